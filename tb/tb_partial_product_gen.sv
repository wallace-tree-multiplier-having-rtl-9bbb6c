// tb_partial_product_gen: exhaustive self-check of the 4x4 AND array.
// For every operand pair it checks each partial-product bit and also that
// the weighted sum of all bits equals a * b.
module tb_partial_product_gen;
  localparam int N = 4;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << N); va++) begin
      for (int vb = 0; vb < (1 << N); vb++) begin
        int acc;
        a = N'(va);
        b = N'(vb);
        #1;
        acc = 0;
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) begin
            checks++;
            if (pp[i][j] !== (((va >> j) & 1) == 1 && ((vb >> i) & 1) == 1)) begin
              failures++;
              $display("FAIL a=%0d b=%0d pp[%0d][%0d]=%0b", va, vb, i, j, pp[i][j]);
            end
            acc += int'(pp[i][j]) << (i + j);
          end
        end
        checks++;
        if (acc != va * vb) begin
          failures++;
          $display("FAIL a=%0d b=%0d weighted sum %0d", va, vb, acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
