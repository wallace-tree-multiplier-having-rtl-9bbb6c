// tb_wallace_reduction: exhaustive self-check of the 4x4 Wallace tree.
// The partial products are formed in the testbench for all 256 operand
// pairs. The tree's outputs must keep the value: p_low + (row_x + row_y) * 8
// equals a * b, and p_low must already equal the low 3 product bits.
module tb_wallace_reduction;
  import wallace_pkg::*;
  pp_matrix_t       pp;
  logic [FINAL_LSB-1:0] p_low;
  row_t             row_x, row_y;
  int checks = 0, failures = 0;

  wallace_reduction dut (.pp(pp), .p_low(p_low), .row_x(row_x), .row_y(row_y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        int prod, total;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            pp[i][j] = ((va >> j) & 1) == 1 && ((vb >> i) & 1) == 1;
        #1;
        prod  = va * vb;
        total = int'(p_low) + ((int'(row_x) + int'(row_y)) << FINAL_LSB);
        checks++;
        if (total != prod) begin
          failures++;
          $display("FAIL a=%0d b=%0d total %0d", va, vb, total);
        end
        checks++;
        if (int'(p_low) != (prod & 7)) begin
          failures++;
          $display("FAIL a=%0d b=%0d p_low %0d", va, vb, p_low);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
