// tb_bec: exhaustive self-check of the binary to excess-1 converter at its
// default width (3 bits) and at 5 bits: x must equal b + 1 modulo 2^WIDTH.
module tb_bec;
  logic [2:0] b3, x3;
  logic [4:0] b5, x5;
  int checks = 0, failures = 0;

  bec dut3 (.b(b3), .x(x3));
  bec #(.WIDTH(5)) dut5 (.b(b5), .x(x5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v);
      b3 = 3'(v);
      #1;
      checks++;
      if (int'(x5) != ((v + 1) % 32)) begin
        failures++;
        $display("FAIL w5 b=%0d x=%0d", v, x5);
      end
      checks++;
      if (int'(x3) != (((v % 8) + 1) % 8)) begin
        failures++;
        $display("FAIL w3 b=%0d x=%0d", v % 8, x3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
