// tb_csla_bec: exhaustive self-check of the BEC carry select group at its
// default width (2 bits) and at 4 bits: {co, s} must equal a + b + ci.
// It also counts how often each carry-in case (the ripple adder's own
// result, and the BEC's result) was selected.
module tb_csla_bec;
  logic [1:0] a2, b2, s2;
  logic [3:0] a4, b4, s4;
  logic       ci, co2, co4;
  int checks = 0, failures = 0;

  csla_bec dut2 (.a(a2), .b(b2), .ci(ci), .s(s2), .co(co2));
  csla_bec #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .ci(ci), .s(s4), .co(co4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 16; va++) begin
      for (int vb = 0; vb < 16; vb++) begin
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(va); b4 = 4'(vb); a2 = 2'(va); b2 = 2'(vb); ci = c[0];
          #1;
          checks++;
          if (int'({co4, s4}) != va + vb + c) begin
            failures++;
            $display("FAIL w4 %0d+%0d+%0d got %0d", va, vb, c, {co4, s4});
          end
          checks++;
          if (int'({co2, s2}) != (va & 3) + (vb & 3) + c) begin
            failures++;
            $display("FAIL w2 %0d+%0d+%0d got %0d", va & 3, vb & 3, c, {co2, s2});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
