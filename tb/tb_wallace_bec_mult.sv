// tb_wallace_bec_mult: end-to-end self-check of the 4x4 Wallace tree
// multiplier with the BEC carry select final adder, at its default size.
// All 256 operand pairs are applied, then 256 random pairs; each product is
// compared with a * b computed in the testbench. The testbench also counts,
// from the operands alone, how often the final adder's low group produces a
// carry, so that the BEC path of the carry select group is used, how often
// it does not, and how often the final adder has a carry out; any of these
// never happening is a failure. For that count it rebuilds the two rows the
// Wallace tree hands to the final adder with its own bit-level model of the
// tree (counters written as integer sums).
module tb_wallace_bec_mult;
  import wallace_pkg::*;
  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;
  int sel_bec = 0, sel_rca = 0, carry_out = 0;

  wallace_bec_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bit_of(input int v, input int k);
    return (v >> k) & 1;
  endfunction

  // Reference two-stage Wallace tree: returns the rows of weight 3..6.
  task automatic ref_rows(input int va, input int vb, output int rx, output int ry);
    int pp[4][4];
    int t, s1_2, c1_1, s1_3, c1_2, s1_4, c1_3, c1_4;
    int s2_3, c2_2, c2_3, s2_4, c2_4, s2_5, c2_5;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = bit_of(va, j) & bit_of(vb, i);
    // stage 1
    c1_1 = (pp[0][1] + pp[1][0]) >> 1;
    t = pp[0][2] + pp[1][1] + pp[2][0];  s1_2 = t & 1; c1_2 = t >> 1;
    t = pp[0][3] + pp[1][2] + pp[2][1];  s1_3 = t & 1; c1_3 = t >> 1;
    t = pp[1][3] + pp[2][2];             s1_4 = t & 1; c1_4 = t >> 1;
    // stage 2
    c2_2 = (s1_2 + c1_1) >> 1;
    t = s1_3 + c1_2 + pp[3][0];          s2_3 = t & 1; c2_3 = t >> 1;
    t = s1_4 + c1_3 + pp[3][1];          s2_4 = t & 1; c2_4 = t >> 1;
    t = pp[2][3] + c1_4 + pp[3][2];      s2_5 = t & 1; c2_5 = t >> 1;
    rx = s2_3 + 2 * s2_4 + 4 * s2_5 + 8 * pp[3][3];
    ry = c2_2 + 2 * c2_3 + 4 * c2_4 + 8 * c2_5;
  endtask

  task automatic apply(input int va, input int vb);
    int lo, rx, ry;
    a = OPERAND_W'(va);
    b = OPERAND_W'(vb);
    #1;
    checks++;
    if (int'(p) != va * vb) begin
      failures++;
      $display("FAIL %0d * %0d got %0d", va, vb, p);
    end
    ref_rows(va, vb, rx, ry);
    checks++;
    if (int'(p) != ((rx + ry) << FINAL_LSB) + (va * vb) % (1 << FINAL_LSB)) begin
      failures++;
      $display("FAIL %0d * %0d tree model disagrees", va, vb);
    end
    // Carry out of group 1 (weights 3..4) of the final adder.
    lo = (rx % (1 << LOW_W)) + (ry % (1 << LOW_W));
    if ((lo >> LOW_W) != 0) sel_bec++;
    else                    sel_rca++;
    if (((rx + ry) >> ROW_W) != 0) carry_out++;
  endtask

  initial begin
    for (int va = 0; va < 16; va++)
      for (int vb = 0; vb < 16; vb++)
        apply(va, vb);
    for (int k = 0; k < 256; k++)
      apply(int'($urandom_range(15)), int'($urandom_range(15)));
    $display("carry select: BEC result %0d, ripple result %0d, final carry out %0d",
             sel_bec, sel_rca, carry_out);
    checks++;
    if (sel_bec == 0 || sel_rca == 0 || carry_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
