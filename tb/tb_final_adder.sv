// tb_final_adder: exhaustive self-check of the split final adder at its
// default split (2-bit ripple group, 2-bit BEC carry select group) over all
// 256 pairs of 4-bit rows: sum must equal x + y. Counts the pairs in which
// the low group's carry picked the BEC result, and fails if either choice
// of the carry select group never occurred.
module tb_final_adder;
  logic [3:0] x, y;
  logic [4:0] sum;
  int checks = 0, failures = 0;
  int sel_bec = 0, sel_rca = 0;

  final_adder dut (.x(x), .y(y), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vx = 0; vx < 16; vx++) begin
      for (int vy = 0; vy < 16; vy++) begin
        x = 4'(vx);
        y = 4'(vy);
        #1;
        checks++;
        if (int'(sum) != vx + vy) begin
          failures++;
          $display("FAIL %0d+%0d got %0d", vx, vy, sum);
        end
        if ((vx & 3) + (vy & 3) > 3) sel_bec++;
        else                         sel_rca++;
      end
    end
    $display("carry select: BEC result %0d times, ripple result %0d times", sel_bec, sel_rca);
    checks++;
    if (sel_bec == 0 || sel_rca == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
