// tb_col_exp_judge: feeds fields of a 1000-pixel image (thresholds: N1 over
// 20 pixels, N2 at least 10) and checks the judgement loaded at the end of
// the field: too many very bright colour pixels -> decrease, too few well
// exposed -> increase, otherwise hold. A colour pixel counts when any of its
// three primaries passes the comparator. The counts straddle the thresholds.
module tb_col_exp_judge;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  localparam int P = 1000;
  logic clk = 0, rst_n = 0;
  logic pv = 0, fs = 0, foe = 0;
  logic [2:0] vb = 0, we = 0;
  judge_t j; logic f1, f2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  col_exp_judge #(.PIXELS(P)) dut (.clk, .rst_n, .pv, .fs, .foe, .vb, .we, .j, .n1_flag(f1), .n2_flag(f2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one field with nb very bright pixels and nw well-exposed-only pixels
  task automatic field(input int nb, input int nw);
    int k;
    @(negedge clk); fs = 1; @(negedge clk); fs = 0;
    for (int i = 0; i < P; i++) begin
      k = $urandom_range(0, 2);
      vb = 0; we = 0;
      if (i < nb) begin vb[k] = 1; we = 3'b111; end              // bright pixel passes both
      else if (i < nb + nw) we[k] = 1;
      else if ((i % 7) == 0) we = 0;
      pv = 1;
      @(negedge clk);
      if (i % 3 == 2) begin pv = 0; @(negedge clk); end            // idle clock: not counted
    end
    pv = 0; vb = 0; we = 0;
    @(negedge clk); foe = 1; @(negedge clk); foe = 0;
  endtask

  task automatic expect_j(input int nb, input int nw, input bit e, input bit d);
    field(nb, nw);
    check(j.en == e && (!e || j.down == d),
          $sformatf("N1=%0d N2=%0d: en=%b down=%b expected %b %b", nb, nb + nw, j.en, j.down, e, d));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_j(0, 0, 1, 0);      // dark: increase
    expect_j(0, 9, 1, 0);      // 9 well exposed < 10
    expect_j(0, 10, 0, 0);     // 10 well exposed: hold
    expect_j(20, 0, 0, 0);     // 20 bright (also well exposed): hold
    expect_j(21, 0, 1, 1);     // 21 bright: decrease
    expect_j(300, 100, 1, 1);
    expect_j(5, 50, 0, 0);
    expect_j(2, 7, 1, 0);      // 9 well exposed in all
    // field start clears the flags
    @(negedge clk); fs = 1; @(negedge clk); fs = 0;
    check(!f1 && !f2, "flags not cleared by field start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
