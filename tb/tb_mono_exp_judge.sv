// tb_mono_exp_judge: feeds fields of a 1000-pixel image to the monochrome
// judgement (thresholds w1 = 5, w2 = 20, w3 = 40 very white pixels,
// b1 = 100, b2 = 200 very black pixels) and checks the decision for both
// settings of ITS around every threshold.
module tb_mono_exp_judge;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  localparam int P = 1000;
  logic clk = 0, rst_n = 0;
  logic pv = 0, fs = 0, foe = 0, vwp = 0, vbp = 0, its = 0;
  judge_t j;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mono_exp_judge #(.PIXELS(P)) dut (.clk, .rst_n, .pv, .fs, .foe, .vwp, .vbp, .its, .j);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic field(input int nw, input int nb);
    @(negedge clk); fs = 1; @(negedge clk); fs = 0;
    for (int i = 0; i < P; i++) begin
      vwp = (i < nw); vbp = (i >= P - nb);
      pv = 1; @(negedge clk);
      if (i % 4 == 0) begin pv = 0; @(negedge clk); end
    end
    pv = 0; vwp = 0; vbp = 0;
    @(negedge clk); foe = 1; @(negedge clk); foe = 0;
  endtask

  // independent model of the decision
  task automatic run(input int nw, input int nb, input bit s);
    bit bright, dark;
    its = s;
    field(nw, nb);
    bright = s ? (nw > 20) : (nw > 40);
    dark   = (nw <= 5) && (s ? (nb > 100) : (nb > 200));
    check(j.en == (bright || dark) && (!j.en || j.down == bright),
          $sformatf("its=%0d W=%0d B=%0d: en=%b down=%b", s, nw, nb, j.en, j.down));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      run(0, 0, s[0]);   run(0, 100, s[0]); run(0, 101, s[0]); run(0, 200, s[0]);
      run(0, 201, s[0]); run(5, 300, s[0]); run(6, 300, s[0]); run(20, 0, s[0]);
      run(21, 0, s[0]);  run(40, 0, s[0]);  run(41, 0, s[0]);  run(100, 500, s[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
