// tb_cb_judge: exhaustive check of the colour balance judgement over all
// 5^5 combinations of the five peak bands, against an independent model of
// the two-step comparison (highlight peak first, whole-image peak second).
module tb_cb_judge;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0;
  band_t gpw, rpg, bpg, rpw, bpw;
  judge_t jr, jb; logic no_action;
  int checks = 0, failures = 0;
  int actions = 0;
  always #5 clk = ~clk;

  cb_judge dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic judge_t model(input int g, input int pg, input int pw);
    judge_t r;
    r.en = 0; r.down = 0;
    if (pg > g) begin r.en = 1; r.down = 1; end
    else if (pw < g) begin r.en = 1; r.down = 0; end
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_reset: begin
      checks++;
      if (jr.en || jb.en || !no_action) begin failures++; $display("FAIL reset"); end
    end
    for (int v = 0; v < 3125; v++) begin
      int x, a[5];
      judge_t er, eb;
      x = v;
      for (int k = 0; k < 5; k++) begin a[k] = x % 5; x = x / 5; end
      {gpw, rpg, bpg, rpw, bpw} = {band_t'(a[0]), band_t'(a[1]), band_t'(a[2]), band_t'(a[3]), band_t'(a[4])};
      ld = 1; @(negedge clk); ld = 0;
      er = model(a[0], a[1], a[3]);
      eb = model(a[0], a[2], a[4]);
      checks++;
      if (jr.en !== er.en || (er.en && jr.down !== er.down) ||
          jb.en !== eb.en || (eb.en && jb.down !== eb.down) ||
          no_action !== !(er.en || eb.en)) begin
        failures++;
        $display("FAIL G=%0d Rpg=%0d Bpg=%0d Rpw=%0d Bpw=%0d", a[0], a[1], a[2], a[3], a[4]);
      end
      if (er.en) actions++;
    end
    // the last vector (all bands 4) gives no action; without ld the
    // registered result must hold even though the inputs now call for one
    gpw = 0; rpg = 4; @(negedge clk);
    checks++;
    if (jr.en !== 1'b0 || actions == 0) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
