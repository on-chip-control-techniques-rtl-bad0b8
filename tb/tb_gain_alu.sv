// tb_gain_alu: checks the common gain counter: reset to the nominal value,
// +/-1 per enabled update, stop at GAIN_MAX (112 colour, 120 monochrome) and
// at the nominal value going down, behaviour while AGC is off (hold, or
// reload of the nominal on the monochrome variant), a rewritten nominal register, and the external write.
module tb_gain_alu;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic upd = 0, en = 0, down = 0, agc_on = 1, nom_wr = 0, wr = 0;
  logic [6:0] nom_data = 0, wr_data = 0;
  logic [6:0] gain, nominal, mgain, mnom; logic at_nom, m_at_nom;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gain_alu dut (.clk, .rst_n, .upd, .en, .down, .agc_on, .nom_wr, .nom_data, .wr, .wr_data,
                .gain, .nominal, .at_nom);
  gain_alu #(.NOMINAL(24), .GAIN_MAX(120), .OFF_TO_NOMINAL(1'b1)) dut_m (.clk, .rst_n, .upd, .en, .down, .agc_on,
                .nom_wr(1'b0), .nom_data, .wr(1'b0), .wr_data, .gain(mgain), .nominal(mnom), .at_nom(m_at_nom));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit e, input bit dn);
    @(negedge clk); en = e; down = dn; upd = 1;
    @(negedge clk); upd = 0; en = 0;
  endtask

  initial begin
    int exp_g;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(gain == 80 && nominal == 80 && at_nom, "colour reset to nominal 80");
    check(mgain == 24 && m_at_nom, "mono reset to nominal 24");
    step(0, 0);
    check(gain == 80, "moved without enable");
    exp_g = 80;
    for (int i = 0; i < 60; i++) begin
      step(1, 0);
      exp_g = (exp_g < 112) ? exp_g + 1 : 112;
      check(gain == 7'(exp_g), $sformatf("up: gain %0d expected %0d", gain, exp_g));
    end
    check(mgain == 84, $sformatf("mono after 60 ups %0d", mgain));
    for (int i = 0; i < 40; i++) step(1, 0);
    check(mgain == 120, $sformatf("mono max %0d", mgain));
    for (int i = 0; i < 40; i++) begin
      step(1, 1);
      exp_g = (exp_g > 80) ? exp_g - 1 : 80;
      check(gain == 7'(exp_g), $sformatf("down: gain %0d expected %0d", gain, exp_g));
    end
    check(at_nom, "at_nom after return");
    // AGC off: the colour counter keeps its value, the monochrome one
    // returns to its nominal value; neither counts
    repeat (5) step(1, 0);
    check(gain == 85 && mgain > 24, $sformatf("before AGC off %0d %0d", gain, mgain));
    agc_on = 0;
    step(0, 0);
    check(gain == 85, "AGC off did not hold the gain");
    check(mgain == 24, "AGC off did not reload the pad nominal");
    step(1, 0);
    check(gain == 85 && mgain == 24, "AGC off still counts");
    @(negedge clk); wr = 1; wr_data = 7'd70; @(negedge clk); wr = 0;
    step(1, 1);
    check(gain == 70, "written gain with AGC off not kept");
    agc_on = 1;
    step(0, 0);
    check(gain == 80, "AGC on did not restore the nominal floor");
    agc_on = 1;
    // new nominal
    @(negedge clk); nom_wr = 1; nom_data = 7'd50; @(negedge clk); nom_wr = 0;
    step(0, 0);
    check(nominal == 50 && gain == 80, "nominal write");
    repeat (40) step(1, 1);
    check(gain == 50, $sformatf("down to new nominal %0d", gain));
    @(negedge clk); wr = 1; wr_data = 7'd99; @(negedge clk); wr = 0;
    check(gain == 99, "external write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
