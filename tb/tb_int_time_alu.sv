// tb_int_time_alu: checks the integration time ALU with the colour limits
// (defaults) and with the monochrome limits. Each update must change the
// integration time (coarse x 384 + fine pixel clocks) by about 1/16 (checked
// to lie between 5.5 % and 7 % while no limit is hit), the fine output must
// be three times the fine integer and inside its range, long runs of
// increases must saturate at the maximum (coarse limit, at_max set) and long
// runs of decreases at the minimum. Also checks the hold (en = 0), the
// external write and force_max.
module tb_int_time_alu;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic upd = 0, en = 0, down = 0, wr = 0, fmax = 0;
  logic [8:0] wr_coarse = 0; logic [6:0] wr_fine7 = 0;
  logic [8:0] c_co, c_fi, m_co, m_fi; logic [6:0] c_f7, m_f7; logic c_max, m_max;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  int_time_alu dut_c (.clk, .rst_n, .upd, .en, .down, .wr, .wr_coarse, .wr_fine7,
                      .force_max(fmax), .exp_coarse(c_co), .exp_fine(c_fi), .fine7(c_f7), .at_max(c_max));
  int_time_alu #(.COARSE_MAX(310), .FINE_MIN(3), .FINE_MAX(376)) dut_m (
                      .clk, .rst_n, .upd, .en, .down, .wr, .wr_coarse, .wr_fine7,
                      .force_max(fmax), .exp_coarse(m_co), .exp_fine(m_fi), .fine7(m_f7), .at_max(m_max));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real t_int(input logic [8:0] co, input logic [6:0] f7);
    return real'(co) * 384.0 + real'(f7) * 3.0;
  endfunction

  task automatic step(input bit dn);
    @(negedge clk); down = dn; en = 1; upd = 1;
    @(negedge clk); upd = 0; en = 0;
  endtask

  initial begin
    real t0, t1, ratio;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(c_co == 64 && m_co == 64, "reset value");
    // hold
    @(negedge clk); down = 0; en = 0; upd = 1; @(negedge clk); upd = 0;
    check(c_co == 64 && c_f7 == 0, "changed without enable");
    // decreases: 6.25 % steps down to the minimum
    for (int i = 0; i < 200; i++) begin
      t0 = t_int(c_co, c_f7);
      step(1);
      t1 = t_int(c_co, c_f7);
      ratio = t1 / t0;
      if (t0 > 3000.0) check(ratio > 0.93 && ratio < 0.945, $sformatf("down step ratio %f", ratio));
      check(c_fi >= 37 && c_fi <= 356, $sformatf("fine %0d out of range", c_fi));
      check(m_fi >= 3 && m_fi <= 376, $sformatf("mono fine %0d out of range", m_fi));
      check(c_fi == ((c_f7 * 3 < 37) ? 37 : (c_f7 * 3 > 356 ? 356 : c_f7 * 3)), "fine is not 3 x fine integer");
    end
    check(c_co == 0 && c_fi == 39 && c_f7 == 13, $sformatf("colour minimum coarse %0d fine %0d", c_co, c_fi));
    check(m_co == 0 && m_fi == 3, $sformatf("mono minimum coarse %0d fine %0d", m_co, m_fi));
    // increases up to the maximum
    for (int i = 0; i < 400; i++) begin
      t0 = t_int(c_co, c_f7);
      step(0);
      t1 = t_int(c_co, c_f7);
      ratio = t1 / t0;
      if (!c_max && t0 > 3000.0) check(ratio > 1.055 && ratio < 1.07, $sformatf("up step ratio %f", ratio));
      check(c_co <= 260 && m_co <= 310, "coarse over its limit");
    end
    check(c_max && c_co == 260 && c_fi == 356, $sformatf("colour maximum coarse %0d fine %0d", c_co, c_fi));
    check(m_max && m_co == 310 && m_fi == 376, $sformatf("mono maximum coarse %0d fine %0d", m_co, m_fi));
    // range: longest / shortest integration, in pixel clocks
    check(real'(310 * 384 + 376) / 3.0 > 39000.0, "mono range below 40,000:1");
    // write
    @(negedge clk); wr = 1; wr_coarse = 9'd100; wr_fine7 = 7'd40; @(negedge clk); wr = 0;
    check(c_co == 100 && c_fi == 120, $sformatf("write gave %0d/%0d", c_co, c_fi));
    step(1);   // (100*2048 + 40*16) * 15/16 = 192600 = 94*2048 + 5*16 + 8
    check(c_co == 94 && c_f7 == 5, $sformatf("t1 write and step %0d/%0d", c_co, c_f7));
    @(negedge clk); fmax = 1; @(negedge clk); fmax = 0;
    check(c_max && m_max, "force_max");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
