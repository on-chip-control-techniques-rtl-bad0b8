// tb_asis1011_ctrl: closed-loop test of the monochrome camera control chip on
// a reduced format (96 pixel clocks per line, 61 lines per frame, 40 x 16
// active pixels, 19 array rows, coarse exposure up to 28 lines).
//
// A scene model closes the loop: 3 % of the pixels are a white highlight,
// the rest grey 0.15..0.6; the pixel signal is reflectance x light x exposure
// x gain / nominal gain, with the exposure taken as the integration time ALU
// value (coarse x 384 + 3 x fine integer). The very-white comparator (CPO)
// fires above 1.0 and the very-black one (VBP) below 0.1.
//
// Phases: normal light (AEC settles), very dim light (maximum exposure, then
// AGC raises the gain), normal light (gain back to nominal first), HLD = 0
// freezing the exposure, MAX = 1 forcing the longest exposure, AGC = 0 with
// new GS pad settings (gain follows the pads), and ITS selecting the narrow
// or wide white threshold with a scene whose white fraction lies between
// them. The row word lines are checked throughout: never more than one row
// sampled at a time, no row both reset and sampled. Each mechanism is
// counted; one that never happens is a failure.
module tb_asis1011_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;

  localparam int L = 96, LPF = 61, HA = 40, VA = 16, NR = VA + 3;
  localparam int CMAX = 28;
  localparam real E0 = 4000.0;

  logic clk = 0, rst_n = 0;
  logic cpo, vbp, hld = 1, agc = 1, its = 0, max = 0;
  logic [2:0] gs = 3'b001;
  logic pclk_en, cv, cal, sam, rebit, ls, fi, rst, ss, si, pv, pvb, fst, foe;
  logic [6:0] gb_n;
  logic [NR-1:0] word_sample, word_reset;
  logic [8:0] exp_coarse, exp_fine;
  judge_t exp_judge;
  always #5 clk = ~clk;

  asis1011_ctrl #(
    .PCLK_PER_LINE(L), .LINES_PER_FRAME(LPF), .H_ACTIVE(HA), .V_ACTIVE(VA), .HSYNC_W(8),
    .COARSE_MAX(CMAX), .FINE_MIN(3), .FINE_MAX(90), .GAIN_MAX(120), .N_ROWS(NR)
  ) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- scene model ----------------
  real lux = 1.0, hl = 1.0;
  int  idx;
  always @(posedge clk) begin
    if (fst && pclk_en)     idx <= 0;
    else if (pv && pclk_en) idx <= idx + 1;
  end
  function automatic real refl(input int i);
    if (i % 33 == 0) return hl;
    return 0.15 + 0.45 * real'((i * 37) % 101) / 100.0;
  endfunction
  real v;
  logic [6:0] gain;
  assign gain = ~gb_n;
  always_comb begin
    v   = refl(idx) * lux * real'(int'(dut.u_ita.acc[19:4]) * 3) / E0 * real'(gain) / 24.0;
    cpo = v > 1.0;
    vbp = v < 0.1;
  end

  // ---------------- monitors ----------------
  int frames = 0;
  int n_exp_up = 0, n_exp_dn = 0, n_gain_up = 0, n_gain_dn = 0, n_row_samples = 0;
  int p_acc, p_gain; bit p_at_max, p_valid = 0, free_run = 1;
  always @(posedge clk) if (rst_n && foe && pclk_en) begin
    int acc, g;
    acc = int'(dut.u_ita.acc); g = int'(gain);
    if (p_valid && free_run) begin
      if (acc > p_acc) begin
        n_exp_up++;
        check(exp_judge.en && !exp_judge.down, $sformatf("frame %0d: exposure rose without request", frames));
      end
      if (acc < p_acc) begin
        n_exp_dn++;
        check(p_gain <= 24, $sformatf("frame %0d: exposure fell with gain %0d above nominal", frames, p_gain));
      end
      if (g > p_gain) begin
        n_gain_up++;
        check(p_at_max, $sformatf("frame %0d: gain rose before maximum exposure", frames));
      end
      if (g < p_gain) n_gain_dn++;
    end
    p_acc = acc; p_gain = g; p_at_max = dut.exp_at_max; p_valid = 1;
    frames++;
  end
  always @(negedge clk) if (rst_n) begin
    if ($countones(word_sample) > 1 || (word_sample & word_reset) != '0) begin
      checks++; failures++; $display("FAIL: word lines %b / %b", word_sample, word_reset);
    end
    if (word_sample != '0 && pclk_en) n_row_samples++;
  end

  task automatic wait_frames(input int n);
    int f0 = frames;
    wait (frames >= f0 + n);
  endtask

  initial begin
    #200ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] held;
    int ns;
    #100ns rst_n = 1;
    // ---- normal light ----
    wait_frames(100);
    $display("normal: exposure %0d/%0d gain %0d", exp_coarse, exp_fine, gain);
    check(!dut.exp_at_max && gain == 24, "AEC settled in normal light");
    // ---- very dim ----
    lux = 0.003;
    wait_frames(130);
    $display("dim: exposure %0d/%0d gain %0d", exp_coarse, exp_fine, gain);
    check(dut.exp_at_max && gain > 24, "AGC active at maximum exposure");
    // ---- normal again ----
    lux = 1.0;
    wait_frames(130);
    $display("normal: exposure %0d/%0d gain %0d", exp_coarse, exp_fine, gain);
    check(!dut.exp_at_max && gain == 24, "back to AEC");
    free_run = 0;
    // ---- HLD = 0 freezes ----
    hld = 0; held = dut.u_ita.acc;
    lux = 4.0;
    wait_frames(5);
    check(dut.u_ita.acc == held, "HLD = 0 did not freeze the exposure");
    // ---- MAX forces maximum exposure ----
    max = 1; wait_frames(1);
    check(exp_coarse == CMAX && exp_fine == 90, "MAX did not force the longest exposure");
    max = 0;
    // ---- AGC off, pads set the gain ----
    agc = 0; gs = 3'b010; lux = 0.003;
    wait_frames(3);
    check(gain == 7'd40, $sformatf("AGC off: gain %0d, pads ask 40", gain));
    gs = 3'b001; wait_frames(2);
    check(gain == 7'd24, "pad nominal 24");
    // ---- ITS: 3 % white pixels, between the 2 % and 4 % thresholds ----
    // with the exposure frozen, set the light so that only the highlight is white
    lux = 1.3 / (real'(int'(dut.u_ita.acc[19:4]) * 3) / E0);
    its = 1; wait_frames(2);
    check(exp_judge.en && exp_judge.down, "ITS = 1 (narrow gap) should call too bright");
    its = 0; wait_frames(2);
    check(!exp_judge.en, "ITS = 0 (wide gap) should accept 3 % white");
    ns = n_row_samples;
    $display("frames %0d exp up %0d down %0d gain up %0d down %0d row samples %0d",
             frames, n_exp_up, n_exp_dn, n_gain_up, n_gain_dn, ns);
    check(n_exp_up > 0, "exposure increase never happened");
    check(n_exp_dn > 0, "exposure decrease never happened");
    check(n_gain_up > 0, "AGC gain increase never happened");
    check(n_gain_dn > 0, "AGC gain decrease never happened");
    check(ns > 0, "row sampling never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
