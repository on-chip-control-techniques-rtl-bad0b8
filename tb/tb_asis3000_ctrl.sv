// tb_asis3000_ctrl: closed-loop test of the colour camera control chip on a
// reduced format (96 pixel clocks per line, 61 lines per frame, 40 x 16
// active pixels, coarse exposure up to 28 lines, peak threshold 8 pixels) so
// that hundreds of frames run quickly.
//
// A scene model closes the loop: every active pixel has a reflectance (5 %
// of the pixels are a white highlight, the rest grey 0.15..0.6), the red and
// blue channels see a colour cast, and the signal of a channel is
// reflectance x cast x light x exposure x channel gain. The exposure in the
// model is the integration time ALU value (coarse x 384 + 3 x fine integer),
// which is monotonic even though the reduced line is shorter than 384
// pixel clocks. The comparator outputs presented to the chip are this signal
// against 0.86, 0.93, 1.0 and 1.07.
//
// Phases: normal light with a red cast and weak blue (exposure and colour
// balance settle), very dim light (exposure rises to its maximum, then AGC
// raises the gain), normal light again (gain returns to nominal before the
// exposure drops), then host control over the serial interface (automatic
// functions off, direct exposure and offset writes, read-back, chequer
// board) and the optical registration taps.
// At every frame boundary the monitor checks the switching rules: gain only
// rises while the exposure is at its maximum, exposure only falls while the
// gain is at its nominal value, offsets never move in a frame where the
// exposure judgement acted (Xenab), and exposure moves in the direction the
// judgement asked. Each mechanism is counted; one that never happens is a
// failure.
module tb_asis3000_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;

  localparam int L = 96, LPF = 61, HA = 40, VA = 16;
  localparam int CMAX = 28, FMIN = 3, FMAX = 90, NOM = 80, GMAX = 112;
  localparam time I2C_Q = 400ns;
  localparam real E0 = 4000.0;

  logic clk = 0, rst_n = 0;
  logic scl = 1, sda_m = 1, sda;
  logic sda_oe;
  logic [3:0] g_cmp, r_cmp, b_cmp;
  logic pclk_en, cv, cal, sam, rebit, rst, ss, si, pv, pvb, fst, feoe, foe;
  logic gr_ls, rd_ls, bl_ls, gr_fi, rd_fi, bl_fi, chq;
  logic [6:0] dgr, drd, dbl;
  logic [8:0] exp_coarse, exp_fine;
  judge_t exp_judge, cb_red, cb_blue;
  assign sda = sda_m & !sda_oe;
  always #5 clk = ~clk;

  asis3000_ctrl #(
    .PCLK_PER_LINE(L), .LINES_PER_FRAME(LPF), .H_ACTIVE(HA), .V_ACTIVE(VA), .HSYNC_W(8),
    .COARSE_MAX(CMAX), .FINE_MIN(FMIN), .FINE_MAX(FMAX), .GAIN_NOMINAL(NOM), .GAIN_MAX(GMAX),
    .CB_MIN_COUNT(8)
  ) dut (.*, .sda_in(sda));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  `include "i2c_master.svh"

  // ---------------- scene model ----------------
  real lux = 1.0, cast_r = 1.25, cast_b = 0.8;
  int  idx;
  always @(posedge clk) begin
    if (fst && pclk_en)     idx <= 0;
    else if (pv && pclk_en) idx <= idx + 1;
  end

  function automatic real refl(input int i);
    if (i % 20 == 0) return 1.0;
    return 0.15 + 0.45 * real'((i * 37) % 101) / 100.0;
  endfunction
  function automatic logic [3:0] cmp4(input real s);
    return {s > 1.07, s > 1.0, s > 0.93, s > 0.86};
  endfunction
  real expo;
  always_comb begin
    expo  = real'(int'(exp_coarse) * 384 + 3 * int'(dut.exp_fine7)) / E0;
    g_cmp = cmp4(refl(idx) * lux * expo * real'(dgr) / NOM);
    r_cmp = cmp4(refl(idx) * cast_r * lux * expo * real'(drd) / NOM);
    b_cmp = cmp4(refl(idx) * cast_b * lux * expo * real'(dbl) / NOM);
  end

  // ---------------- frame monitor ----------------
  int frames = 0;
  int n_exp_up = 0, n_exp_dn = 0, n_gain_up = 0, n_gain_dn = 0;
  int n_red_dn = 0, n_blue_up = 0, n_xenab = 0, n_exp_max = 0;
  int p_acc, p_gain, p_roff, p_boff; bit p_at_max, p_valid = 0;
  bit host = 0;   // set while the host writes the exposure
  always @(posedge clk) if (rst_n && foe && pclk_en) begin
    int acc, g, ro, bo;
    acc = int'(dut.u_ita.acc); g = int'(dgr);
    ro = int'(dut.roff); bo = int'(dut.boff);
    if (p_valid) begin
      // exp_judge here is the decision that drove the updates since the last frame
      if (acc > p_acc && !host) begin
        n_exp_up++;
        check(exp_judge.en && !exp_judge.down, $sformatf("frame %0d: exposure rose without request", frames));
      end
      if (acc < p_acc) begin
        n_exp_dn++;
        check(p_gain <= NOM, $sformatf("frame %0d: exposure fell while gain %0d above nominal", frames, p_gain));
      end
      if (g > p_gain && !dut.u_sif.gain_wr) begin
        n_gain_up++;
        check(p_at_max, $sformatf("frame %0d: gain rose before exposure reached maximum", frames));
      end
      if (g < p_gain) n_gain_dn++;
      if (ro != p_roff || bo != p_boff)
        check(!exp_judge.en || !dut.cbe, $sformatf("frame %0d: offset moved while exposure acted", frames));
      if (ro < p_roff) n_red_dn++;
      if (bo > p_boff) n_blue_up++;
      if (exp_judge.en && (cb_red.en || cb_blue.en)) n_xenab++;
      if (dut.exp_at_max) n_exp_max++;
    end
    p_acc = acc; p_gain = g; p_roff = ro; p_boff = bo; p_at_max = dut.exp_at_max; p_valid = 1;
    frames++;
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

  // registration: history of the LS input on pixel clocks
  logic [15:0] ls_hist;
  always @(posedge clk) if (pclk_en) ls_hist <= {ls_hist[14:0], dut.ls};

  initial begin
    logic [15:0] w; bit ok; real rr, rb;
    int n_reg = 0;
    #100ns rst_n = 1;
    // ---- phase 1: normal light, colour cast ----
    wait_frames(120);
    rr = real'(drd) * cast_r / real'(dgr); rb = real'(dbl) * cast_b / real'(dgr);
    $display("phase 1: exposure %0d/%0d gain %0d red %0d blue %0d (balance %f %f)", exp_coarse, exp_fine, dgr, drd, dbl, rr, rb);
    check(dut.roff < 0 && dut.boff > 0, "colour balance direction");
    check(rr > 0.88 && rr < 1.12 && rb > 0.88 && rb < 1.12, "colour balance reached");
    check(dgr == NOM, "gain nominal in good light");
    // ---- phase 2: very dim light ----
    lux = 0.01;
    wait_frames(120);
    $display("phase 2: exposure %0d/%0d gain %0d", exp_coarse, exp_fine, dgr);
    check(dut.exp_at_max && dgr > NOM, "AGC raised gain at maximum exposure");
    // ---- phase 3: normal light ----
    lux = 1.0;
    wait_frames(120);
    $display("phase 3: exposure %0d/%0d gain %0d", exp_coarse, exp_fine, dgr);
    check(dgr == NOM && !dut.exp_at_max, "back to nominal gain and AEC");
    // ---- phase 4: host control ----
    host = 1;
    i2c_write({4'b0001, 12'h024}, ok);            // AGC on, chequer board, AEC and AWC off
    check(ok, "set-up write acknowledged");
    check(chq && !dut.aec_on && !dut.cbe, "set-up bits");
    i2c_write({4'b0010, 9'd10, 3'd2}, ok);        // exposure 10 lines, fine bits 2
    wait_frames(1);
    check(exp_coarse == 10 && exp_fine == 9'd90, $sformatf("written exposure %0d/%0d", exp_coarse, exp_fine));
    i2c_write({4'b0100, 4'd0, 1'b1, 7'd5}, ok);   // red offset -5
    i2c_write({4'b0101, 4'd0, 1'b0, 7'd9}, ok);   // blue offset +9
    lux = 3.0;                                    // would drive AEC down if it were on
    wait_frames(4);
    check(exp_coarse == 10, "exposure held with AEC off");
    check(int'(drd) == int'(dgr) - 5 && int'(dbl) == int'(dgr) + 9,
          $sformatf("written offsets: gain %0d red %0d blue %0d", dgr, drd, dbl));
    i2c_read(w, ok);
    check(ok && w == {4'b0101, 4'd0, 8'd9}, $sformatf("read blue offset %h", w));
    i2c_write({4'b0010, 9'd10, 3'd2}, ok);
    i2c_read(w, ok);
    check(ok && w == {4'b0010, 9'd10, 3'd2}, $sformatf("read exposure %h", w));
    // ---- optical registration taps ----
    i2c_write({4'b0110, 4'd0, 4'd11, 4'd3}, ok);       // blue tap 11, red tap 3, green 7
    repeat (2000) @(posedge clk);
    repeat (3000) begin
      @(negedge clk);
      if (pclk_en) begin
        check(gr_ls == ls_hist[7] && rd_ls == ls_hist[3] && bl_ls == ls_hist[11],
              $sformatf("registration taps %b%b%b hist %b cx %h", gr_ls, rd_ls, bl_ls, ls_hist, dut.cx));
        n_reg++;
      end
    end
    // ---- mechanisms ----
    $display("frames %0d exp up %0d down %0d gain up %0d down %0d red down %0d blue up %0d xenab %0d at max %0d",
             frames, n_exp_up, n_exp_dn, n_gain_up, n_gain_dn, n_red_dn, n_blue_up, n_xenab, n_exp_max);
    check(n_exp_up > 0, "exposure increase never happened");
    check(n_exp_dn > 0, "exposure decrease never happened");
    check(n_gain_up > 0, "AGC gain increase never happened");
    check(n_gain_dn > 0, "AGC gain decrease never happened");
    check(n_red_dn > 0, "red offset decrease never happened");
    check(n_blue_up > 0, "blue offset increase never happened");
    check(n_xenab > 0, "exposure priority (Xenab) never exercised");
    check(n_exp_max > 0, "maximum exposure never reached");
    check(n_reg > 0, "registration never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
