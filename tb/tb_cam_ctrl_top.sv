// tb_cam_ctrl_top: end-to-end run of both camera control chips at their full
// formats and clocks, with no parameter changes: the colour chip at
// 14.31818 MHz (NTSC, 525 lines, 364 pixel clocks per line, 305 x 240
// pixels) and the monochrome chip at 12 MHz (625 lines, 384 pixel clocks per
// line, 312 x 287 pixels, 290 array rows).
//
// Each chip sees a scene model: reflectance x light x exposure x gain, with
// the exposure taken as the integration time ALU value (coarse x 384 +
// 3 x fine integer). The colour scene has 5 % white highlight pixels and a
// red cast (x1.25) with weak blue (x0.8); its comparators switch at 0.86,
// 0.93, 1.0 and 1.07. The monochrome scene has 3 % white pixels; CPO fires
// above 1.0 and VBP below 0.1.
//
// Sequence (both chips run at the same time): normal light, dim light,
// normal light; then on the colour chip host writes and reads over the
// serial interface and the registration taps, on the monochrome chip HLD.
// Checks: lines per frame from the CV count, the switching rules at every
// frame (gain rises only at maximum exposure, exposure falls only at nominal
// gain, offsets never move while the exposure judgement acts), colour
// balance reached, AGC and return, serial access, one row sampled at a time.
// Every mechanism is counted and one that never happens is a failure.
module tb_cam_ctrl_top;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;

  localparam time I2C_Q = 2us;
  localparam real CE0 = 30000.0, ME0 = 30000.0;

  // ---------------- colour chip ----------------
  logic c_clk = 0, c_rst_n = 0, scl = 1, sda_m = 1, sda;
  logic c_sda_oe;
  logic [3:0] c_g_cmp, c_r_cmp, c_b_cmp;
  logic c_pclk_en, c_cv, c_cal, c_sam, c_rebit, c_rst, c_ss, c_si, c_pv, c_pvb, c_fst, c_feoe, c_foe;
  logic c_gr_ls, c_rd_ls, c_bl_ls, c_gr_fi, c_rd_fi, c_bl_fi, c_chq;
  logic [6:0] c_dgr, c_drd, c_dbl;
  logic [8:0] c_exp_coarse, c_exp_fine;
  judge_t c_exp_judge, c_cb_red, c_cb_blue;
  // ---------------- monochrome chip ----------------
  logic m_clk = 0, m_rst_n = 0;
  logic m_cpo, m_vbp, m_hld = 1, m_agc = 1, m_its = 0, m_max = 0;
  logic [2:0] m_gs = 3'b001;
  logic m_pclk_en, m_cv, m_cal, m_sam, m_rebit, m_ls, m_fi, m_rst, m_ss, m_si, m_pv, m_pvb, m_fst, m_foe;
  logic [6:0] m_gb_n;
  logic [289:0] m_word_sample, m_word_reset;
  logic [8:0] m_exp_coarse, m_exp_fine;
  judge_t m_exp_judge;

  assign sda = sda_m & !c_sda_oe;
  always #34.92ns c_clk = ~c_clk;     // 14.31818 MHz
  always #41.667ns m_clk = ~m_clk;    // 12 MHz

  cam_ctrl_top dut (.*, .c_scl(scl), .c_sda_in(sda));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  `include "i2c_master.svh"

  function automatic real grey(input int i);
    return 0.15 + 0.45 * real'((i * 37) % 101) / 100.0;
  endfunction
  function automatic logic [3:0] cmp4(input real s);
    return {s > 1.07, s > 1.0, s > 0.93, s > 0.86};
  endfunction

  // ---------------- colour scene ----------------
  real c_lux = 1.0;
  int  c_idx;
  always @(posedge c_clk) begin
    if (c_fst && c_pclk_en)     c_idx <= 0;
    else if (c_pv && c_pclk_en) c_idx <= c_idx + 1;
  end
  real c_s;
  always_comb begin
    c_s = (c_idx % 20 == 0 ? 1.0 : grey(c_idx)) * c_lux *
          real'(int'(dut.u_colour.u_ita.acc[19:4]) * 3) / CE0 / 80.0;
    c_g_cmp = cmp4(c_s * real'(c_dgr));
    c_r_cmp = cmp4(c_s * 1.25 * real'(c_drd));
    c_b_cmp = cmp4(c_s * 0.8 * real'(c_dbl));
  end

  // ---------------- monochrome scene ----------------
  real m_lux = 1.0;
  int  m_idx;
  logic [6:0] m_gain;
  assign m_gain = ~m_gb_n;
  always @(posedge m_clk) begin
    if (m_fst && m_pclk_en)     m_idx <= 0;
    else if (m_pv && m_pclk_en) m_idx <= m_idx + 1;
  end
  real m_s;
  always_comb begin
    m_s = (m_idx % 33 == 0 ? 1.0 : grey(m_idx)) * m_lux *
          real'(int'(dut.u_mono.u_ita.acc[19:4]) * 3) / ME0 * real'(m_gain) / 24.0;
    m_cpo = m_s > 1.0;
    m_vbp = m_s < 0.1;
  end

  // ---------------- colour frame monitor ----------------
  int c_frames = 0, c_lines = 0;
  int c_exp_up = 0, c_exp_dn = 0, c_gain_up = 0, c_gain_dn = 0, c_red_dn = 0, c_blue_up = 0, c_xenab = 0;
  int cp_acc, cp_gain, cp_roff, cp_boff; bit cp_max, cp_valid = 0, c_host = 0;
  always @(posedge c_clk) if (c_rst_n && c_pclk_en) begin
    if (c_cv) c_lines++;
    if (c_foe) begin
      int acc, g, ro, bo;
      acc = int'(dut.u_colour.u_ita.acc); g = int'(c_dgr);
      ro = int'(dut.u_colour.roff); bo = int'(dut.u_colour.boff);
      if (cp_valid && !c_host) begin
        check(c_lines == 525, $sformatf("colour frame %0d has %0d lines", c_frames, c_lines));
        if (acc > cp_acc) begin c_exp_up++; check(c_exp_judge.en && !c_exp_judge.down, "colour exposure rose unasked"); end
        if (acc < cp_acc) begin c_exp_dn++; check(cp_gain <= 80, "colour exposure fell above nominal gain"); end
        if (g > cp_gain) begin c_gain_up++; check(cp_max, "colour gain rose below maximum exposure"); end
        if (g < cp_gain) c_gain_dn++;
        if (ro != cp_roff || bo != cp_boff) check(!c_exp_judge.en, "offset moved while exposure acted");
        if (ro < cp_roff) c_red_dn++;
        if (bo > cp_boff) c_blue_up++;
        if (c_exp_judge.en && (c_cb_red.en || c_cb_blue.en)) c_xenab++;
      end
      cp_acc = acc; cp_gain = g; cp_roff = ro; cp_boff = bo; cp_max = dut.u_colour.exp_at_max;
      cp_valid = c_frames > 0;
      c_frames++; c_lines = 0;
      if (c_frames % 10 == 0) begin
        $display("colour frame %0d: exposure %0d/%0d gain %0d red %0d blue %0d", c_frames, c_exp_coarse, c_exp_fine, c_dgr, c_drd, c_dbl);
        $fflush;
      end
    end
  end

  // ---------------- monochrome frame monitor ----------------
  int m_frames = 0, m_lines = 0, m_samples = 0;
  int m_exp_up = 0, m_exp_dn = 0, m_gain_up = 0, m_gain_dn = 0;
  int mp_acc, mp_gain; bit mp_max, mp_valid = 0, m_host = 0;
  always @(posedge m_clk) if (m_rst_n && m_pclk_en) begin
    if (m_cv) m_lines++;
    if (m_foe) begin
      int acc, g;
      acc = int'(dut.u_mono.u_ita.acc); g = int'(m_gain);
      if (mp_valid && !m_host) begin
        check(m_lines == 625, $sformatf("mono frame %0d has %0d lines", m_frames, m_lines));
        if (acc > mp_acc) begin m_exp_up++; check(m_exp_judge.en && !m_exp_judge.down, "mono exposure rose unasked"); end
        if (acc < mp_acc) begin m_exp_dn++; check(mp_gain <= 24, "mono exposure fell above nominal gain"); end
        if (g > mp_gain) begin m_gain_up++; check(mp_max, "mono gain rose below maximum exposure"); end
        if (g < mp_gain) m_gain_dn++;
      end
      mp_acc = acc; mp_gain = g; mp_max = dut.u_mono.exp_at_max;
      mp_valid = m_frames > 0;
      m_frames++; m_lines = 0;
      if (m_frames % 10 == 0) begin
        $display("mono frame %0d: exposure %0d/%0d gain %0d", m_frames, m_exp_coarse, m_exp_fine, m_gain);
        $fflush;
      end
    end
  end
  always @(negedge m_clk) if (m_rst_n && m_pclk_en) begin
    if ($countones(m_word_sample) > 1 || (m_word_sample & m_word_reset) != '0) begin
      checks++; failures++; $display("FAIL: mono word lines");
    end
    if (m_word_sample != '0) m_samples++;
  end

  initial begin
    #30s;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit c_done = 0, m_done = 0;
  int n_wr = 0, n_rd = 0, n_reg = 0;
  logic [15:0] c_ls_hist;
  always @(posedge c_clk) if (c_pclk_en) c_ls_hist <= {c_ls_hist[14:0], dut.u_colour.ls};

  // colour sequence
  initial begin
    logic [15:0] w; bit ok; real rr, rb;
    #1us c_rst_n = 1;
    wait (c_frames >= 50);
    rr = real'(c_drd) * 1.25 / real'(c_dgr); rb = real'(c_dbl) * 0.8 / real'(c_dgr);
    $display("colour normal: exposure %0d/%0d gain %0d red %0d blue %0d balance %f %f",
             c_exp_coarse, c_exp_fine, c_dgr, c_drd, c_dbl, rr, rb);
    check(rr > 0.88 && rr < 1.12 && rb > 0.88 && rb < 1.12, "colour balance reached");
    c_lux = 0.01;
    wait (c_frames >= 85);
    $display("colour dim: exposure %0d/%0d gain %0d", c_exp_coarse, c_exp_fine, c_dgr);
    check(c_exp_coarse == 260 && c_dgr > 80, "colour AGC at maximum exposure");
    c_lux = 1.0;
    wait (c_frames >= 123);
    $display("colour normal: exposure %0d/%0d gain %0d", c_exp_coarse, c_exp_fine, c_dgr);
    check(c_exp_coarse < 260 && c_dgr == 80, "colour back to AEC");
    c_host = 1;
    i2c_write({4'b0001, 12'h024}, ok); n_wr += ok;
    check(ok && c_chq, "chequer board set-up");
    i2c_write({4'b0010, 9'd100, 3'd4}, ok); n_wr += ok;
    i2c_write({4'b0100, 4'd0, 1'b1, 7'd12}, ok); n_wr += ok;
    i2c_write({4'b0110, 4'd0, 4'd9, 4'd5}, ok); n_wr += ok;
    wait (c_frames >= 126);
    check(c_exp_coarse == 100 && int'(c_drd) == int'(c_dgr) - 12, "host exposure and red offset");
    i2c_read(w, ok); n_rd += ok;
    check(w == {4'b0110, 4'd0, 4'd9, 4'd5}, $sformatf("read centre X %h", w));
    i2c_write({4'b0010, 9'd100, 3'd4}, ok); n_wr += ok;
    i2c_read(w, ok); n_rd += ok;
    check(w == {4'b0010, 9'd100, 3'd4}, $sformatf("read exposure %h", w));
    repeat (2000) begin
      @(negedge c_clk);
      if (c_pclk_en) begin
        check(c_gr_ls == c_ls_hist[7] && c_rd_ls == c_ls_hist[5] && c_bl_ls == c_ls_hist[9], "registration");
        n_reg++;
      end
    end
    c_done = 1;
  end

  // monochrome sequence
  initial begin
    logic [19:0] held;
    #1us m_rst_n = 1;
    wait (m_frames >= 25);
    $display("mono normal: exposure %0d/%0d gain %0d", m_exp_coarse, m_exp_fine, m_gain);
    check(m_exp_coarse < 310 && m_gain == 24, "mono AEC in normal light");
    m_lux = 0.05;
    wait (m_frames >= 65);
    $display("mono dim: exposure %0d/%0d gain %0d", m_exp_coarse, m_exp_fine, m_gain);
    check(m_exp_coarse == 310 && m_gain > 24, "mono AGC at maximum exposure");
    m_lux = 1.0;
    wait (m_frames >= 110);
    $display("mono normal: exposure %0d/%0d gain %0d", m_exp_coarse, m_exp_fine, m_gain);
    check(m_exp_coarse < 310 && m_gain == 24, "mono back to AEC");
    m_host = 1;
    m_hld = 0; held = dut.u_mono.u_ita.acc; m_lux = 5.0;
    wait (m_frames >= 113);
    check(dut.u_mono.u_ita.acc == held, "HLD froze the exposure");
    m_done = 1;
  end

  initial begin
    wait (c_done && m_done);
    $display("colour: frames %0d exp up %0d down %0d gain up %0d down %0d red down %0d blue up %0d xenab %0d",
             c_frames, c_exp_up, c_exp_dn, c_gain_up, c_gain_dn, c_red_dn, c_blue_up, c_xenab);
    $display("mono: frames %0d exp up %0d down %0d gain up %0d down %0d row samples %0d",
             m_frames, m_exp_up, m_exp_dn, m_gain_up, m_gain_dn, m_samples);
    check(c_exp_up > 0, "colour exposure increase never happened");
    check(c_exp_dn > 0, "colour exposure decrease never happened");
    check(c_gain_up > 0, "colour AGC increase never happened");
    check(c_gain_dn > 0, "colour AGC decrease never happened");
    check(c_red_dn > 0, "red balance never acted");
    check(c_blue_up > 0, "blue balance never acted");
    check(c_xenab > 0, "exposure priority never exercised");
    check(n_wr == 5 && n_rd == 2, "serial accesses");
    check(n_reg > 0, "registration never checked");
    check(m_exp_up > 0, "mono exposure increase never happened");
    check(m_exp_dn > 0, "mono exposure decrease never happened");
    check(m_gain_up > 0, "mono AGC increase never happened");
    check(m_gain_dn > 0, "mono AGC decrease never happened");
    check(m_samples > 0, "mono row sampling never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
