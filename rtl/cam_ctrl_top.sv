// cam_ctrl_top: the control logic of the two single-chip CMOS cameras, side
// by side.
//
// c_*: the colour chip (three 305 x 240 arrays, NTSC timing, exposure and
// gain control, automatic colour balance on the RGB peaks, optical centre
// registration, serial host interface).
// m_*: the monochrome chip (one 312 x 287 array, CCIR timing, exposure and
// gain control, row decoding of the vertical shift register).
// The two share no signals; each has its own clock and reset. The analogue
// parts of both chips (arrays, comparators, MDACs, black-level calibration,
// video output multiplexer) connect through these ports: comparator results
// come in, timing pulses, word lines and gain codes go out.
module cam_ctrl_top
  import cam_pkg::*;
(
  // ---------------- colour chip ----------------
  input  logic        c_clk,
  input  logic        c_rst_n,
  input  logic        c_scl,
  input  logic        c_sda_in,
  output logic        c_sda_oe,
  input  logic [3:0]  c_g_cmp,
  input  logic [3:0]  c_r_cmp,
  input  logic [3:0]  c_b_cmp,
  output logic        c_pclk_en,
  output logic        c_cv,
  output logic        c_cal,
  output logic        c_sam,
  output logic        c_rebit,
  output logic        c_rst,
  output logic        c_ss,
  output logic        c_si,
  output logic        c_pv,
  output logic        c_pvb,
  output logic        c_fst,
  output logic        c_feoe,
  output logic        c_foe,
  output logic        c_gr_ls,
  output logic        c_rd_ls,
  output logic        c_bl_ls,
  output logic        c_gr_fi,
  output logic        c_rd_fi,
  output logic        c_bl_fi,
  output logic        c_chq,
  output logic [6:0]  c_dgr,
  output logic [6:0]  c_drd,
  output logic [6:0]  c_dbl,
  output logic [8:0]  c_exp_coarse,
  output logic [8:0]  c_exp_fine,
  output judge_t      c_exp_judge,
  output judge_t      c_cb_red,
  output judge_t      c_cb_blue,
  // ---------------- monochrome chip ----------------
  input  logic        m_clk,
  input  logic        m_rst_n,
  input  logic        m_cpo,
  input  logic        m_vbp,
  input  logic        m_hld,
  input  logic        m_agc,
  input  logic        m_its,
  input  logic        m_max,
  input  logic [2:0]  m_gs,
  output logic        m_pclk_en,
  output logic        m_cv,
  output logic        m_cal,
  output logic        m_sam,
  output logic        m_rebit,
  output logic        m_ls,
  output logic        m_fi,
  output logic        m_rst,
  output logic        m_ss,
  output logic        m_si,
  output logic        m_pv,
  output logic        m_pvb,
  output logic        m_fst,
  output logic        m_foe,
  output logic [6:0]  m_gb_n,
  output logic [289:0] m_word_sample,
  output logic [289:0] m_word_reset,
  output logic [8:0]  m_exp_coarse,
  output logic [8:0]  m_exp_fine,
  output judge_t      m_exp_judge
);
  asis3000_ctrl u_colour (
    .clk(c_clk), .rst_n(c_rst_n), .scl(c_scl), .sda_in(c_sda_in), .sda_oe(c_sda_oe),
    .g_cmp(c_g_cmp), .r_cmp(c_r_cmp), .b_cmp(c_b_cmp),
    .pclk_en(c_pclk_en), .cv(c_cv), .cal(c_cal), .sam(c_sam), .rebit(c_rebit),
    .rst(c_rst), .ss(c_ss), .si(c_si), .pv(c_pv), .pvb(c_pvb), .fst(c_fst),
    .feoe(c_feoe), .foe(c_foe),
    .gr_ls(c_gr_ls), .rd_ls(c_rd_ls), .bl_ls(c_bl_ls),
    .gr_fi(c_gr_fi), .rd_fi(c_rd_fi), .bl_fi(c_bl_fi), .chq(c_chq),
    .dgr(c_dgr), .drd(c_drd), .dbl(c_dbl),
    .exp_coarse(c_exp_coarse), .exp_fine(c_exp_fine),
    .exp_judge(c_exp_judge), .cb_red(c_cb_red), .cb_blue(c_cb_blue)
  );

  asis1011_ctrl u_mono (
    .clk(m_clk), .rst_n(m_rst_n), .cpo(m_cpo), .vbp(m_vbp), .hld(m_hld),
    .agc(m_agc), .its(m_its), .max(m_max), .gs(m_gs),
    .pclk_en(m_pclk_en), .cv(m_cv), .cal(m_cal), .sam(m_sam), .rebit(m_rebit),
    .ls(m_ls), .fi(m_fi), .rst(m_rst), .ss(m_ss), .si(m_si), .pv(m_pv),
    .pvb(m_pvb), .fst(m_fst), .foe(m_foe), .gb_n(m_gb_n),
    .word_sample(m_word_sample), .word_reset(m_word_reset),
    .exp_coarse(m_exp_coarse), .exp_fine(m_exp_fine), .exp_judge(m_exp_judge)
  );
endmodule
