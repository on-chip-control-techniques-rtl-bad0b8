// asis3000_ctrl: digital control logic of the three-array colour camera chip.
//
// The chip has three 305 x 240 sensor arrays (green, red, blue) behind a
// triple lens and produces three NTSC-timed (525/60, non-interlaced scan)
// video outputs. This module is all of its logic; the arrays, comparators,
// MDAC gain stages and black-level calibration are analogue and sit outside:
//   - pixel clock enable (external clock / 2.5) and the video timing generator
//   - exposure judgement on the OR of the three channels' comparators
//   - AEC/AGC switch, integration time ALU, common (green) gain ALU
//   - exposure encoder producing FI and RST
//   - colour balance: five peak recorders (MAX(1) for G, R, B over the image,
//     MAX(2) for R and B in the green highlight), the judgement, and the red
//     and blue offset gain ALUs
//   - optical centre registration of LS and FI for the three arrays
//   - the two-wire serial interface with its set-up and value registers
// Frame sequence: the judgements count over the odd field; at its last pixel
// (foe) exposure result and peaks are loaded; one clock later the exposure and
// gain ALUs update and the colour balance judgement registers its result; one
// clock after that the offset counters step, unless the exposure judgement
// asked for a change this frame (exposure has priority); the red and blue gain
// registers load one clock later. Comparator inputs must be valid for the
// pixel marked by pv (one clock after the counters, as all timing outputs).
// Gain codes are outputs as codes (larger = more gain); the MDAC of the
// source takes them on its load transistors in inverted form.
module asis3000_ctrl
  import cam_pkg::*;
#(
  parameter int unsigned CLK_NUM         = 5,    // pixel clock = clk * DEN / NUM
  parameter int unsigned CLK_DEN         = 2,
  parameter int unsigned PCLK_PER_LINE   = 364,
  parameter int unsigned LINES_PER_FRAME = 525,
  parameter int unsigned H_ACTIVE        = 305,
  parameter int unsigned V_ACTIVE        = 240,
  parameter int unsigned HSYNC_W         = 27,
  parameter int unsigned COARSE_MAX      = 260,
  parameter int unsigned FINE_MIN        = 37,
  parameter int unsigned FINE_MAX        = 356,
  parameter int unsigned GAIN_NOMINAL    = 80,
  parameter int unsigned GAIN_MAX        = 112,
  parameter int unsigned CB_MIN_COUNT    = 64,
  parameter int unsigned REG_DEPTH       = 15
) (
  input  logic        clk,          // CKN, 14.31818 MHz
  input  logic        rst_n,        // INI (inverted)
  // serial interface
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  // analogue comparator outputs per channel, [0] = V1 (0.86) .. [3] = V4 (1.07)
  input  logic [3:0]  g_cmp,
  input  logic [3:0]  r_cmp,
  input  logic [3:0]  b_cmp,
  // sensor and video timing
  output logic        pclk_en,
  output logic        cv,
  output logic        cal,
  output logic        sam,
  output logic        rebit,
  output logic        rst,
  output logic        ss,
  output logic        si,
  output logic        pv,
  output logic        pvb,
  output logic        fst,
  output logic        feoe,
  output logic        foe,
  output logic        gr_ls,
  output logic        rd_ls,
  output logic        bl_ls,
  output logic        gr_fi,
  output logic        rd_fi,
  output logic        bl_fi,
  output logic        chq,          // chequer board test enable
  // gains and exposure
  output logic [6:0]  dgr,
  output logic [6:0]  drd,
  output logic [6:0]  dbl,
  output logic [8:0]  exp_coarse,
  output logic [8:0]  exp_fine,
  // frame status (for observation)
  output judge_t      exp_judge,
  output judge_t      cb_red,
  output judge_t      cb_blue
);
  localparam int unsigned HW = $clog2(PCLK_PER_LINE);
  localparam int unsigned VW = $clog2((LINES_PER_FRAME + 1) / 2);
  localparam int unsigned V_START = ((LINES_PER_FRAME + 1) / 2) - V_ACTIVE - 1;

  // ---------------- timing ----------------
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vline;
  logic          ls, line_end;

  pclk_div #(.NUM(CLK_NUM), .DEN(CLK_DEN)) u_div (.clk, .rst_n, .pclk_en);

  video_timing #(
    .PCLK_PER_LINE(PCLK_PER_LINE), .LINES_PER_FRAME(LINES_PER_FRAME),
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .HSYNC_W(HSYNC_W)
  ) u_vt (
    .clk, .rst_n, .pclk_en, .hcnt, .vline, .feoe, .cv, .cal, .sam, .rebit,
    .ls, .pv, .pvb, .ss, .si, .fst, .foe, .line_end
  );

  logic pix, fs, foe_d1, foe_d2, foe_d3;
  assign pix = pv && pclk_en;
  assign fs  = fst && pclk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {foe_d1, foe_d2, foe_d3} <= '0;
    else        {foe_d1, foe_d2, foe_d3} <= {foe && pclk_en, foe_d1, foe_d2};
  end
  logic foe_s;
  assign foe_s = foe && pclk_en;

  // ---------------- serial interface ----------------
  logic [10:0] setup;
  logic [7:0]  cx, cy;
  logic        exp_wr, gain_wr, roff_wr, boff_wr;
  logic [8:0]  exp_wr_coarse;
  logic [6:0]  exp_wr_fine7, gain_wr_data;
  logic signed [7:0] off_wr_data, roff, boff;
  logic        aec_on, agc_on, cbe;
  assign aec_on = setup[SU_AEC];
  assign agc_on = setup[SU_AGC];
  assign cbe    = setup[SU_AWC];
  assign chq    = setup[SU_CHQ];

  // ---------------- exposure and common gain ----------------
  logic exp_at_max, gain_at_nom, exp_en, gain_en, sw_down;
  logic [6:0] nominal, exp_fine7;

  col_exp_judge #(.PIXELS(H_ACTIVE * V_ACTIVE)) u_ej (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s),
    .vb({b_cmp[2], r_cmp[2], g_cmp[2]}),
    .we({b_cmp[1], r_cmp[1], g_cmp[1]}),
    .j(exp_judge), .n1_flag(), .n2_flag()
  );

  aec_agc_switch u_sw (
    .j(exp_judge), .aec_on, .agc_on, .exp_at_max, .gain_at_nom,
    .exp_en, .gain_en, .down(sw_down)
  );

  int_time_alu #(.COARSE_MAX(COARSE_MAX), .FINE_MIN(FINE_MIN), .FINE_MAX(FINE_MAX)) u_ita (
    .clk, .rst_n, .upd(foe_d1), .en(exp_en), .down(sw_down),
    .wr(exp_wr), .wr_coarse(exp_wr_coarse), .wr_fine7(exp_wr_fine7), .force_max(1'b0),
    .exp_coarse, .exp_fine, .fine7(exp_fine7), .at_max(exp_at_max)
  );

  gain_alu #(.NOMINAL(GAIN_NOMINAL), .GAIN_MAX(GAIN_MAX)) u_ga (
    .clk, .rst_n, .upd(foe_d1), .en(gain_en), .down(sw_down), .agc_on,
    .nom_wr(1'b0), .nom_data('0), .wr(gain_wr), .wr_data(gain_wr_data),
    .gain(dgr), .nominal, .at_nom(gain_at_nom)
  );

  logic fi;
  exp_encoder #(
    .PCLK_PER_LINE(PCLK_PER_LINE), .LINES_PER_FIELD(LINES_PER_FRAME / 2),
    .V_START(V_START), .SAM_END(HSYNC_W + 15), .VW(VW)
  ) u_enc (
    .clk, .rst_n, .pclk_en, .hcnt, .vline, .exp_coarse, .exp_fine, .fi, .rst
  );

  // ---------------- colour balance ----------------
  band_t g_band, r_band, b_band, gpw, rpw, bpw, rpg, bpg;
  logic  g_bigger, g_equal, g_lower, g_eq64;

  cb_max1 #(.MIN_COUNT(CB_MIN_COUNT)) u_mg (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s), .cmp(g_cmp), .band(g_band),
    .bigger(g_bigger), .equal(g_equal), .lower(g_lower),
    .eq64(g_eq64), .peak_out(gpw)
  );
  cb_max1 #(.MIN_COUNT(CB_MIN_COUNT)) u_mr (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s), .cmp(r_cmp), .band(r_band),
    .bigger(), .equal(), .lower(), .eq64(), .peak_out(rpw)
  );
  cb_max1 #(.MIN_COUNT(CB_MIN_COUNT)) u_mb (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s), .cmp(b_cmp), .band(b_band),
    .bigger(), .equal(), .lower(), .eq64(), .peak_out(bpw)
  );


  cb_max2 u_m2r (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s), .band(r_band),
    .g_bigger, .g_equal, .g_lower, .g_eq64, .peak_out(rpg)
  );
  cb_max2 u_m2b (
    .clk, .rst_n, .pv(pix), .fs, .foe(foe_s), .band(b_band),
    .g_bigger, .g_equal, .g_lower, .g_eq64, .peak_out(bpg)
  );

  cb_judge u_cbj (
    .clk, .rst_n, .ld(foe_d1), .gpw, .rpg, .bpg, .rpw, .bpw,
    .jr(cb_red), .jb(cb_blue), .no_action()
  );

  offset_galu #(.GAIN_MAX(GAIN_MAX)) u_gr (
    .clk, .rst_n, .upd(foe_d2), .upd_reg(foe_d3), .j(cb_red), .cbe,
    .xenab(exp_judge.en), .wr(roff_wr), .wr_offset(off_wr_data), .dgr,
    .offset(roff), .drd(drd), .oflow_hi(), .oflow_lo()
  );
  offset_galu #(.GAIN_MAX(GAIN_MAX)) u_gb (
    .clk, .rst_n, .upd(foe_d2), .upd_reg(foe_d3), .j(cb_blue), .cbe,
    .xenab(exp_judge.en), .wr(boff_wr), .wr_offset(off_wr_data), .dgr,
    .offset(boff), .drd(dbl), .oflow_hi(), .oflow_lo()
  );

  // ---------------- optical centre registration ----------------
  optical_reg #(.DEPTH(REG_DEPTH)) u_reg_x (
    .clk, .rst_n, .shift(pclk_en), .din(ls), .x_red(cx[3:0]), .x_blue(cx[7:4]),
    .gr(gr_ls), .rd(rd_ls), .bl(bl_ls)
  );
  optical_reg #(.DEPTH(REG_DEPTH)) u_reg_y (
    .clk, .rst_n, .shift(pclk_en && line_end), .din(fi), .x_red(cy[3:0]), .x_blue(cy[7:4]),
    .gr(gr_fi), .rd(rd_fi), .bl(bl_fi)
  );

  // ---------------- serial interface ----------------
  serial_if u_sif (
    .clk, .rst_n, .scl, .sda_in, .sda_oe, .setup, .cx, .cy,
    .exp_wr, .exp_wr_coarse, .exp_wr_fine7, .gain_wr, .gain_wr_data,
    .roff_wr, .boff_wr, .off_wr_data,
    .rb_coarse(exp_coarse), .rb_fine3(exp_fine7[6:4]), .rb_gain(dgr),
    .rb_roff(roff), .rb_boff(boff)
  );
endmodule
