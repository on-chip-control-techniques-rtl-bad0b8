// asis1011_ctrl: digital control logic of the monochrome camera chip.
//
// The chip has one 312 x 287 sensor array and delivers CCIR 625/50 composite
// video (non-interlaced scan, both fields on the same lines) from a 12 MHz
// clock, pixel clock 6 MHz, 384 pixel clocks per line. Its logic:
//   - pixel clock enable (clk / 2) and the video timing generator
//   - very-white / very-black exposure judgement (thresholds picked by ITS)
//   - AEC/AGC switch, integration time ALU (coarse <= 310 lines, fine 3..376
//     pixel clocks, range about 40,000:1), gain ALU (nominal from pads
//     GS5..GS7, default 24, maximum 120)
//   - exposure encoder producing FI and RST
//   - the vertical shift register with row decoding that turns FI, SAM and
//     RST into the row word lines of the array (electronic aperture)
// Pads: HLD = 1 lets the exposure follow the scene (0 freezes it), MAX = 1
// forces the longest exposure, AGC = 1 enables the gain control. The gain
// code drives the MDAC load transistors active low (GB = inverted code).
// Frame sequence as in the colour chip: judge over the odd field, load at its
// last pixel, update the ALUs one clock later.
module asis1011_ctrl
  import cam_pkg::*;
#(
  parameter int unsigned CLK_NUM         = 2,
  parameter int unsigned CLK_DEN         = 1,
  parameter int unsigned PCLK_PER_LINE   = 384,
  parameter int unsigned LINES_PER_FRAME = 625,
  parameter int unsigned H_ACTIVE        = 312,
  parameter int unsigned V_ACTIVE        = 287,
  parameter int unsigned HSYNC_W         = 28,
  parameter int unsigned COARSE_MAX      = 310,
  parameter int unsigned FINE_MIN        = 3,
  parameter int unsigned FINE_MAX        = 376,
  parameter int unsigned GAIN_MAX        = 120,
  parameter int unsigned N_ROWS          = 290   // 287 image + 3 black lines
) (
  input  logic        clk,          // CKI, 12 MHz
  input  logic        rst_n,        // INI (inverted)
  input  logic        cpo,          // very white comparator (above VWT)
  input  logic        vbp,          // very black comparator (below VBT)
  input  logic        hld,
  input  logic        agc,
  input  logic        its,
  input  logic        max,
  input  logic [2:0]  gs,           // GS7..GS5
  output logic        pclk_en,
  output logic        cv,
  output logic        cal,
  output logic        sam,
  output logic        rebit,
  output logic        ls,
  output logic        fi,
  output logic        rst,
  output logic        ss,
  output logic        si,
  output logic        pv,
  output logic        pvb,
  output logic        fst,
  output logic        foe,
  output logic [6:0]  gb_n,         // GB[7:1], active low
  output logic [N_ROWS-1:0] word_sample,  // row word lines: read
  output logic [N_ROWS-1:0] word_reset,   // row word lines: reset
  output logic [8:0]  exp_coarse,
  output logic [8:0]  exp_fine,
  output judge_t      exp_judge
);
  localparam int unsigned HW = $clog2(PCLK_PER_LINE);
  localparam int unsigned VW = $clog2((LINES_PER_FRAME + 1) / 2);
  localparam int unsigned V_START = ((LINES_PER_FRAME + 1) / 2) - V_ACTIVE - 1;

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vline;
  logic          feoe, line_end;   // not used by this chip

  pclk_div #(.NUM(CLK_NUM), .DEN(CLK_DEN)) u_div (.clk, .rst_n, .pclk_en);

  video_timing #(
    .PCLK_PER_LINE(PCLK_PER_LINE), .LINES_PER_FRAME(LINES_PER_FRAME),
    .H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .HSYNC_W(HSYNC_W)
  ) u_vt (
    .clk, .rst_n, .pclk_en, .hcnt, .vline, .feoe, .cv, .cal, .sam, .rebit,
    .ls, .pv, .pvb, .ss, .si, .fst, .foe, .line_end
  );

  logic foe_s, foe_d1;
  assign foe_s = foe && pclk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) foe_d1 <= 1'b0;
    else        foe_d1 <= foe_s;
  end

  mono_exp_judge #(.PIXELS(H_ACTIVE * V_ACTIVE)) u_ej (
    .clk, .rst_n, .pv(pv && pclk_en), .fs(fst && pclk_en), .foe(foe_s),
    .vwp(cpo), .vbp, .its, .j(exp_judge)
  );

  logic exp_at_max, gain_at_nom, exp_en, gain_en, sw_down;
  logic [6:0] gain;

  aec_agc_switch u_sw (
    .j(exp_judge), .aec_on(hld), .agc_on(agc), .exp_at_max, .gain_at_nom,
    .exp_en, .gain_en, .down(sw_down)
  );

  int_time_alu #(.COARSE_MAX(COARSE_MAX), .FINE_MIN(FINE_MIN), .FINE_MAX(FINE_MAX)) u_ita (
    .clk, .rst_n, .upd(foe_d1), .en(exp_en), .down(sw_down),
    .wr(1'b0), .wr_coarse('0), .wr_fine7('0), .force_max(max),
    .exp_coarse, .exp_fine, .fine7(), .at_max(exp_at_max)
  );

  gain_alu #(.NOMINAL(24), .GAIN_MAX(GAIN_MAX), .OFF_TO_NOMINAL(1'b1)) u_ga (
    .clk, .rst_n, .upd(foe_d1), .en(gain_en), .down(sw_down), .agc_on(agc),
    .nom_wr(1'b1), .nom_data({gs, 4'b1000}), .wr(1'b0), .wr_data('0),
    .gain, .nominal(), .at_nom(gain_at_nom)
  );
  assign gb_n = ~gain;

  exp_encoder #(
    .PCLK_PER_LINE(PCLK_PER_LINE), .LINES_PER_FIELD(LINES_PER_FRAME / 2),
    .V_START(V_START), .SAM_END(HSYNC_W + 15), .VW(VW)
  ) u_enc (
    .clk, .rst_n, .pclk_en, .hcnt, .vline, .exp_coarse, .exp_fine, .fi, .rst
  );

  vsr_decoder #(.N_ROWS(N_ROWS)) u_vsr (
    .clk, .rst_n, .shift(cv && pclk_en), .fi, .sam, .rst,
    .word_sample, .word_reset, .integrating()
  );
endmodule
