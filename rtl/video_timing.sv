// video_timing: line and frame counters with decoders that generate the
// sensor drive pulses and the composite-video timing.
//
// A line counter counts pixel clocks 0..PCLK_PER_LINE-1 and its carry steps a
// frame counter over LINES_PER_FRAME lines. The sensor is scanned
// non-interlaced: both video fields trace the same sensor lines, so the frame
// is split into an odd field of ceil(L/2) lines and an even field of floor(L/2)
// lines and the line number within the field (vline) drives the sensor.
// Fixed-number decoders on the counters set and clear registered pulses:
//   cv     one-pclk line clock for the vertical shift register
//   cal    sense amplifier calibration, sam: sample into the column amps,
//   rebit  bit line reset; all three sit in the line blanking
//   ls     one-pclk start of horizontal scan, one pclk before the first pixel
//   pv     pixel valid inside the active window (pvb is its inverse, a pad)
//   ss     sync level select: normal line sync, half-width equalising pulses
//          on field lines 0-2 and 6-8, broad field-sync pulses on lines 3-5
//   si     video select during the active window, off in field blanking
//   fst    one pclk at the first pixel of every field, feoe = odd field flag
//   foe    one pclk at the last pixel of the odd field (judgement strobe)
// Every output changes one clock after the pclk_en that produces it.
// The counter structure, the signal set and the NTSC/PAL line counts follow
// the source; the pulse positions inside the line and the vertical blanking
// layout are this design's choices (the source prints no waveform numbers).
// Defaults: NTSC colour chip, 364 pixel clocks (910 clocks / 2.5) per line,
// 525 lines, 305 x 240 active pixels.
module video_timing #(
  parameter int unsigned PCLK_PER_LINE   = 364,
  parameter int unsigned LINES_PER_FRAME = 525,
  parameter int unsigned H_ACTIVE        = 305,
  parameter int unsigned V_ACTIVE        = 240,
  parameter int unsigned HSYNC_W         = 27,
  parameter int unsigned H_START         = PCLK_PER_LINE - H_ACTIVE,
  parameter int unsigned V_START         = ((LINES_PER_FRAME + 1) / 2) - V_ACTIVE - 1,
  parameter int unsigned HW = $clog2(PCLK_PER_LINE),
  parameter int unsigned VW = $clog2((LINES_PER_FRAME + 1) / 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pclk_en,
  output logic [HW-1:0] hcnt,      // q[8:0]: pixel in line
  output logic [VW-1:0] vline,     // line within the field
  output logic          feoe,      // 1 = odd field
  output logic          cv,
  output logic          cal,
  output logic          sam,
  output logic          rebit,
  output logic          ls,
  output logic          pv,
  output logic          pvb,
  output logic          ss,
  output logic          si,
  output logic          fst,
  output logic          foe,
  output logic          line_end   // one pclk at the last pixel of every line
);
  localparam int unsigned ODD_LINES  = (LINES_PER_FRAME + 1) / 2;
  localparam int unsigned EVEN_LINES = LINES_PER_FRAME / 2;
  // Line blanking decoder positions (pixel clocks from the line start).
  localparam int unsigned CV_POS   = HSYNC_W;
  localparam int unsigned CAL_BEG  = HSYNC_W + 1;
  localparam int unsigned SAM_BEG  = HSYNC_W + 7;
  localparam int unsigned REB_BEG  = HSYNC_W + 15;
  localparam int unsigned REB_END  = HSYNC_W + 23;

  initial begin
    assert (H_START > REB_END) else $error("line blanking too short");
    assert (V_START >= 9) else $error("field blanking too short");
  end

  logic          last_pix;
  logic          last_line;
  logic [VW-1:0] vnext;

  assign last_pix  = (hcnt == HW'(PCLK_PER_LINE - 1));
  assign last_line = feoe ? (vline == VW'(ODD_LINES - 1)) : (vline == VW'(EVEN_LINES - 1));
  assign vnext     = vline + 1'b1;

  // Counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt  <= '0;
      vline <= '0;
      feoe  <= 1'b1;
    end else if (pclk_en) begin
      if (last_pix) begin
        hcnt <= '0;
        if (last_line) begin
          vline <= '0;
          feoe  <= ~feoe;
        end else begin
          vline <= vnext;
        end
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  // Decoders and pulse registers, computed from the counter state.
  logic h_act, v_act, eq_line, broad_line;
  logic [HW-1:0] sync_w;
  assign h_act      = (hcnt >= HW'(H_START));
  assign v_act      = (vline >= VW'(V_START)) && (vline < VW'(V_START + V_ACTIVE));
  assign eq_line    = (vline < VW'(3)) || ((vline >= VW'(6)) && (vline < VW'(9)));
  assign broad_line = (vline >= VW'(3)) && (vline < VW'(6));
  always_comb begin
    if (broad_line)   sync_w = HW'(PCLK_PER_LINE / 2 - HSYNC_W);
    else if (eq_line) sync_w = HW'(HSYNC_W / 2);
    else              sync_w = HW'(HSYNC_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {cv, cal, sam, rebit, ls, pv, ss, si, fst, foe, line_end} <= '0;
      pvb <= 1'b1;
    end else if (pclk_en) begin
      cv       <= (hcnt == HW'(CV_POS));
      cal      <= (hcnt >= HW'(CAL_BEG)) && (hcnt < HW'(SAM_BEG));
      sam      <= (hcnt >= HW'(SAM_BEG)) && (hcnt < HW'(REB_BEG));
      rebit    <= (hcnt >= HW'(REB_BEG)) && (hcnt < HW'(REB_END));
      ls       <= v_act && (hcnt == HW'(H_START - 1));
      pv       <= v_act && h_act;
      pvb      <= !(v_act && h_act);
      ss       <= (hcnt < sync_w) ||
                  (broad_line && (hcnt >= HW'(PCLK_PER_LINE / 2)) &&
                   (hcnt < HW'(PCLK_PER_LINE - HSYNC_W)));
      si       <= v_act && h_act;
      fst      <= (hcnt == '0) && (vline == '0);
      foe      <= feoe && last_pix && last_line;
      line_end <= last_pix;
    end
  end
endmodule
