// mono_exp_judge: exposure judgement of the monochrome camera.
//
// Two comparators mark each pixel as very white (above the white reference,
// pad VWT) or very black (below the black reference, pad VBT). Two counters
// count them over a field on pixel-valid strobes; RS flip-flops record each
// count passing its thresholds: w1 < w2 < w3 for white, b1 < b2 for black.
// Field start clears them; at the end of the odd field the judgement is
// loaded into D flip-flops:
//   white count above the selected high white threshold -> decrease
//   white count below w1 and black count above the
//     selected black threshold                           -> increase
//   otherwise                                             -> hold
// Pad ITS selects the threshold pair: ITS = 0 (the normal, larger gap) uses
// w3 and b2, ITS = 1 uses w2 and b1.
// Counters, RS flip-flops, the five thresholds and ITS follow the source; the
// threshold values (as fractions of the pixel count) and the exact decision
// rule are this design's, since the source's histogram figure gives no
// numbers. The result changes the clock after foe.
module mono_exp_judge
  import cam_pkg::*;
#(
  parameter int unsigned PIXELS = 312 * 287,
  parameter int unsigned W1_TH  = PIXELS / 200,      // 0.5 %
  parameter int unsigned W2_TH  = PIXELS * 2 / 100,  // 2 %
  parameter int unsigned W3_TH  = PIXELS * 4 / 100,  // 4 %
  parameter int unsigned B1_TH  = PIXELS * 10 / 100, // 10 %
  parameter int unsigned B2_TH  = PIXELS * 20 / 100  // 20 %
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pv,
  input  logic   fs,
  input  logic   foe,
  input  logic   vwp,       // very white pixel comparator
  input  logic   vbp,       // very black pixel comparator
  input  logic   its,
  output judge_t j
);
  localparam int unsigned WW = $clog2(W3_TH + 2);
  localparam int unsigned BW = $clog2(B2_TH + 2);

  logic [WW-1:0] cw;
  logic [BW-1:0] cb;
  logic w1, w2, w3, b1, b2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw <= '0; cb <= '0; {w1, w2, w3, b1, b2} <= '0;
    end else if (fs) begin
      cw <= '0; cb <= '0; {w1, w2, w3, b1, b2} <= '0;
    end else if (pv) begin
      if (vwp && !w3) begin
        cw <= cw + 1'b1;
        if (cw == WW'(W1_TH)) w1 <= 1'b1;
        if (cw == WW'(W2_TH)) w2 <= 1'b1;
        if (cw == WW'(W3_TH)) w3 <= 1'b1;
      end
      if (vbp && !b2) begin
        cb <= cb + 1'b1;
        if (cb == BW'(B1_TH)) b1 <= 1'b1;
        if (cb == BW'(B2_TH)) b2 <= 1'b1;
      end
    end
  end

  logic too_bright, too_dark;
  assign too_bright = its ? w2 : w3;
  assign too_dark   = !w1 && (its ? b1 : b2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j <= '0;
    end else if (foe) begin
      j.en   <= too_bright || too_dark;
      j.down <= too_bright;
    end
  end
endmodule
