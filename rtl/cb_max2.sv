// cb_max2: records the peak band of red (or blue) inside the green highlight.
//
// It keeps two registers: peakreg, the channel's peak among pixels where
// green is at or above its running peak, and lowpkreg, its peak among pixels
// where green is below it or has just set a new peak. The green MAX(1) sorts
// every pixel against the green peak (Bigger / Equal / Lower); two digital
// comparators test whether this channel's band is bigger than each register
// (bigpix1, bigpix2). Update rules (the source's update table):
//   bigpix1 and green Equal or Bigger  -> peakreg takes the present band
//   bigpix2 and green Lower or Bigger  -> lowpkreg takes the present band
// At the end of the odd field the output is peakreg when the green peak was
// reached by enough pixels (eq64 from green MAX(1)), otherwise lowpkreg,
// matching the green peak that MAX(1) lowered by one band. Field start
// clears both registers.
// Interface: one pixel per clock where pv is high; peak_out is registered on
// foe. The registers, comparators and update table follow the source; the
// eq64 output selection is this design's reading of how the lowered green
// peak is matched.
module cb_max2
  import cam_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pv,
  input  logic  fs,
  input  logic  foe,
  input  band_t band,        // this channel's present band
  input  logic  g_bigger,
  input  logic  g_equal,
  input  logic  g_lower,
  input  logic  g_eq64,
  output band_t peak_out
);
  band_t peakreg, lowpkreg;
  logic  bigpix1, bigpix2;
  assign bigpix1 = band > peakreg;
  assign bigpix2 = band > lowpkreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peakreg <= '0; lowpkreg <= '0;
    end else if (fs) begin
      peakreg <= '0; lowpkreg <= '0;
    end else if (pv) begin
      if (bigpix1 && (g_equal || g_bigger)) peakreg  <= band;
      if (bigpix2 && (g_lower || g_bigger)) lowpkreg <= band;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   peak_out <= '0;
    else if (foe) peak_out <= g_eq64 ? peakreg : lowpkreg;
  end
endmodule
