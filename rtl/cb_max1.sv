// cb_max1: records the peak band of one primary over the whole image.
//
// The four analogue comparators of a channel are encoded into a band number
// 0..4. Each valid pixel's band is compared with the peak register:
//   Bigger -> the peak register takes the band, the pixel counter restarts at 1
//   Equal  -> the counter counts one more pixel at the peak band
//   Lower  -> nothing
// A peak is trusted only when more than MIN_COUNT pixels reached it (this
// suppresses noise); at the end of the odd field (foe) the peak is copied to
// the output register, lowered by one band when the count is too small (eq64
// = 0). Field start clears peak and counter for the next field.
// Bigger/Equal/Lower are combinational and steer the MAX(2) recorders of red
// and blue.
// Structure and the 64-pixel rule follow the source; a count of exactly 64
// is treated as too few ("must be more than 64").
module cb_max1
  import cam_pkg::*;
#(
  parameter int unsigned MIN_COUNT = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pv,
  input  logic       fs,
  input  logic       foe,
  input  logic [3:0] cmp,       // comparator outputs, cmp[0] = lowest threshold
  output band_t      band,      // encoded present pixel
  output logic       bigger,
  output logic       equal,
  output logic       lower,
  output logic       eq64,
  output band_t      peak_out   // peak for the colour balance judgement
);
  localparam int unsigned CW = $clog2(MIN_COUNT + 2);
  band_t         peak;
  logic [CW-1:0] cnt;

  assign band   = therm2band(cmp);
  assign bigger = band > peak;
  assign equal  = band == peak;
  assign lower  = band < peak;
  assign eq64   = cnt > CW'(MIN_COUNT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak <= '0; cnt <= '0;
    end else if (fs) begin
      peak <= '0; cnt <= '0;
    end else if (pv) begin
      if (bigger) begin
        peak <= band;
        cnt  <= CW'(1);
      end else if (equal && !eq64) begin
        cnt <= cnt + 1'b1;          // saturates once above MIN_COUNT
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   peak_out <= '0;
    else if (foe) peak_out <= (eq64 || peak == '0) ? peak : peak - 1'b1;
  end
endmodule
