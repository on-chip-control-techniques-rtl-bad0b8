// offset_galu: gain ALU of the red (or blue) channel.
//
// An 8-bit two's complement up/down counter holds the offset of this channel
// from the common gain, -127..+127, stepping by one per update when the
// colour balance judgement asks for it. The counter only moves while
// automatic colour balance is on (cbe) and the exposure controller is not
// acting this frame (xenab = 0), which gives the exposure priority. An adder
// sums the offset and the common gain Dgr; the sum is clamped to 0..GAIN_MAX
// before the 7-bit output register Drd (loaded on upd_reg, the clock after
// upd). Overflow decoders on the sum stop the counter from moving further in
// the direction that left the range. With cbe = 0 the counter behaves as a
// register that the serial interface can write.
// Structure, widths and range follow the source.
module offset_galu
  import cam_pkg::*;
#(
  parameter int unsigned GAIN_MAX = 112
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        upd,
  input  logic        upd_reg,
  input  judge_t      j,
  input  logic        cbe,
  input  logic        xenab,
  input  logic        wr,
  input  logic signed [7:0] wr_offset,
  input  logic [6:0]  dgr,          // common gain
  output logic signed [7:0] offset,
  output logic [6:0]  drd,          // channel gain to the MDAC
  output logic        oflow_hi,
  output logic        oflow_lo
);
  localparam logic signed [9:0] GMAX_S = 10'(GAIN_MAX);
  logic signed [9:0] sum;
  assign sum      = $signed({3'b000, dgr}) + 10'(offset);
  assign oflow_hi = sum >= GMAX_S;
  assign oflow_lo = sum <= 10'sd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset <= '0;
    end else if (!cbe) begin
      if (wr) offset <= wr_offset;
    end else if (upd && j.en && !xenab) begin
      if (j.down && !oflow_lo && offset != -8'sd127) offset <= offset - 1'b1;
      else if (!j.down && !oflow_hi && offset != 8'sd127) offset <= offset + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drd <= 7'(GAIN_MAX / 2);
    end else if (upd_reg) begin
      if (sum < 10'sd0)                   drd <= '0;
      else if (sum > GMAX_S)       drd <= 7'(GAIN_MAX);
      else                                drd <= sum[6:0];
    end
  end
endmodule
