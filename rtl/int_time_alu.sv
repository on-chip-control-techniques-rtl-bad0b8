// int_time_alu: computes the integration time for the next frame.
//
// The working register is 20 bits: a 9-bit coarse number (lines) above an
// 11-bit fine part made of 7 integer bits and 4 fraction bits. One unit of the
// 7-bit fine integer is three pixel clocks, so 128 fine units make one line of
// 384 pixel clocks and the carry between fine and coarse is a plain binary
// carry. Each update adds or subtracts the register shifted right by four
// (a 1/16 = 6.25 % step) with a 20-bit adder/subtracter; the fine integer is
// then multiplied by three to give the pixel-clock count exp[8:0], clamped to
// FINE_MIN..FINE_MAX, and the coarse number exp[17:9] is clamped to
// COARSE_MAX. The working register is also held inside the range: above
// COARSE_MAX it saturates, below the smallest legal value it is set to it.
// at_max tells the AEC/AGC switch that the exposure cannot grow further.
// An external write (serial interface) loads coarse and the fine integer.
// Timing: the registers change on the clock where upd is high and en is set.
// Structure, step, the x3 trick and the monochrome limits (coarse <= 310,
// fine 3..376) follow the source; the colour limits (coarse <= 260, fine
// 37..356) are the defaults. The reset value INIT_COARSE is this design's.
module int_time_alu #(
  parameter int unsigned COARSE_MAX  = 260,
  parameter int unsigned FINE_MIN    = 37,
  parameter int unsigned FINE_MAX    = 356,
  parameter int unsigned INIT_COARSE = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,         // once per frame
  input  logic       en,          // enable AND AEC on
  input  logic       down,        // 1: decrease
  input  logic       wr,          // external write
  input  logic [8:0] wr_coarse,
  input  logic [6:0] wr_fine7,
  input  logic       force_max,   // force maximum exposure
  output logic [8:0] exp_coarse,  // exp[17:9]
  output logic [8:0] exp_fine,    // exp[8:0], pixel clocks
  output logic [6:0] fine7,       // fine integer, for read back
  output logic       at_max
);
  localparam int unsigned FMIN7 = (FINE_MIN + 2) / 3;           // ceil(FINE_MIN/3)
  localparam logic [19:0] MINVAL = {9'd0, 7'(FMIN7), 4'd0};
  localparam logic [19:0] MAXVAL = {9'(COARSE_MAX), 7'h7f, 4'hf};

  logic [19:0] acc, step, sum;

  assign step = acc >> 4;
  assign sum  = down ? (acc - step) : (acc + step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= {9'(INIT_COARSE), 7'd0, 4'd0};
    end else if (force_max) begin
      acc <= MAXVAL;
    end else if (wr) begin
      acc <= {wr_coarse, wr_fine7, 4'd0};
    end else if (upd && en) begin
      if (sum[19:11] > 9'(COARSE_MAX)) acc <= MAXVAL;
      else if (sum < MINVAL)           acc <= MINVAL;
      else                             acc <= sum;
    end
  end

  // Multiply by three and clamp the fine number.
  logic [8:0] f3;
  assign f3 = 9'(acc[10:4]) + {acc[10:4], 1'b0};
  always_comb begin
    exp_coarse = (acc[19:11] > 9'(COARSE_MAX)) ? 9'(COARSE_MAX) : acc[19:11];
    if (f3 > 9'(FINE_MAX))      exp_fine = 9'(FINE_MAX);
    else if (f3 < 9'(FINE_MIN)) exp_fine = 9'(FINE_MIN);
    else                        exp_fine = f3;
  end
  assign fine7  = acc[10:4];
  assign at_max = (acc[19:11] >= 9'(COARSE_MAX));
endmodule
