// optical_reg: optical centre registration delay line.
//
// The triple-lens colour camera has a fixed parallax between its three
// images. To align them, the scan start pulse of each array is delayed by a
// programmable amount: a DEPTH-stage shift register delays the input pulse,
// the green output is taken from the fixed middle stage and the red and blue
// outputs from stages chosen by 4-bit settings (setting s selects stage s,
// s = 15 is treated as 14; the middle setting 7 aligns with green). Used once
// on LS, shifting on pixel clocks (horizontal offset in pixels), and once on
// FI, shifting once per line (vertical offset in lines). Every output is one
// stage delayed at least, so the green output lags the input by GR_TAP+1
// shifts.
// The 15-bit shift register, the fixed green tap in the middle and the 4-bit
// settings follow the source; the setting-to-stage mapping is this design's.
module optical_reg #(
  parameter int unsigned DEPTH  = 15,
  parameter int unsigned GR_TAP = DEPTH / 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       shift,
  input  logic       din,
  input  logic [3:0] x_red,
  input  logic [3:0] x_blue,
  output logic       gr,
  output logic       rd,
  output logic       bl
);
  logic [DEPTH-1:0] sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (shift) sr <= {sr[DEPTH-2:0], din};
  end

  function automatic int unsigned tap(input logic [3:0] s);
    return (int'(s) > DEPTH - 1) ? DEPTH - 1 : int'(s);
  endfunction

  assign gr = sr[GR_TAP];
  assign rd = sr[tap(x_red)];
  assign bl = sr[tap(x_blue)];
endmodule
