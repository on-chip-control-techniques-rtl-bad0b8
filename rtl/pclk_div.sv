// pclk_div: pixel clock enable generator.
//
// The colour chip runs from a 14.31818 MHz clock (four times the NTSC colour
// subcarrier) and needs a 5.727272 MHz pixel clock, a division by 2.5; the
// monochrome chip divides 12 MHz by 2. The divider is a fractional
// accumulator: every clock it adds DEN and, when the sum reaches NUM, emits a
// one-clock enable and subtracts NUM. The output is therefore DEN enables
// every NUM clocks (two per five clocks by default). The rest of the logic
// runs on the external clock and advances on this enable rather than on a
// derived clock; that single-clock style is a choice of this design.
module pclk_div #(
  parameter int unsigned NUM = 5,
  parameter int unsigned DEN = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic pclk_en
);
  localparam int unsigned W = $clog2(NUM + DEN + 1);
  logic [W-1:0] acc;
  logic [W-1:0] sum;

  assign sum = acc + W'(DEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      pclk_en <= 1'b0;
    end else if (sum >= W'(NUM)) begin
      acc     <= sum - W'(NUM);
      pclk_en <= 1'b1;
    end else begin
      acc     <= sum;
      pclk_en <= 1'b0;
    end
  end
endmodule
