// exp_encoder: turns the exposure value into the FI and RST waveforms.
//
// Integration time = coarse x line period + fine x pixel clock period.
// FI (input of the vertical shift register) is high for the coarse number of
// lines that precede the first line read out: its falling edge is fixed at
// line V_START, its rising edge is set by a dynamic decoder that compares the
// field line counter with Sc = V_START - coarse (modulo the field length).
// RST resets every non-integrating row; its rising edge is fixed at SAM_END,
// the end of the line's sample pulse, and its falling edge is set by a
// dynamic decoder comparing the pixel counter with Sf = SAM_END - fine
// (modulo the line length), so a larger fine value moves the falling edge
// earlier and lengthens the integration before the next sample ends. The
// reset pulse is PCLK_PER_LINE - fine clocks wide: 8 clocks at the largest
// fine values of the source (356 of 364, 376 of 384), nearly a line at the
// smallest. Each waveform is an RS flip-flop whose set comes from the
// dynamic decoder and whose reset comes from a fixed decoder; reset wins, so
// coarse = 0 gives no FI pulse and the exposure is the fine part alone.
// Fine codes above PCLK_PER_LINE - 1 are clamped so that RST stays a pulse.
// Adder + dynamic decoder + RS flip-flop per waveform follows the source; the
// exact decoder positions are this design's choice. Outputs are registered
// and change one clock after the pclk_en on which the counters match.
module exp_encoder #(
  parameter int unsigned PCLK_PER_LINE   = 364,
  parameter int unsigned LINES_PER_FIELD = 262,
  parameter int unsigned V_START         = 22,
  parameter int unsigned SAM_END         = 42,
  parameter int unsigned HW = $clog2(PCLK_PER_LINE),
  parameter int unsigned VW = $clog2(LINES_PER_FIELD + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pclk_en,
  input  logic [HW-1:0] hcnt,
  input  logic [VW-1:0] vline,
  input  logic [8:0]    exp_coarse,
  input  logic [8:0]    exp_fine,
  output logic          fi,
  output logic          rst
);
  localparam int unsigned RST_RISE = SAM_END % PCLK_PER_LINE;

  logic [HW:0]   sf;     // one bit wider for the modulo correction
  logic [VW+9:0] sc;
  logic [8:0]    fine_c, coarse_c;

  // Keep the codes inside what one line / one field can express.
  assign fine_c   = (exp_fine   > 9'(PCLK_PER_LINE - 1))       ? 9'(PCLK_PER_LINE - 1)       : exp_fine;
  assign coarse_c = (exp_coarse > 9'(LINES_PER_FIELD - 1))     ? 9'(LINES_PER_FIELD - 1)     : exp_coarse;

  always_comb begin
    sf = (HW+1)'(RST_RISE + PCLK_PER_LINE) - (HW+1)'(fine_c);
    if (sf >= (HW+1)'(PCLK_PER_LINE)) sf = sf - (HW+1)'(PCLK_PER_LINE);
    sc = (VW+10)'(V_START + LINES_PER_FIELD) - (VW+10)'(coarse_c);
    if (sc >= (VW+10)'(LINES_PER_FIELD)) sc = sc - (VW+10)'(LINES_PER_FIELD);
  end

  logic fi_set, fi_clr, rst_set, rst_clr;
  assign fi_set  = (hcnt == '0) && (vline == VW'(sc));
  assign fi_clr  = (hcnt == '0) && (vline == VW'(V_START));
  assign rst_set = (hcnt == HW'(RST_RISE));
  assign rst_clr = (hcnt == HW'(sf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fi  <= 1'b0;
      rst <= 1'b1;
    end else if (pclk_en) begin
      if (fi_clr)       fi <= 1'b0;
      else if (fi_set)  fi <= 1'b1;
      if (rst_clr)      rst <= 1'b0;
      else if (rst_set) rst <= 1'b1;
    end
  end
endmodule
