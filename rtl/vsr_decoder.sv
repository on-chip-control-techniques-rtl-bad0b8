// vsr_decoder: vertical shift register with row decoding (electronic
// aperture, the improved "scheme 2" decoding).
//
// FI is shifted one row per line clock (cv) through an N_ROWS-stage shift
// register d[]. Rows whose bit is 1 are integrating. The row just behind the
// FI pulse (d[i] = 0, d[i+1] = 1) has finished integrating and is read: its
// word line carries the SAM pulse. Every other row with d[i] = 0 is held in
// reset. The row just ahead of the pulse (d[i] = 0, d[i-1] = 1) will start
// integrating next line; only its reset is ended by the falling edge of RST,
// which sets the fine part of the exposure. All other reset rows stay in
// reset through the line, so that only one row's driver switches at the RST
// edge (the earlier scheme released every reset row at that edge and the
// switching current showed as a bright vertical bar in dark pictures).
// Outputs: per-row sample and reset word-line enables, combinational from the
// register and the SAM/RST inputs; the register shifts on the clock where
// shift is high.
// The shift register, the d(i)/d(i+1) decoding, FI and RST meanings follow
// the source; the decoder is described here at behaviour level rather than
// as the gate network of the source's cell, and the row count (green array,
// 244 rows) is taken from the colour chip.
module vsr_decoder #(
  parameter int unsigned N_ROWS = 244
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift,    // line clock (cv) strobe
  input  logic              fi,
  input  logic              sam,
  input  logic              rst,
  output logic [N_ROWS-1:0] word_sample,
  output logic [N_ROWS-1:0] word_reset,
  output logic [N_ROWS-1:0] integrating
);
  logic [N_ROWS-1:0] d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     d <= '0;
    else if (shift) d <= {d[N_ROWS-2:0], fi};
  end
  assign integrating = d;

  always_comb begin
    for (int i = 0; i < N_ROWS; i++) begin
      logic behind, ahead;
      behind = !d[i] && (i + 1 < N_ROWS) && d[(i + 1) % N_ROWS];
      ahead  = !d[i] && (i == 0 ? fi : d[(i + N_ROWS - 1) % N_ROWS]);
      word_sample[i] = behind && sam;
      word_reset[i]  = !d[i] && !(behind && sam) && (ahead ? rst : 1'b1);
    end
  end
endmodule
