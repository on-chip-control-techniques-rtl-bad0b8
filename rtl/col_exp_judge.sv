// col_exp_judge: exposure judgement of the colour camera.
//
// A colour pixel is over-exposed (n1) when any of its primaries is above the
// "very bright" threshold (comparator at 1.00 of full scale) and is counted
// as well exposed (n2) when any primary is above the 0.93 comparator. Two
// counters count n1 and n2 over a field on pixel-valid strobes; each sets an
// RS flip-flop when its count passes its threshold (N1: more than 2 % of the
// pixels, N2: at least 1 %). The field-start pulse clears counters and
// flip-flops; at the end of the odd field (foe) the flip-flops are copied into
// D flip-flops that drive the judgement:
//   N1 over threshold            -> enable = 1, down = 1 (too bright)
//   N2 under threshold (and not) -> enable = 1, down = 0 (too dark)
//   otherwise                    -> enable = 0 (well exposed)
// The output holds for a whole frame and changes the clock after foe.
// Thresholds and the counter/RS/D-flip-flop structure follow the source; the
// counter widths are sized from the thresholds (11 and 10 bits at defaults).
module col_exp_judge
  import cam_pkg::*;
#(
  parameter int unsigned PIXELS = 305 * 240,
  parameter int unsigned N1_TH  = PIXELS * 2 / 100,
  parameter int unsigned N2_TH  = PIXELS / 100
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   pv,          // one clock per valid colour pixel
  input  logic   fs,          // field start: clear
  input  logic   foe,         // end of odd field: load result
  input  logic [2:0] vb,      // very bright comparators  {blue, red, green}
  input  logic [2:0] we,      // well-exposed comparators {blue, red, green}
  output judge_t j,
  output logic   n1_flag,     // live RS flip-flop states (test visibility)
  output logic   n2_flag
);
  localparam int unsigned W1 = $clog2(N1_TH + 2);
  localparam int unsigned W2 = $clog2(N2_TH + 1);

  logic [W1-1:0] c1;
  logic [W2-1:0] c2;
  logic n1, n2;
  assign n1 = |vb;
  assign n2 = |we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; c2 <= '0; n1_flag <= 1'b0; n2_flag <= 1'b0;
    end else if (fs) begin
      c1 <= '0; c2 <= '0; n1_flag <= 1'b0; n2_flag <= 1'b0;
    end else if (pv) begin
      if (n1 && !n1_flag) begin
        c1 <= c1 + 1'b1;
        if (c1 == W1'(N1_TH)) n1_flag <= 1'b1;     // count now N1_TH+1
      end
      if (n2 && !n2_flag) begin
        c2 <= c2 + 1'b1;
        if (c2 == W2'(N2_TH - 1)) n2_flag <= 1'b1; // count now N2_TH
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j <= '0;
    end else if (foe) begin
      j.en   <= n1_flag || !n2_flag;
      j.down <= n1_flag;
    end
  end
endmodule
