// cb_judge: colour balance judgement and decision logic.
//
// Inputs are the five peak bands of the last odd field: Gpw (green over the
// image), Rpg/Bpg (red/blue inside the green highlight) and Rpw/Bpw
// (red/blue over the image). Green is the reference. For red:
//   step 1: Rpg > Gpw                 -> Bigrd: lower the red gain one step
//   step 2: else Rpw < Gpw            -> Lessrd: raise the red gain one step
//   otherwise                         -> no action
// Step 2 uses the whole-image peak so that a highlight lacking red (cyan, for
// instance) does not wrongly raise the red gain. Blue is judged the same way.
// The decision logic turns Bigrd/Lessrd/Bigbl/Lessbl into an (enable, down)
// command for each offset gain unit; no_action flags a balanced picture.
// The result is registered on ld (the clock after the peaks are loaded).
// The two-step comparison follows the source's algorithm description.
module cb_judge
  import cam_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ld,
  input  band_t  gpw,
  input  band_t  rpg,
  input  band_t  bpg,
  input  band_t  rpw,
  input  band_t  bpw,
  output judge_t jr,
  output judge_t jb,
  output logic   no_action
);
  logic bigrd, lessrd, bigbl, lessbl;
  assign bigrd  = rpg > gpw;
  assign lessrd = !bigrd && (rpw < gpw);
  assign bigbl  = bpg > gpw;
  assign lessbl = !bigbl && (bpw < gpw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      jr <= '0; jb <= '0; no_action <= 1'b1;
    end else if (ld) begin
      jr        <= '{en: bigrd || lessrd, down: bigrd};
      jb        <= '{en: bigbl || lessbl, down: bigbl};
      no_action <= !(bigrd || lessrd || bigbl || lessbl);
    end
  end
endmodule
