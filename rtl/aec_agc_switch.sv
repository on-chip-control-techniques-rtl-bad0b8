// aec_agc_switch: decides whether the exposure or the gain takes a step.
//
// The exposure judgement says only "increase", "decrease" or "hold". Gain is
// an extension of the exposure range at the dark end, so:
//   increase: step the integration time unless it is at its maximum (or AEC is
//             off); then, with AGC on, step the gain instead;
//   decrease: while the gain is above nominal (and AGC is on) lower the gain
//             first; once it is nominal, lower the integration time.
// Purely combinational. The rule follows the source's description of AGC as
// the continuation of AEC (the switching flow chart itself is not reproduced
// there, so the priority written above is this design's reading).
module aec_agc_switch
  import cam_pkg::*;
(
  input  judge_t j,           // from the exposure judgement
  input  logic   aec_on,
  input  logic   agc_on,
  input  logic   exp_at_max,
  input  logic   gain_at_nom,
  output logic   exp_en,
  output logic   gain_en,
  output logic   down
);
  always_comb begin
    exp_en  = 1'b0;
    gain_en = 1'b0;
    down    = j.down;
    if (j.en) begin
      if (!j.down) begin
        if (aec_on && !exp_at_max) exp_en  = 1'b1;
        else if (agc_on)           gain_en = 1'b1;
      end else begin
        if (agc_on && !gain_at_nom) gain_en = 1'b1;
        else if (aec_on)            exp_en  = 1'b1;
      end
    end
  end
endmodule
