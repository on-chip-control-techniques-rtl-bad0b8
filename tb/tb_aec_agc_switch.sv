// tb_aec_agc_switch: exhaustive check of the AEC/AGC hand-over against an
// independent table: an increase goes to the exposure until it is at its
// maximum, then to the gain; a decrease goes to the gain while it is above
// nominal, then to the exposure; AEC/AGC off inhibit their side.
module tb_aec_agc_switch;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  judge_t j;
  logic aec_on, agc_on, exp_at_max, gain_at_nom;
  logic exp_en, gain_en, down;
  int checks = 0, failures = 0;

  aec_agc_switch dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic e_exp, e_gain;
      {j.en, j.down, aec_on, agc_on, exp_at_max, gain_at_nom} = 6'(v);
      #1;
      // expected
      e_exp = 0; e_gain = 0;
      if (j.en && !j.down) begin
        if (aec_on && !exp_at_max) e_exp = 1;
        else if (agc_on) e_gain = 1;
      end
      if (j.en && j.down) begin
        if (agc_on && !gain_at_nom) e_gain = 1;
        else if (aec_on) e_exp = 1;
      end
      checks++;
      if (exp_en !== e_exp || gain_en !== e_gain || down !== j.down) begin
        failures++;
        $display("FAIL v=%b exp_en=%b gain_en=%b exp %b %b", 6'(v), exp_en, gain_en, e_exp, e_gain);
      end
      checks++;
      if (exp_en && gain_en) begin failures++; $display("FAIL both enabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
