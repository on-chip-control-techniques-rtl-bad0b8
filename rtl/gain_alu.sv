// gain_alu: the common (green) gain value for the output-stage MDAC.
//
// A 7-bit up/down counter holds the gain code Db[6:0] (a larger code is a
// higher gain). A 7-bit nominal register holds the gain used in good light;
// it resets to NOMINAL and can be rewritten (pads on the monochrome chip, the
// serial interface on the colour chip). While AGC is on, the counter loads
// the nominal value whenever it would otherwise sit below it. While AGC is
// off the counter either keeps its value, so that a gain written from outside
// stays (OFF_TO_NOMINAL = 0, colour chip), or returns to the nominal value
// (OFF_TO_NOMINAL = 1, monochrome chip, whose gain then follows the pads). When en is set on an update the counter moves by one in the
// direction of down; decoders stop it at GAIN_MAX going up and at the
// nominal value going down. An external write loads the counter directly.
// at_nom flags that the gain is back at its nominal value, which the AEC/AGC
// switch uses to hand control back to the exposure.
// Timing: changes on the clock where upd is high.
// Counter, nominal register and the limits (nominal 24 / max 120 monochrome,
// nominal 80 / max 112 colour) follow the source; the colour values are the
// defaults.
module gain_alu #(
  parameter int unsigned NOMINAL  = 80,
  parameter int unsigned GAIN_MAX = 112,
  parameter bit          OFF_TO_NOMINAL = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,
  input  logic       en,        // step request from the switch
  input  logic       down,
  input  logic       agc_on,
  input  logic       nom_wr,
  input  logic [6:0] nom_data,
  input  logic       wr,
  input  logic [6:0] wr_data,
  output logic [6:0] gain,
  output logic [6:0] nominal,
  output logic       at_nom
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      nominal <= 7'(NOMINAL);
    else if (nom_wr) nominal <= nom_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain <= 7'(NOMINAL);
    end else if (wr) begin
      gain <= wr_data;
    end else if (upd) begin
      if (!agc_on) begin
        if (OFF_TO_NOMINAL)                          gain <= nominal;
      end else if (gain < nominal)                   gain <= nominal;
      else if (en && down && gain > nominal)         gain <= gain - 1'b1;
      else if (en && !down && gain < 7'(GAIN_MAX))   gain <= gain + 1'b1;
    end
  end

  assign at_nom = (gain <= nominal);
endmodule
