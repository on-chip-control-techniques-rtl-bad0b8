// serial_if: two-wire serial camera interface and its control registers.
//
// A host talks to the camera as a slave at address byte 20h (write) / 21h
// (read), i.e. 7-bit address 10h. A write carries messages of two bytes: a
// 4-bit header and a 12-bit value. The header selects the destination:
//   0001 set-up code (bit 2 AGC on, bit 4 AEC on, bit 5 chequer board test,
//        bit 9 automatic colour balance on; other bits free)
//   0010 exposure: coarse lines in value[11:3], upper fine bits in value[2:0]
//   0011 common gain, value[6:0] (0..112)
//   0100 / 0101 red / blue gain offset, value[7] sign (1 = minus), value[6:0]
//        magnitude; converted here to two's complement
//   0110 / 0111 centre X / Y offsets, value[7:4] blue, value[3:0] red
// Each completed message pulses the matching *_wr strobe for one clock. A
// read returns two bytes: the last header written, followed by the present
// value for that header (exposure, gain and offsets are read back from the
// control units, so automatic values can be interrogated).
// SCL and SDA are synchronised to clk and their edges detected; START and
// STOP are SDA edges while SCL is high. The slave pulls SDA low (sda_oe = 1)
// for its acknowledge and for zero data bits during a read (open drain).
// clk must be many times faster than SCL.
// The address, the two-byte message, the header codes, set-up bits and
// value ranges follow the source; the read format, the bit-level protocol
// (the standard I2C one) and the reset defaults (AEC, AGC and colour balance
// on, chequer board off, centre offsets 7) are this design's.
module serial_if
  import cam_pkg::*;
#(
  parameter logic [6:0] ADDR7 = 7'h10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  // registers
  output logic [10:0] setup,
  output logic [7:0]  cx,
  output logic [7:0]  cy,
  // write strobes to the control units
  output logic        exp_wr,
  output logic [8:0]  exp_wr_coarse,
  output logic [6:0]  exp_wr_fine7,
  output logic        gain_wr,
  output logic [6:0]  gain_wr_data,
  output logic        roff_wr,
  output logic        boff_wr,
  output logic signed [7:0] off_wr_data,
  // read back
  input  logic [8:0]  rb_coarse,
  input  logic [2:0]  rb_fine3,     // upper three bits of the fine integer
  input  logic [6:0]  rb_gain,
  input  logic signed [7:0] rb_roff,
  input  logic signed [7:0] rb_boff
);
  // ---- synchronisers and edge detection ----
  logic [2:0] scl_s, sda_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1; sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end
  logic scl_rise, scl_fall, start_c, stop_c;
  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c   = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK, S_WR, S_RD, S_RACK} state_e;
  state_e     st, st_after_ack;
  logic [7:0] sh;
  logic [3:0] bitn;
  logic       byte_idx;    // 0: first byte of a message, 1: second
  logic [7:0] hi_byte;
  hdr_e       last_hdr;
  logic [15:0] rd_word;

  // ---- message decode ----
  logic [11:0] val;
  logic        msg_done;
  logic [15:0] msg;
  assign msg = {hi_byte, sh};
  assign val = msg[11:0];

  function automatic logic signed [7:0] sm2tc(input logic [7:0] v);
    return v[7] ? -$signed({1'b0, v[6:0]}) : $signed({1'b0, v[6:0]});
  endfunction
  function automatic logic [7:0] tc2sm(input logic signed [7:0] v);
    return (v < 0) ? {1'b1, 7'(-v)} : {1'b0, 7'(v)};
  endfunction

  always_comb begin
    unique case (last_hdr)
      HDR_SETUP: rd_word = {4'(last_hdr), 1'b0, setup};
      HDR_EXP:   rd_word = {4'(last_hdr), rb_coarse, rb_fine3};
      HDR_GAIN:  rd_word = {4'(last_hdr), 5'd0, rb_gain};
      HDR_ROFF:  rd_word = {4'(last_hdr), 4'd0, tc2sm(rb_roff)};
      HDR_BOFF:  rd_word = {4'(last_hdr), 4'd0, tc2sm(rb_boff)};
      HDR_CX:    rd_word = {4'(last_hdr), 4'd0, cx};
      HDR_CY:    rd_word = {4'(last_hdr), 4'd0, cy};
      default:   rd_word = {4'(last_hdr), 12'd0};
    endcase
  end

  // ---- bit-level state machine ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; st_after_ack <= S_IDLE; sh <= '0; bitn <= '0; byte_idx <= 1'b0;
      hi_byte <= '0; sda_oe <= 1'b0; msg_done <= 1'b0;
    end else begin
      msg_done <= 1'b0;
      if (start_c) begin
        st <= S_ADDR; bitn <= '0; sda_oe <= 1'b0; byte_idx <= 1'b0;
      end else if (stop_c) begin
        st <= S_IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          S_IDLE: ;
          S_ADDR, S_WR: begin
            if (scl_rise) begin
              sh   <= {sh[6:0], sda_s[1]};
              bitn <= bitn + 1'b1;
            end else if (scl_fall && bitn == 4'd8 && st == S_ADDR && sh[7:1] == ADDR7) begin
              // 8 bits in and addressed: acknowledge
              sda_oe <= 1'b1; st <= S_ACK; bitn <= '0;
              st_after_ack <= sh[0] ? S_RD : S_WR;
            end else if (scl_fall && bitn == 4'd8 && st == S_ADDR) begin
              st <= S_IDLE; bitn <= '0;
            end else if (scl_fall && bitn == 4'd8 && st == S_WR) begin
              sda_oe <= 1'b1; st <= S_ACK; st_after_ack <= S_WR; bitn <= '0;
              if (!byte_idx) hi_byte <= sh;
              else           msg_done <= 1'b1;
              byte_idx <= !byte_idx;
            end
          end
          S_ACK: begin
            if (scl_fall) begin
              bitn <= '0;
              st   <= st_after_ack;
              if (st_after_ack == S_RD) begin
                sh     <= byte_idx ? rd_word[7:0] : rd_word[15:8];
                sda_oe <= byte_idx ? !rd_word[7] : !rd_word[15];
                bitn   <= 4'd1;
              end else begin
                sda_oe <= 1'b0;
              end
            end
          end
          S_RD: begin
            if (scl_fall) begin
              if (bitn == 4'd8) begin
                sda_oe <= 1'b0; st <= S_RACK; byte_idx <= !byte_idx;
              end else begin
                sda_oe <= !sh[3'd7 - bitn[2:0]];
                bitn   <= bitn + 1'b1;
              end
            end
          end
          S_RACK: begin
            if (scl_rise) begin
              // master ACK (low) asks for another byte, NACK ends the read
              st <= sda_s[1] ? S_IDLE : S_ACK;
              st_after_ack <= S_RD;
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // ---- register file ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      setup    <= 11'((1 << SU_AGC) | (1 << SU_AEC) | (1 << SU_AWC));
      cx       <= 8'h77;
      cy       <= 8'h77;
      last_hdr <= HDR_FREE;
      {exp_wr, gain_wr, roff_wr, boff_wr} <= '0;
      exp_wr_coarse <= '0; exp_wr_fine7 <= '0; gain_wr_data <= '0; off_wr_data <= '0;
    end else begin
      {exp_wr, gain_wr, roff_wr, boff_wr} <= '0;
      if (msg_done) begin
        last_hdr <= hdr_e'(msg[15:12]);
        unique case (msg[15:12])
          HDR_SETUP: setup <= val[10:0];
          HDR_EXP:   begin exp_wr <= 1'b1; exp_wr_coarse <= val[11:3]; exp_wr_fine7 <= {val[2:0], 4'd0}; end
          HDR_GAIN:  begin gain_wr <= 1'b1; gain_wr_data <= val[6:0]; end
          HDR_ROFF:  begin roff_wr <= 1'b1; off_wr_data <= sm2tc(val[7:0]); end
          HDR_BOFF:  begin boff_wr <= 1'b1; off_wr_data <= sm2tc(val[7:0]); end
          HDR_CX:    cx <= val[7:0];
          HDR_CY:    cy <= val[7:0];
          default: ;
        endcase
      end
    end
  end
endmodule
