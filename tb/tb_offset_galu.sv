// tb_offset_galu: random sequences of colour balance decisions, exposure
// priority (Xenab), enable (Cbe), direct writes and common gain values drive
// the offset counter. A reference model follows every clock: the offset steps
// by one per update unless Xenab is set, the channel gain dgr + offset would
// leave 0..112, or the counter is at +-127; with Cbe low only writes act.
// The registered channel gain must equal the clamped sum after every
// register update.
module tb_offset_galu;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, upd_reg = 0, cbe = 1, xenab = 0, wr = 0;
  judge_t j = '0;
  logic signed [7:0] wr_offset = 0, offset;
  logic [6:0] dgr = 80, drd;
  logic oflow_hi, oflow_lo;
  int checks = 0, failures = 0;
  int m_off = 0, m_drd = 56;
  int n_up = 0, n_dn = 0, n_hi = 0, n_lo = 0;
  always #5 clk = ~clk;

  offset_galu #(.GAIN_MAX(112)) dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (offset != 0 || drd != 56) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 40000; k++) begin
      // drive a random cycle
      upd = $urandom_range(0, 1); upd_reg = $urandom_range(0, 3) == 0;
      j.en = $urandom_range(0, 3) != 0;
      // long runs in one direction so both limits are reached
      j.down = ((k / 2000) % 2) == 1;
      xenab = $urandom_range(0, 9) == 0;
      cbe = $urandom_range(0, 49) != 0;
      wr = $urandom_range(0, 199) == 0;
      wr_offset = 8'($urandom_range(0, 255));
      if (wr_offset == -8'sd128) wr_offset = -8'sd127;
      if ($urandom_range(0, 99) == 0) dgr = 7'($urandom_range(0, 112));
      #1;
      // model, evaluated on present state
      s = int'(dgr) + m_off;
      checks++;
      if (oflow_hi != (s >= 112) || oflow_lo != (s <= 0)) begin
        failures++; $display("FAIL oflow sum %0d", s);
      end
      if (s >= 112) n_hi++;
      if (s <= 0) n_lo++;
      @(posedge clk);
      if (!cbe) begin
        if (wr) m_off = int'(wr_offset);
      end else if (upd && j.en && !xenab) begin
        if (j.down && s > 0 && m_off != -127) begin m_off--; n_dn++; end
        else if (!j.down && s < 112 && m_off != 127) begin m_off++; n_up++; end
      end
      if (upd_reg) m_drd = s < 0 ? 0 : (s > 112 ? 112 : s);
      @(negedge clk);
      checks++;
      if (int'(offset) != m_off || int'(drd) != m_drd) begin
        failures++; $display("FAIL k=%0d offset %0d exp %0d drd %0d exp %0d", k, offset, m_off, drd, m_drd);
      end
    end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_hi == 0 || n_lo == 0) begin
      failures++; $display("FAIL coverage up %0d dn %0d hi %0d lo %0d", n_up, n_dn, n_hi, n_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
