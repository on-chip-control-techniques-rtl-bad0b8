// tb_exp_encoder: drives the exposure encoder from its own line and field
// counters (a 64-pixel, 40-line test field) and measures the waveforms: FI
// must stay high for exactly `coarse` lines and fall when line V_START
// begins; RST must fall `fine` pixel clocks before the end of the sample
// pulse and rise at that point. Out-of-range codes must be clamped.
module tb_exp_encoder;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 64, NF = 40, VS = 10, SE = 28;
  logic clk = 0, rst_n = 0;
  logic [5:0] hcnt = 0;
  logic [5:0] vline = 0;
  logic [8:0] exp_coarse, exp_fine;
  logic fi, rst;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  exp_encoder #(.PCLK_PER_LINE(L), .LINES_PER_FIELD(NF), .V_START(VS), .SAM_END(SE), .HW(6), .VW(6))
    dut (.clk, .rst_n, .pclk_en(1'b1), .hcnt, .vline, .exp_coarse, .exp_fine, .fi, .rst);

  always_ff @(posedge clk) begin
    if (hcnt == L - 1) begin
      hcnt <= 0;
      vline <= (vline == NF - 1) ? 0 : vline + 1;
    end else hcnt <= hcnt + 1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (L * NF * 40) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one field after settling
  task automatic measure(input int c, input int f, input int ec, input int ef);
    int fi_cycles, fi_fall_line, fi_fall_h, rst_fall_h, rst_rise_h, rst_falls;
    logic fi_d, rst_d;
    exp_coarse = 9'(c); exp_fine = 9'(f);
    repeat (L * NF * 2) @(posedge clk);   // settle two fields
    fi_cycles = 0; fi_fall_line = -1; rst_falls = 0; rst_fall_h = -1; rst_rise_h = -1;
    fi_d = fi; rst_d = rst;
    repeat (L * NF) begin
      @(posedge clk); #1;
      if (fi) fi_cycles++;
      if (fi_d && !fi) begin fi_fall_line = vline; fi_fall_h = hcnt; end
      if (rst_d && !rst) begin rst_falls++; rst_fall_h = (hcnt + L - 1) % L; end
      if (!rst_d && rst) rst_rise_h = (hcnt + L - 1) % L;
      fi_d = fi; rst_d = rst;
    end
    check(fi_cycles == ec * L, $sformatf("coarse %0d: FI high %0d cycles, expected %0d", c, fi_cycles, ec * L));
    if (ec > 0) check(fi_fall_line == VS && fi_fall_h == 1, $sformatf("FI fell at line %0d", fi_fall_line));
    check(rst_falls == NF, $sformatf("fine %0d: %0d RST falls per field", f, rst_falls));
    check((SE - rst_fall_h + L) % L == ef, $sformatf("fine %0d: RST fell %0d before sample end, expected %0d",
          f, (SE - rst_fall_h + L) % L, ef));
    check(rst_rise_h == SE, $sformatf("RST rose at %0d", rst_rise_h));
  endtask

  initial begin
    exp_coarse = 0; exp_fine = 10;
    repeat (2) @(posedge clk);
    rst_n = 1;
    measure(5, 10, 5, 10);
    measure(1, 3, 1, 3);
    measure(0, 40, 0, 40);
    measure(20, 50, 20, 50);
    measure(39, 1, 39, 1);
    measure(100, 200, NF - 1, L - 1);   // clamped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
