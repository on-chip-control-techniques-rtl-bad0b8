// tb_cb_max1: random fields of 300 pixels drive the peak recorder. The
// expected result is computed independently per field: the peak is the
// highest band seen, and it is reported one band lower unless more than 64
// pixels reached it. The distribution is chosen so the peak count falls on
// both sides of 64, and fields with exactly 64 and 65 peak pixels are forced.
module tb_cb_max1;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst_n = 0, pv = 0, fs = 0, foe = 0;
  logic [3:0] cmp = 0;
  band_t band, peak_out;
  logic bigger, equal, lower, eq64;
  int checks = 0, failures = 0, lowered = 0, kept = 0;
  int b[N];
  always #5 clk = ~clk;

  cb_max1 #(.MIN_COUNT(64)) dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic field(input int npk);
    int mx, cnt, expv;
    // npk < 0: random field; otherwise exactly npk pixels at band 3, rest lower
    for (int i = 0; i < N; i++)
      b[i] = (npk < 0) ? int'($urandom_range(0, 4) > 2 ? $urandom_range(0, 4) : $urandom_range(0, 2))
                       : (i < npk ? 3 : int'($urandom_range(0, 2)));
    if (npk >= 0) b.shuffle();
    @(negedge clk); fs = 1; @(negedge clk); fs = 0;
    mx = 0; cnt = 0;
    for (int i = 0; i < N; i++) begin
      cmp = 4'((1 << b[i]) - 1);
      pv = 1;
      #1;
      checks++;
      if (band != band_t'(b[i]) || bigger != (b[i] > mx) || equal != (b[i] == mx) ||
          lower != (b[i] < mx)) begin
        failures++; $display("FAIL flags pixel %0d band %0d peak %0d", i, b[i], mx);
      end
      if (b[i] > mx) begin mx = b[i]; cnt = 1; end else if (b[i] == mx) cnt++;
      @(negedge clk);
      // an idle clock with an out-of-range value must be ignored
      pv = 0; cmp = 4'hf; @(negedge clk);
    end
    @(negedge clk); foe = 1; @(negedge clk); foe = 0;
    expv = (cnt > 64 || mx == 0) ? mx : mx - 1;
    checks++;
    if (peak_out != band_t'(expv)) begin
      failures++; $display("FAIL peak_out %0d exp %0d (max %0d count %0d)", peak_out, expv, mx, cnt);
    end
    if (expv != mx) lowered++; else kept++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    field(64); field(65); field(0); field(200);
    for (int k = 0; k < 60; k++) field(-1);
    checks++;
    if (lowered == 0 || kept == 0) begin failures++; $display("FAIL coverage %0d %0d", lowered, kept); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
