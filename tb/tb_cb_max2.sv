// tb_cb_max2: a green peak recorder (cb_max1) drives the red highlight
// recorder, as in the colour chip. Random fields of correlated green and red
// bands are applied. The expected output is computed by a behavioural model
// of the update table: for each pixel the green band is compared with the
// running green peak; at or above it, red may raise the upper register; below
// it or above it, red may raise the lower register. The upper register is
// reported when more than 64 pixels reached the green maximum, otherwise the
// lower one.
module tb_cb_max2;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst_n = 0, pv = 0, fs = 0, foe = 0;
  logic [3:0] gcmp = 0, rcmp = 0;
  band_t gband, rband, gpk, rpk;
  logic g_bigger, g_equal, g_lower, g_eq64;
  int checks = 0, failures = 0, use_hi = 0, use_lo = 0;
  int g[N], r[N];
  always #5 clk = ~clk;

  cb_max1 #(.MIN_COUNT(64)) u_g (.clk, .rst_n, .pv, .fs, .foe, .cmp(gcmp), .band(gband),
    .bigger(g_bigger), .equal(g_equal), .lower(g_lower),
    .eq64(g_eq64), .peak_out(gpk));
  cb_max2 dut (.clk, .rst_n, .pv, .fs, .foe, .band(rband), .g_bigger, .g_equal, .g_lower,
    .g_eq64, .peak_out(rpk));
  assign rband = therm2band(rcmp);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic field();
    int gm, gc, hi, lo, expv, top, thr, run;
    bit late;
    top = $urandom_range(1, 4);
    thr = $urandom_range(20, 300);   // per-mille share of pixels forced to the top band
    // in "late" fields the top green band appears only in the second half, so
    // the green peak rises part way through the field
    late = $urandom_range(0, 1);
    for (int i = 0; i < N; i++) begin
      if (late && i < N / 2) g[i] = $urandom_range(0, top - 1);
      else g[i] = $urandom_range(0, 999) < thr ? top : int'($urandom_range(0, top - 1));
      // red follows green with a random cast of -2..+1 bands
      r[i] = g[i] + int'($urandom_range(0, 3)) - 2;
      if (r[i] < 0) r[i] = 0;
      if (r[i] > 4) r[i] = 4;
      if (late && i >= N / 2 && g[i] == top - 1) r[i] = 0;
    end
    @(negedge clk); fs = 1; @(negedge clk); fs = 0;
    for (int i = 0; i < N; i++) begin
      gcmp = 4'((1 << g[i]) - 1); rcmp = 4'((1 << r[i]) - 1);
      pv = 1; @(negedge clk);
    end
    pv = 0;
    @(negedge clk); foe = 1; @(negedge clk); foe = 0;
    gm = 0; gc = 0; hi = 0; lo = 0;
    foreach (g[i]) if (g[i] > gm) gm = g[i];
    foreach (g[i]) if (g[i] == gm) gc++;
    run = 0;
    foreach (g[i]) begin
      if (g[i] >= run && r[i] > hi) hi = r[i];
      if (g[i] != run && r[i] > lo) lo = r[i];
      if (g[i] > run) run = g[i];
    end
    expv = (gc > 64) ? hi : lo;
    if (gc > 64) use_hi++; else use_lo++;
    checks++;
    if (rpk != band_t'(expv)) begin
      failures++; $display("FAIL red peak %0d exp %0d (gmax %0d count %0d hi %0d lo %0d)", rpk, expv, gm, gc, hi, lo);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) field();
    checks++;
    if (use_hi == 0 || use_lo == 0) begin failures++; $display("FAIL coverage %0d %0d", use_hi, use_lo); end
    $display("fields judged on the green peak %0d, on the band below %0d", use_hi, use_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
