// tb_vsr_decoder: a 32-row shift register decoder is driven with FI pulses of
// random width (the coarse exposure in lines) and random SAM / RST levels.
// Checked on every clock against a model: the integrating rows equal the FI
// history; the row sampled is the one whose integration just ended, and it
// integrated for exactly the FI width; no row is both reset and sampled or
// reset while integrating; and, the point of the improved decoding, a change
// of RST changes the reset state of at most one row (the row next to start).
module tb_vsr_decoder;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, shift = 0, fi = 0, sam = 0, rst = 1;
  logic [N-1:0] word_sample, word_reset, integrating;
  logic [N-1:0] m;               // model of the shift register
  int run_len[N];                // lines each row has been integrating
  int w;                         // current FI width
  int checks = 0, failures = 0, n_samples = 0, n_rst_edges = 0;
  always #5 clk = ~clk;

  vsr_decoder #(.N_ROWS(N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word-line state for a given RST level (the inputs sam/fi as applied)
  task automatic reset_with(input logic r, output logic [N-1:0] v);
    rst = r; #1;
    v = word_reset;
  endtask

  initial begin
    int period;
    logic [N-1:0] r0, r1;
    m = '0;
    foreach (run_len[i]) run_len[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 60; frame++) begin
      w = $urandom_range(1, 12);
      period = $urandom_range(N + w, N + w + 3);   // one pulse in the register at a time
      for (int line = 0; line < period; line++) begin
        // a few clocks within the line with random SAM/RST
        for (int c = 0; c < 4; c++) begin
          @(negedge clk);
          fi = (line < w); sam = $urandom_range(0, 1); rst = $urandom_range(0, 1); shift = 0;
          #1;
          check(integrating == m, "integrating rows");
          for (int i = 0; i < N; i++) begin
            bit beh;
            beh = !m[i] && (i + 1 < N) && m[i + 1];
            check(word_sample[i] == (beh && sam), $sformatf("sample row %0d", i));
            if (word_sample[i]) begin
              n_samples++;
              check(run_len[i] == w, $sformatf("row %0d integrated %0d lines, FI %0d", i, run_len[i], w));
            end
            check(!(word_reset[i] && (m[i] || word_sample[i])), $sformatf("reset conflict row %0d", i));
          end
          reset_with(1'b0, r0); reset_with(1'b1, r1);
          check($countones(r0 ^ r1) <= 1, $sformatf("RST switches %0d rows", $countones(r0 ^ r1)));
          if (r0 != r1) n_rst_edges++;
        end
        // line clock
        @(negedge clk); shift = 1; fi = (line < w);
        @(negedge clk); shift = 0;
        // model: length of each row's latest integration in lines
        for (int i = N - 1; i >= 0; i--) begin
          logic nxt;
          nxt = (i == 0) ? fi : m[i - 1];
          if (nxt) run_len[i] = m[i] ? run_len[i] + 1 : 1;
        end
        m = {m[N-2:0], fi};
      end
    end
    check(n_samples > 100 && n_rst_edges > 100, $sformatf("coverage samples %0d rst %0d", n_samples, n_rst_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
