// tb_video_timing: runs the NTSC timing generator (default parameters) for
// one frame and a bit with the pixel enable always on, and checks against
// counts worked out from the line and field sizes: the line period between
// CV pulses (364), the field lengths (263 + 262 lines), the number of valid
// pixels per field (305 x 240), one LS per active line, the widths of the
// three kinds of sync pulse, that SI is off during field blanking and that
// FOE comes once per frame at the last pixel of the odd field.
module tb_video_timing;
  timeunit 1ns; timeprecision 1ps;
  localparam int L = 364, F = 525, HA = 305, VA = 240;
  logic clk = 0, rst_n = 0;
  logic [8:0] hcnt; logic [8:0] vline;
  logic feoe, cv, cal, sam, rebit, ls, pv, pvb, ss, si, fst, foe, line_end;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  video_timing dut (.clk, .rst_n, .pclk_en(1'b1), .hcnt, .vline, .feoe, .cv, .cal,
                    .sam, .rebit, .ls, .pv, .pvb, .ss, .si, .fst, .foe, .line_end);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (L * F * 2) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0, last_cv = -1, last_fst = -1, last_foe = -1;
  int pv_cnt = 0, ls_cnt = 0, ss_run = 0, fields = 0, foes = 0;
  int widths[int];
  logic ss_d = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (fields < 3) begin
      @(posedge clk); #1; cyc++;
      check(pvb == !pv, "pvb is not the inverse of pv");
      if (cv) begin
        if (last_cv >= 0) check(cyc - last_cv == L, $sformatf("cv period %0d", cyc - last_cv));
        last_cv = cyc;
      end
      if (pv) pv_cnt++;
      if (ls) ls_cnt++;
      check(!(si && (cal || sam || rebit || ss)), "si overlaps blanking pulses");
      if (ss) ss_run++;
      if (!ss && ss_d) begin if (cyc > 100) widths[ss_run]++; ss_run = 0; end
      ss_d = ss;
      if (foe) begin
        foes++;
        check(feoe == 0 && hcnt == 0 && vline == 0, "foe not at the end of the odd field");
        if (last_foe >= 0) check(cyc - last_foe == L * F, $sformatf("foe period %0d", cyc - last_foe));
        last_foe = cyc;
      end
      if (fst) begin
        if (last_fst >= 0) begin
          longint len;
          len = cyc - last_fst;
          check(len == L * 263 || len == L * 262, $sformatf("field length %0d", len));
          check(pv_cnt == HA * VA, $sformatf("valid pixels per field %0d", pv_cnt));
          check(ls_cnt == VA, $sformatf("LS per field %0d", ls_cnt));
        end
        pv_cnt = 0; ls_cnt = 0;
        last_fst = cyc;
        fields++;
      end
    end
    check(foes >= 1, "no foe");
    check(widths.exists(27), "no normal sync pulse");
    check(widths.exists(13), "no equalising pulse");
    check(widths.exists(L/2 - 27), "no broad pulse");
    foreach (widths[w]) $display("sync width %0d seen %0d times", w, widths[w]);
    check(widths.num() == 3, $sformatf("%0d kinds of sync pulse", widths.num()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
