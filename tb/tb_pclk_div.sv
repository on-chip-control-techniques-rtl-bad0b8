// tb_pclk_div: checks the pixel clock enable of both chips. The colour
// divider (5/2) must give exactly two enables in every window of five clocks
// and never two in a row; the monochrome divider (2/1) must alternate.
module tb_pclk_div;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  logic en_c, en_m;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pclk_div dut_c (.clk, .rst_n, .pclk_en(en_c));
  pclk_div #(.NUM(2), .DEN(1)) dut_m (.clk, .rst_n, .pclk_en(en_m));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] hist;
  int total = 0, mtotal = 0;
  logic prev_m;
  initial begin
    hist = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    #1 prev_m = en_m;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk); #1;
      hist = {hist[3:0], en_c};
      total += en_c;
      mtotal += en_m;
      if (i >= 5) check($countones(hist) == 2, $sformatf("window of 5 has %0d enables", $countones(hist)));
      check(!(hist[1] && hist[0]), "two enables in a row");
      check(en_m != prev_m, "mono enable does not alternate");
      prev_m = en_m;
    end
    check(total == 200, $sformatf("colour: %0d enables in 500 clocks, expected 200", total));
    check(mtotal == 250, $sformatf("mono: %0d enables in 500 clocks, expected 250", mtotal));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
