// tb_optical_reg: a random bit stream is shifted through the 15-stage
// registration register (with random idle clocks) and every tap setting of
// red and blue is checked against a model of the delayed stream: output of
// tap t equals the input t shifts ago, green equals the input 7 shifts ago,
// settings above 14 use the last stage.
module tb_optical_reg;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [3:0] x_red = 0, x_blue = 0;
  logic gr, rd, bl;
  int checks = 0, failures = 0;
  bit hist[$];
  always #5 clk = ~clk;

  optical_reg #(.DEPTH(15)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit past(input int t);
    int tt = t > 14 ? 14 : t;
    return tt < hist.size() ? hist[tt] : 1'b0;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      x_red = 4'($urandom_range(0, 15)); x_blue = 4'($urandom_range(0, 15));
      #1;
      checks++;
      if (gr != past(7) || rd != past(x_red) || bl != past(x_blue)) begin
        failures++; $display("FAIL k=%0d xr=%0d xb=%0d", k, x_red, x_blue);
      end
      shift = $urandom_range(0, 3) != 0; din = $urandom_range(0, 1);
      @(posedge clk);
      if (shift) begin hist.push_front(din); if (hist.size() > 16) void'(hist.pop_back()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
