// tb_serial_if: a bit-level two-wire master (open-drain SDA, SCL period
// 400 ns against a 10 ns system clock) talks to the camera interface. It
// checks the acknowledge of address 20h and the absence of one for other
// addresses, every message header (set-up, exposure, gain, signed offsets,
// centre offsets), the write strobes and their data, several messages in one
// transfer, and reads that return the last header and the present value.
module tb_serial_if;
  timeunit 1ns; timeprecision 1ps;
  import cam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scl = 1, sda_m = 1;
  logic sda_oe, sda;
  logic [10:0] setup; logic [7:0] cx, cy;
  logic exp_wr, gain_wr, roff_wr, boff_wr;
  logic [8:0] exp_wr_coarse; logic [6:0] exp_wr_fine7, gain_wr_data;
  logic signed [7:0] off_wr_data;
  logic [8:0] rb_coarse = 9'd123; logic [2:0] rb_fine3 = 3'd5;
  logic [6:0] rb_gain = 7'd99;
  logic signed [7:0] rb_roff = -8'sd17, rb_boff = 8'sd42;
  int checks = 0, failures = 0;
  int n_exp = 0, n_gain = 0, n_roff = 0, n_boff = 0;
  logic [8:0] l_coarse; logic [6:0] l_fine7, l_gain; logic signed [7:0] l_roff, l_boff;
  localparam time Q = 100ns;   // quarter SCL period
  always #5 clk = ~clk;
  assign sda = sda_m & !sda_oe;

  serial_if #(.ADDR7(7'h10)) dut (.clk, .rst_n, .scl, .sda_in(sda), .sda_oe, .setup, .cx, .cy,
    .exp_wr, .exp_wr_coarse, .exp_wr_fine7, .gain_wr, .gain_wr_data, .roff_wr, .boff_wr,
    .off_wr_data, .rb_coarse, .rb_fine3, .rb_gain, .rb_roff, .rb_boff);

  always @(posedge clk) if (rst_n) begin
    if (exp_wr)  begin n_exp++;  l_coarse = exp_wr_coarse; l_fine7 = exp_wr_fine7; end
    if (gain_wr) begin n_gain++; l_gain = gain_wr_data; end
    if (roff_wr) begin n_roff++; l_roff = off_wr_data; end
    if (boff_wr) begin n_boff++; l_boff = off_wr_data; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- master primitives ----
  task automatic start_c();
    sda_m = 1; #Q; scl = 1; #Q; sda_m = 0; #Q; scl = 0; #Q;
  endtask
  task automatic stop_c();
    sda_m = 0; #Q; scl = 1; #Q; sda_m = 1; #(2*Q);
  endtask
  task automatic put_bit(input bit b);
    sda_m = b; #Q; scl = 1; #(2*Q); scl = 0; #Q;
  endtask
  task automatic get_bit(output bit b);
    sda_m = 1; #Q; scl = 1; #Q; b = sda; #Q; scl = 0; #Q;
  endtask
  task automatic put_byte(input logic [7:0] v, output bit ack);
    bit a;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(a);
    ack = !a;
  endtask
  task automatic get_byte(output logic [7:0] v, input bit more);
    bit b;
    for (int i = 7; i >= 0; i--) begin get_bit(b); v[i] = b; end
    put_bit(!more);
  endtask

  task automatic write_msgs(input logic [15:0] m[], input logic [7:0] addr = 8'h20);
    bit ack;
    start_c();
    put_byte(addr, ack);
    check(ack == (addr == 8'h20), $sformatf("address %h ack %0d", addr, ack));
    if (ack) foreach (m[i]) begin
      put_byte(m[i][15:8], ack); check(ack, "ack header byte");
      put_byte(m[i][7:0], ack);  check(ack, "ack data byte");
    end
    stop_c();
    #(4*Q);
  endtask

  task automatic read_word(output logic [15:0] w);
    bit ack;
    start_c();
    put_byte(8'h21, ack);
    check(ack, "read address ack");
    get_byte(w[15:8], 1'b1);
    get_byte(w[7:0], 1'b0);
    stop_c();
    #(4*Q);
  endtask

  initial begin
    logic [15:0] w;
    int ne;
    #100ns rst_n = 1;
    #1us;
    check(setup == 11'h214 && cx == 8'h77 && cy == 8'h77, "reset registers");
    // set-up code: AEC only plus chequer board
    write_msgs('{{4'b0001, 12'h030}});
    check(setup == 11'h030, $sformatf("setup %h", setup));
    read_word(w);
    check(w == {4'b0001, 12'h030}, $sformatf("read setup %h", w));
    // exposure: coarse 200, fine bits 6
    write_msgs('{{4'b0010, 9'd200, 3'd6}});
    check(n_exp == 1 && l_coarse == 200 && l_fine7 == 7'd96, $sformatf("exp %0d %0d %0d", n_exp, l_coarse, l_fine7));
    read_word(w);
    check(w == {4'b0010, 9'd123, 3'd5}, $sformatf("read exposure %h", w));
    // three messages in one transfer: gain, red -20, blue +35
    write_msgs('{{4'b0011, 12'd90}, {4'b0100, 4'd0, 1'b1, 7'd20}, {4'b0101, 4'd0, 1'b0, 7'd35}});
    check(n_gain == 1 && l_gain == 90, $sformatf("gain %0d", l_gain));
    check(n_roff == 1 && l_roff == -8'sd20, $sformatf("red offset %0d", l_roff));
    check(n_boff == 1 && l_boff == 8'sd35, $sformatf("blue offset %0d", l_boff));
    read_word(w);
    check(w == {4'b0101, 4'd0, 8'd42}, $sformatf("read blue offset %h", w));
    write_msgs('{{4'b0100, 12'h000}});
    read_word(w);
    check(w == {4'b0100, 4'd0, 1'b1, 7'd17}, $sformatf("read red offset %h", w));
    write_msgs('{{4'b0011, 12'd64}});
    read_word(w);
    check(w == {4'b0011, 5'd0, 7'd99}, $sformatf("read gain %h", w));
    write_msgs('{{4'b0110, 12'h0a3}, {4'b0111, 12'h05c}});
    check(cx == 8'ha3 && cy == 8'h5c, $sformatf("centre %h %h", cx, cy));
    read_word(w);
    check(w == {4'b0111, 12'h05c}, $sformatf("read cy %h", w));
    // another slave address: no acknowledge, nothing changes
    ne = n_exp;
    write_msgs('{{4'b0010, 12'hfff}}, 8'h40);
    write_msgs('{{4'b0010, 12'hfff}}, 8'h22);
    check(n_exp == ne, "foreign address ignored");
    // free header does not disturb anything
    write_msgs('{{4'b0000, 12'hfff}});
    check(setup == 11'h030 && cx == 8'ha3, "free header");
    // random exposure writes
    for (int k = 0; k < 20; k++) begin
      logic [11:0] v;
      v = 12'($urandom_range(0, 4095));
      ne = n_exp;
      write_msgs('{{4'b0010, v}});
      check(n_exp == ne + 1 && l_coarse == v[11:3] && l_fine7 == {v[2:0], 4'd0}, "random exposure");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
