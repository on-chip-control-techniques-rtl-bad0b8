// i2c_master.svh: bit-level two-wire master tasks shared by the camera
// testbenches. The including module declares `scl`, `sda_m` (master drive,
// open drain) and `sda` (the wired line), and the time constant `I2C_Q`
// (a quarter of the SCL period). Writes send the slave address byte 20h
// and then 16-bit messages, high byte first; reads use address byte 21h and
// return one 16-bit word.
task automatic i2c_start();
  sda_m = 1; #I2C_Q; scl = 1; #I2C_Q; sda_m = 0; #I2C_Q; scl = 0; #I2C_Q;
endtask
task automatic i2c_stop();
  sda_m = 0; #I2C_Q; scl = 1; #I2C_Q; sda_m = 1; #(2*I2C_Q);
endtask
task automatic i2c_put_bit(input bit b);
  sda_m = b; #I2C_Q; scl = 1; #(2*I2C_Q); scl = 0; #I2C_Q;
endtask
task automatic i2c_get_bit(output bit b);
  sda_m = 1; #I2C_Q; scl = 1; #I2C_Q; b = sda; #I2C_Q; scl = 0; #I2C_Q;
endtask
task automatic i2c_put_byte(input logic [7:0] v, output bit ack);
  bit a;
  for (int i = 7; i >= 0; i--) i2c_put_bit(v[i]);
  i2c_get_bit(a);
  ack = !a;
endtask
task automatic i2c_get_byte(output logic [7:0] v, input bit more);
  bit b;
  for (int i = 7; i >= 0; i--) begin i2c_get_bit(b); v[i] = b; end
  i2c_put_bit(!more);
endtask
task automatic i2c_write(input logic [15:0] msg, output bit ok);
  bit a0, a1, a2;
  i2c_start();
  i2c_put_byte(8'h20, a0);
  i2c_put_byte(msg[15:8], a1);
  i2c_put_byte(msg[7:0], a2);
  i2c_stop();
  ok = a0 && a1 && a2;
endtask
task automatic i2c_read(output logic [15:0] w, output bit ok);
  i2c_start();
  i2c_put_byte(8'h21, ok);
  i2c_get_byte(w[15:8], 1'b1);
  i2c_get_byte(w[7:0], 1'b0);
  i2c_stop();
endtask
