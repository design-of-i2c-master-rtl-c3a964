// tb_i2c_freq: runs the whole master/three-slave system at three SCL rates
// from one 50 MHz clock: 100 kHz (standard mode), 400 kHz (fast mode) and
// 1 MHz (fast mode plus). At each rate every slave gets a four-byte burst
// write and a burst read-back, and every transaction's length in cycles is
// checked against its frame count.
module tb_i2c_freq;
  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  int c [3], f [3];
  bit fin [3];

  i2c_rate_check #(.SCL_HZ(100_000))   u_100k (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  i2c_rate_check #(.SCL_HZ(400_000))   u_400k (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  i2c_rate_check #(.SCL_HZ(1_000_000)) u_1m   (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
