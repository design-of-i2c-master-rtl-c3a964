// tb_i2c_slave: tests the I2C slave against a bit-banged bus.
//
// Two slaves share the bus: one with the 7-bit address 0x50, one with the
// 10-bit address 0x2A5. The testbench plays the master with plain tasks
// (START, repeated START, STOP, byte out with ACK sampling, byte in with
// ACK/NACK) and checks: which slave acknowledges each address byte, that
// written bytes land in the right registers with the pointer advancing, that
// bus reads and the local read port return them, that a 10-bit read header
// is refused unless the full address was matched since the last STOP, and
// that a wrong second address byte is refused.
module tb_i2c_slave;
  import i2c_pkg::*;

  localparam int H = 20;   // clock cycles per SCL half period

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic scl = 1'b1;
  logic sda_drv = 1'b1;    // testbench side of SDA, 0 pulls low
  logic oe7, oe10;
  logic sda;
  logic [7:0] loc_addr = '0;
  logic [7:0] rd7, rd10;

  assign sda = sda_drv & ~oe7 & ~oe10;

  always #5 clk = ~clk;

  i2c_slave #(.ADDR(10'h050), .TEN_BIT(1'b0)) u7 (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_oe(oe7),
    .loc_addr, .loc_rdata(rd7));
  i2c_slave #(.ADDR(10'h2A5), .TEN_BIT(1'b1)) u10 (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_oe(oe10),
    .loc_addr, .loc_rdata(rd10));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_cyc(int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic bus_start();          // from idle: SCL and SDA high
    sda_drv = 1'b1; scl = 1'b1; wait_cyc(H);
    sda_drv = 1'b0;             wait_cyc(H);
    scl = 1'b0;                 wait_cyc(H / 2);
  endtask

  task automatic bus_rstart();         // entered with SCL low
    sda_drv = 1'b1; wait_cyc(H / 2);
    scl = 1'b1;     wait_cyc(H);
    sda_drv = 1'b0; wait_cyc(H);
    scl = 1'b0;     wait_cyc(H / 2);
  endtask

  task automatic bus_stop();           // entered with SCL low
    sda_drv = 1'b0; wait_cyc(H / 2);
    scl = 1'b1;     wait_cyc(H);
    sda_drv = 1'b1; wait_cyc(2 * H);
  endtask

  // one bit: set SDA with SCL low, raise SCL, sample, lower SCL
  task automatic bus_bit(input logic b, output logic s);
    sda_drv = b;  wait_cyc(H / 2);
    scl = 1'b1;   wait_cyc(H / 2);
    s = sda;      wait_cyc(H / 2);
    scl = 1'b0;   wait_cyc(H / 2);
  endtask

  task automatic send_byte(input logic [7:0] b, output bit acked);
    logic s;
    for (int i = 7; i >= 0; i--) bus_bit(b[i], s);
    bus_bit(1'b1, s);
    acked = !s;
  endtask

  task automatic recv_byte(input bit ack, output logic [7:0] b);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      bus_bit(1'b1, s);
      b[i] = s;
    end
    bus_bit(!ack, s);
  endtask

  logic [7:0] b;
  bit a;

  initial begin
    wait_cyc(4);
    rst_n = 1'b1;
    wait_cyc(4);

    // 7-bit write of three bytes to registers 0x20..0x22
    bus_start();
    send_byte({7'h50, 1'b0}, a); check(a,  "7-bit address acknowledged");
    send_byte(8'h20, a);         check(a,  "register address acknowledged");
    send_byte(8'hA5, a);         check(a,  "data 0 acknowledged");
    send_byte(8'h3C, a);         check(a,  "data 1 acknowledged");
    send_byte(8'h81, a);         check(a,  "data 2 acknowledged");
    bus_stop();

    // local port
    loc_addr = 8'h20; wait_cyc(1); check(rd7 == 8'hA5, "local reg 20");
    loc_addr = 8'h21; wait_cyc(1); check(rd7 == 8'h3C, "local reg 21");
    loc_addr = 8'h22; wait_cyc(1); check(rd7 == 8'h81, "local reg 22");

    // 7-bit read back from 0x21 with repeated START, two bytes
    bus_start();
    send_byte({7'h50, 1'b0}, a); check(a, "read: address acknowledged");
    send_byte(8'h21, a);         check(a, "read: register acknowledged");
    bus_rstart();
    send_byte({7'h50, 1'b1}, a); check(a, "read: address R acknowledged");
    recv_byte(1'b1, b);          check(b == 8'h3C, $sformatf("read 21 = %02h", b));
    recv_byte(1'b0, b);          check(b == 8'h81, $sformatf("read 22 = %02h", b));
    check(sda == 1'b1, "slave released SDA after NACK");
    bus_stop();

    // nobody answers another 7-bit address
    bus_start();
    send_byte({7'h51, 1'b0}, a); check(!a, "address 0x51 not acknowledged");
    bus_stop();

    // 10-bit write to 0x05, 0x06
    bus_start();
    send_byte({5'b11110, 2'b10, 1'b0}, a); check(a, "10-bit first byte acknowledged");
    send_byte(8'hA5, a);                   check(a, "10-bit second byte acknowledged");
    send_byte(8'h05, a);                   check(a, "10-bit register acknowledged");
    send_byte(8'h5A, a);                   check(a, "10-bit data 0 acknowledged");
    send_byte(8'hC3, a);                   check(a, "10-bit data 1 acknowledged");
    bus_stop();
    loc_addr = 8'h05; wait_cyc(1); check(rd10 == 8'h5A, "10-bit local reg 05");
    loc_addr = 8'h06; wait_cyc(1); check(rd10 == 8'hC3, "10-bit local reg 06");
    loc_addr = 8'h20; wait_cyc(1); check(rd7 == 8'hA5, "7-bit slave untouched");

    // 10-bit read: full address, register, Sr, first byte with R
    bus_start();
    send_byte({5'b11110, 2'b10, 1'b0}, a); check(a, "10-bit read: first byte");
    send_byte(8'hA5, a);                   check(a, "10-bit read: second byte");
    send_byte(8'h05, a);                   check(a, "10-bit read: register");
    bus_rstart();
    send_byte({5'b11110, 2'b10, 1'b1}, a); check(a, "10-bit read: header R");
    recv_byte(1'b1, b); check(b == 8'h5A, $sformatf("10-bit read 05 = %02h", b));
    recv_byte(1'b0, b); check(b == 8'hC3, $sformatf("10-bit read 06 = %02h", b));
    bus_stop();

    // 10-bit read header without the full address since STOP: refused
    bus_start();
    send_byte({5'b11110, 2'b10, 1'b1}, a); check(!a, "bare 10-bit read header refused");
    bus_stop();

    // wrong second byte: refused
    bus_start();
    send_byte({5'b11110, 2'b10, 1'b0}, a); check(a,  "10-bit first byte again");
    send_byte(8'hA4, a);                   check(!a, "wrong second byte refused");
    bus_stop();

    // wrong MSBs: refused
    bus_start();
    send_byte({5'b11110, 2'b01, 1'b0}, a); check(!a, "wrong 10-bit MSBs refused");
    bus_stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
