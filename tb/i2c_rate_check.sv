// i2c_rate_check: testbench helper that runs one i2c_system at a given SCL
// rate. It writes four random bytes to each slave, reads them back in one
// burst per slave, and checks the data and the transaction lengths in clock
// cycles against the frame count times CLK_HZ / SCL_HZ (rounded down to whole
// quarter periods). It reports its check and failure counts and raises
// `finished` when done.
module i2c_rate_check #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int unsigned BITCYC = 4 * (CLK_HZ / (4 * SCL_HZ));
  localparam logic [9:0] SADDR [3] = '{10'h050, 10'h068, 10'h2A5};
  localparam bit         STEN  [3] = '{1'b0, 1'b0, 1'b1};

  logic       start = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] reg_addr = '0, nbytes = 8'd4, data_in, data_out;
  logic       data_req, data_out_valid, busy, done, ack_error;
  logic [7:0] loc_addr = '0;
  logic [7:0] loc_rdata [3];
  logic       scl, sda;

  i2c_system #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (.*);

  logic [7:0] wbuf [4];
  logic [7:0] rbuf [4];
  int widx, ridx;
  assign data_in = wbuf[widx[1:0]];
  always @(posedge clk) begin
    if (data_req) widx <= widx + 1;
    if (data_out_valid) begin
      rbuf[ridx[1:0]] = data_out;
      ridx = ridx + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (SCL %0d Hz): %s", SCL_HZ, what);
    end
  endtask

  task automatic run(bit r, int s, output int cyc);
    @(negedge clk);
    rw = r; ten_bit = STEN[s]; addr = SADDR[s]; reg_addr = 8'(16 * s + 3);
    widx = 0; ridx = 0;
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!done);
    check(!ack_error, "transaction acknowledged");
  endtask

  initial begin
    int cyc, ph;
    logic [7:0] exp [4];
    checks = 0; failures = 0; finished = 0;
    @(posedge rst_n);
    repeat (4) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      for (int i = 0; i < 4; i++) begin
        exp[i]  = 8'($urandom);
        wbuf[i] = exp[i];
      end
      run(1'b0, s, cyc);
      ph = 2 + 9 * ((STEN[s] ? 3 : 2) + 4);
      check(cyc == ph * BITCYC + 1, $sformatf("write cycles %0d expected %0d", cyc, ph * BITCYC + 1));
      run(1'b1, s, cyc);
      ph = 3 + 9 * ((STEN[s] ? 4 : 3) + 4);
      check(cyc == ph * BITCYC + 1, $sformatf("read cycles %0d expected %0d", cyc, ph * BITCYC + 1));
      check(ridx == 4, "four bytes read");
      for (int i = 0; i < 4; i++)
        check(rbuf[i] == exp[i], $sformatf("slave %0d byte %0d = %02h expected %02h",
                                           s + 1, i, rbuf[i], exp[i]));
    end
    finished = 1;
  end
endmodule
