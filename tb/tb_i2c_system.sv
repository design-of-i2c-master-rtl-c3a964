// tb_i2c_system: end-to-end test of the master and three slaves, with every
// parameter of the top at its default (50 MHz clock, 100 kHz SCL, slaves at
// 7-bit 0x50, 7-bit 0x68 and 10-bit 0x2A5).
//
// The test runs directed and random write and read transactions against all
// three slaves, in both addressing modes, single-byte and burst, plus writes
// to an absent address that must end in a NACK abort. A reference copy of
// each slave's registers predicts every byte read back over the bus and
// every byte seen on the local read port. The cycle count of each
// transaction is checked against the bit count of its frame sequence. A bus
// monitor counts START, repeated START and STOP conditions; each mechanism
// must occur at least once.
module tb_i2c_system;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);
  localparam int unsigned BITCYC  = 4 * QUARTER;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] reg_addr = '0;
  logic [7:0] nbytes = 8'd1;
  logic [7:0] data_in;
  logic       data_req, data_out_valid, busy, done, ack_error;
  logic [7:0] data_out;
  logic [7:0] loc_addr = '0;
  logic [7:0] loc_rdata [3];
  logic       scl, sda;

  always #10 clk = ~clk;

  i2c_system dut (.*);

  int checks = 0, failures = 0;

  // reference register files
  logic [7:0] ref_mem [3][256];
  bit         ref_vld [3][256];

  localparam logic [9:0] SADDR [3] = '{10'h050, 10'h068, 10'h2A5};
  localparam bit         STEN  [3] = '{1'b0, 1'b0, 1'b1};

  // write data source and read data sink
  logic [7:0] wbuf [16];
  logic [7:0] rbuf [16];
  int         widx, ridx;
  assign data_in = wbuf[widx[3:0]];
  always @(posedge clk) begin
    if (data_req) widx <= widx + 1;
    if (data_out_valid) begin
      rbuf[ridx[3:0]] = data_out;
      ridx = ridx + 1;
    end
  end

  // bus monitor
  int n_start = 0, n_rstart = 0, n_stop = 0;
  bit in_txn = 1'b0;
  always @(negedge sda) if (scl && rst_n) begin
    if (in_txn) n_rstart++; else n_start++;
    in_txn = 1'b1;
  end
  always @(posedge sda) if (scl && rst_n) begin
    n_stop++;
    in_txn = 1'b0;
  end

  // mechanism counters
  int n_addr7 = 0, n_addr10 = 0, n_write = 0, n_read = 0, n_burst = 0;
  int n_nack = 0;
  int n_slave [3] = '{0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one transaction; returns the number of cycles from start to done.
  task automatic run(input bit r, input bit ten, input logic [9:0] a,
                     input logic [7:0] ra, input int n, output int cyc,
                     output bit err);
    @(negedge clk);
    rw = r; ten_bit = ten; addr = a; reg_addr = ra; nbytes = 8'(n);
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
    err = ack_error;
  endtask

  function automatic int phases(bit r, bit ten, int n);
    // START + STOP, frames of 9 bits, one more phase for repeated START
    return r ? 3 + 9 * ((ten ? 4 : 3) + n) : 2 + 9 * ((ten ? 3 : 2) + n);
  endfunction

  task automatic do_write(int s, logic [7:0] ra, int n);
    int cyc; bit err;
    for (int i = 0; i < n; i++) wbuf[i] = 8'($urandom);
    run(1'b0, STEN[s], SADDR[s], ra, n, cyc, err);
    check(!err, $sformatf("write slave %0d acknowledged", s + 1));
    check(cyc == phases(0, STEN[s], n) * BITCYC + 1,
          $sformatf("write cycles %0d expected %0d", cyc,
                    phases(0, STEN[s], n) * BITCYC + 1));
    check(widx == n, $sformatf("write took %0d bytes of %0d", widx, n));
    for (int i = 0; i < n; i++) begin
      ref_mem[s][8'(ra + 8'(i))] = wbuf[i];
      ref_vld[s][8'(ra + 8'(i))] = 1'b1;
    end
    n_write++;
    n_slave[s]++;
    if (STEN[s]) n_addr10++; else n_addr7++;
    if (n > 1) n_burst++;
  endtask

  task automatic do_read(int s, logic [7:0] ra, int n);
    int cyc; bit err;
    run(1'b1, STEN[s], SADDR[s], ra, n, cyc, err);
    check(!err, $sformatf("read slave %0d acknowledged", s + 1));
    check(cyc == phases(1, STEN[s], n) * BITCYC + 1,
          $sformatf("read cycles %0d expected %0d", cyc,
                    phases(1, STEN[s], n) * BITCYC + 1));
    check(ridx == n, $sformatf("read returned %0d bytes of %0d", ridx, n));
    for (int i = 0; i < n; i++)
      if (ref_vld[s][8'(ra + 8'(i))])
        check(rbuf[i] == ref_mem[s][8'(ra + 8'(i))],
              $sformatf("slave %0d reg %02h read %02h expected %02h", s + 1,
                        8'(ra + 8'(i)), rbuf[i], ref_mem[s][8'(ra + 8'(i))]));
    n_read++;
    n_slave[s]++;
    if (STEN[s]) n_addr10++; else n_addr7++;
    if (n > 1) n_burst++;
  endtask

  task automatic do_absent(bit ten, logic [9:0] a);
    int cyc; bit err;
    wbuf[0] = 8'hEE;
    run(1'b0, ten, a, 8'h00, 1, cyc, err);
    check(err, "absent slave reported as NACK");
    // START, one 9-bit frame, STOP
    check(cyc == (2 + 9) * BITCYC + 1,
          $sformatf("abort cycles %0d expected %0d", cyc, (2 + 9) * BITCYC + 1));
    if (err) n_nack++;
  endtask

  initial begin
    int s, n;
    logic [7:0] ra;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 256; j++) ref_vld[i][j] = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // directed: one write and read per slave, single byte and burst
    do_write(0, 8'h10, 1);
    do_read (0, 8'h10, 1);
    do_write(1, 8'h00, 3);
    do_read (1, 8'h00, 3);
    do_write(2, 8'h7E, 4);   // pointer runs through 0x7E..0x81
    do_read (2, 8'h7E, 4);
    do_read (0, 8'h10, 1);   // slave 1 untouched by the others

    // absent slaves: 7-bit and 10-bit
    do_absent(1'b0, 10'h033);
    do_absent(1'b1, 10'h1A5);  // same low byte as slave 3, other MSBs

    // random traffic
    for (int k = 0; k < 16; k++) begin
      s  = $urandom_range(0, 2);
      ra = 8'($urandom_range(0, 15));
      n  = $urandom_range(1, 4);
      if ($urandom_range(0, 1) == 0) do_write(s, ra, n);
      else                           do_read (s, ra, n);
    end

    // local read port agrees with the reference for every written register
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 256; j++)
        if (ref_vld[i][j]) begin
          @(negedge clk);
          loc_addr = 8'(j);
          #1;
          check(loc_rdata[i] == ref_mem[i][j],
                $sformatf("slave %0d local reg %02h = %02h expected %02h",
                          i + 1, j, loc_rdata[i], ref_mem[i][j]));
        end

    check(!busy && scl && sda, "bus idle at the end");

    // every mechanism happened
    check(n_start > 0,  "START seen");
    check(n_rstart > 0, "repeated START seen");
    check(n_stop > 0,   "STOP seen");
    check(n_start == n_stop, "every START closed by a STOP");
    check(n_addr7 > 0,  "7-bit addressing used");
    check(n_addr10 > 0, "10-bit addressing used");
    check(n_write > 0,  "write transfer done");
    check(n_read > 0,   "read transfer done");
    check(n_burst > 0,  "multi-byte transfer done");
    check(n_nack > 0,   "NACK abort happened");
    for (int i = 0; i < 3; i++)
      check(n_slave[i] > 0, $sformatf("slave %0d addressed", i + 1));
    $display("mechanisms: start=%0d rstart=%0d stop=%0d addr7=%0d addr10=%0d write=%0d read=%0d burst=%0d nack=%0d slaves=%0d/%0d/%0d",
             n_start, n_rstart, n_stop, n_addr7, n_addr10, n_write, n_read,
             n_burst, n_nack, n_slave[0], n_slave[1], n_slave[2]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
