// tb_i2c_master: tests the I2C master controller against a scripted bus
// responder.
//
// The responder, written here independently of the slave RTL, logs every
// START, repeated START, STOP and byte it sees on the bus, acknowledges
// received bytes (except one it can be told to refuse), and after a read
// header sends bytes from a queue while the master acknowledges them. For
// each transaction the test compares the logged bus sequence with the frame
// sequence worked out from the request (7-bit and 10-bit, write and read,
// single byte and burst), the bytes delivered on data_out, the ack_error
// flag and the number of cycles from start to done. The SCL period is
// shortened to 40 clock cycles to keep the run short.
module tb_i2c_master;
  import i2c_pkg::*;

  localparam int unsigned CLK_HZ  = 4_000_000;
  localparam int unsigned SCL_HZ  = 100_000;
  localparam int unsigned BITCYC  = CLK_HZ / SCL_HZ;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 1'b0, rw = 1'b0, ten_bit = 1'b0;
  logic [9:0] addr = '0;
  logic [7:0] reg_addr = '0, data_in, data_out;
  logic [7:0] nbytes = 8'd1;
  logic       data_req, data_out_valid, busy, done, ack_error;
  logic       scl_oe, sda_oe;
  logic       resp_oe = 1'b0;
  logic       scl, sda;

  assign scl = ~scl_oe;
  assign sda = ~(sda_oe | resp_oe);

  always #5 clk = ~clk;

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) dut (
    .clk, .rst_n, .start, .rw, .ten_bit, .addr, .reg_addr, .nbytes,
    .data_in, .data_req, .data_out, .data_out_valid, .busy, .done,
    .ack_error, .scl_oe, .sda_oe, .sda_i(sda));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus responder ----------------
  // log entries: 'h100 START, 'h200 repeated START, 'h300 STOP, else a byte
  int         blog [$];
  logic [7:0] txq [$];
  int         refuse_idx = -1;   // index of received byte to NACK (-1 none)
  int         n_master_ack = 0, n_master_nack = 0;

  logic scl_p = 1'b1, sda_p = 1'b1;
  bit   active = 0, tx = 0, in_ack = 0, hdr = 0;
  int   bc = 0, rx_idx = 0;
  logic [7:0] sh;

  always @(posedge clk) begin
    if (rst_n) begin
      if (scl && scl_p && sda_p && !sda) begin          // START
        blog.push_back(active ? 'h200 : 'h100);
        active = 1; tx = 0; in_ack = 0; hdr = 1; bc = 0; resp_oe <= 1'b0;
      end else if (scl && scl_p && !sda_p && sda) begin // STOP
        blog.push_back('h300);
        active = 0; tx = 0; in_ack = 0; resp_oe <= 1'b0;
      end else if (active && scl && !scl_p) begin        // SCL rises
        if (!tx && !in_ack && bc < 8) begin
          sh = {sh[6:0], sda}; bc++;
        end else if (tx && bc == 9) begin
          if (sda) n_master_nack++; else n_master_ack++;
          in_ack = sda;  // remember NACK
        end
      end else if (active && !scl && scl_p) begin        // SCL falls
        if (!tx) begin
          if (in_ack) begin
            in_ack = 0; resp_oe <= 1'b0; bc = 0;
            if (hdr && sh[0]) begin                      // read header acked
              tx = 1; sh = txq.pop_front(); resp_oe <= !sh[7]; bc = 1;
            end
            hdr = 0;
          end else if (bc == 8) begin
            blog.push_back(int'(sh));
            resp_oe <= (rx_idx != refuse_idx);
            if (rx_idx == refuse_idx) begin
              bc = 0; active = 0;                        // wait for STOP
            end else in_ack = 1;
            rx_idx++;
          end
        end else begin
          if (bc < 8) begin
            resp_oe <= !sh[7 - bc]; bc++;
          end else if (bc == 8) begin                    // release for ACK
            resp_oe <= 1'b0; bc = 9;
          end else if (!in_ack) begin                    // ACK: next byte
            sh = (txq.size() > 0) ? txq.pop_front() : 8'h00;
            resp_oe <= !sh[7]; bc = 1;
          end else begin
            resp_oe <= 1'b0; tx = 0; in_ack = 0;         // NACK: done
          end
        end
      end
    end
    scl_p = scl;
    sda_p = sda;
  end

  // ---------------- user side ----------------
  logic [7:0] wbuf [16];
  logic [7:0] rbuf [$];
  int widx;
  assign data_in = wbuf[widx[3:0]];
  always @(posedge clk) begin
    if (data_req) widx <= widx + 1;
    if (data_out_valid) rbuf.push_back(data_out);
  end

  task automatic run(bit r, bit ten, logic [9:0] a, logic [7:0] ra, int n,
                     output int cyc, output bit err);
    @(negedge clk);
    rw = r; ten_bit = ten; addr = a; reg_addr = ra; nbytes = 8'(n);
    widx = 0;
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    check(busy, "busy after start");
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!done);
    err = ack_error;
    repeat (BITCYC) @(posedge clk);
  endtask

  function automatic logic [7:0] hdr1(bit ten, logic [9:0] a, bit r);
    return ten ? {5'b11110, a[9:8], r} : {a[6:0], r};
  endfunction

  task automatic expect_log(int exp [$], string what);
    check(blog.size() == exp.size(),
          $sformatf("%s: %0d bus events, expected %0d", what, blog.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < blog.size(); i++)
      check(blog[i] == exp[i],
            $sformatf("%s: event %0d is %03h, expected %03h", what, i, blog[i], exp[i]));
  endtask

  task automatic t_write(bit ten, logic [9:0] a, logic [7:0] ra, int n);
    int exp [$]; int cyc; bit err;
    blog.delete(); rx_idx = 0; refuse_idx = -1;
    for (int i = 0; i < n; i++) wbuf[i] = 8'($urandom);
    run(0, ten, a, ra, n, cyc, err);
    exp.push_back('h100);
    exp.push_back(int'(hdr1(ten, a, 0)));
    if (ten) exp.push_back(int'(a[7:0]));
    exp.push_back(int'(ra));
    for (int i = 0; i < n; i++) exp.push_back(int'(wbuf[i]));
    exp.push_back('h300);
    expect_log(exp, $sformatf("write ten=%0d n=%0d", ten, n));
    check(!err, "write: no ack_error");
    check(cyc == (2 + 9 * ((ten ? 3 : 2) + n)) * BITCYC + 1,
          $sformatf("write cycles %0d", cyc));
  endtask

  task automatic t_read(bit ten, logic [9:0] a, logic [7:0] ra, int n);
    int exp [$]; logic [7:0] d [$]; int cyc; bit err;
    blog.delete(); rx_idx = 0; refuse_idx = -1; rbuf.delete(); txq.delete();
    n_master_ack = 0; n_master_nack = 0;
    for (int i = 0; i < n; i++) begin
      d.push_back(8'($urandom));
      txq.push_back(d[i]);
    end
    run(1, ten, a, ra, n, cyc, err);
    exp.push_back('h100);
    exp.push_back(int'(hdr1(ten, a, 0)));
    if (ten) exp.push_back(int'(a[7:0]));
    exp.push_back(int'(ra));
    exp.push_back('h200);
    exp.push_back(int'(hdr1(ten, a, 1)));
    exp.push_back('h300);
    expect_log(exp, $sformatf("read ten=%0d n=%0d", ten, n));
    check(!err, "read: no ack_error");
    check(rbuf.size() == n, $sformatf("read: %0d bytes of %0d", rbuf.size(), n));
    for (int i = 0; i < n && i < rbuf.size(); i++)
      check(rbuf[i] == d[i], $sformatf("read byte %0d = %02h expected %02h", i, rbuf[i], d[i]));
    check(n_master_ack == n - 1 && n_master_nack == 1,
          $sformatf("read: master ACKed %0d, NACKed %0d", n_master_ack, n_master_nack));
    check(cyc == (3 + 9 * ((ten ? 4 : 3) + n)) * BITCYC + 1,
          $sformatf("read cycles %0d", cyc));
  endtask

  task automatic t_refuse(int idx, int n);
    int cyc; bit err;
    blog.delete(); rx_idx = 0; refuse_idx = idx;
    for (int i = 0; i < n; i++) wbuf[i] = 8'($urandom);
    run(0, 0, 10'h050, 8'h00, n, cyc, err);
    check(err, $sformatf("NACK on byte %0d reported", idx));
    check(blog.size() == idx + 3 && blog[blog.size()-1] == 'h300,
          $sformatf("NACK on byte %0d: %0d events, stopped", idx, blog.size()));
    check(cyc == (2 + 9 * (idx + 1)) * BITCYC + 1,
          $sformatf("abort cycles %0d", cyc));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(posedge clk);
    check(!busy && scl && sda, "idle after reset");

    t_write(0, 10'h050, 8'h12, 1);
    t_write(0, 10'h068, 8'hF0, 3);
    t_write(1, 10'h2A5, 8'h01, 2);
    t_read (0, 10'h050, 8'h12, 1);
    t_read (0, 10'h068, 8'h40, 4);
    t_read (1, 10'h2A5, 8'h09, 3);
    t_refuse(0, 1);   // address refused
    t_refuse(1, 2);   // register refused
    t_refuse(3, 4);   // second data byte refused
    for (int k = 0; k < 6; k++) begin
      if (k[0]) t_read ($urandom_range(0, 1), 10'($urandom_range(0, 1023)) & 10'h37F,
                        8'($urandom), $urandom_range(1, 5));
      else      t_write($urandom_range(0, 1), 10'($urandom_range(0, 1023)) & 10'h37F,
                        8'($urandom), $urandom_range(1, 5));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
