// i2c_system: one I2C master controller and three I2C slaves on one bus.
//
// The master takes a transfer request from the user (read/write, slave
// address up to 10 bits, register address, data) and carries it out on the
// two-wire bus; the three slaves listen and the addressed one answers.
// By default slave 1 and slave 2 use 7-bit addresses (0x50 and 0x68) and
// slave 3 a 10-bit address (0x2A5), so both addressing modes are present.
//
// SDA and SCL are open-drain lines with pull-ups: each device only pulls a
// line low, and the line is high unless someone pulls it. Here that wired-AND
// is formed inside the top from the devices' pull-low enables, and the
// resulting line levels are brought out as `scl` and `sda` for observation.
// Only the master drives SCL.
//
// Each slave's register file can be read from outside through `loc_addr`,
// with one `loc_rdata` lane per slave. Timing is the master's: see
// i2c_master.
//
// The structure (one master, three slaves, shared SDA/SCL) follows the
// document's I/O diagram; the slave addresses and the local read port are
// this design's own choices.
module i2c_system
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCL_HZ  = 100_000,
  parameter int unsigned NB_W    = 8,
  parameter logic [9:0]  S1_ADDR = 10'h050,
  parameter bit          S1_TEN  = 1'b0,
  parameter logic [9:0]  S2_ADDR = 10'h068,
  parameter bit          S2_TEN  = 1'b0,
  parameter logic [9:0]  S3_ADDR = 10'h2A5,
  parameter bit          S3_TEN  = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            rw,
  input  logic            ten_bit,
  input  logic [9:0]      addr,
  input  logic [7:0]      reg_addr,
  input  logic [NB_W-1:0] nbytes,
  input  logic [7:0]      data_in,
  output logic            data_req,
  output logic [7:0]      data_out,
  output logic            data_out_valid,
  output logic            busy,
  output logic            done,
  output logic            ack_error,
  input  logic [7:0]      loc_addr,
  output logic [7:0]      loc_rdata [3],
  output logic            scl,
  output logic            sda
);

  logic       m_scl_oe, m_sda_oe;
  logic [2:0] s_sda_oe;

  // open-drain wired-AND with pull-ups
  assign scl = ~m_scl_oe;
  assign sda = ~(m_sda_oe | (|s_sda_oe));

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .NB_W(NB_W)) u_master (
    .clk, .rst_n, .start, .rw, .ten_bit, .addr, .reg_addr, .nbytes,
    .data_in, .data_req, .data_out, .data_out_valid, .busy, .done,
    .ack_error, .scl_oe(m_scl_oe), .sda_oe(m_sda_oe), .sda_i(sda)
  );

  i2c_slave #(.ADDR(S1_ADDR), .TEN_BIT(S1_TEN)) u_slave1 (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_oe(s_sda_oe[0]),
    .loc_addr, .loc_rdata(loc_rdata[0])
  );

  i2c_slave #(.ADDR(S2_ADDR), .TEN_BIT(S2_TEN)) u_slave2 (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_oe(s_sda_oe[1]),
    .loc_addr, .loc_rdata(loc_rdata[1])
  );

  i2c_slave #(.ADDR(S3_ADDR), .TEN_BIT(S3_TEN)) u_slave3 (
    .clk, .rst_n, .scl_i(scl), .sda_i(sda), .sda_oe(s_sda_oe[2]),
    .loc_addr, .loc_rdata(loc_rdata[2])
  );

  // Two slaves must never acknowledge or send at the same time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_sda_oe));

endmodule
