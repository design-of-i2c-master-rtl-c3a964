// i2c_master: FSM-based I2C master controller.
//
// On a one-cycle `start` pulse the controller latches the transfer request
// (read/write, 7- or 10-bit slave address, register address, byte count) and
// runs one complete bus transaction on its own:
//
//   write: S | slave address, W | A | register | A | data | A ... | P
//   read:  S | slave address, W | A | register | A | Sr | slave address, R |
//          A | data | A ... | data | NACK | P
//
// With `ten_bit` set, the slave address is sent as two bytes: 11110 a9 a8 R/W
// and then a7..a0. After the repeated START of a read only the first of the
// two bytes is sent again, with R/W = 1, as the I2C convention has it.
// If the slave does not acknowledge a byte the master gives up, sends STOP
// and reports `ack_error` together with `done`.
//
// Timing: each SCL period is split into four quarters of
// QUARTER = CLK_HZ / (4 * SCL_HZ) clock cycles. SCL is low in quarters 0-1 and
// high in quarters 2-3. SDA is changed at the start of quarter 1 (SCL low) and
// sampled at the end of quarter 2 (SCL high). START, repeated START and STOP
// each take one SCL period, as does every bit. A write of N bytes with a 7-bit
// address therefore takes (2 + 9*(2+N)) * 4 * QUARTER cycles from `start` to
// `done`, a read (3 + 9*(3+N)) * 4 * QUARTER; a 10-bit address adds one more
// 9-bit frame.
//
// Bus pins are open drain: `scl_oe` / `sda_oe` high pull the line low, low
// releases it to the pull-up. The master is the only clock source (no clock
// stretching and no multi-master arbitration).
//
// Data interface: `data_in` is taken at the start of each write data byte and
// `data_req` pulses for one cycle then, so the user can present the next
// byte. Each received byte appears on `data_out` with a one-cycle
// `data_out_valid`. The master acknowledges every read byte except the last.
//
// The state sequence (IDLE, START, address/register/data frames with ACK,
// repeated START for reads, STOP) and the frame layout follow the document;
// the quarter-period timing, the user-side handshake, the byte count, the
// ten_bit select input and the abort on NACK are this design's own choices.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,  // system clock
  parameter int unsigned SCL_HZ = 100_000,     // SCL frequency
  parameter int unsigned NB_W   = 8            // width of the byte count
) (
  input  logic            clk,
  input  logic            rst_n,
  // user side
  input  logic            start,
  input  logic            rw,          // 0 write, 1 read
  input  logic            ten_bit,     // 1: 10-bit slave address
  input  logic [9:0]      addr,
  input  logic [7:0]      reg_addr,
  input  logic [NB_W-1:0] nbytes,      // data bytes to move, 0 counts as 1
  input  logic [7:0]      data_in,
  output logic            data_req,
  output logic [7:0]      data_out,
  output logic            data_out_valid,
  output logic            busy,
  output logic            done,
  output logic            ack_error,
  // I2C bus, open drain
  output logic            scl_oe,
  output logic            sda_oe,
  input  logic            sda_i
);

  localparam int unsigned QUARTER = CLK_HZ / (4 * SCL_HZ);
  localparam int unsigned QW      = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  // The slave reacts to SCL edges a few cycles late (input synchronisers),
  // so each quarter must be comfortably longer than that.
  initial assert (QUARTER >= 8)
    else $error("i2c_master: CLK_HZ/(4*SCL_HZ) must be at least 8");

  m_state_e        st;
  m_frame_e        frame;
  logic [QW-1:0]   qcnt;     // cycles inside the current quarter
  logic [1:0]      q;        // quarter of the current SCL period
  logic [3:0]      bitn;     // bit inside a frame, 8 = acknowledge
  logic [7:0]      shreg;
  logic [NB_W-1:0] remain;   // data bytes still to move, including current
  logic            rw_q, ten_q;
  logic [9:0]      addr_q;
  logic [7:0]      reg_q;
  logic            ack_bit;  // sampled SDA of the acknowledge bit

  wire tick = (qcnt == QW'(QUARTER - 1));
  wire last = (remain <= NB_W'(1));

  assign busy = (st != M_IDLE);

  // Byte to send in a given frame.
  function automatic logic [7:0] frame_byte(m_frame_e f);
    unique case (f)
      F_ADDR1: frame_byte = ten_q ? {TEN_BIT_PREFIX, addr_q[9:8], RW_WRITE}
                                  : {addr_q[6:0], RW_WRITE};
      F_ADDR2: frame_byte = addr_q[7:0];
      F_REG:   frame_byte = reg_q;
      F_RADDR: frame_byte = ten_q ? {TEN_BIT_PREFIX, addr_q[9:8], RW_READ}
                                  : {addr_q[6:0], RW_READ};
      F_WDATA: frame_byte = data_in;
      default: frame_byte = 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= M_IDLE;
      frame          <= F_ADDR1;
      qcnt           <= '0;
      q              <= '0;
      bitn           <= '0;
      shreg          <= '0;
      remain         <= '0;
      rw_q           <= 1'b0;
      ten_q          <= 1'b0;
      addr_q         <= '0;
      reg_q          <= '0;
      ack_bit        <= 1'b1;
      scl_oe         <= 1'b0;
      sda_oe         <= 1'b0;
      data_req       <= 1'b0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
      done           <= 1'b0;
      ack_error      <= 1'b0;
    end else begin
      data_req       <= 1'b0;
      data_out_valid <= 1'b0;
      done           <= 1'b0;

      if (st == M_IDLE) begin
        qcnt <= '0;
        q    <= '0;
        if (start) begin
          st        <= M_START;
          rw_q      <= rw;
          ten_q     <= ten_bit;
          addr_q    <= addr;
          reg_q     <= reg_addr;
          remain    <= (nbytes == '0) ? NB_W'(1) : nbytes;
          ack_error <= 1'b0;
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 1'b1;
        if (tick) begin
          q <= q + 2'd1;
          unique case (st)
            // ---------------------------------------------------------------
            M_START, M_RSTART: begin
              unique case (q)
                2'd0: if (st == M_RSTART) sda_oe <= 1'b0; // SDA up, SCL low
                2'd1: scl_oe <= 1'b0;                     // SCL up
                2'd2: sda_oe <= 1'b1;                     // SDA falls: (r)START
                2'd3: begin                               // SCL falls
                  scl_oe <= 1'b1;
                  st     <= M_BYTE;
                  bitn   <= '0;
                  frame  <= (st == M_START) ? F_ADDR1 : F_RADDR;
                  shreg  <= frame_byte((st == M_START) ? F_ADDR1 : F_RADDR);
                end
              endcase
            end
            // ---------------------------------------------------------------
            M_BYTE: begin
              unique case (q)
                2'd0: begin                               // drive SDA
                  if (bitn == 4'd8)
                    // acknowledge: release when sending, ACK/NACK when reading
                    sda_oe <= (frame == F_RDATA) ? !last : 1'b0;
                  else if (frame == F_RDATA)
                    sda_oe <= 1'b0;
                  else
                    sda_oe <= !shreg[7];
                end
                2'd1: scl_oe <= 1'b0;                     // SCL rises
                2'd2: begin                               // sample SDA
                  if (bitn == 4'd8) ack_bit <= sda_i;
                  else              shreg   <= {shreg[6:0], sda_i};
                end
                2'd3: begin                               // SCL falls
                  scl_oe <= 1'b1;
                  if (bitn != 4'd8) begin
                    bitn <= bitn + 4'd1;
                  end else begin
                    bitn <= '0;
                    if (frame == F_RDATA) begin
                      data_out_valid <= 1'b1;
                      data_out       <= shreg;
                      if (last) st <= M_STOP;
                      else begin
                        remain <= remain - 1'b1;
                        shreg  <= '0;
                      end
                    end else if (ack_bit) begin
                      // no acknowledge from the slave: abort
                      ack_error <= 1'b1;
                      st        <= M_STOP;
                    end else begin
                      unique case (frame)
                        F_ADDR1: begin
                          frame <= ten_q ? F_ADDR2 : F_REG;
                          shreg <= frame_byte(ten_q ? F_ADDR2 : F_REG);
                        end
                        F_ADDR2: begin
                          frame <= F_REG;
                          shreg <= frame_byte(F_REG);
                        end
                        F_REG: begin
                          if (rw_q) st <= M_RSTART;
                          else begin
                            frame    <= F_WDATA;
                            shreg    <= frame_byte(F_WDATA);
                            data_req <= 1'b1;
                          end
                        end
                        F_RADDR: begin
                          frame <= F_RDATA;
                          shreg <= '0;
                        end
                        F_WDATA: begin
                          if (last) st <= M_STOP;
                          else begin
                            remain   <= remain - 1'b1;
                            shreg    <= frame_byte(F_WDATA);
                            data_req <= 1'b1;
                          end
                        end
                        default: st <= M_STOP;
                      endcase
                    end
                  end
                end
              endcase
            end
            // ---------------------------------------------------------------
            M_STOP: begin
              unique case (q)
                2'd0: sda_oe <= 1'b1;                     // SDA low, SCL low
                2'd1: scl_oe <= 1'b0;                     // SCL up
                2'd2: sda_oe <= 1'b0;                     // SDA rises: STOP
                2'd3: begin
                  st   <= M_IDLE;
                  done <= 1'b1;
                end
              endcase
            end
            default: st <= M_IDLE;
          endcase
        end
      end
    end
  end

  // While SCL is high inside a data or acknowledge bit the master must not
  // move SDA; only START, repeated START and STOP may.
  property p_sda_stable_scl_high;
    @(posedge clk) disable iff (!rst_n)
      (st == M_BYTE && $past(st) == M_BYTE && !scl_oe && !$past(scl_oe))
        |-> $stable(sda_oe);
  endproperty
  assert property (p_sda_stable_scl_high);

endmodule
