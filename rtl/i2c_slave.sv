// i2c_slave: I2C slave with a byte-wide register file.
//
// The slave watches SCL and SDA, recognises START, repeated START and STOP,
// and answers only to its own address. With TEN_BIT = 0 it matches a first
// byte {ADDR[6:0], R/W}. With TEN_BIT = 1 it matches a first byte
// {11110, ADDR[9:8], R/W} and then a second byte ADDR[7:0]; a later read
// header {11110, ADDR[9:8], 1} after a repeated START is answered only if the
// full 10-bit address was matched since the last STOP.
//
// After its address (R/W = 0) the slave takes the next byte as the register
// address, and every following byte is written to that register, the pointer
// advancing by one per byte. After a repeated START and its address with
// R/W = 1 it sends the register at the pointer, again advancing per byte,
// until the master answers a byte with NACK. Every received byte it accepts is
// acknowledged by pulling SDA low for the ninth clock.
//
// Timing: SCL and SDA pass a two-flop synchroniser; all decisions are taken
// on the synchronised edges, so the slave lags the bus by 3 clock cycles and
// needs SCL phases of at least about 8 system cycles. SDA is changed only
// after a falling SCL edge. The slave never stretches the clock.
//
// Interface: `sda_oe` high pulls SDA low (open drain). `loc_addr` /
// `loc_rdata` give the local side (for example the device the slave serves)
// a combinational read of the register file.
//
// The address matching, the ACK after each byte and the register-address
// byte follow the document; the register file, its size, the pointer
// auto-increment and the local read port are this design's own choices.
module i2c_slave
  import i2c_pkg::*;
#(
  parameter logic [9:0]  ADDR    = 10'h050,  // own address
  parameter bit          TEN_BIT = 1'b0,     // 1: 10-bit addressing
  parameter int unsigned REGS    = 256       // registers, at most 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_oe,
  input  logic [7:0] loc_addr,
  output logic [7:0] loc_rdata
);

  localparam int unsigned AW = (REGS > 1) ? $clog2(REGS) : 1;

  logic [7:0] mem [REGS];

  // synchronisers and edge detection
  logic [1:0] scl_sync, sda_sync;
  logic       scl_d, sda_d;
  wire scl_s = scl_sync[1];
  wire sda_s = sda_sync[1];
  wire scl_rise = scl_s & ~scl_d;
  wire scl_fall = ~scl_s & scl_d;
  wire start_c  = scl_s & scl_d & sda_d & ~sda_s;
  wire stop_c   = scl_s & scl_d & ~sda_d & sda_s;

  s_state_e   st, nxt;      // nxt: state after the acknowledge bit
  logic [3:0] bitn;
  logic [7:0] shreg;
  logic [7:0] ptr;
  logic       ten_matched;  // full 10-bit address seen since STOP

  assign loc_rdata = (int'(loc_addr) < REGS) ? mem[AW'(loc_addr)] : 8'h00;

  wire [7:0] rx_byte = shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_d    <= 1'b1;
      sda_d    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
      scl_d    <= scl_s;
      sda_d    <= sda_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      nxt         <= S_IDLE;
      bitn        <= '0;
      shreg       <= '0;
      ptr         <= '0;
      ten_matched <= 1'b0;
      sda_oe      <= 1'b0;
    end else if (stop_c) begin
      st          <= S_IDLE;
      ten_matched <= 1'b0;
      sda_oe      <= 1'b0;
    end else if (start_c) begin
      st     <= S_ADDR1;
      bitn   <= '0;
      sda_oe <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: sda_oe <= 1'b0;

        // ----- receiving states: shift on rising SCL, decide on the fall
        S_ADDR1, S_ADDR2, S_REG, S_WDATA: begin
          if (scl_rise && bitn != 4'd8) begin
            shreg <= {shreg[6:0], sda_s};
            bitn  <= bitn + 4'd1;
          end else if (scl_fall && bitn == 4'd8) begin
            bitn <= '0;
            unique case (st)
              S_ADDR1: begin
                if (!TEN_BIT && rx_byte[7:1] == ADDR[6:0]) begin
                  sda_oe <= 1'b1;
                  st     <= S_ACK;
                  nxt    <= (rx_byte[0] == RW_READ) ? S_TX : S_REG;
                end else if (TEN_BIT && rx_byte[7:3] == TEN_BIT_PREFIX &&
                             rx_byte[2:1] == ADDR[9:8] &&
                             (rx_byte[0] == RW_WRITE || ten_matched)) begin
                  sda_oe <= 1'b1;
                  st     <= S_ACK;
                  nxt    <= (rx_byte[0] == RW_READ) ? S_TX : S_ADDR2;
                end else begin
                  st <= S_IDLE;
                end
              end
              S_ADDR2: begin
                if (rx_byte == ADDR[7:0]) begin
                  ten_matched <= 1'b1;
                  sda_oe      <= 1'b1;
                  st          <= S_ACK;
                  nxt         <= S_REG;
                end else begin
                  st <= S_IDLE;
                end
              end
              S_REG: begin
                ptr    <= rx_byte;
                sda_oe <= 1'b1;
                st     <= S_ACK;
                nxt    <= S_WDATA;
              end
              default: begin  // S_WDATA
                ptr    <= ptr + 8'd1;
                sda_oe <= 1'b1;
                st     <= S_ACK;
                nxt    <= S_WDATA;
              end
            endcase
          end
        end

        // ----- acknowledge bit: released on the next falling SCL
        S_ACK: begin
          if (scl_fall) begin
            st <= nxt;
            if (nxt == S_TX) begin
              shreg  <= (int'(ptr) < REGS) ? mem[AW'(ptr)] : 8'h00;
              sda_oe <= !((int'(ptr) < REGS) ? mem[AW'(ptr)][7] : 1'b0);
              bitn   <= 4'd1;
            end else begin
              sda_oe <= 1'b0;
              bitn   <= '0;
            end
          end
        end

        // ----- sending: next bit on every falling SCL, release for ACK
        S_TX: begin
          if (scl_fall) begin
            if (bitn == 4'd8) begin
              sda_oe <= 1'b0;
              st     <= S_RACK;
              ptr    <= ptr + 8'd1;
            end else begin
              sda_oe <= !shreg[3'd7 - 3'(bitn)];
              bitn   <= bitn + 4'd1;
            end
          end
        end

        // ----- master's acknowledge: ACK continues, NACK ends the read
        S_RACK: begin
          if (scl_rise) begin
            bitn <= sda_s ? 4'd15 : 4'd0;   // 15 marks NACK
          end else if (scl_fall) begin
            if (bitn == 4'd0) begin
              st     <= S_TX;
              shreg  <= (int'(ptr) < REGS) ? mem[AW'(ptr)] : 8'h00;
              sda_oe <= !((int'(ptr) < REGS) ? mem[AW'(ptr)][7] : 1'b0);
              bitn   <= 4'd1;
            end else begin
              st <= S_IDLE;
            end
          end
        end

        default: st <= S_IDLE;
      endcase
    end
  end

  // register file write: the byte just received in S_WDATA
  always_ff @(posedge clk) begin
    if (!stop_c && !start_c && st == S_WDATA && scl_fall && bitn == 4'd8 &&
        int'(ptr) < REGS)
      mem[AW'(ptr)] <= rx_byte;
  end

endmodule
