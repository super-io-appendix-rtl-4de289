// i2c_slave: an I2C target that gives an I2C host the same register-bus access
// as the serial bus controller.
//
// Transactions (7-bit device address i2c_addr, no auto-increment):
//   write: START, addr+W, reg, data, data, ..., STOP
//          every data byte becomes one bus write of reg
//   read : START, addr+W, reg, (repeated) START, addr+R, data..., NACK, STOP
//          every byte sent is a fresh bus read of reg
// The slave acknowledges its address, the register byte and every data byte
// it receives; a byte the host acknowledges during a read is followed by
// another. A transaction for another address is ignored until the next START.
//
// scl and sda are sampled with clk through two-flop synchronisers, so clk
// must be many times faster than scl (at 27 MHz any standard or fast-mode
// rate is fine). START (sda falls while scl is high) and STOP (sda rises while
// scl is high) are recognised in any state. Data is taken at rising scl; sda
// is changed shortly after falling scl. sda_o is the open-drain output:
// 0 pulls the line low, 1 releases it.
// Bus reads must answer (rvalid) before the next falling scl; unmapped
// addresses read as 0x00.
//
// The transaction structure (address, register byte, data bytes with ACKs,
// reads of the selected register) follows the printed design. Sampling in the
// clk domain, the address match (which the printed code had disabled) and the
// bus handshake are this design's choices.
module i2c_slave
  import superio_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] i2c_addr,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_o,
  output bus_req_t   bus_req,
  input  bus_rsp_t   bus_rsp
);
  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_REG, I_WDATA, I_ACK, I_RDATA, I_RACK} state_t;
  state_t state, next_state;

  logic [2:0] scl_sync, sda_sync;
  logic       scl_s, sda_s, scl_rise, scl_fall, start_c, stop_c;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_sync <= '1;
      sda_sync <= '1;
    end else begin
      scl_sync <= {scl_sync[1:0], scl};
      sda_sync <= {sda_sync[1:0], sda_i};
    end
  end

  assign scl_s    = scl_sync[1];
  assign sda_s    = sda_sync[1];
  assign scl_rise = scl_sync[1] && !scl_sync[2];
  assign scl_fall = !scl_sync[1] && scl_sync[2];
  assign start_c  = scl_s && scl_sync[2] && sda_sync[2] && !sda_sync[1];
  assign stop_c   = scl_s && scl_sync[2] && !sda_sync[2] && sda_sync[1];

  logic [7:0] shift, new_byte, tx_byte, tx_shift;
  logic [3:0] cnt;
  logic       ack_pending, got_ack, rd_wait;

  assign new_byte = {shift[6:0], sda_s};

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= I_IDLE;
      next_state  <= I_IDLE;
      shift       <= '0;
      cnt         <= '0;
      sda_o       <= 1'b1;
      ack_pending <= 1'b0;
      got_ack     <= 1'b0;
      rd_wait     <= 1'b0;
      tx_byte     <= '0;
      tx_shift    <= '0;
      bus_req     <= '0;
    end else begin
      bus_req.go <= 1'b0;
      if (rd_wait && bus_rsp.rvalid) begin
        tx_byte <= bus_rsp.rdata;
        rd_wait <= 1'b0;
      end

      if (start_c) begin
        state       <= I_ADDR;
        cnt         <= '0;
        sda_o       <= 1'b1;
        ack_pending <= 1'b0;
      end else if (stop_c) begin
        state <= I_IDLE;
        sda_o <= 1'b1;
      end else begin
        case (state)
          I_ADDR, I_REG, I_WDATA: begin
            if (scl_rise) begin
              shift <= new_byte;
              cnt   <= cnt + 4'd1;
              if (cnt == 4'd7) begin
                cnt         <= '0;
                ack_pending <= 1'b1;
                case (state)
                  I_ADDR: begin
                    if (new_byte[7:1] != i2c_addr) begin
                      ack_pending <= 1'b0;
                      state       <= I_IDLE;
                    end else if (new_byte[0]) begin
                      next_state    <= I_RDATA;
                      bus_req.go    <= 1'b1;
                      bus_req.write <= 1'b0;
                      tx_byte       <= 8'h00;
                      rd_wait       <= 1'b1;
                    end else begin
                      next_state <= I_REG;
                    end
                  end
                  I_REG: begin
                    bus_req.addr <= new_byte;
                    next_state   <= I_WDATA;
                  end
                  default: begin
                    bus_req.wdata <= new_byte;
                    bus_req.write <= 1'b1;
                    bus_req.go    <= 1'b1;
                    next_state    <= I_WDATA;
                  end
                endcase
              end
            end
            if (scl_fall && ack_pending) begin
              ack_pending <= 1'b0;
              sda_o       <= 1'b0;
              state       <= I_ACK;
            end
          end
          I_ACK: if (scl_fall) begin
            if (next_state == I_RDATA) begin
              sda_o    <= tx_byte[7];
              tx_shift <= {tx_byte[6:0], 1'b0};
              cnt      <= 4'd1;
            end else begin
              sda_o <= 1'b1;
              cnt   <= '0;
            end
            state <= next_state;
          end
          I_RDATA: if (scl_fall) begin
            if (cnt == 4'd8) begin
              sda_o   <= 1'b1;
              got_ack <= 1'b0;
              state   <= I_RACK;
            end else begin
              sda_o    <= tx_shift[7];
              tx_shift <= {tx_shift[6:0], 1'b0};
              cnt      <= cnt + 4'd1;
            end
          end
          I_RACK: begin
            if (scl_rise) begin
              if (!sda_s) begin
                got_ack       <= 1'b1;
                bus_req.go    <= 1'b1;
                bus_req.write <= 1'b0;
                tx_byte       <= 8'h00;
                rd_wait       <= 1'b1;
              end else begin
                state <= I_IDLE;
              end
            end
            if (scl_fall && got_ack) begin
              sda_o    <= tx_byte[7];
              tx_shift <= {tx_byte[6:0], 1'b0};
              cnt      <= 4'd1;
              state    <= I_RDATA;
            end
          end
          default: sda_o <= 1'b1;
        endcase
      end
    end
  end

endmodule
