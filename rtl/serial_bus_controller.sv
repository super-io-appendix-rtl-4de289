// serial_bus_controller: turns RS-232 commands from a host into register-bus
// accesses and sends read results back.
//
// Protocol (bytes on the serial line, 115200 baud 8N1 by default):
//   write:  0x43, address, value      -> one bus write, no reply
//   read:   0x42, address             -> one bus read, the value is sent back
// The command byte is 0100001 followed by the write flag; any other byte is
// ignored while waiting for a command. Addresses 248..252 are answered by the
// controller itself with its version (major, minor) and build date (day,
// month, year); reads of them still go out on the bus but the reply is the
// constant.
//
// A write waits until no slot reports bus busy (a slot serving its own module)
// and then issues a one-clock go with write=1. A read issues a one-clock go
// with write=0 and waits up to READ_TIMEOUT clocks for a slot to return
// rvalid; if none does (an unmapped address) the reply is 0x00. The last value
// read is shown on leds.
//
// The command format, information registers, busy wait before writes and the
// reply path follow the printed design. The single-clock go for reads and the
// rvalid/timeout read handshake replace its fixed three-clock sampling of a
// tristate bus; that is this design's choice.
module serial_bus_controller
  import superio_pkg::*;
#(
  parameter int unsigned CLK_FREQ           = 27_000_000,
  parameter int unsigned BAUD               = 115_200,
  parameter int unsigned READ_TIMEOUT       = 4,
  parameter logic [7:0]  INFO_VERSION_MAJOR = 8'd0,
  parameter logic [7:0]  INFO_VERSION_MINOR = 8'd1,
  parameter logic [7:0]  INFO_BUILD_DAY     = 8'd10,
  parameter logic [7:0]  INFO_BUILD_MONTH   = 8'd5,
  parameter logic [7:0]  INFO_BUILD_YEAR    = 8'd5
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     rxd,
  output logic     txd,
  output bus_req_t bus_req,
  input  bus_rsp_t bus_rsp,
  output logic [7:0] leds
);
  logic       rx_ready, rx_eop, rx_idle;
  logic [7:0] rx_data;
  logic       tx_start, tx_busy;
  logic [7:0] tx_data;

  uart_rx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rxd,
    .data_ready(rx_ready), .data_error(), .data(rx_data), .end_of_packet(rx_eop), .idle(rx_idle)
  );

  uart_tx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .start(tx_start), .data(tx_data), .txd, .busy(tx_busy)
  );

  typedef enum logic [2:0] {
    S_IDLE, S_GETREG, S_GETVAL, S_BUSYWAIT, S_READ, S_SEND, S_SENDWAIT
  } state_t;
  state_t state;

  localparam int unsigned TW = $clog2(READ_TIMEOUT + 1);
  logic [TW-1:0] wait_cnt;
  logic          is_write;

  function automatic logic [7:0] info_or(input logic [7:0] a, input logic [7:0] bus_value);
    case (a)
      INFO_ADDR_VERSION_MAJOR: return INFO_VERSION_MAJOR;
      INFO_ADDR_VERSION_MINOR: return INFO_VERSION_MINOR;
      INFO_ADDR_BUILD_DAY:     return INFO_BUILD_DAY;
      INFO_ADDR_BUILD_MONTH:   return INFO_BUILD_MONTH;
      INFO_ADDR_BUILD_YEAR:    return INFO_BUILD_YEAR;
      default:                 return bus_value;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      bus_req  <= '0;
      is_write <= 1'b0;
      wait_cnt <= '0;
      tx_start <= 1'b0;
      tx_data  <= '0;
      leds     <= '0;
    end else begin
      bus_req.go <= 1'b0;
      tx_start   <= 1'b0;
      case (state)
        S_IDLE: if (rx_ready && rx_data[7:1] == CMD_PREFIX) begin
          is_write <= rx_data[0];
          state    <= S_GETREG;
        end
        S_GETREG: if (rx_ready) begin
          bus_req.addr <= rx_data;
          if (is_write) state <= S_GETVAL;
          else begin
            bus_req.write <= 1'b0;
            bus_req.go    <= 1'b1;
            wait_cnt      <= '0;
            state         <= S_READ;
          end
        end
        S_GETVAL: if (rx_ready) begin
          bus_req.wdata <= rx_data;
          state         <= S_BUSYWAIT;
        end
        S_BUSYWAIT: if (!bus_rsp.busy) begin
          bus_req.write <= 1'b1;
          bus_req.go    <= 1'b1;
          state         <= S_IDLE;
        end
        S_READ: begin
          if (bus_rsp.rvalid || wait_cnt == TW'(READ_TIMEOUT)) begin
            tx_data <= info_or(bus_req.addr, bus_rsp.rvalid ? bus_rsp.rdata : 8'h00);
            leds    <= info_or(bus_req.addr, bus_rsp.rvalid ? bus_rsp.rdata : 8'h00);
            state   <= S_SEND;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_SEND: begin
          tx_start <= 1'b1;
          state    <= S_SENDWAIT;
        end
        S_SENDWAIT: if (!tx_start && !tx_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A go strobe lasts exactly one clock.
  assert property (@(posedge clk) disable iff (rst) bus_req.go |=> !bus_req.go);

endmodule
