// uart_tx: RS-232 transmitter, 8 data bits, no parity, two stop bits.
//
// A fractional accumulator (step INC, ACC_WIDTH bits) produces one tick per
// bit time while a frame is in progress; it is cleared while idle so that the
// start bit lasts a full bit. A start pulse (one clock, or held) while idle
// loads the byte and sends start bit, data bits LSB first and two stop bits,
// eleven bit times in all. busy is high from the clock after start until the
// second stop bit ends. The line output is registered.
//
// Frame format, stop-bit count and baud generation follow the printed design;
// latching the byte at start (so the caller may change data afterwards) is
// this design's choice.
module uart_tx #(
  parameter int unsigned CLK_FREQ  = 27_000_000,
  parameter int unsigned BAUD      = 115_200,
  parameter int unsigned ACC_WIDTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);
  localparam longint unsigned INC =
      ((64'(BAUD) << (ACC_WIDTH - 4)) + (64'(CLK_FREQ) >> 5)) / (64'(CLK_FREQ) >> 4);

  typedef enum logic [1:0] {TX_IDLE, TX_START, TX_DATA, TX_STOP} tx_state_t;
  tx_state_t state;

  logic [ACC_WIDTH:0] acc;
  logic tick;
  assign tick = acc[ACC_WIDTH];
  assign busy = (state != TX_IDLE);

  always_ff @(posedge clk) begin
    if (rst || !busy) acc <= '0;
    else              acc <= {1'b0, acc[ACC_WIDTH-1:0]} + (ACC_WIDTH+1)'(INC);
  end

  logic [7:0] shreg;
  logic [2:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= TX_IDLE;
      shreg <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else begin
      case (state)
        TX_IDLE: begin
          txd <= 1'b1;
          if (start) begin
            shreg <= data;
            state <= TX_START;
          end
        end
        TX_START: begin
          txd <= 1'b0;
          if (tick) begin
            state <= TX_DATA;
            cnt   <= '0;
          end
        end
        TX_DATA: begin
          txd <= shreg[0];
          if (tick) begin
            shreg <= {1'b0, shreg[7:1]};
            cnt   <= cnt + 3'd1;
            if (cnt == 3'd7) begin
              state <= TX_STOP;
              cnt   <= '0;
            end
          end
        end
        TX_STOP: begin
          txd <= 1'b1;
          if (tick) begin
            cnt <= cnt + 3'd1;
            if (cnt == 3'd1) state <= TX_IDLE;
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
