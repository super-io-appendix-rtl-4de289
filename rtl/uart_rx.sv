// uart_rx: RS-232 receiver, 8N1, 8x oversampling.
//
// A fractional accumulator divides the system clock down to eight ticks per
// bit: every clock it adds INC to an ACC_WIDTH-bit phase and the carry out is
// the tick, so the tick rate is CLK_FREQ*INC/2^ACC_WIDTH ~= 8*BAUD with no
// integer-divider error build-up. On each tick the line is inverted (so that an
// idle line reads 0), passed through a two-stage synchroniser and a 2-bit
// saturating up/down counter that acts as a glitch filter with hysteresis.
// When the filtered line shows a start bit, a tick counter places the first
// data sample 11 ticks later (about the middle of bit 0) and every further
// sample 8 ticks apart; bits arrive LSB first. After the stop-bit sample,
// data_ready pulses for one clock if the stop bit was 1; if it was 0
// data_error pulses instead (framing error) and the frame is dropped. While no frame is in progress a gap counter
// counts ticks: idle rises after 16 ticks (two bit times) of silence and
// end_of_packet pulses once when that happens.
//
// Interface: rxd is the asynchronous serial input. data is valid when
// data_ready pulses and stays until the next frame's bits shift in.
// The oversampling scheme, sample point, filter and gap detection follow the
// printed design; the accumulator step is computed here from CLK_FREQ and BAUD
// with the same rounding.
module uart_rx #(
  parameter int unsigned CLK_FREQ  = 27_000_000,
  parameter int unsigned BAUD      = 115_200,
  parameter int unsigned ACC_WIDTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       data_ready,
  output logic       data_error,
  output logic [7:0] data,
  output logic       end_of_packet,
  output logic       idle
);
  localparam longint unsigned BAUD8 = 64'(BAUD) * 8;
  localparam longint unsigned INC =
      ((BAUD8 << (ACC_WIDTH - 7)) + (64'(CLK_FREQ) >> 8)) / (64'(CLK_FREQ) >> 7);

  logic [ACC_WIDTH:0] acc;
  logic tick;
  assign tick = acc[ACC_WIDTH];

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= {1'b0, acc[ACC_WIDTH-1:0]} + (ACC_WIDTH+1)'(INC);
  end

  // Inverted, synchronised and filtered line: 1 = space (start bit / data 0).
  logic [1:0] sync_inv;
  logic [1:0] filt_cnt;
  logic       line_inv;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_inv <= '0;
      filt_cnt <= '0;
      line_inv <= 1'b0;
    end else if (tick) begin
      sync_inv <= {sync_inv[0], ~rxd};
      if (sync_inv[1] && filt_cnt != 2'b11)       filt_cnt <= filt_cnt + 2'd1;
      else if (!sync_inv[1] && filt_cnt != 2'b00) filt_cnt <= filt_cnt - 2'd1;
      if (filt_cnt == 2'b00)      line_inv <= 1'b0;
      else if (filt_cnt == 2'b11) line_inv <= 1'b1;
    end
  end

  typedef enum logic [1:0] {RX_IDLE, RX_DATA, RX_STOP} rx_state_t;
  rx_state_t  state;
  logic [3:0] spacing;   // ticks since the start bit was seen
  logic [2:0] bit_idx;
  logic       sample;
  assign sample = tick && (spacing == 4'd10);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= RX_IDLE;
      spacing    <= '0;
      bit_idx    <= '0;
      data       <= '0;
      data_ready <= 1'b0;
      data_error <= 1'b0;
    end else begin
      data_ready <= 1'b0;
      data_error <= 1'b0;
      if (state == RX_IDLE) spacing <= '0;
      else if (sample)      spacing <= 4'd3;   // next sample 8 ticks on
      else if (tick)        spacing <= spacing + 4'd1;
      case (state)
        RX_IDLE: if (tick && line_inv) begin
          state   <= RX_DATA;
          bit_idx <= '0;
        end
        RX_DATA: if (sample) begin
          data    <= {~line_inv, data[7:1]};
          bit_idx <= bit_idx + 3'd1;
          if (bit_idx == 3'd7) state <= RX_STOP;
        end
        RX_STOP: if (sample) begin
          data_ready <= ~line_inv;
          data_error <= line_inv;
          state      <= RX_IDLE;
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // Inter-character gap detection.
  logic [4:0] gap;
  always_ff @(posedge clk) begin
    if (rst) begin
      gap           <= 5'd16;
      end_of_packet <= 1'b0;
    end else begin
      end_of_packet <= tick && (gap == 5'd15);
      if (state != RX_IDLE)   gap <= '0;
      else if (tick && !gap[4]) gap <= gap + 5'd1;
    end
  end
  assign idle = gap[4];

endmodule
