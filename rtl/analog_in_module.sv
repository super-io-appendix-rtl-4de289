// analog_in_module: runs one conversion of an external 8-bit parallel ADC
// after each host access to its slot and stores the result for the host.
//
// Slot registers:
//   0  result of the last conversion (written by the module)
//   1  bits 3:0 select the analog multiplexer channel (read by the module)
// Sequence, started by the falling edge of the slot's busy (a host access):
//   1. read register 1 and drive its low nibble on mux
//   2. one clock with adc_ce=1, adc_rw=1, then adc_ce=0 and adc_rw=0 for
//      START_WAIT+1 clocks: the write strobe that starts a conversion
//   3. adc_rw=1; wait for adc_stat to rise, then to fall (conversion done)
//   4. wait READ_WAIT+1 clocks with adc_ce low and adc_rw high, sample
//      adc_data
//   5. write the sample to register 0
// adc_ce stays low between conversions, as in the printed sequence; it and
// adc_rw are high after reset. adc_stat is synchronised to clk.
// The host therefore reads the result of the conversion started by its
// previous access. Any host access retriggers; one that arrives during a
// conversion is handled when it ends.
//
// The ADC handshake and its wait counts follow the printed design. The mux
// register (the printed module declares the mux output and a mux register
// copy but leaves them at zero) and the acknowledged register write are this
// design's choices.
module analog_in_module
  import superio_pkg::*;
#(
  parameter int unsigned START_WAIT = 48,
  parameter int unsigned READ_WAIT  = 48
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  output logic [3:0] mux,
  input  logic [7:0] adc_data,
  input  logic       adc_stat,
  output logic       adc_ce,
  output logic       adc_rw
);
  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_START, S_STAT_HI, S_STAT_LO, S_READ_WAIT, S_STORE
  } state_t;
  state_t state;

  localparam int unsigned CW = $clog2(((START_WAIT > READ_WAIT) ? START_WAIT : READ_WAIT) + 1);
  logic [CW-1:0] counter;
  logic [1:0]    stat_sync;
  logic [7:0]    sample;
  logic          pending;

  // register 1 fetch
  mod_req_t   req_f, req_s;
  logic [7:0] f_w [1], f_r [1], s_w [1], s_r [1];
  logic       f_done, f_active, f_fell;
  logic       s_done, s_active, s_fell;
  logic       f_start, s_start;

  assign f_w[0] = 8'h00;
  assign s_w[0] = sample;

  reg_sequencer #(.N(1), .ADDRS({21'd0, 3'd1}), .WRITES(8'h00)) u_fetch (
    .clk, .rst, .start(f_start), .wvals(f_w), .rvals(f_r), .done(f_done),
    .active(f_active), .busy_fell(f_fell), .mod_req(req_f), .mod_rsp
  );

  reg_sequencer #(.N(1), .ADDRS('0), .WRITES(8'h01)) u_store (
    .clk, .rst, .start(s_start), .wvals(s_w), .rvals(s_r), .done(s_done),
    .active(s_active), .busy_fell(s_fell), .mod_req(req_s), .mod_rsp
  );

  assign mod_req = f_active ? req_f : req_s;
  assign f_start = (state == S_IDLE) && (f_fell || pending);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      counter   <= '0;
      stat_sync <= '0;
      sample    <= '0;
      mux       <= '0;
      adc_ce    <= 1'b1;
      adc_rw    <= 1'b1;
      s_start   <= 1'b0;
      pending   <= 1'b0;
    end else begin
      stat_sync <= {stat_sync[0], adc_stat};
      s_start   <= 1'b0;
      if (f_fell && state != S_IDLE) pending <= 1'b1;
      case (state)
        S_IDLE: begin
          counter <= '0;
          if (f_start) begin
            pending <= 1'b0;
            state   <= S_FETCH;
          end
        end
        S_FETCH: if (f_done) begin
          mux    <= f_r[0][3:0];
          adc_ce <= 1'b1;
          adc_rw <= 1'b1;
          state  <= S_START;
        end
        S_START: begin
          adc_ce <= 1'b0;
          adc_rw <= 1'b0;
          if (counter < CW'(START_WAIT)) counter <= counter + 1'b1;
          else                           state   <= S_STAT_HI;
        end
        S_STAT_HI: begin
          adc_rw <= 1'b1;
          if (stat_sync[1]) state <= S_STAT_LO;
        end
        S_STAT_LO: begin
          counter <= '0;
          if (!stat_sync[1]) state <= S_READ_WAIT;
        end
        S_READ_WAIT: begin
          if (counter < CW'(READ_WAIT)) counter <= counter + 1'b1;
          else begin
            sample  <= adc_data;
            s_start <= 1'b1;
            state   <= S_STORE;
          end
        end
        S_STORE: if (s_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
