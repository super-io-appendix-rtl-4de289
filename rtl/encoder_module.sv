// encoder_module: counts pulses of a single-channel wheel encoder and measures
// its speed.
//
// The encoder input is synchronised to clk and every rising edge adds one to a
// 16-bit pulse count. Every VEL_WINDOW+1 clocks (0.52 s at 27 MHz) the
// velocity is updated to (pulses in the window) >> VEL_SHIFT, truncated to 8
// bits; enc_vel carries it to a motor's speed loop. The module writes its slot:
//   0  count[15:8]   1  count[7:0]   2  velocity
// right after every host access to the slot and otherwise every
// REPORT_INTERVAL+2 clocks. The count is captured once per report so that the
// two halves always belong together.
//
// Register map, window, shift and report rule follow the printed design.
// Sampling the encoder in the clk domain instead of clocking a counter from
// it, and the captured count, are this design's choices.
module encoder_module
  import superio_pkg::*;
#(
  parameter int unsigned VEL_WINDOW      = 14_000_000,
  parameter int unsigned VEL_SHIFT       = 4,
  parameter int unsigned REPORT_INTERVAL = 8192
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  input  logic       encoder,
  output logic [7:0] enc_vel
);
  localparam int unsigned VW = $clog2(VEL_WINDOW + 1);
  localparam int unsigned RW = $clog2(REPORT_INTERVAL + 2);

  logic [2:0]    enc_sync;
  logic [15:0]   enc_count, old_count, snap;
  logic [VW-1:0] vel_cnt;
  logic [RW-1:0] rep_cnt;
  logic          start;
  logic [7:0]    wvals [3];
  logic [7:0]    rvals [3];
  logic          busy_fell, done, active;
  logic [15:0]   delta;

  assign delta = enc_count - old_count;
  assign start = !mod_rsp.busy && !active && (busy_fell || rep_cnt > RW'(REPORT_INTERVAL));

  always_ff @(posedge clk) begin
    if (rst) begin
      enc_sync  <= '0;
      enc_count <= '0;
      old_count <= '0;
      vel_cnt   <= '0;
      rep_cnt   <= '0;
      enc_vel   <= '0;
      snap      <= '0;
    end else begin
      enc_sync <= {enc_sync[1:0], encoder};
      if (enc_sync[1] && !enc_sync[2]) enc_count <= enc_count + 16'd1;

      if (vel_cnt == VW'(VEL_WINDOW)) begin
        vel_cnt   <= '0;
        enc_vel   <= 8'(delta >> VEL_SHIFT);
        old_count <= enc_count;
      end else begin
        vel_cnt <= vel_cnt + 1'b1;
      end

      if (start) begin
        rep_cnt <= '0;
        snap    <= enc_count;
      end else if (rep_cnt <= RW'(REPORT_INTERVAL)) begin
        rep_cnt <= rep_cnt + 1'b1;
      end
    end
  end

  assign wvals[0] = snap[15:8];
  assign wvals[1] = snap[7:0];
  assign wvals[2] = enc_vel;

  reg_sequencer #(
    .N(3), .ADDRS({3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd2, 3'd1, 3'd0}), .WRITES(8'h07)
  ) u_seq (
    .clk, .rst, .start, .wvals, .rvals, .done, .active, .busy_fell,
    .mod_req, .mod_rsp
  );

endmodule
