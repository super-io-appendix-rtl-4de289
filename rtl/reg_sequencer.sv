// reg_sequencer: the register-access engine every peripheral module uses to
// talk to its slot (the "module skeleton" of the design).
//
// On a start pulse it walks through N accesses to its slot's register file,
// one after the other: access i goes to register ADDRS[i] and is a write of
// wvals[i] when WRITES[i] is set, a read into rvals[i] otherwise. Each access
// holds mod_req.enable until the slot answers with mod_rsp.ack; reads take
// the value in the ack cycle. done pulses once after the last access. A
// start that arrives while a walk is running is remembered and starts a new
// walk when the current one ends, so no host update is lost. rvals hold
// their last values between walks; RESET_VALS sets them at reset.
//
// busy_fell is a registered detector of the falling edge of mod_rsp.busy,
// i.e. "the host has just accessed this slot"; modules use it as their
// start condition, as the printed skeleton does.
//
// The printed skeleton reads three registers after the host bus releases
// the slot; the table-driven walk with acknowledged accesses is this
// design's generalisation of it.
module reg_sequencer
  import superio_pkg::*;
#(
  parameter int unsigned          N          = 3,
  parameter logic [7:0][2:0]      ADDRS      = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0},
  parameter logic [7:0]           WRITES     = 8'h00,
  parameter logic [7:0][7:0]      RESET_VALS = '0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] wvals [N],
  output logic [7:0] rvals [N],
  output logic       done,
  output logic       active,
  output logic       busy_fell,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] idx;
  logic          again;
  logic          old_busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      active   <= 1'b0;
      again    <= 1'b0;
      done     <= 1'b0;
      old_busy <= 1'b0;
      for (int i = 0; i < N; i++) rvals[i] <= RESET_VALS[i];
    end else begin
      old_busy <= mod_rsp.busy;
      done     <= 1'b0;
      if (!active) begin
        if (start || again) begin
          active <= 1'b1;
          again  <= 1'b0;
          idx    <= '0;
        end
      end else begin
        if (start) again <= 1'b1;
        if (mod_rsp.ack) begin
          if (!WRITES[3'(idx)]) rvals[idx] <= mod_rsp.rdata;
          if (idx == IW'(N - 1)) begin
            active <= 1'b0;
            done   <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end

  assign busy_fell = old_busy && !mod_rsp.busy;

  always_comb begin
    mod_req.enable = active;
    mod_req.write  = WRITES[3'(idx)];
    mod_req.addr   = ADDRS[3'(idx)];
    mod_req.wdata  = wvals[idx];
  end

endmodule
