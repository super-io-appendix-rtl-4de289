// digital_in_module: reports an 8-bit input port to the host.
//
// The module writes the port value into register 0 of its slot whenever the
// port changes, and in any case every REFRESH+1 clocks, so the host always
// reads a recent value without polling the module. A change that happens
// while a write is under way starts another write as soon as it ends. The
// port is expected to be synchronous to clk (the board feeds it through
// debouncers). The register write completes a few clocks after the change.
//
// Change-triggered and periodic reporting, and the period of 65000 clocks,
// follow the printed design; the periodic counter running freely from reset
// is this design's reading of it.
module digital_in_module
  import superio_pkg::*;
#(
  parameter int unsigned REFRESH = 65000
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  input  logic [7:0] port
);
  localparam int unsigned CW = $clog2(REFRESH + 1);
  logic [7:0]    old_port;
  logic [CW-1:0] counter;
  logic          trigger;
  logic [7:0]    wvals [1];
  logic [7:0]    rvals [1];
  logic          busy_fell, done, active;

  assign trigger  = (port != old_port) || (counter == CW'(REFRESH));
  assign wvals[0] = port;

  always_ff @(posedge clk) begin
    if (rst) begin
      old_port <= '0;
      counter  <= '0;
    end else begin
      old_port <= port;
      counter  <= trigger ? '0 : counter + 1'b1;
    end
  end

  reg_sequencer #(
    .N(1), .ADDRS('0), .WRITES(8'h01)
  ) u_seq (
    .clk, .rst, .start(trigger), .wvals, .rvals, .done, .active, .busy_fell,
    .mod_req, .mod_rsp
  );

endmodule
