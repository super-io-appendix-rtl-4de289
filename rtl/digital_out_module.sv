// digital_out_module: an 8-bit output port set by the host.
//
// Register 0 of its slot is read after every host access and driven onto
// port (registered). After reset the port shows 16 (0x10), the reset value
// the printed design gives this module.
module digital_out_module
  import superio_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  output logic [7:0] port
);
  logic [7:0] wvals [1];
  logic [7:0] rvals [1];
  logic       busy_fell, done, active;

  assign wvals[0] = 8'h00;

  reg_sequencer #(
    .N(1), .ADDRS('0), .WRITES(8'h00), .RESET_VALS({56'd0, 8'd16})
  ) u_seq (
    .clk, .rst, .start(busy_fell), .wvals, .rvals, .done, .active, .busy_fell,
    .mod_req, .mod_rsp
  );

  always_ff @(posedge clk) begin
    if (rst) port <= 8'd16;
    else     port <= rvals[0];
  end

endmodule
