// Testbench for digital_out_module on a reg_controller8 slot: reset value 16,
// then random host writes must appear on the port within a few clocks, and
// a host write to another register of the slot leaves the port unchanged.
module tb_digital_out_module;
  import superio_pkg::*;
  localparam logic [4:0] IDX = 5'd8;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [7:0] port;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  digital_out_module dut (.clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .port);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(port == 8'd16, "reset value 16");
    for (int n = 0; n < 12; n++) begin
      v = 8'($urandom);
      bus_write({IDX, 3'd0}, v);
      repeat (6) @(negedge clk);
      check(port == v, $sformatf("port %02x after write %02x", port, v));
    end
    bus_write({IDX, 3'd5}, ~v);
    repeat (10) @(negedge clk);
    check(port == v, "other register leaves the port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
