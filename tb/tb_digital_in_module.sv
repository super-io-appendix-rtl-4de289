// Testbench for digital_in_module on a reg_controller8 slot, with a short
// refresh period. Checks that a port change reaches register 0 within a few
// clocks, that changes during a write are not lost, and that without changes
// the module rewrites the register every REFRESH+1 clocks.
module tb_digital_in_module;
  import superio_pkg::*;
  localparam int unsigned REFRESH = 200;
  localparam logic [4:0] IDX = 5'd2;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [7:0] port = '0;
  int checks = 0, failures = 0;
  int n_writes = 0;
  int last_write_t = 0, gap = 0, cyc = 0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  digital_in_module #(.REFRESH(REFRESH)) dut (.clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .port);

  always @(posedge clk) begin
    cyc++;
    if (mrsp.ack && mreq.write) begin
      n_writes++;
      gap = cyc - last_write_t;
      last_write_t = cyc;
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      port = 8'($urandom);
      repeat (6) @(negedge clk);
      bus_read({IDX, 3'd0}, d);
      check(d == port, $sformatf("register shows port %02x (got %02x)", port, d));
    end
    // two changes in consecutive clocks: the final value must land
    port = 8'hA5;
    @(negedge clk);
    port = 8'h5A;
    repeat (8) @(negedge clk);
    check(regs[0] == 8'h5A, "back-to-back changes: last value stored");
    // periodic refresh with a steady port
    begin
      int w0;
      repeat (3 * (REFRESH + 1)) @(negedge clk);
      w0 = n_writes;
      repeat (5 * (REFRESH + 1)) @(negedge clk);
      check(n_writes - w0 == 5, $sformatf("%0d refresh writes in 5 periods", n_writes - w0));
      check(gap == REFRESH + 1, $sformatf("refresh period %0d", gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
