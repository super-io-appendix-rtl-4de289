// Testbench for reg_controller8: host writes and reads, module writes and
// reads against a reference model of the eight registers; slot decode (other
// slots ignored); host priority over a waiting module request; a host go that
// arrives while a module access is being served is not lost; busy flags and
// one-clock latencies.
module tb_reg_controller8;
  import superio_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq = '0;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [7:0] model [8];
  localparam logic [4:0] IDX = 5'd6;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_controller8 dut (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                       .mod_req(mreq), .mod_rsp(mrsp), .regs);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  task automatic mod_access(input bit w, input logic [2:0] a, input logic [7:0] wd,
                            output logic [7:0] rd, output int lat);
    @(negedge clk);
    mreq = '{enable: 1'b1, write: w, addr: a, wdata: wd};
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
      #1;
    end while (!mrsp.ack && lat < 50);
    rd = mrsp.rdata;
    @(negedge clk);
    mreq.enable = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int lat, mb_seen;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 8; i++) model[i] = 8'h00;
    // host writes, then reads back
    for (int i = 0; i < 8; i++) begin
      d = 8'($urandom);
      bus_write({IDX, 3'(i)}, d);
      model[i] = d;
    end
    for (int i = 0; i < 8; i++) begin
      bus_read({IDX, 3'(i)}, d);
      check(d == model[i], $sformatf("host read reg %0d", i));
      check(regs[i] == model[i], $sformatf("register %0d contents", i));
    end
    // another slot's address changes nothing and gets no answer
    bus_write({5'd7, 3'd2}, 8'hEE);
    check(regs[2] == model[2], "other slot write ignored");
    @(negedge clk);
    breq.go = 1'b1; breq.write = 1'b0; breq.addr = {5'd5, 3'd1};
    @(negedge clk);
    breq.go = 1'b0;
    check(!brsp.rvalid, "other slot read not answered");
    repeat (3) @(negedge clk);
    check(!brsp.rvalid && brsp.rdata == 8'h00, "idle slot drives zeros");
    // module reads and writes
    for (int i = 0; i < 8; i++) begin
      mod_access(1'b0, 3'(i), 8'h00, d, lat);
      check(d == model[i] && lat == 1, $sformatf("module read reg %0d lat %0d", i, lat));
    end
    for (int i = 0; i < 4; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      mod_access(1'b1, 3'(i * 2), v, d, lat);
      model[i * 2] = v;
      check(lat == 1, "module write latency");
    end
    for (int i = 0; i < 8; i++) begin
      bus_read({IDX, 3'(i)}, d);
      check(d == model[i], $sformatf("host sees module write reg %0d", i));
    end
    // host has priority: module request and host go in the same cycle
    @(negedge clk);
    mreq = '{enable: 1'b1, write: 1'b0, addr: 3'd3, wdata: 8'h00};
    breq.go = 1'b1; breq.write = 1'b1; breq.addr = {IDX, 3'd3}; breq.wdata = 8'h5A;
    @(posedge clk); #1;
    breq.go = 1'b0;
    check(mrsp.busy && !mrsp.ack, "host served first, module sees busy");
    mb_seen = 0;
    while (!mrsp.ack) begin
      @(posedge clk); #1;
      mb_seen++;
    end
    model[3] = 8'h5A;
    check(mrsp.rdata == 8'h5A && brsp.busy, "module then reads the host's value, bus busy during it");
    @(negedge clk);
    mreq.enable = 1'b0;
    // host go during a module access is latched and served next
    @(negedge clk);
    mreq = '{enable: 1'b1, write: 1'b1, addr: 3'd1, wdata: 8'h77};
    @(posedge clk); #1;                    // accepted: WRITEM during the next cycle
    @(negedge clk);
    breq.go = 1'b1; breq.write = 1'b1; breq.addr = {IDX, 3'd2}; breq.wdata = 8'hC4;
    mreq.enable = 1'b0;
    @(negedge clk);
    breq.go = 1'b0;
    repeat (4) @(negedge clk);
    model[1] = 8'h77;
    model[2] = 8'hC4;
    check(regs[1] == 8'h77 && regs[2] == 8'hC4, "host go during module access not lost");
    // reset clears
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(regs[0] == 8'h00 && regs[7] == 8'h00, "reset clears registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
