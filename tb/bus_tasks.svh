// Host-bus driver tasks shared by the slot-level testbenches. The including
// module provides clk, breq (bus_req_t) and brsp (bus_rsp_t).
task automatic bus_write(input logic [7:0] a, input logic [7:0] d);
  @(negedge clk);
  breq.go = 1'b1; breq.write = 1'b1; breq.addr = a; breq.wdata = d;
  @(negedge clk);
  breq.go = 1'b0;
  repeat (4) @(negedge clk);
endtask

task automatic bus_read(input logic [7:0] a, output logic [7:0] d);
  int n;
  @(negedge clk);
  breq.go = 1'b1; breq.write = 1'b0; breq.addr = a;
  @(negedge clk);
  breq.go = 1'b0;
  n = 0;
  while (!brsp.rvalid && n < 20) begin
    @(negedge clk);
    n++;
  end
  d = brsp.rdata;
  repeat (4) @(negedge clk);
endtask
