// Testbench for serial_bus_controller: a serial host model sends write and
// read commands; a register-bus model (256 bytes, slots answer only below
// 0x80, reads answer two clocks after go) checks every bus access and
// supplies read data. Checks the command decoding, ignoring of stray bytes,
// the information registers, the timeout reply for unmapped addresses, the
// busy wait before writes, and the reply bytes on the serial line.
module tb_serial_bus_controller;
  import superio_pkg::*;
  localparam int unsigned CLK_FREQ = 27_000_000;
  localparam int unsigned BAUD     = 115_200;
  localparam real CLK_PERIOD = 10.0;
  localparam real BIT_CYC = real'(CLK_FREQ) / real'(BAUD);

  logic clk = 1'b0, rst = 1'b1, host_txd = 1'b1, host_rxd;
  bus_req_t breq;
  bus_rsp_t brsp;
  logic [7:0] leds;
  logic       busy_force = 1'b0;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;
  int writes = 0, reads = 0, busy_violations = 0;
  logic [7:0] last_waddr, last_wdata;
  logic [1:0] rd_pipe;
  logic [7:0] rd_addr;

  always #(CLK_PERIOD / 2) clk = ~clk;

  serial_bus_controller #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) dut (
    .clk, .rst, .rxd(host_txd), .txd(host_rxd), .bus_req(breq), .bus_rsp(brsp), .leds
  );

  always_ff @(posedge clk) begin
    rd_pipe <= rst ? 2'b00 : {rd_pipe[0], 1'b0};
    if (breq.go && !rst) begin
      if (breq.write) begin
        writes++;
        if (busy_force) busy_violations++;
        mem[breq.addr] <= breq.wdata;
        last_waddr <= breq.addr;
        last_wdata <= breq.wdata;
      end else begin
        reads++;
        rd_addr <= breq.addr;
        if (breq.addr < 8'h80) rd_pipe <= {rd_pipe[0], 1'b1};
      end
    end
  end

  always_comb begin
    brsp.busy   = busy_force;
    brsp.rvalid = rd_pipe[1];
    brsp.rdata  = rd_pipe[1] ? mem[rd_addr] : 8'h00;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/uart_tasks.svh"

  task automatic host_write(input logic [7:0] a, input logic [7:0] d);
    uart_send(CMD_WRITE);
    uart_send(a);
    uart_send(d);
    #(BIT_CYC * CLK_PERIOD);   // the receiver reports a byte after its stop bit
  endtask

  task automatic host_read(input logic [7:0] a, output logic [7:0] d, output bit ok);
    uart_send(CMD_READ);
    fork
      uart_send(a);
      uart_recv(d, ok, 40);
    join
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a, d, got, model [256];
    bit ok;
    int w0;
    for (int i = 0; i < 256; i++) begin
      mem[i] = 8'(i * 7 + 3);
      model[i] = 8'(i * 7 + 3);
    end
    repeat (10) @(negedge clk);
    rst = 1'b0;
    repeat (100) @(negedge clk);
    // stray bytes are ignored
    uart_send(8'h00);
    uart_send(8'h41);
    uart_send(8'hFF);
    #(BIT_CYC * CLK_PERIOD * 2);
    check(writes == 0 && reads == 0, "stray bytes cause no bus access");
    // writes
    for (int n = 0; n < 6; n++) begin
      a = 8'($urandom_range(0, 127));
      d = 8'($urandom);
      w0 = writes;
      host_write(a, d);
      repeat (10) @(negedge clk);
      model[a] = d;
      check(writes == w0 + 1 && last_waddr == a && last_wdata == d,
            $sformatf("write %02x <= %02x (n=%0d %02x %02x)", a, d, writes-w0, last_waddr, last_wdata));
    end
    // reads, including the written ones
    for (int n = 0; n < 6; n++) begin
      a = (n < 2) ? last_waddr : 8'($urandom_range(0, 127));
      host_read(a, got, ok);
      check(ok && got == model[a], $sformatf("read %02x = %02x, got %02x ok=%0d", a, model[a], got, ok));
      check(leds == model[a], "leds show the last read value");
    end
    // information registers
    host_read(8'd248, got, ok); check(ok && got == 8'd0,  "version major");
    host_read(8'd249, got, ok); check(ok && got == 8'd1,  "version minor");
    host_read(8'd250, got, ok); check(ok && got == 8'd10, "build day");
    host_read(8'd251, got, ok); check(ok && got == 8'd5,  "build month");
    host_read(8'd252, got, ok); check(ok && got == 8'd5,  "build year");
    // unmapped address: no slot answers, reply 0
    host_read(8'hC3, got, ok); check(ok && got == 8'h00, "unmapped read replies 0");
    // busy wait: a write is held while busy and issued when it drops
    busy_force = 1'b1;
    w0 = writes;
    host_write(8'h12, 8'h9A);
    repeat (500) @(negedge clk);
    check(writes == w0, "write held while busy");
    busy_force = 1'b0;
    repeat (10) @(negedge clk);
    check(writes == w0 + 1 && last_waddr == 8'h12 && last_wdata == 8'h9A, "held write issued after busy");
    check(busy_violations == 0, "no write issued during busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
