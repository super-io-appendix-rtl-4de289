// Testbench for uart_rx: a bit-accurate line model sends random bytes at the
// nominal rate and at +-2 % rate error; checks every byte, that a frame with
// a broken stop bit is dropped, and the idle / end-of-packet gap detection.
module tb_uart_rx;
  localparam int unsigned CLK_FREQ = 27_000_000;
  localparam int unsigned BAUD     = 115_200;
  localparam real CLK_PERIOD = 10.0;
  real BIT_CYC = real'(CLK_FREQ) / real'(BAUD);

  logic clk = 1'b0, rst = 1'b1, host_txd = 1'b1, host_rxd;
  logic data_ready, data_error, end_of_packet, idle;
  logic [7:0] data;
  int checks = 0, failures = 0;
  int ready_count = 0, eop_count = 0, err_count = 0, err_before;
  logic [7:0] last;

  always #(CLK_PERIOD / 2) clk = ~clk;

  uart_rx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) dut (
    .clk, .rst, .rxd(host_txd), .data_ready, .data_error, .data, .end_of_packet, .idle
  );

  always @(posedge clk) begin
    if (data_ready) begin
      ready_count++;
      last = data;
    end
    if (end_of_packet) eop_count++;
    if (data_error) err_count++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/uart_tasks.svh"

  task automatic send_bad_stop(input logic [7:0] b);
    host_txd = 1'b0;
    #(BIT_CYC * CLK_PERIOD);
    for (int i = 0; i < 8; i++) begin
      host_txd = b[i];
      #(BIT_CYC * CLK_PERIOD);
    end
    host_txd = 1'b0;             // stop bit missing
    #(BIT_CYC * CLK_PERIOD);
    host_txd = 1'b1;
    #(BIT_CYC * CLK_PERIOD * 3);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int n_before, eop_before;
    repeat (10) @(negedge clk);
    rst = 1'b0;
    repeat (3000) @(negedge clk);
    check(idle === 1'b1, "idle after reset");
    for (int rate = 0; rate < 3; rate++) begin
      BIT_CYC = real'(CLK_FREQ) / real'(BAUD) * ((rate == 0) ? 1.0 : (rate == 1) ? 1.02 : 0.98);
      for (int n = 0; n < 10; n++) begin
        b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
        n_before = ready_count;
        uart_send(b);
        #(BIT_CYC * CLK_PERIOD * 0.5);
        check(ready_count == n_before + 1 && last == b,
              $sformatf("rate %0d byte %02x got %02x (%0d ready)", rate, b, last, ready_count - n_before));
      end
    end
    BIT_CYC = real'(CLK_FREQ) / real'(BAUD);
    // framing error: no data_ready
    #(BIT_CYC * CLK_PERIOD * 4);
    n_before = ready_count;
    err_before = err_count;
    send_bad_stop(8'h3C);
    check(ready_count == n_before, "frame with bad stop bit dropped");
    #(BIT_CYC * CLK_PERIOD * 2);
    check(err_count == err_before + 1, "framing error flagged once");
    // burst of bytes, then a gap: one end-of-packet, idle during the gap only
    #(BIT_CYC * CLK_PERIOD * 30);
    eop_before = eop_count;
    uart_send(8'h11);
    check(idle === 1'b0, "not idle right after a byte");
    uart_send(8'h22);
    uart_send(8'h33);
    check(eop_count == eop_before, "no end-of-packet inside a burst");
    #(BIT_CYC * CLK_PERIOD * 4);
    check(eop_count == eop_before + 1 && idle === 1'b1, "one end-of-packet after the gap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
