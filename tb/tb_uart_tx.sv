// Testbench for uart_tx: sends random bytes and decodes the line by sampling
// at the middle of each bit, checking start bit, data (LSB first), the two
// stop bits, and that busy lasts eleven bit times.
module tb_uart_tx;
  localparam int unsigned CLK_FREQ = 27_000_000;
  localparam int unsigned BAUD     = 115_200;
  localparam real CLK_PERIOD = 10.0;
  localparam real BIT_CYC = real'(CLK_FREQ) / real'(BAUD);   // 234.375

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, txd, busy;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  always #(CLK_PERIOD / 2) clk = ~clk;

  uart_tx #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) dut (.clk, .rst, .start, .data, .txd, .busy);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cycles;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(txd === 1'b1 && !busy, "idle line high");
    for (int n = 0; n < 8; n++) begin
      b = (n == 0) ? 8'h55 : (n == 1) ? 8'h00 : (n == 2) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      data = b; start = 1'b1;
      @(negedge clk);
      start = 1'b0; data = ~b;                // byte must have been latched
      // wait for the start-bit edge on the line
      while (txd === 1'b1) @(negedge clk);
      #(BIT_CYC * CLK_PERIOD * 0.5);
      check(txd === 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        #(BIT_CYC * CLK_PERIOD);
        got[i] = txd;
      end
      check(got == b, $sformatf("data %02x got %02x", b, got));
      #(BIT_CYC * CLK_PERIOD);
      check(txd === 1'b1, "stop bit 1");
      #(BIT_CYC * CLK_PERIOD);
      check(txd === 1'b1, "stop bit 2");
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    // busy duration: 11 bit times
    @(negedge clk);
    data = 8'hA5; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_cycles = 0;
    while (busy) begin
      @(negedge clk);
      busy_cycles++;
    end
    check(busy_cycles > int'(11.0 * BIT_CYC) - 4 && busy_cycles < int'(11.0 * BIT_CYC) + 4,
          $sformatf("busy lasted %0d cycles", busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
