// Testbench for debouncer with CW=4 (16-clock debounce interval). Checks that
// bursts of bounces shorter than the interval never reach the output, that a
// level held for the interval does, and the latency from the last edge of
// the input to the output change (2 synchroniser clocks + 2^CW clocks).
module tb_debouncer;
  localparam int unsigned CW = 4;
  localparam int unsigned T = 1 << CW;
  logic clk = 1'b0, rst = 1'b1, button_i = 1'b0, button_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  debouncer #(.CW(CW)) dut (.clk, .rst, .button_i, .button_o);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    logic lvl;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(button_o == 1'b0, "output low after reset");
    lvl = 1'b0;
    for (int n = 0; n < 10; n++) begin
      bit glitched;
      // bounce: random short pulses of the new level, each under the interval
      glitched = 1'b0;
      for (int b = 0; b < 6; b++) begin
        button_i = ~lvl;
        repeat ($urandom_range(1, T - 4)) @(negedge clk);
        button_i = lvl;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        if (button_o != lvl) glitched = 1'b1;
      end
      check(!glitched && button_o == lvl, $sformatf("bounces filtered (%0d)", n));
      // settle at the new level
      button_i = ~lvl;
      lat = 0;
      while (button_o == lvl && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(button_o == ~lvl, "new level passed");
      check(lat >= T && lat <= T + 3, $sformatf("latency %0d", lat));
      lvl = ~lvl;
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
