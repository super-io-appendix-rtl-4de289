// Testbench for servo_module on a reg_controller8 slot, with a short
// prescaler. Checks the reset pulse width (16 units), the pulse width of
// each channel after host writes (high cycles per frame = width*(PWM_DIV+1)),
// the frame length, and that the channels are independent.
module tb_servo_module;
  import superio_pkg::*;
  localparam int unsigned PWM_DIV = 5;
  localparam int unsigned FRAME = 256 * (PWM_DIV + 1);
  localparam logic [4:0] IDX = 5'd4;

  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [1:0] servo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  servo_module #(.PWM_DIV(PWM_DIV)) dut (.clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .servo);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  task automatic measure(output int h0, output int h1, output int rises0);
    logic p0;
    h0 = 0; h1 = 0; rises0 = 0; p0 = servo[0];
    for (int i = 0; i < FRAME; i++) begin
      @(posedge clk);
      if (servo[0]) h0++;
      if (servo[1]) h1++;
      if (servo[0] && !p0) rises0++;
      p0 = servo[0];
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h0, h1, r;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    measure(h0, h1, r);
    check(h0 == 16 * (PWM_DIV + 1) && h1 == 16 * (PWM_DIV + 1), $sformatf("reset width 16 (%0d %0d)", h0, h1));
    check(r == 1, "one pulse per frame");
    for (int n = 0; n < 4; n++) begin
      logic [7:0] w0, w1;
      w0 = 8'($urandom); w1 = 8'($urandom);
      if (n == 0) begin w0 = 8'd0; w1 = 8'd255; end
      bus_write({IDX, 3'd0}, w0);
      bus_write({IDX, 3'd1}, w1);
      repeat (10) @(negedge clk);
      measure(h0, h1, r);
      check(h0 == int'(w0) * (PWM_DIV + 1), $sformatf("servo 0 width %0d: %0d", w0, h0));
      check(h1 == int'(w1) * (PWM_DIV + 1), $sformatf("servo 1 width %0d: %0d", w1, h1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
