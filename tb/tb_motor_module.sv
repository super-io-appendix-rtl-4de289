// Testbench for motor_module, attached to a reg_controller8 slot driven by
// host bus tasks. Uses a short prescaler and loop period. Checks the PWM duty
// (high cycles per PWM period = velocity*(PWM_DIV+1)) and period, the
// direction output, that settings take effect only through the slot, and the
// speed loop: one step toward the target every FEEDBACK_PERIOD+2 clocks, up
// when the encoder is slow, down when it is fast, saturating at 255.
module tb_motor_module;
  import superio_pkg::*;
  localparam int unsigned PWM_DIV = 3;
  localparam int unsigned FB = 40;
  localparam int unsigned PERIOD = 256 * (PWM_DIV + 1);
  localparam logic [4:0] IDX = 5'd0;

  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [7:0] enc_vel = '0;
  logic mot_dir, mot_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  motor_module #(.PWM_DIV(PWM_DIV), .FEEDBACK_PERIOD(FB)) dut (
    .clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .enc_vel, .mot_dir, .mot_en
  );

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"


  task automatic duty(output int high);
    high = 0;
    for (int i = 0; i < PERIOD; i++) begin
      @(posedge clk);
      if (mot_en) high++;
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
    int h;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    duty(h);
    check(h == 0 && !mot_dir, "off after reset");
    for (int n = 0; n < 5; n++) begin
      logic [7:0] v;
      v = (n == 0) ? 8'd64 : (n == 1) ? 8'd255 : (n == 2) ? 8'd0 : 8'($urandom);
      bus_write({IDX, 3'd0}, v);
      bus_write({IDX, 3'd1}, 8'(n & 1));
      repeat (20) @(negedge clk);
      duty(h);
      check(h == int'(v) * (PWM_DIV + 1), $sformatf("duty for velocity %0d: %0d high", v, h));
      check(mot_dir == n[0], "direction");
    end
    // speed loop: target 100, encoder reports 0 -> output velocity climbs
    bus_write({IDX, 3'd0}, 8'd100);
    bus_write({IDX, 3'd1}, 8'd0);
    repeat (10) @(negedge clk);
    check(dut.out_vel == 8'd100, "open loop follows the register");
    bus_write({IDX, 3'd3}, 8'd1);
    enc_vel = 8'd0;
    begin
      logic [7:0] v0;
      int steps;
      v0 = dut.out_vel;
      repeat (10 * (FB + 2)) @(negedge clk);
      steps = int'(dut.out_vel) - int'(v0);
      check(steps >= 9 && steps <= 11, $sformatf("slow encoder: %0d steps up in 10 periods", steps));
      enc_vel = 8'd200;
      v0 = dut.out_vel;
      repeat (5 * (FB + 2)) @(negedge clk);
      steps = int'(v0) - int'(dut.out_vel);
      check(steps >= 4 && steps <= 6, $sformatf("fast encoder: %0d steps down in 5 periods", steps));
      enc_vel = 8'd100;
      v0 = dut.out_vel;
      repeat (5 * (FB + 2)) @(negedge clk);
      check(dut.out_vel == v0, "encoder on target: output holds");
      // saturation at 255
      bus_write({IDX, 3'd0}, 8'd255);
      enc_vel = 8'd0;
      repeat (300 * (FB + 2)) @(negedge clk);
      check(dut.out_vel == 8'd255, "saturates at 255");
      duty(h);
      check(h == 255 * (PWM_DIV + 1), "full duty under the loop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
