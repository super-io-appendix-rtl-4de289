// Full-size testbench: super_io at its default parameters (27 MHz clock,
// 115200 baud, motor prescaler 128, LCD waits for a real controller).
// A serial host model checks the LCD power-up sequence, reads an
// information register, writes motor 0 velocity and direction, measures
// one full PWM period (256 * 129 clocks), reads the velocity back, and
// drives the digital output port.
module tb_super_io_full;
  import superio_pkg::*;
  localparam real CLK_PERIOD = 10.0;
  localparam real BIT_CYC = 27_000_000.0 / 115_200.0;

  logic clk = 1'b0, rst = 1'b1, host_txd = 1'b1, host_rxd;
  logic [7:0] host_leds;
  logic motor0_en, motor0_dir, motor0_dir_n, motor1_en, motor1_dir, motor1_dir_n;
  logic [7:0] lcd_db;
  logic lcd_rs, lcd_rw, lcd_en;
  logic [1:0] servo;
  logic [7:0] led;
  logic adc_ce, adc_cs, adc_rw;
  logic [3:0] adc_mux;
  logic [7:0] digout;
  logic sda_o;
  bus_req_t i2c_req;
  int checks = 0, failures = 0;
  int n_lcd = 0;
  logic [7:0] lcd_log [8];
  logic en_q = 1'b0;

  always #(CLK_PERIOD / 2) clk = ~clk;

  super_io dut (
    .clk, .rst, .rs232_rxd(host_txd), .rs232_txd(host_rxd), .host_leds,
    .motor0_en, .motor0_dir, .motor0_dir_n, .motor1_en, .motor1_dir, .motor1_dir_n,
    .buttons(8'h00), .lcd_db, .lcd_rs, .lcd_rw, .lcd_en, .servo, .encoder(2'b00), .led,
    .adc_data(8'h00), .adc_stat(1'b0), .adc_ce, .adc_cs, .adc_rw, .adc_mux, .digout,
    .i2c_addr(7'h2C), .i2c_scl(1'b1), .i2c_sda_i(1'b1), .i2c_sda_o(sda_o),
    .i2c_bus_req(i2c_req), .i2c_bus_rsp('0)
  );

  always @(posedge clk) begin
    en_q <= lcd_en;
    if (lcd_en && !en_q) begin
      if (n_lcd < 8) lcd_log[n_lcd] = lcd_db;
      n_lcd++;
    end
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
    #(BIT_CYC * CLK_PERIOD * 2);
  endtask

  task automatic host_read(input logic [7:0] a, output logic [7:0] d);
    bit ok;
    uart_send(CMD_READ);
    fork
      uart_send(a);
      uart_recv(d, ok, 40);
    join
    check(ok, $sformatf("reply to read of %02x", a));
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int h;
    repeat (10) @(negedge clk);
    rst = 1'b0;

    host_read(INFO_ADDR_BUILD_DAY, d);
    check(d == 8'd10, $sformatf("build day %0d", d));

    host_write(reg_addr(5'(SLOT_MOTOR0), 3'd0), 8'd64);
    host_write(reg_addr(5'(SLOT_MOTOR0), 3'd1), 8'd0);
    h = 0;
    repeat (256 * 129) begin
      @(posedge clk);
      h += int'(motor0_en);
    end
    check(h == 64 * 129, $sformatf("motor 0 duty %0d", h));
    check(!motor0_dir && motor0_dir_n, "motor 0 direction");
    check(!motor1_en, "motor 1 idle");
    host_read(reg_addr(5'(SLOT_MOTOR0), 3'd0), d);
    check(d == 8'd64, "motor 0 velocity reads back");

    host_write(reg_addr(5'(SLOT_DIGOUT0), 3'd0), 8'h5A);
    repeat (10) @(negedge clk);
    check(digout == 8'h5A, "digital output");

    while (n_lcd < 4) @(negedge clk);
    check(lcd_log[0] == 8'h01 && lcd_log[1] == 8'h3F && lcd_log[2] == 8'h0C &&
          lcd_log[3] == 8'h06, "LCD power-up sequence");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
