// End-to-end testbench for super_io at reduced timing parameters (serial line
// at CLK_FREQ/16, short PWM prescalers, windows and LCD waits). A serial host
// model drives every slot through the real command protocol; models of the
// ADC, the encoders, bouncing push buttons and an I2C host sit on the pins.
// Every mechanism of the design is made to happen and counted:
// host write, host read reply, information register, unmapped-read timeout,
// motor PWM, motor speed loop, encoder count and velocity, button debounce
// into the digital input, periodic input refresh, LCD init and character,
// servo pulse, ADC conversion, digital output, I2C bus write.
module tb_super_io;
  import superio_pkg::*;
  localparam int unsigned CLK_FREQ = 27_000_000;
  localparam int unsigned BAUD     = CLK_FREQ / 16;
  localparam real CLK_PERIOD = 10.0;
  localparam real BIT_CYC = 16.0;
  localparam int unsigned MPD = 3, SPD = 3, WIN = 1999, LCW = 300;

  logic clk = 1'b0, rst = 1'b1, host_txd = 1'b1, host_rxd;
  logic [7:0] host_leds;
  logic motor0_en, motor0_dir, motor0_dir_n, motor1_en, motor1_dir, motor1_dir_n;
  logic [7:0] buttons = '0;
  logic [7:0] lcd_db;
  logic lcd_rs, lcd_rw, lcd_en;
  logic [1:0] servo;
  logic [1:0] encoder = '0;
  logic [7:0] led;
  logic [7:0] adc_data;
  logic adc_stat, adc_ce, adc_cs, adc_rw;
  logic [3:0] adc_mux;
  logic [7:0] digout;
  logic scl = 1'b1, sda_m = 1'b1, sda_o;
  bus_req_t i2c_req;
  bus_rsp_t i2c_rsp = '0;
  logic [7:0] seed = 8'h3C;
  int conversions, strobe_len;
  int checks = 0, failures = 0;

  // mechanism counters
  int m_write = 0, m_read = 0, m_info = 0, m_timeout = 0, m_pwm = 0, m_loop = 0;
  int m_enc = 0, m_debounce = 0, m_refresh = 0, m_lcd_init = 0, m_lcd_char = 0;
  int m_servo = 0, m_adc = 0, m_digout = 0, m_i2c = 0;

  always #(CLK_PERIOD / 2) clk = ~clk;

  super_io #(
    .CLK_FREQ(CLK_FREQ), .BAUD(BAUD), .MOTOR_PWM_DIV(MPD), .MOTOR_FB_PERIOD(100),
    .SERVO_PWM_DIV(SPD), .ENC_VEL_WINDOW(WIN), .ENC_REPORT_INTERVAL(100),
    .DIGIN_REFRESH(500), .DEBOUNCE_CW(4), .ADC_START_WAIT(6), .ADC_READ_WAIT(4),
    .LCD_CLEAR_WAIT(LCW), .LCD_INIT_CLEAR_WAIT(250), .LCD_CMD_WAIT(40), .LCD_LINE_WAIT(60)
  ) dut (
    .clk, .rst, .rs232_rxd(host_txd), .rs232_txd(host_rxd), .host_leds,
    .motor0_en, .motor0_dir, .motor0_dir_n, .motor1_en, .motor1_dir, .motor1_dir_n,
    .buttons, .lcd_db, .lcd_rs, .lcd_rw, .lcd_en, .servo, .encoder, .led,
    .adc_data, .adc_stat, .adc_ce, .adc_cs, .adc_rw, .adc_mux, .digout,
    .i2c_addr(7'h2C), .i2c_scl(scl), .i2c_sda_i(sda_m & sda_o), .i2c_sda_o(sda_o),
    .i2c_bus_req(i2c_req), .i2c_bus_rsp(i2c_rsp)
  );

  tb_adc_model #(.BUSY_DELAY(5), .CONV_TIME(30)) u_adc (
    .clk, .ce(adc_ce), .rw(adc_rw), .mux(adc_mux), .seed, .data(adc_data), .stat(adc_stat),
    .conversions, .strobe_len
  );

  // LCD strobe log
  logic [7:0] lcd_log_db [64];
  logic       lcd_log_rs [64];
  int n_lcd = 0;
  logic en_q = 1'b0;
  always @(posedge clk) begin
    en_q <= lcd_en;
    if (lcd_en && !en_q && n_lcd < 64) begin
      lcd_log_db[n_lcd] = lcd_db;
      lcd_log_rs[n_lcd] = lcd_rs;
      n_lcd++;
    end
  end

  // digital-input refresh writes seen on the slot
  always @(posedge clk) if (dut.mrsp[SLOT_DIGIN0].ack && dut.mreq[SLOT_DIGIN0].write) m_refresh++;

  // encoder 0: pulse every 'enc_spacing' clocks
  int enc_spacing = 0, enc_pulses = 0;
  initial begin
    #3;
    forever begin
      if (enc_spacing == 0) #10;
      else begin
        encoder[0] = 1'b1; enc_pulses++;
        #(enc_spacing * 5);
        encoder[0] = 1'b0;
        #(enc_spacing * 5);
      end
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
    m_write++;
  endtask

  task automatic host_read(input logic [7:0] a, output logic [7:0] d);
    bit ok;
    uart_send(CMD_READ);
    fork
      uart_send(a);
      uart_recv(d, ok, 40);
    join
    check(ok, $sformatf("reply to read of %02x", a));
    if (ok) m_read++;
  endtask

  task automatic high_count(input int which, input int cycles, output int h);
    h = 0;
    for (int i = 0; i < cycles; i++) begin
      @(posedge clk);
      case (which)
        0: h += int'(motor0_en);
        1: h += int'(motor1_en);
        default: h += int'(servo[0]);
      endcase
    end
  endtask

  // I2C host helpers (SCL period 40 clocks)
  task automatic half();
    repeat (20) @(negedge clk);
  endtask
  task automatic i2c_bit(input logic b);
    sda_m = b; half(); scl = 1'b1; half(); scl = 1'b0;
  endtask
  task automatic i2c_byte(input logic [7:0] v, output logic ack);
    for (int i = 7; i >= 0; i--) i2c_bit(v[i]);
    sda_m = 1'b1; half(); scl = 1'b1; #1; ack = !(sda_m & sda_o); half(); scl = 1'b0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d, hi, lo;
    int h;
    repeat (10) @(negedge clk);
    rst = 1'b0;
    repeat (1000) @(negedge clk);

    // LCD initialisation
    check(n_lcd == 4 && lcd_log_db[0] == 8'h01 && lcd_log_db[1] == 8'h3F &&
          lcd_log_db[2] == 8'h0C && lcd_log_db[3] == 8'h06, "LCD init sequence");
    if (n_lcd == 4) m_lcd_init++;

    // information register and unmapped address
    host_read(INFO_ADDR_VERSION_MINOR, d);
    check(d == 8'd1, "version minor");
    if (d == 8'd1) m_info++;
    host_read(8'hC8, d);
    check(d == 8'h00, "unmapped address reads 0");
    if (d == 8'h00) m_timeout++;

    // motor 0: velocity 128, direction 1
    host_write(reg_addr(5'(SLOT_MOTOR0), 3'd0), 8'd128);
    host_write(reg_addr(5'(SLOT_MOTOR0), 3'd1), 8'd1);
    high_count(0, 256 * (MPD + 1), h);
    check(h == 128 * (MPD + 1), $sformatf("motor 0 duty %0d", h));
    check(motor0_dir && !motor0_dir_n, "motor 0 direction");
    if (h == 128 * (MPD + 1)) m_pwm++;
    host_read(reg_addr(5'(SLOT_MOTOR0), 3'd0), d);
    check(d == 8'd128 && host_leds == 8'd128, "motor 0 velocity reads back");

    // motor 1 with the speed loop on and encoder 1 stopped: output climbs
    host_write(reg_addr(5'(SLOT_MOTOR1), 3'd0), 8'd50);
    host_write(reg_addr(5'(SLOT_MOTOR1), 3'd3), 8'd1);
    repeat (30 * 102) @(negedge clk);
    high_count(1, 256 * (MPD + 1), h);
    check(h > 60 * (MPD + 1), $sformatf("speed loop raised motor 1 duty (%0d)", h));
    if (h > 60 * (MPD + 1)) m_loop++;
    check(led == 8'hFF, "encoder 1 velocity 0 shown on led");

    // encoder 0: one pulse every 8 clocks -> 250 per window -> velocity 15
    enc_spacing = 8;
    repeat (3 * (WIN + 1)) @(negedge clk);
    host_read(reg_addr(5'(SLOT_ENC0), 3'd2), d);
    enc_spacing = 0;
    repeat (300) @(negedge clk);
    check(d == 8'd15, $sformatf("encoder 0 velocity %0d", d));
    host_read(reg_addr(5'(SLOT_ENC0), 3'd0), hi);
    host_read(reg_addr(5'(SLOT_ENC0), 3'd1), lo);
    check(int'({hi, lo}) == enc_pulses, $sformatf("encoder 0 count %0d of %0d", {hi, lo}, enc_pulses));
    if (d == 8'd15 && int'({hi, lo}) == enc_pulses) m_enc++;

    // push button 3 with contact bounce
    for (int b = 0; b < 5; b++) begin
      buttons[3] = 1'b1; repeat (5) @(negedge clk);
      buttons[3] = 1'b0; repeat (3) @(negedge clk);
    end
    check(dut.buttons_db == 8'h00, "bounces filtered");
    buttons[3] = 1'b1;
    repeat (100) @(negedge clk);
    host_read(reg_addr(5'(SLOT_DIGIN0), 3'd0), d);
    check(d == 8'h08, $sformatf("button 3 in digital input (%02x)", d));
    if (d == 8'h08) m_debounce++;

    // LCD character
    host_write(reg_addr(5'(SLOT_LCD), 3'd0), 8'h48);
    repeat (50) @(negedge clk);
    check(n_lcd == 5 && lcd_log_db[4] == 8'h48 && lcd_log_rs[4], "LCD character H");
    if (n_lcd == 5) m_lcd_char++;

    // servo 0 width 40
    host_write(reg_addr(5'(SLOT_SERVO0), 3'd0), 8'd40);
    high_count(2, 256 * (SPD + 1), h);
    check(h == 40 * (SPD + 1), $sformatf("servo 0 width %0d", h));
    if (h == 40 * (SPD + 1)) m_servo++;

    // ADC: select channel 5 (this access converts), then read the result
    host_write(reg_addr(5'(SLOT_ANALOG0), 3'd1), 8'd5);
    repeat (300) @(negedge clk);
    host_read(reg_addr(5'(SLOT_ANALOG0), 3'd0), d);
    check(adc_mux == 4'd5 && d == (8'(5 * 17) ^ seed), $sformatf("ADC result %02x", d));
    if (d == (8'(5 * 17) ^ seed)) m_adc++;

    // digital output
    host_write(reg_addr(5'(SLOT_DIGOUT0), 3'd0), 8'hA7);
    repeat (10) @(negedge clk);
    check(digout == 8'hA7, "digital output");
    if (digout == 8'hA7) m_digout++;

    // I2C host writes 0x66 to register 0x42 through the target
    begin
      logic a0, a1, a2;
      int got;
      got = 0;
      fork
        begin
          sda_m = 1'b0; half(); scl = 1'b0; half();   // START
          i2c_byte({7'h2C, 1'b0}, a0);
          i2c_byte(8'h42, a1);
          i2c_byte(8'h66, a2);
          sda_m = 1'b0; half(); scl = 1'b1; half(); sda_m = 1'b1; half();   // STOP
        end
        begin
          while (!(i2c_req.go && i2c_req.write)) @(posedge clk);
          if (i2c_req.addr == 8'h42 && i2c_req.wdata == 8'h66) got = 1;
        end
      join
      check(a0 && a1 && a2 && got == 1, "I2C write reaches the bus port");
      if (got == 1) m_i2c++;
    end

    // one failure for every mechanism that never happened
    check(m_write > 0, "mechanism: host write");
    check(m_read > 0, "mechanism: host read reply");
    check(m_info > 0, "mechanism: information register");
    check(m_timeout > 0, "mechanism: unmapped-read timeout");
    check(m_pwm > 0, "mechanism: motor PWM");
    check(m_loop > 0, "mechanism: motor speed loop");
    check(m_enc > 0, "mechanism: encoder count and velocity");
    check(m_debounce > 0, "mechanism: button debounce");
    check(m_refresh > 0, "mechanism: periodic input refresh");
    check(m_lcd_init > 0, "mechanism: LCD initialisation");
    check(m_lcd_char > 0, "mechanism: LCD character");
    check(m_servo > 0, "mechanism: servo pulse");
    check(m_adc > 0, "mechanism: ADC conversion");
    check(m_digout > 0, "mechanism: digital output");
    check(m_i2c > 0, "mechanism: I2C bus write");
    $display("mechanisms: write %0d read %0d info %0d timeout %0d pwm %0d loop %0d enc %0d debounce %0d refresh %0d lcd_init %0d lcd_char %0d servo %0d adc %0d digout %0d i2c %0d",
             m_write, m_read, m_info, m_timeout, m_pwm, m_loop, m_enc, m_debounce, m_refresh,
             m_lcd_init, m_lcd_char, m_servo, m_adc, m_digout, m_i2c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
