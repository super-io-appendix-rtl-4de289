// super_io: the Super IO board, a host-controlled robot I/O controller.
//
// A host PC sends three-byte write commands and two-byte read commands over
// RS-232 (see serial_bus_controller). Each command becomes one access on an
// internal 8-bit register bus whose address selects one of nine slots
// (addr[7:3]) and one of its eight registers (addr[2:0]). Every slot is a
// reg_controller8 register file shared with one peripheral module, which
// fetches its settings after each host access and posts its measurements
// there for the host to read:
//   slot 0  motor 0       : PWM enable + direction, speed loop from encoder 0
//   slot 1  motor 1       : same, speed loop from encoder 1
//   slot 2  digital in 0  : the eight push buttons, debounced
//   slot 3  character LCD : HD44780 display, one character register
//   slot 4  servo 0       : two servo pulse outputs
//   slot 5  encoder 0     : pulse count and velocity
//   slot 6  encoder 1     : pulse count and velocity (also shown inverted on led)
//   slot 7  analog in 0   : external 8-bit ADC with 4-bit input mux
//   slot 8  digital out 0 : 8-bit output port
// Host register address = slot*8 + register; e.g. motor 0 velocity is 0x00,
// the LCD character 0x18, the ADC result 0x38.
//
// The slot responses are combined by OR: a slot drives zeros unless it is
// answering, and busy is the OR of all slots' busy.
//
// The I2C target (i2c_slave) is a second host interface with the same bus
// protocol. It is placed next to the serial path with its own bus request and
// response brought out as ports, so a system can arbitrate or connect it as it
// needs; it is not wired into the nine slots.
//
// Everything runs on one clock (27 MHz on the original board). rst is
// synchronous and active high.
// The slot map, pin functions and the module set follow the printed board
// top; port names describe functions rather than the board's connector pins.
module super_io
  import superio_pkg::*;
#(
  parameter int unsigned CLK_FREQ            = 27_000_000,
  parameter int unsigned BAUD                = 115_200,
  parameter int unsigned MOTOR_PWM_DIV       = 128,
  parameter int unsigned MOTOR_FB_PERIOD     = 10_000_000,
  parameter int unsigned SERVO_PWM_DIV       = 2048,
  parameter int unsigned ENC_VEL_WINDOW      = 14_000_000,
  parameter int unsigned ENC_REPORT_INTERVAL = 8192,
  parameter int unsigned DIGIN_REFRESH       = 65000,
  parameter int unsigned DEBOUNCE_CW         = 8,
  parameter int unsigned ADC_START_WAIT      = 48,
  parameter int unsigned ADC_READ_WAIT       = 48,
  parameter int unsigned LCD_CLEAR_WAIT      = 44330,
  parameter int unsigned LCD_INIT_CLEAR_WAIT = 44325,
  parameter int unsigned LCD_CMD_WAIT        = 1083,
  parameter int unsigned LCD_LINE_WAIT       = 1247
) (
  input  logic       clk,
  input  logic       rst,
  // host serial port
  input  logic       rs232_rxd,
  output logic       rs232_txd,
  output logic [7:0] host_leds,      // last value read by the host
  // motors (H-bridge enable and both direction phases)
  output logic       motor0_en,
  output logic       motor0_dir,
  output logic       motor0_dir_n,
  output logic       motor1_en,
  output logic       motor1_dir,
  output logic       motor1_dir_n,
  // push buttons: up, down, left, right, enter, 0, 1, 2 (bit 0 .. bit 7)
  input  logic [7:0] buttons,
  // character LCD
  output logic [7:0] lcd_db,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en,
  // servos
  output logic [1:0] servo,
  // wheel encoders and the velocity display of encoder 1 (active-low LEDs)
  input  logic [1:0] encoder,
  output logic [7:0] led,
  // ADC
  input  logic [7:0] adc_data,
  input  logic       adc_stat,
  output logic       adc_ce,
  output logic       adc_cs,
  output logic       adc_rw,
  output logic [3:0] adc_mux,
  // digital output port
  output logic [7:0] digout,
  // I2C target and its register-bus master port
  input  logic [6:0] i2c_addr,
  input  logic       i2c_scl,
  input  logic       i2c_sda_i,
  output logic       i2c_sda_o,
  output bus_req_t   i2c_bus_req,
  input  bus_rsp_t   i2c_bus_rsp
);
  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  bus_rsp_t slot_rsp [NUM_SLOTS];
  mod_req_t mreq [NUM_SLOTS];
  mod_rsp_t mrsp [NUM_SLOTS];
  logic [7:0] slot_regs [NUM_SLOTS][8];

  serial_bus_controller #(.CLK_FREQ(CLK_FREQ), .BAUD(BAUD)) u_host (
    .clk, .rst, .rxd(rs232_rxd), .txd(rs232_txd), .bus_req, .bus_rsp, .leds(host_leds)
  );

  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_slot
    reg_controller8 u_rc (
      .clk, .rst, .index(5'(s)), .bus_req, .bus_rsp(slot_rsp[s]),
      .mod_req(mreq[s]), .mod_rsp(mrsp[s]), .regs(slot_regs[s])
    );
  end

  always_comb begin
    bus_rsp = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      bus_rsp.busy   = bus_rsp.busy   | slot_rsp[s].busy;
      bus_rsp.rvalid = bus_rsp.rvalid | slot_rsp[s].rvalid;
      bus_rsp.rdata  = bus_rsp.rdata  | slot_rsp[s].rdata;
    end
  end

  // encoders
  logic [7:0] enc_vel [2];
  encoder_module #(.VEL_WINDOW(ENC_VEL_WINDOW), .REPORT_INTERVAL(ENC_REPORT_INTERVAL)) u_enc0 (
    .clk, .rst, .mod_req(mreq[SLOT_ENC0]), .mod_rsp(mrsp[SLOT_ENC0]),
    .encoder(encoder[0]), .enc_vel(enc_vel[0])
  );
  encoder_module #(.VEL_WINDOW(ENC_VEL_WINDOW), .REPORT_INTERVAL(ENC_REPORT_INTERVAL)) u_enc1 (
    .clk, .rst, .mod_req(mreq[SLOT_ENC1]), .mod_rsp(mrsp[SLOT_ENC1]),
    .encoder(encoder[1]), .enc_vel(enc_vel[1])
  );
  assign led = ~enc_vel[1];

  // motors
  motor_module #(.PWM_DIV(MOTOR_PWM_DIV), .FEEDBACK_PERIOD(MOTOR_FB_PERIOD)) u_mot0 (
    .clk, .rst, .mod_req(mreq[SLOT_MOTOR0]), .mod_rsp(mrsp[SLOT_MOTOR0]),
    .enc_vel(enc_vel[0]), .mot_dir(motor0_dir), .mot_en(motor0_en)
  );
  motor_module #(.PWM_DIV(MOTOR_PWM_DIV), .FEEDBACK_PERIOD(MOTOR_FB_PERIOD)) u_mot1 (
    .clk, .rst, .mod_req(mreq[SLOT_MOTOR1]), .mod_rsp(mrsp[SLOT_MOTOR1]),
    .enc_vel(enc_vel[1]), .mot_dir(motor1_dir), .mot_en(motor1_en)
  );
  assign motor0_dir_n = ~motor0_dir;
  assign motor1_dir_n = ~motor1_dir;

  // debounced push buttons into digital in 0
  logic [7:0] buttons_db;
  for (genvar b = 0; b < 8; b++) begin : g_db
    debouncer #(.CW(DEBOUNCE_CW)) u_db (
      .clk, .rst, .button_i(buttons[b]), .button_o(buttons_db[b])
    );
  end
  digital_in_module #(.REFRESH(DIGIN_REFRESH)) u_din0 (
    .clk, .rst, .mod_req(mreq[SLOT_DIGIN0]), .mod_rsp(mrsp[SLOT_DIGIN0]), .port(buttons_db)
  );

  char_lcd_module #(
    .CLEAR_WAIT(LCD_CLEAR_WAIT), .INIT_CLEAR_WAIT(LCD_INIT_CLEAR_WAIT),
    .CMD_WAIT(LCD_CMD_WAIT), .LINE_WAIT(LCD_LINE_WAIT)
  ) u_lcd (
    .clk, .rst, .mod_req(mreq[SLOT_LCD]), .mod_rsp(mrsp[SLOT_LCD]),
    .lcd_db, .lcd_rs, .lcd_rw, .lcd_en
  );

  servo_module #(.PWM_DIV(SERVO_PWM_DIV)) u_servo0 (
    .clk, .rst, .mod_req(mreq[SLOT_SERVO0]), .mod_rsp(mrsp[SLOT_SERVO0]), .servo
  );

  analog_in_module #(.START_WAIT(ADC_START_WAIT), .READ_WAIT(ADC_READ_WAIT)) u_ana0 (
    .clk, .rst, .mod_req(mreq[SLOT_ANALOG0]), .mod_rsp(mrsp[SLOT_ANALOG0]),
    .mux(adc_mux), .adc_data, .adc_stat, .adc_ce, .adc_rw
  );
  assign adc_cs = adc_ce;

  digital_out_module u_dout0 (
    .clk, .rst, .mod_req(mreq[SLOT_DIGOUT0]), .mod_rsp(mrsp[SLOT_DIGOUT0]), .port(digout)
  );

  i2c_slave u_i2c (
    .clk, .rst, .i2c_addr, .scl(i2c_scl), .sda_i(i2c_sda_i), .sda_o(i2c_sda_o),
    .bus_req(i2c_bus_req), .bus_rsp(i2c_bus_rsp)
  );

endmodule
