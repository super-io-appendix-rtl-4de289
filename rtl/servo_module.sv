// servo_module: two hobby-servo pulse outputs.
//
// Registers of its slot (read after every host access):
//   0  pulse width of servo 0, in units of PWM_DIV+1 clocks
//   1  pulse width of servo 1
// Both widths are 16 after reset. A prescaler counts 0..PWM_DIV, an 8-bit
// phase counter advances once per prescaler wrap, and servo[i] is high while
// phase < width i. With the defaults at 27 MHz the frame is 256*2049 clocks
// (19.4 ms, about 51 Hz) and one width unit is 75.9 us, so the reset width of
// 16 gives a 1.21 ms pulse. Outputs are registered.
//
// Register map, reset widths, prescaler and frame follow the printed design.
module servo_module
  import superio_pkg::*;
#(
  parameter int unsigned PWM_DIV = 2048
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  output logic [1:0] servo
);
  logic [7:0] wvals [2];
  logic [7:0] rvals [2];
  logic       busy_fell, done, active;

  assign wvals = '{default: 8'h00};

  reg_sequencer #(
    .N(2), .ADDRS({3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd1, 3'd0}), .WRITES(8'h00),
    .RESET_VALS({8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd16, 8'd16})
  ) u_seq (
    .clk, .rst, .start(busy_fell), .wvals, .rvals, .done, .active, .busy_fell,
    .mod_req, .mod_rsp
  );

  localparam int unsigned DW = $clog2(PWM_DIV + 1);
  logic [DW-1:0] pwm_div;
  logic [7:0]    pwm_count;

  always_ff @(posedge clk) begin
    if (rst) begin
      pwm_div   <= '0;
      pwm_count <= '0;
      servo     <= '0;
    end else begin
      if (pwm_div == DW'(PWM_DIV)) begin
        pwm_div   <= '0;
        pwm_count <= pwm_count + 8'd1;
      end else begin
        pwm_div <= pwm_div + 1'b1;
      end
      servo[0] <= (pwm_count < rvals[0]);
      servo[1] <= (pwm_count < rvals[1]);
    end
  end

endmodule
