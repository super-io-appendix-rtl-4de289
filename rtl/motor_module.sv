// motor_module: PWM drive for one DC motor (enable + direction to an H-bridge),
// with optional closed-loop speed trimming from an encoder.
//
// Registers of its slot (read by the module after every host access):
//   0  velocity   PWM duty, 0..255 (duty = velocity/256)
//   1  direction  bit 0 drives mot_dir
//   2  (unused)
//   3  feedback   bit 0 enables the speed loop
// PWM: a prescaler counts 0..PWM_DIV (PWM_DIV+1 clocks per step), an 8-bit
// phase counter advances once per prescaler wrap, and mot_en is high while
// phase < output velocity: a 256-step PWM of period 256*(PWM_DIV+1) clocks
// (about 1.24 ms, 806 Hz, at 27 MHz). mot_en and mot_dir are registered.
// Open loop, the output velocity is the velocity register. With feedback on,
// every FEEDBACK_PERIOD+2 clocks the output velocity is stepped by one toward
// the value that makes the encoder velocity (enc_vel) equal the velocity
// register: up if the encoder is slower, down if faster, saturating at 0 and
// 255; the direction register is copied at the same moment.
//
// Register map, PWM structure, prescaler, loop period and step follow the
// printed design.
module motor_module
  import superio_pkg::*;
#(
  parameter int unsigned PWM_DIV         = 128,
  parameter int unsigned FEEDBACK_PERIOD = 10_000_000
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  input  logic [7:0] enc_vel,
  output logic       mot_dir,
  output logic       mot_en
);
  logic [7:0] wvals [3];
  logic [7:0] rvals [3];
  logic       busy_fell, done, active;

  assign wvals = '{default: 8'h00};

  // reads registers 0, 1 and 3
  reg_sequencer #(
    .N(3), .ADDRS({3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd3, 3'd1, 3'd0}), .WRITES(8'h00)
  ) u_seq (
    .clk, .rst, .start(busy_fell), .wvals, .rvals, .done, .active, .busy_fell,
    .mod_req, .mod_rsp
  );

  logic [7:0] cur_vel, cur_dir;
  logic       fb_en;
  assign cur_vel = rvals[0];
  assign cur_dir = rvals[1];
  assign fb_en   = rvals[2][0];

  localparam int unsigned DW = $clog2(PWM_DIV + 1);
  localparam int unsigned FW = $clog2(FEEDBACK_PERIOD + 2);

  logic [DW-1:0] pwm_div;
  logic [7:0]    pwm_count;
  logic [FW-1:0] fb_cnt;
  logic [7:0]    out_vel, out_dir;

  always_ff @(posedge clk) begin
    if (rst) begin
      pwm_div   <= '0;
      pwm_count <= '0;
      fb_cnt    <= '0;
      out_vel   <= '0;
      out_dir   <= '0;
      mot_en    <= 1'b0;
      mot_dir   <= 1'b0;
    end else begin
      if (fb_en) begin
        if (fb_cnt > FW'(FEEDBACK_PERIOD)) begin
          fb_cnt  <= '0;
          out_dir <= cur_dir;
          if (enc_vel < cur_vel && out_vel != 8'hFF)      out_vel <= out_vel + 8'd1;
          else if (enc_vel > cur_vel && out_vel != 8'h00) out_vel <= out_vel - 8'd1;
        end else begin
          fb_cnt <= fb_cnt + 1'b1;
        end
      end else begin
        out_vel <= cur_vel;
        out_dir <= cur_dir;
      end

      if (pwm_div == DW'(PWM_DIV)) begin
        pwm_div   <= '0;
        pwm_count <= pwm_count + 8'd1;
      end else begin
        pwm_div <= pwm_div + 1'b1;
      end
      mot_en  <= (pwm_count < out_vel);
      mot_dir <= out_dir[0];
    end
  end

endmodule
