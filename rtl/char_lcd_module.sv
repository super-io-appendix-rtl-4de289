// char_lcd_module: drives an HD44780-style character LCD (8-bit bus, write
// only) from a single character register.
//
// After reset the module initialises the display: clear (0x01), function set
// 8-bit / two lines (0x3F), display on (0x0C), entry mode increment (0x06).
// Then, each time the host accesses the slot, it reads register 0:
//   0x00       clear the display (command 0x01) and restart at line 1
//   any other  write it as a character (rs=1)
// After 16 characters on a line the next idle cycle moves the cursor to the
// start of line 2 (command 0xC0). Accesses that arrive while a command is
// still being executed are ignored.
//
// Every transfer drives db and rs, holds them RS_SETUP clocks, raises
// lcd_en for E_PULSE clocks, lowers it and then waits the execution time of
// the command before the module will accept the next one:
//   clear       CLEAR_WAIT clocks (also after characters, as in the printed
//               design; a slow but safe choice)
//   init steps  CMD_WAIT clocks; the first clear INIT_CLEAR_WAIT clocks
//   line 2      LINE_WAIT clocks
// With the defaults at 27 MHz these are 1.64 ms, 40 us and 46 us, above the
// controller's data-sheet limits. lcd_rw is always 0.
//
// The command set, the 16-character wrap, the strobe length and the waits
// follow the printed design; its separate state per init step is folded here
// into a small command table.
module char_lcd_module
  import superio_pkg::*;
#(
  parameter int unsigned E_PULSE         = 8,
  parameter int unsigned RS_SETUP        = 2,
  parameter int unsigned CLEAR_WAIT      = 44330,
  parameter int unsigned INIT_CLEAR_WAIT = 44325,
  parameter int unsigned CMD_WAIT        = 1083,
  parameter int unsigned LINE_WAIT       = 1247,
  parameter int unsigned LINE_LEN        = 16
) (
  input  logic       clk,
  input  logic       rst,
  output mod_req_t   mod_req,
  input  mod_rsp_t   mod_rsp,
  output logic [7:0] lcd_db,
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_en
);
  localparam logic [7:0] CMD_CLEAR   = 8'h01;
  localparam logic [7:0] CMD_FUNC    = 8'h3F;
  localparam logic [7:0] CMD_DISPLAY = 8'h0C;
  localparam logic [7:0] CMD_ENTRY   = 8'h06;
  localparam logic [7:0] CMD_LINE2   = 8'hC0;

  localparam int unsigned MAXW = (CLEAR_WAIT > INIT_CLEAR_WAIT) ? CLEAR_WAIT : INIT_CLEAR_WAIT;
  localparam int unsigned CW   = $clog2(MAXW + E_PULSE + RS_SETUP + 1);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_FETCH, S_SETUP, S_STROBE, S_WAIT} state_t;
  state_t state;

  logic [CW-1:0] counter;
  logic [CW-1:0] wait_len;
  logic [1:0]    init_step;
  logic          in_init;
  logic [4:0]    column;

  logic [7:0] wv [1], rv [1];
  logic       done, active, busy_fell;
  assign wv[0] = 8'h00;

  reg_sequencer #(.N(1), .ADDRS('0), .WRITES(8'h00)) u_seq (
    .clk, .rst, .start(state == S_IDLE && column < 5'(LINE_LEN) && busy_fell),
    .wvals(wv), .rvals(rv), .done, .active, .busy_fell, .mod_req, .mod_rsp
  );

  assign lcd_rw = 1'b0;

  function automatic logic [7:0] init_cmd(input logic [1:0] step);
    case (step)
      2'd0:    return CMD_CLEAR;
      2'd1:    return CMD_FUNC;
      2'd2:    return CMD_DISPLAY;
      default: return CMD_ENTRY;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_INIT;
      counter   <= '0;
      wait_len  <= '0;
      init_step <= '0;
      in_init   <= 1'b1;
      column    <= '0;
      lcd_db    <= '0;
      lcd_rs    <= 1'b0;
      lcd_en    <= 1'b0;
    end else begin
      case (state)
        S_INIT: begin
          lcd_db   <= init_cmd(init_step);
          lcd_rs   <= 1'b0;
          wait_len <= (init_step == 2'd0) ? CW'(INIT_CLEAR_WAIT) : CW'(CMD_WAIT);
          counter  <= '0;
          state    <= S_SETUP;
        end
        S_IDLE: begin
          lcd_en  <= 1'b0;
          counter <= '0;
          if (column >= 5'(LINE_LEN)) begin
            column   <= '0;
            lcd_db   <= CMD_LINE2;
            lcd_rs   <= 1'b0;
            wait_len <= CW'(LINE_WAIT);
            state    <= S_SETUP;
          end else if (busy_fell) begin
            state <= S_FETCH;
          end
        end
        S_FETCH: if (done) begin
          counter  <= '0;
          wait_len <= CW'(CLEAR_WAIT);
          state    <= S_SETUP;
          if (rv[0] == 8'h00) begin
            lcd_db <= CMD_CLEAR;
            lcd_rs <= 1'b0;
            column <= '0;
          end else begin
            lcd_db <= rv[0];
            lcd_rs <= 1'b1;
            column <= column + 5'd1;
          end
        end
        S_SETUP: begin
          if (counter == CW'(RS_SETUP - 1)) begin
            counter <= '0;
            lcd_en  <= 1'b1;
            state   <= S_STROBE;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        S_STROBE: begin
          if (counter == CW'(E_PULSE - 1)) begin
            counter <= '0;
            lcd_en  <= 1'b0;
            state   <= S_WAIT;
          end else begin
            counter <= counter + 1'b1;
          end
        end
        S_WAIT: begin
          if (counter >= wait_len) begin
            counter <= '0;
            if (in_init) begin
              if (init_step == 2'd3) begin
                in_init <= 1'b0;
                lcd_db  <= 8'h00;
                state   <= S_IDLE;
              end else begin
                init_step <= init_step + 2'd1;
                state     <= S_INIT;
              end
            end else begin
              state <= S_IDLE;
            end
          end else begin
            counter <= counter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
