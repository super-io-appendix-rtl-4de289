// Testbench for char_lcd_module on a reg_controller8 slot, with short waits.
// A display-bus monitor logs every enable strobe (db, rs, width, time).
// Checks the init sequence 01 3F 0C 06, the strobe width, the execution
// waits between transfers, characters with rs=1, the move to line 2 after 16
// characters, clear on character 0, lcd_rw=0, and that an access arriving
// while a command executes is ignored.
module tb_char_lcd_module;
  import superio_pkg::*;
  localparam int unsigned E_PULSE = 8, RS_SETUP = 2;
  localparam int unsigned CLEAR_WAIT = 300, INIT_CLEAR_WAIT = 250, CMD_WAIT = 40, LINE_WAIT = 60;
  localparam logic [4:0] IDX = 5'd3;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [7:0] lcd_db;
  logic lcd_rs, lcd_rw, lcd_en;
  int checks = 0, failures = 0;

  logic [7:0] log_db [256];
  logic       log_rs [256];
  int         log_w  [256];
  int         log_t  [256];
  int n_str = 0, cyc = 0, wcnt = 0, rw_bad = 0;
  logic en_q = 1'b0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  char_lcd_module #(.E_PULSE(E_PULSE), .RS_SETUP(RS_SETUP), .CLEAR_WAIT(CLEAR_WAIT),
                    .INIT_CLEAR_WAIT(INIT_CLEAR_WAIT), .CMD_WAIT(CMD_WAIT), .LINE_WAIT(LINE_WAIT)) dut (
    .clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .lcd_db, .lcd_rs, .lcd_rw, .lcd_en
  );

  always @(posedge clk) begin
    cyc++;
    if (!rst && lcd_rw) rw_bad++;
    en_q <= lcd_en;
    if (lcd_en) wcnt++;
    if (lcd_en && !en_q) begin
      log_db[n_str] = lcd_db;
      log_rs[n_str] = lcd_rs;
      log_t[n_str]  = cyc;
    end
    if (!lcd_en && en_q) begin
      log_w[n_str] = wcnt;
      wcnt = 0;
      n_str++;
    end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  task automatic put(input logic [7:0] ch);
    bus_write({IDX, 3'd0}, ch);
    repeat (CLEAR_WAIT + 40) @(negedge clk);
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (INIT_CLEAR_WAIT + 3 * CMD_WAIT + 200) @(negedge clk);
    check(n_str == 4, $sformatf("four init strobes (%0d)", n_str));
    check(log_db[0] == 8'h01 && log_db[1] == 8'h3F && log_db[2] == 8'h0C && log_db[3] == 8'h06,
          "init sequence 01 3F 0C 06");
    check(!log_rs[0] && !log_rs[1] && !log_rs[2] && !log_rs[3], "init strobes are commands");
    check(log_w[0] == E_PULSE && log_w[3] == E_PULSE, "strobe width");
    check(log_t[1] - log_t[0] >= INIT_CLEAR_WAIT + E_PULSE, "wait after the first clear");
    check(log_t[2] - log_t[1] >= CMD_WAIT + E_PULSE, "wait after a command");
    // characters
    s0 = n_str;
    for (int i = 0; i < 16; i++) put(8'h41 + 8'(i));
    check(n_str == s0 + 17, $sformatf("16 characters then line 2 (%0d strobes)", n_str - s0));
    begin
      bit ok;
      ok = 1'b1;
      for (int i = 0; i < 16; i++) ok &= (log_db[s0 + i] == 8'h41 + 8'(i)) && log_rs[s0 + i];
      check(ok, "characters written as data");
    end
    check(log_db[s0 + 16] == 8'hC0 && !log_rs[s0 + 16], "cursor to line 2 after 16 characters");
    check(log_t[s0 + 1] - log_t[s0] >= CLEAR_WAIT + E_PULSE, "wait after a character");
    // character, then an access during its execution is ignored
    repeat (LINE_WAIT + 100) @(negedge clk);
    s0 = n_str;
    bus_write({IDX, 3'd0}, 8'h5A);
    repeat (50) @(negedge clk);
    bus_write({IDX, 3'd0}, 8'h31);
    repeat (2 * CLEAR_WAIT) @(negedge clk);
    check(n_str == s0 + 1 && log_db[s0] == 8'h5A, "access during execution ignored");
    // clear
    s0 = n_str;
    put(8'h00);
    check(n_str == s0 + 1 && log_db[s0] == 8'h01 && !log_rs[s0], "character 0 clears the display");
    // after a clear the column restarts: 16 more characters before line 2
    s0 = n_str;
    for (int i = 0; i < 15; i++) put(8'h61);
    check(n_str == s0 + 15, "column restarts after clear");
    check(rw_bad == 0, "lcd_rw always 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
