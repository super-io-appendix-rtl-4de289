// Testbench for analog_in_module on a reg_controller8 slot, with an ADC model
// (tb_adc_model) whose result depends on the selected mux channel. Checks the
// mux output, the length of the conversion-start strobe, that the module waits
// for the ADC's status pulse, the result in register 0, and that every host
// access to the slot starts exactly one conversion.
module tb_analog_in_module;
  import superio_pkg::*;
  localparam int unsigned START_WAIT = 6;
  localparam int unsigned READ_WAIT  = 4;
  localparam logic [4:0] IDX = 5'd7;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic [3:0] mux;
  logic [7:0] adc_data;
  logic adc_stat, adc_ce, adc_rw;
  int checks = 0, failures = 0;
  int conversions, strobe_len;
  logic [7:0] seed = 8'h00;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  analog_in_module #(.START_WAIT(START_WAIT), .READ_WAIT(READ_WAIT)) dut (
    .clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .mux, .adc_data, .adc_stat, .adc_ce, .adc_rw
  );
  tb_adc_model #(.BUSY_DELAY(5), .CONV_TIME(30)) u_adc (
    .clk, .ce(adc_ce), .rw(adc_rw), .mux, .seed, .data(adc_data), .stat(adc_stat),
    .conversions, .strobe_len
  );

  function automatic logic [7:0] expect_val(input logic [3:0] ch, input logic [7:0] s);
    return 8'(ch * 8'd17) ^ s;
  endfunction

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  `include "tb/bus_tasks.svh"

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int c0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    check(adc_ce && adc_rw && conversions == 0, "ADC idle after reset");
    for (int n = 0; n < 6; n++) begin
      logic [3:0] ch;
      ch = 4'($urandom);
      seed = 8'($urandom);
      c0 = conversions;
      bus_write({IDX, 3'd1}, {4'h0, ch});   // select channel, starts a conversion
      repeat (200) @(negedge clk);
      check(mux == ch, $sformatf("mux %0d", ch));
      check(conversions == c0 + 1, "one conversion per host access");
      check(strobe_len == START_WAIT + 1, $sformatf("start strobe %0d clocks (n=%0d)", strobe_len, n));
      check(regs[0] == expect_val(ch, seed), $sformatf("result %02x expected %02x", regs[0], expect_val(ch, seed)));
      bus_read({IDX, 3'd0}, d);             // also starts the next conversion
      check(d == expect_val(ch, seed), "host reads the result");
      repeat (200) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
