// Testbench for encoder_module on a reg_controller8 slot, with a short
// velocity window and report interval. An encoder model produces pulses at a
// chosen spacing (asynchronous to clk). Checks the pulse count read by the
// host (both halves, including a carry past 255), the velocity
// ((pulses per window) >> 4) on enc_vel and in register 2, and the periodic
// report every REPORT_INTERVAL+2 clocks without host accesses.
module tb_encoder_module;
  import superio_pkg::*;
  localparam int unsigned WIN = 1999;
  localparam int unsigned REP = 100;
  localparam logic [4:0] IDX = 5'd5;
  logic clk = 1'b0, rst = 1'b1;
  bus_req_t breq = '0;
  bus_rsp_t brsp;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] regs [8];
  logic encoder = 1'b0;
  logic [7:0] enc_vel;
  int checks = 0, failures = 0;
  int pulses = 0;
  int spacing = 0;          // clocks between encoder pulses, 0 = stopped
  int n_reports = 0, cyc = 0, last_rep = 0, rep_gap = 0;

  always #5 clk = ~clk;

  reg_controller8 u_slot (.clk, .rst, .index(IDX), .bus_req(breq), .bus_rsp(brsp),
                          .mod_req(mreq), .mod_rsp(mrsp), .regs);
  encoder_module #(.VEL_WINDOW(WIN), .REPORT_INTERVAL(REP)) dut (
    .clk, .rst, .mod_req(mreq), .mod_rsp(mrsp), .encoder, .enc_vel
  );

  // encoder pulse generator, phase-shifted from clk
  initial begin
    #3;
    forever begin
      if (spacing == 0) #10;
      else begin
        encoder = 1'b1;
        pulses++;
        #(spacing * 5);
        encoder = 1'b0;
        #(spacing * 5);
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (mrsp.ack && mreq.write && mreq.addr == 3'd2) begin
      n_reports++;
      rep_gap = cyc - last_rep;
      last_rep = cyc;
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] hi, lo, v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (300) @(negedge clk);
    bus_read({IDX, 3'd0}, hi);
    bus_read({IDX, 3'd1}, lo);
    check({hi, lo} == 16'd0, "count 0 after reset");
    // steady speed: one pulse every 8 clocks -> 250 per window -> velocity 15
    spacing = 8;
    repeat (3 * (WIN + 1)) @(negedge clk);
    check(enc_vel >= 8'd15 && enc_vel <= 8'd15, $sformatf("velocity %0d, expected 15", enc_vel));
    spacing = 0;
    repeat (50) @(negedge clk);
    // host access triggers a fresh report; the count read must equal the pulses
    bus_write({IDX, 3'd7}, 8'h00);
    repeat (20) @(negedge clk);
    bus_read({IDX, 3'd0}, hi);
    bus_read({IDX, 3'd1}, lo);
    check(int'({hi, lo}) == pulses, $sformatf("count %0d, expected %0d", {hi, lo}, pulses));
    check(pulses > 255, "count has carried into the high byte");
    // velocity decays to zero with the encoder stopped
    repeat (2 * (WIN + 1)) @(negedge clk);
    check(enc_vel == 8'd0, "velocity 0 when stopped");
    repeat (2 * (REP + 2)) @(negedge clk);
    bus_read({IDX, 3'd2}, v);
    check(v == enc_vel, "velocity register matches enc_vel");
    // faster: one pulse every 4 clocks -> 500 per window -> 31
    spacing = 4;
    repeat (3 * (WIN + 1)) @(negedge clk);
    check(enc_vel == 8'd31, $sformatf("velocity %0d, expected 31", enc_vel));
    // periodic reports without host accesses
    begin
      int r0;
      r0 = n_reports;
      repeat (10 * (REP + 2)) @(negedge clk);
      check(n_reports - r0 >= 9 && n_reports - r0 <= 10, $sformatf("%0d reports in 10 intervals", n_reports - r0));
      check(rep_gap == REP + 2, $sformatf("report interval %0d", rep_gap));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
