// Testbench for reg_sequencer: a slot model acknowledges each request after a
// random delay and logs it. Checks the order, addresses and directions of the
// accesses, the written values, the values read back, the single done pulse,
// reset values, a start during a walk causing exactly one more walk, and the
// busy falling-edge detector.
module tb_reg_sequencer;
  import superio_pkg::*;
  localparam int unsigned N = 3;
  localparam logic [7:0][2:0] ADDRS = {3'd0, 3'd0, 3'd0, 3'd0, 3'd0, 3'd7, 3'd2, 3'd5};
  localparam logic [7:0] WRITES = 8'b0000_0010;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] wvals [N];
  logic [7:0] rvals [N];
  logic done, active, busy_fell;
  mod_req_t mreq;
  mod_rsp_t mrsp;
  logic [7:0] mem [8];
  int checks = 0, failures = 0;
  int n_acc = 0, n_done = 0, n_fell = 0;
  logic       log_w [64];
  logic [2:0] log_a [64];
  logic [7:0] log_d [64];
  int delay = 0;
  logic slot_busy = 1'b0;

  always #5 clk = ~clk;

  reg_sequencer #(.N(N), .ADDRS(ADDRS), .WRITES(WRITES),
                  .RESET_VALS({8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'hA3, 8'h00, 8'h3A})) dut (
    .clk, .rst, .start, .wvals, .rvals, .done, .active, .busy_fell, .mod_req(mreq), .mod_rsp(mrsp)
  );

  // slot model: ack after 'delay' idle cycles
  int wait_cnt = 0;
  logic ack_q = 1'b0;
  logic [7:0] rdata_q = '0;
  always_ff @(posedge clk) begin
    ack_q   <= 1'b0;
    rdata_q <= 8'h00;
    if (mreq.enable && !ack_q) begin
      if (wait_cnt >= delay) begin
        wait_cnt <= 0;
        ack_q    <= 1'b1;
        log_w[n_acc] = mreq.write;
        log_a[n_acc] = mreq.addr;
        log_d[n_acc] = mreq.wdata;
        n_acc++;
        if (mreq.write) mem[mreq.addr] <= mreq.wdata;
        else            rdata_q <= mem[mreq.addr];
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
    if (done) n_done++;
    if (busy_fell) n_fell++;
  end
  assign mrsp = '{busy: slot_busy, ack: ack_q, rdata: rdata_q};

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) mem[i] = 8'(8'h10 * i + 1);
    wvals = '{8'h00, 8'hC7, 8'h00};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(rvals[0] == 8'h3A && rvals[2] == 8'hA3, "reset values");
    check(!mreq.enable && !active, "idle after reset");
    for (int walk = 0; walk < 4; walk++) begin
      int a0, d0;
      delay = walk;
      a0 = n_acc; d0 = n_done;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (active) @(negedge clk);
      repeat (2) @(negedge clk);
      check(n_acc == a0 + 3 && n_done == d0 + 1, $sformatf("walk %0d: 3 accesses, one done", walk));
      check(!log_w[a0] && log_a[a0] == 3'd5, "access 0 reads reg 5");
      check(log_w[a0 + 1] && log_a[a0 + 1] == 3'd2 && log_d[a0 + 1] == wvals[1], "access 1 writes reg 2");
      check(!log_w[a0 + 2] && log_a[a0 + 2] == 3'd7, "access 2 reads reg 7");
      check(rvals[0] == mem[5] && rvals[2] == mem[7], "read values captured");
      check(mem[2] == wvals[1], "written value stored");
      mem[5] = 8'($urandom); mem[7] = 8'($urandom); wvals[1] = 8'($urandom);
    end
    // start during a walk: exactly one more walk
    begin
      int a0;
      delay = 3;
      a0 = n_acc;
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      repeat (2) @(negedge clk);
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      repeat (100) @(negedge clk);
      check(n_acc == a0 + 6, $sformatf("start during a walk gives one more walk (%0d)", n_acc - a0));
    end
    // busy falling edge
    begin
      int f0;
      f0 = n_fell;
      @(negedge clk); slot_busy = 1'b1;
      repeat (3) @(negedge clk);
      check(n_fell == f0, "no fall while busy");
      slot_busy = 1'b0;
      repeat (3) @(negedge clk);
      check(n_fell == f0 + 1, "one busy_fell pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
