// Testbench for i2c_slave: a bit-level I2C host model (open-drain line,
// SCL period of 40 clocks) and a register-bus model (256 bytes, read data two
// clocks after go). Checks writes of one and several data bytes, register
// reads with repeated START and multi-byte reads ending in NACK, the ACK bits
// the slave returns, and that another device address is ignored (no ACK, no
// bus access).
module tb_i2c_slave;
  import superio_pkg::*;
  localparam logic [6:0] ADDR = 7'h2C;
  localparam int HALF = 20;                 // clocks per half SCL period
  logic clk = 1'b0, rst = 1'b1;
  logic scl = 1'b1, sda_m = 1'b1, sda_o, sda;
  bus_req_t breq;
  bus_rsp_t brsp;
  logic [7:0] mem [256];
  logic [1:0] rd_pipe = '0;
  logic [7:0] rd_addr = '0;
  int checks = 0, failures = 0, n_go = 0;

  always #5 clk = ~clk;
  assign sda = sda_m & sda_o;               // wired-AND open-drain line

  i2c_slave dut (.clk, .rst, .i2c_addr(ADDR), .scl, .sda_i(sda), .sda_o,
                 .bus_req(breq), .bus_rsp(brsp));

  always_ff @(posedge clk) begin
    rd_pipe <= {rd_pipe[0], 1'b0};
    if (breq.go) begin
      n_go++;
      if (breq.write) mem[breq.addr] <= breq.wdata;
      else begin
        rd_addr <= breq.addr;
        rd_pipe <= {rd_pipe[0], 1'b1};
      end
    end
  end
  assign brsp = '{busy: 1'b0, rvalid: rd_pipe[1], rdata: rd_pipe[1] ? mem[rd_addr] : 8'h00};

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic half();
    repeat (HALF) @(negedge clk);
  endtask

  task automatic i2c_start();
    sda_m = 1'b1; half(); scl = 1'b1; half();
    sda_m = 1'b0; half(); scl = 1'b0; half();
  endtask

  task automatic i2c_stop();
    sda_m = 1'b0; half(); scl = 1'b1; half(); sda_m = 1'b1; half();
  endtask

  task automatic i2c_bit_out(input logic b);
    sda_m = b; half(); scl = 1'b1; half(); scl = 1'b0;
  endtask

  task automatic i2c_bit_in(output logic b);
    sda_m = 1'b1; half(); scl = 1'b1; #1; b = sda; half(); scl = 1'b0;
  endtask

  task automatic i2c_write_byte(input logic [7:0] v, output logic ack);
    for (int i = 7; i >= 0; i--) i2c_bit_out(v[i]);
    i2c_bit_in(ack);
    ack = ~ack;
  endtask

  task automatic i2c_read_byte(output logic [7:0] v, input logic send_ack);
    for (int i = 7; i >= 0; i--) i2c_bit_in(v[i]);
    i2c_bit_out(~send_ack);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ack, a1, a2;
    logic [7:0] r, v [4];
    int g0;
    for (int i = 0; i < 256; i++) mem[i] = 8'(i ^ 8'h5A);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    // single-byte writes
    for (int n = 0; n < 4; n++) begin
      logic [7:0] ra, d;
      ra = 8'($urandom); d = 8'($urandom);
      i2c_start();
      i2c_write_byte({ADDR, 1'b0}, ack); check(ack, "address ACK");
      i2c_write_byte(ra, a1);            check(a1, "register ACK");
      i2c_write_byte(d, a2);             check(a2, "data ACK");
      i2c_stop();
      repeat (5) @(negedge clk);
      check(mem[ra] == d, $sformatf("write reg %02x = %02x", ra, d));
    end
    // multi-byte write: every byte to the same register
    g0 = n_go;
    i2c_start();
    i2c_write_byte({ADDR, 1'b0}, ack);
    i2c_write_byte(8'h40, ack);
    for (int i = 0; i < 3; i++) begin
      i2c_write_byte(8'h90 + 8'(i), ack);
      check(ack, "data ACK in a burst");
    end
    i2c_stop();
    repeat (5) @(negedge clk);
    check(n_go == g0 + 3 && mem[8'h40] == 8'h92, "three bus writes, last value kept");
    // register read with repeated start, three bytes, NACK on the last
    mem[8'h21] = 8'hC3;
    i2c_start();
    i2c_write_byte({ADDR, 1'b0}, ack);
    i2c_write_byte(8'h21, ack);
    i2c_start();
    i2c_write_byte({ADDR, 1'b1}, ack);
    check(ack, "read address ACK");
    for (int i = 7; i >= 0; i--) i2c_bit_in(r[i]);
    check(r == 8'hC3, $sformatf("read byte 0 = %02x", r));
    mem[8'h21] = 8'h17;                    // changed before the host's ACK
    i2c_bit_out(1'b0);
    i2c_read_byte(r, 1'b1);
    check(r == 8'h17, $sformatf("read byte 1 re-reads the register = %02x", r));
    i2c_read_byte(r, 1'b0);
    check(r == 8'h17, "read byte 2");
    i2c_stop();
    // another device: no ACK, no bus access
    g0 = n_go;
    i2c_start();
    i2c_write_byte({ADDR ^ 7'h01, 1'b0}, ack);
    check(!ack, "other address not acknowledged");
    i2c_write_byte(8'h10, ack);
    i2c_write_byte(8'h99, ack);
    i2c_stop();
    repeat (5) @(negedge clk);
    check(n_go == g0 && mem[8'h10] == (8'h10 ^ 8'h5A), "other address causes no access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
