// Behavioural model of the external 8-bit parallel ADC used by the analog
// input testbenches. A conversion starts when rw rises again after being low
// with ce low (the write strobe). BUSY_DELAY clocks later stat rises, and
// CONV_TIME clocks after that it falls and data holds the result, a function
// of the selected mux channel and a seed: (channel*17) xor seed.
// It counts conversions and reports the last strobe length in clocks.
module tb_adc_model #(
  parameter int BUSY_DELAY = 5,
  parameter int CONV_TIME  = 30
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       rw,
  input  logic [3:0] mux,
  input  logic [7:0] seed,
  output logic [7:0] data,
  output logic       stat,
  output int         conversions,
  output int         strobe_len
);
  int cnt = 0, low = 0;
  logic rw_q = 1'b1;
  initial begin
    data = 8'h00;
    stat = 1'b0;
    conversions = 0;
    strobe_len = 0;
  end
  always @(posedge clk) begin
    rw_q <= rw;
    if (ce) low <= 0;
    else if (!rw) low <= low + 1;
    if (!ce && rw && !rw_q) begin
      strobe_len  <= low;
      low         <= 0;
      conversions <= conversions + 1;
      cnt         <= 1;
    end else if (cnt > 0) begin
      cnt <= cnt + 1;
      if (cnt == BUSY_DELAY) stat <= 1'b1;
      if (cnt == BUSY_DELAY + CONV_TIME) begin
        stat <= 1'b0;
        data <= 8'(mux * 8'd17) ^ seed;
        cnt  <= 0;
      end
    end
  end
endmodule
