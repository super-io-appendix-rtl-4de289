// Serial-line host model tasks. The including module provides clk, the
// line it drives into the design (host_txd), the line it listens to
// (host_rxd) and BIT_CYC, the bit time in clock cycles (may be fractional).
task automatic uart_send(input logic [7:0] b);
  realtime t0;
  t0 = $realtime;
  host_txd = 1'b0;
  #(BIT_CYC * CLK_PERIOD);
  for (int i = 0; i < 8; i++) begin
    host_txd = b[i];
    #(BIT_CYC * CLK_PERIOD);
  end
  host_txd = 1'b1;
  #(BIT_CYC * CLK_PERIOD);
endtask

// Waits up to max_bits bit times for a start bit, then samples mid-bit.
task automatic uart_recv(output logic [7:0] b, output bit ok, input int max_bits);
  realtime limit;
  ok = 1'b0;
  b = '0;
  limit = $realtime + max_bits * BIT_CYC * CLK_PERIOD;
  while (host_rxd === 1'b1 && $realtime < limit) #(CLK_PERIOD);
  if (host_rxd !== 1'b0) return;
  #(BIT_CYC * CLK_PERIOD * 1.5);
  for (int i = 0; i < 8; i++) begin
    b[i] = host_rxd;
    #(BIT_CYC * CLK_PERIOD);
  end
  ok = (host_rxd === 1'b1);
endtask
