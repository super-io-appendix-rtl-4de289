// debouncer: cleans up a mechanical switch or push button.
//
// The raw input is synchronised by two flip-flops. A CW-bit counter runs while
// the synchronised input differs from the output and is cleared whenever they
// agree; when it reaches all ones with the input still different, the output
// takes the new value. The input must therefore hold a new level for 2^CW
// consecutive clocks (256 clocks, 9.5 us at 27 MHz, with the default CW) to be
// passed on. Reset is synchronous and clears the output (the printed debouncer resets
// asynchronously; a synchronous reset matches the rest of this design).
//
// This is the structure of the printed debouncer.
module debouncer #(
  parameter int unsigned CW = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic button_i,
  output logic button_o
);
  logic [1:0]    sync;
  logic [CW-1:0] count;
  logic          changed;

  assign changed = sync[1] ^ button_o;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= '0;
      count    <= '0;
      button_o <= 1'b0;
    end else begin
      sync <= {sync[0], button_i};
      if (!changed) begin
        count <= '0;
      end else begin
        count <= count + 1'b1;
        if (&count) button_o <= sync[1];
      end
    end
  end

endmodule
