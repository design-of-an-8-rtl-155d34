// Packet buffer shift register (BSR), two per switch input.
//
// DEPTH nine-bit stages (80, one whole packet) that shift by one word on
// every clock in which s is high and hold otherwise. Because a buffer shifts a
// full packet in exactly DEPTH clocks, the packet it held leaves at dout while
// the new one enters at di: one 80-clock shift both sends the stored packet and
// stores the incoming one. The shift/hold qualification and the 80 x 9 size
// follow the document; the clock line drivers it describes are electrical and
// are not modelled.
module bsr
  import pse_pkg::*;
#(
  parameter int unsigned DEPTH = PKT_WORDS
) (
  input  logic  clk,
  input  logic  s,      // shift (1) or hold (0)
  input  word_t di,
  output word_t dout
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (s) begin
      mem[0] <= di;
      for (int i = 1; i < DEPTH; i++) mem[i] <= mem[i-1];
    end
  end

  assign dout = mem[DEPTH-1];

endmodule
