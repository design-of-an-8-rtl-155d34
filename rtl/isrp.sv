// Input shift register with parity check (ISRP), one per switch input.
//
// A chain of LEN nine-bit stages shifts the upstream data every clock, so
// dout is the input delayed by LEN clocks (21 in the chip). The first TAP
// stages (2) line the packet up with packet-time; their output is the header
// tap d, which feeds the header registers of the input control circuit, and
// pe flags an odd-parity error of the word at the tap. The remaining stages
// give the control logic time to decide where the packet goes before its first
// word leaves the register.
//
// The 21 stages, the tap after stage 2 and the exclusive-or parity tree follow
// the document. The tap word's parity is checked over all nine bits; how many
// of them the chip's parity tree takes is not settled by the description.
module isrp
  import pse_pkg::*;
#(
  parameter int unsigned LEN = ISR_LEN,
  parameter int unsigned TAP = ISR_TAP
) (
  input  logic        clk,
  input  word_t       di,     // upstream data
  output logic [7:0]  d,      // header data at the tap
  output logic        pe,     // parity error of the word at the tap
  output word_t       dout    // data delayed by LEN clocks
);

  word_t stage [LEN];

  always_ff @(posedge clk) begin
    stage[0] <= di;
    for (int i = 1; i < LEN; i++) stage[i] <= stage[i-1];
  end

  assign d    = wdata(stage[TAP-1]);
  assign pe   = parity_bad(stage[TAP-1]);
  assign dout = stage[LEN-1];

endmodule
