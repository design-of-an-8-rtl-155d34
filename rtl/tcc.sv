// Timing control circuit (TCC).
//
// A counter restarts on every clock in which packet-time (pt) is high and
// counts the clocks of the packet cycle; decoding its value gives one-clock
// strobes t_i, high i+1 clocks after pt (t1 is the clock in which the first
// packet word reaches the header tap). trot covers t22 and t23. tshift is
// high for exactly PKT clocks starting at t20, the clocks in which the first
// through last word of a packet leave the input shift register, and is the
// only output that can reach into the next packet cycle. Packet cycles must
// be at least PKT clocks apart.
//
// The counter, the strobe names and the hard-reset behaviour (the circuit
// stays reset until the next packet-time) follow the document. The document's
// decoding PLA and set/reset flip-flops are replaced by comparators, and the
// clock numbers of t16..t22 are this design's own, chosen so that the 21-stage
// input register and the 24-clock cut-through latency work out.
module tcc
  import pse_pkg::*;
#(
  parameter int unsigned PKT = PKT_WORDS
) (
  input  logic     clk,
  input  logic     rst,    // hard reset
  input  logic     pt,     // packet-time
  output tstrobe_t ts
);

  localparam int unsigned CW = 7;
  localparam logic [CW-1:0] IDLE = '1;

  logic [CW-1:0] cnt;
  logic [CW-1:0] swc;    // remaining clocks of the shift window

  // After reset the counter parks at IDLE, which decodes to no strobe, until
  // the next packet-time; it also parks there when packet-times stop.
  always_ff @(posedge clk) begin
    if (rst)              cnt <= IDLE;
    else if (pt)          cnt <= '0;
    else if (cnt != IDLE) cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                          swc <= '0;
    else if (cnt == CW'(19)) swc <= CW'(PKT);
    else if (swc != '0)               swc <= swc - 1'b1;
  end

  always_comb begin
    ts        = '0;
    ts.t1     = cnt == CW'(1);
    ts.t2     = cnt == CW'(2);
    ts.t3     = cnt == CW'(3);
    ts.t4     = cnt == CW'(4);
    ts.t16    = cnt == CW'(16);
    ts.t19    = cnt == CW'(19);
    ts.t20    = cnt == CW'(20);
    ts.t22    = cnt == CW'(22);
    ts.trot   = (cnt == CW'(22) || cnt == CW'(23));
    ts.tshift = swc != '0;
  end

endmodule
