// Header modification circuit (HMC) of one switch input, with the output
// register of the output port this half owns.
//
// The path multiplexor picks BSR0, the cut-through path or BSR1 (bsel). The
// picked word goes through a one-word delay stage D; from D come the normal
// data, the fanout divided by two (an exclusive-or restores the parity) and
// the fanout incremented and divided by two (parity recomputed). For each
// output port an output multiplexor chooses among these and the undelayed word:
//   copy, word 1 (t22): the fanout halves; if the BCN bit is odd port 0 gets
//                       FAN/2 and port 1 (FAN+1)/2, if even the other way round
//   test with rrf, trot: words 2 and 3 are sent undelayed while D holds word 1,
//                       which then follows as word 3 (rotation 1,2,3 -> 2,3,1)
//   otherwise           the delayed word.
// hen[OWN] gates the own port's word into the output register OUT, hen[other]
// gates the other port's word to tp for the other half; the word arriving from
// the other half on op is ORed in, so the two halves form a 2x2 crosspoint.
// OUT is two register stages, making the cut-through latency
// 21 (input register) + 1 (D) + 2 (OUT) = 24 clocks.
//
// With tsten high, tmei selects the output multiplexor input of both ports
// (00 FAN/2, 01 (FAN+1)/2, 10 delayed, 11 undelayed) and the packet window no
// longer gates the enables, so the data path can be driven from the pins.
//
// Structure, selection rules and the 24-clock latency follow the document.
// Outside the 80-word window of a packet the enables are forced off so that the
// outputs carry zeros between packets; that gating is this design's own.
module hmc
  import pse_pkg::*;
#(
  parameter bit OWN = 1'b0     // output port driven by this half's OUT
) (
  input  logic       clk,
  input  logic       rst,
  input  word_t      d0,       // from BSR0
  input  word_t      d1,       // cut-through path
  input  word_t      d2,       // from BSR1
  input  bsel_t      bsel,
  input  logic [1:0] hen,      // e[10]: enables for ports 1 and 0
  input  logic       copy,
  input  logic       test,
  input  logic       bcn,
  input  logic       rrf,      // rotate routing field of test packets
  input  logic       tsten,    // test control of the output multiplexors
  input  logic [1:0] tmei,     // 00 FAN/2, 01 (FAN+1)/2, 10 delayed, 11 undelayed
  input  tstrobe_t   ts,
  input  word_t      op,       // from the other half, for this port
  output word_t      tp,       // to the other half, for its port
  output word_t      dout      // downstream data of port OWN
);

  // mainpath multiplexor
  word_t main;
  always_comb begin
    unique case (bsel)
      BSEL_BSR0: main = d0;
      BSEL_CUT:  main = d1;
      BSEL_BSR1: main = d2;
      default:   main = '0;
    endcase
  end

  // delay stage; holds word 1 during a rotation
  logic  rot;
  word_t dq;
  logic  win;     // D holds one of the 80 words of the packet
  assign rot = test && rrf && ts.trot;

  always_ff @(posedge clk) begin
    if (rst) begin
      dq  <= '0;
      win <= 1'b0;
    end else begin
      if (!rot) dq <= main;
      win <= ts.tshift;
    end
  end

  // DIV and INCDIV/PAR
  word_t div2, incdiv2;
  logic [8:0] inc_sum;
  always_comb begin
    div2    = {1'b0, dq[8:2], dq[0] ^ dq[1]};
    inc_sum = {1'b0, wdata(dq)} + 9'd1;
    incdiv2 = mkword(inc_sum[8:1]);
  end

  // output multiplexors, one per port
  word_t pword [2];
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      if (tsten) begin
        unique case (tmei)
          2'b00:   pword[p] = div2;
          2'b01:   pword[p] = incdiv2;
          2'b10:   pword[p] = dq;
          default: pword[p] = main;
        endcase
      end else if (copy && ts.t22)
        pword[p] = ((p == 0) == bcn) ? div2 : incdiv2;
      else if (rot)
        pword[p] = main;
      else
        pword[p] = dq;
    end
  end

  // crosspoint enables and output register
  word_t own_w;
  word_t out1, out2;
  assign own_w = ((win || tsten) && hen[OWN])  ? pword[OWN]  : '0;
  assign tp    = ((win || tsten) && hen[!OWN]) ? pword[!OWN] : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      out1 <= '0;
      out2 <= '0;
    end else begin
      out1 <= own_w | op;
      out2 <= out1;
    end
  end

  assign dout = out2;

endmodule
