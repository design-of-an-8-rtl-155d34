// Control PLA of the input control circuit.
//
// Inputs: en (the output control granted the request presented this packet
// cycle), dp2/dp1/dp0 (the incoming packet, the packet in BSR1, the packet in
// BSR0 needs a port) and fb (1: the packet in BSR1 arrived before the one in
// BSR0). Outputs: the buffer shift selects s1/s0, the path select bsel, the
// new first-buffer bit nfb with its load enable, the upgrant ug and the
// one-hot choice oe of which request is shown to the output control.
//
// The state table (shift, path, nfb and grant columns) is the document's. A
// buffer that shifts while sending its packet takes in the incoming packet in
// the same 80 clocks. ug is high when at least one buffer will be free. oe
// always presents the oldest waiting packet: the buffered one with dp0/dp1,
// the older buffer by fb when both are full, else the incoming one. This makes
// oe independent of en, which the table leaves open for the case of two full
// buffers that were refused; that reading is this design's own.
module icc_pla
  import pse_pkg::*;
(
  input  logic       en,
  input  logic       dp2,
  input  logic       dp1,
  input  logic       dp0,
  input  logic       fb,
  output logic       s1,
  output logic       s0,
  output bsel_t      bsel,
  output logic       nfb,
  output logic       nfb_ld,   // 0 where the table leaves nfb unchanged
  output logic [2:0] oe,       // {oe2, oe1, oe0}
  output logic       ug
);

  always_comb begin
    // request presentation
    unique casez ({dp1, dp0})
      2'b00:   oe = 3'b100;
      2'b01:   oe = 3'b001;
      2'b10:   oe = 3'b010;
      default: oe = fb ? 3'b010 : 3'b001;
    endcase
  end

  // The request presented never depends on en, so the loop through the
  // output control circuit (r -> en -> PLA) is broken here.
  always_comb begin
    s1     = 1'b0;
    s0     = 1'b0;
    bsel   = BSEL_NONE;
    nfb    = 1'b0;
    nfb_ld = 1'b0;
    ug     = 1'b1;
    unique case ({en, dp2, dp1, dp0})
      // refused (or nothing asked)
      4'b0000: ;
      4'b0001: begin nfb = 1'b0; nfb_ld = 1'b1; end
      4'b0010: begin nfb = 1'b1; nfb_ld = 1'b1; end
      4'b0011: ug = 1'b0;
      4'b0100: begin s0 = 1'b1; nfb = 1'b0; nfb_ld = 1'b1; end
      4'b0101: begin s1 = 1'b1; nfb = 1'b0; nfb_ld = 1'b1; ug = 1'b0; end
      4'b0110: begin s0 = 1'b1; nfb = 1'b1; nfb_ld = 1'b1; ug = 1'b0; end
      4'b0111: ug = 1'b0;           // cannot occur: no grant was given
      // granted
      4'b1000: ;
      4'b1001: begin s0 = 1'b1; bsel = BSEL_BSR0; end
      4'b1010: begin s1 = 1'b1; bsel = BSEL_BSR1; end
      4'b1011: begin
        if (!fb) begin s0 = 1'b1; bsel = BSEL_BSR0; nfb = 1'b1; end
        else     begin s1 = 1'b1; bsel = BSEL_BSR1; nfb = 1'b0; end
        nfb_ld = 1'b1;
      end
      4'b1100: bsel = BSEL_CUT;
      4'b1101: begin s0 = 1'b1; bsel = BSEL_BSR0; nfb = 1'b0; nfb_ld = 1'b1; end
      4'b1110: begin s1 = 1'b1; bsel = BSEL_BSR1; nfb = 1'b1; nfb_ld = 1'b1; end
      4'b1111: ug = 1'b0;           // cannot occur
      default: ;
    endcase
  end

endmodule
