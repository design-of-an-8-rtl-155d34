// Header registers and header decoder (HEADER: HDRREGS + HDRDEC).
//
// The RC, FAN and BCN registers load from the header tap of the input shift
// register on the strobes ld_rc, ld_fan and ld_bcn, as words 0, 1 and 3 of
// the packet pass the tap. Only the low bit of the BCN word is kept. From the
// registers the decoder works out, combinationally:
//   HDRRC   packet type (empty, point-to-point, broadcast, test) and rcbad for
//           an unknown RC or an RC word with a parity error; a bad header is
//           handled as point-to-point so it is never broadcast;
//   HDRFA   the link-number bit selected by the stage number sn, and whether
//           the fanout exceeds 2^sn (copy needed);
//   HDROM   the operation mode;
//   HDRPORT the request r[N10], copy and test.
// Routing network: every non-empty packet goes to the port named by LN bit sn.
// Distribution network: point-to-point and broadcast packets take either port.
// Copy network: broadcast packets with FAN > 2^sn need both ports and are
// copied, other point-to-point and broadcast packets take either port. Test
// packets go to the port named by LN bit sn in every mode.
//
// The decoding rules are the document's. The undefined operation mode 00 is
// handled like the routing network; that choice is this design's own.
module hdr_dec
  import pse_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d,        // header tap data
  input  logic       pe,       // parity error at the tap
  input  logic       ld_rc,    // word 0 at the tap
  input  logic       ld_fan,   // word 1 at the tap
  input  logic       ld_bcn,   // word 3 at the tap
  input  om_t        om,
  input  logic [2:0] sn,
  output hinfo_t     hi,       // decoded request, copy, test, bcn bit
  output logic       rcbad,
  output logic [7:0] rc_word,  // header register contents (observation)
  output logic [7:0] fan_word
);

  logic [7:0] rc_q, fan_q;
  logic       rc_pe_q, bcn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      rc_q    <= '0;
      rc_pe_q <= 1'b0;
      fan_q   <= '0;
      bcn_q   <= 1'b0;
    end else begin
      if (ld_rc) begin
        rc_q    <= d;
        rc_pe_q <= pe;
      end
      if (ld_fan) fan_q <= d;
      if (ld_bcn) bcn_q <= d[0];
    end
  end

  assign rc_word  = rc_q;
  assign fan_word = fan_q;

  // HDRRC
  logic [2:0] rc;
  logic       is_nil, is_point, is_bcast, is_test;
  always_comb begin
    rc       = rc_q[7:5];
    rcbad    = 1'b0;
    is_nil   = 1'b0;
    is_point = 1'b0;
    is_bcast = 1'b0;
    is_test  = 1'b0;
    unique case (rc)
      RC_EMPTY: is_nil   = 1'b1;
      RC_POINT: is_point = 1'b1;
      RC_BCAST: is_bcast = 1'b1;
      RC_TEST:  is_test  = 1'b1;
      default:  rcbad    = 1'b1;
    endcase
    if (rc != RC_EMPTY && rc_pe_q) rcbad = 1'b1;
    if (rcbad) begin
      is_point = 1'b1;
      is_bcast = 1'b0;
      is_test  = 1'b0;
    end
  end

  // HDRFA
  logic       ln_bit;
  logic       eq2sn, lt2sn;
  logic [8:0] two_sn;
  always_comb begin
    ln_bit = fan_q[sn];
    two_sn = 9'(1) << sn;
    eq2sn  = {1'b0, fan_q} == two_sn;
    lt2sn  = {1'b0, fan_q} <  two_sn;
  end

  // HDROM + HDRPORT
  req_t specific;
  always_comb begin
    specific = ln_bit ? REQ_PORT1 : REQ_PORT0;
    hi       = HINFO_NONE;
    hi.bcn   = bcn_q;
    if (!is_nil) begin
      if (is_test) begin
        hi.r    = specific;
        hi.test = 1'b1;
      end else begin
        unique case (om)
          OM_DN: hi.r = REQ_EITHER;
          OM_CN: begin
            if (is_bcast && !eq2sn && !lt2sn) begin
              hi.r    = REQ_BOTH;
              hi.copy = 1'b1;
            end else begin
              hi.r = REQ_EITHER;
            end
          end
          default: hi.r = specific;   // OM_RN and the undefined 00
        endcase
      end
    end
  end

endmodule
