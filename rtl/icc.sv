// Input control circuit (ICC) of one switch input.
//
// Decodes the header of each incoming packet (hdr_dec), keeps the decoded
// header of each buffered packet in the buffer control registers BCR0/BCR1,
// presents one request vector r to the output control circuit, and from the
// enable vector en it gets back runs the control PLA (icc_pla), which decides
// whether the incoming packet is cut through, buffered, or whether a buffered
// packet is sent. It also drives the upstream grant ug and flags header and
// parity errors.
//
// Timing in one packet cycle (strobes from the timing control circuit):
//   t1..t4  header words pass the tap; RC, FAN and the BCN bit are loaded
//   t16     CTLREG latches the PLA outputs, the enables and the header bits of
//           the granted packet; ug changes here
//   t19     buffer shift selects and path select take effect from t20, when the
//           first packet word leaves the input shift register
//   t20     output enables, copy, test and BCN bit for the header modification
//           circuit take effect from t21, when word 0 sits in its delay stage
//   t22     BCR0/BCR1 and the first-buffer bit fb are updated: a buffer that
//           shifted in this cycle now describes the packet that entered it
// Every control output holds until it is replaced in the next packet cycle,
// because the packet it steers runs on into that cycle.
// The BCR/PLA/CTLREG structure, the t16/t20/t22 strobes and the error rules
// follow the document; the exact clocks and the separate t19 stage are this
// design's own. A parity error on any word of a non-empty packet raises perr.
//
// Test access, as the document describes it: td shows, by tm, the PLA outputs
// (00), the request vector r[N01] on td[7:5] with the PLA inputs (01), the FAN
// register (10) or the RC register (11). With ten the request, copy and test
// bits come from a test register instead of the decoder; this design loads
// that register from data bits 4:0 of word 2 at t3. With tld the two BCRs
// shift as a 12-bit serial chain tsi -> BCR0 -> BCR1 -> tso. With tsten the
// shift selects, path select and enables are replaced by tsi_s, tbi and tpi
// (the buffers then shift every clock their tsi_s bit is high), while
// tso_s, tbo and tpo keep showing what the control logic drives. The td bit
// order below td[7:5] and the test-register load word are this design's own.
module icc
  import pse_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] d,       // header tap data
  input  logic       pe,      // parity error at the tap
  input  om_t        om,
  input  logic [2:0] sn,
  input  tstrobe_t   ts,
  input  logic [1:0] en,      // e[10] from the output control circuit
  output req_t       r,       // request vector to the output control circuit
  output logic       ug,      // upstream grant
  output logic       s0,      // BSR0 shift select (qualified with tshift)
  output logic       s1,      // BSR1 shift select (qualified with tshift)
  output logic       s0_force,// BSR0 shifts now (test control)
  output logic       s1_force,// BSR1 shifts now (test control)
  output bsel_t      bsel,    // path into the header modification circuit
  output logic [1:0] hen,     // output enables for the packet on the path
  output logic       copy,
  output logic       test,
  output logic       bcn,
  output logic       rcbad,
  output logic       hdr_err, // one-clock pulse: bad RC in this packet
  output logic       perr,    // one-clock pulse: parity error at the tap
  // test access
  input  logic       ten,     // request from the test register, not the decoder
  input  logic [1:0] tm,      // observation select for td
  output logic [7:0] td,      // observed register / PLA signals
  input  logic       tld,     // shift the BCRs as a serial chain
  input  logic       tsi,     // serial data into BCR0
  output logic       tso,     // serial data out of BCR1
  input  logic       tsten,   // external control of shift, path and enables
  input  logic [1:0] tsi_s,   // {BSR1, BSR0} shift under tsten
  input  logic [1:0] tbi,     // path select under tsten
  input  logic [1:0] tpi,     // output enables under tsten
  output logic [1:0] tso_s,   // observed {BSR1, BSR0} shift selects
  output logic [1:0] tbo,     // observed path select
  output logic [1:0] tpo      // observed output enables
);

  // ---------------------------------------------------------------- header
  hinfo_t dec_hi;   // decoded header of the incoming packet
  hinfo_t inc;      // the same, or the test register under ten
  logic [7:0] rc_word, fan_word;
  logic [4:0] treg; // test register: {rN, r1, r0, copy, test}

  hdr_dec u_hdr (
    .clk, .rst, .d, .pe,
    .ld_rc (ts.t1), .ld_fan(ts.t2), .ld_bcn(ts.t4),
    .om, .sn,
    .hi    (dec_hi),
    .rcbad,
    .rc_word, .fan_word
  );

  // The test register loads from the tap with word 2, which the decoder
  // does not use.
  always_ff @(posedge clk) begin
    if (rst)        treg <= '0;
    else if (ts.t3) treg <= d[4:0];
  end

  always_comb begin
    inc = dec_hi;
    if (ten) begin
      inc.r    = req_t'(treg[4:2]);
      inc.copy = treg[1];
      inc.test = treg[0];
    end
  end

  // ---------------------------------------------------- BCRs and request
  hinfo_t bcr0, bcr1;
  logic   fb;
  logic   pla_s1, pla_s0, pla_nfb, pla_nfb_ld, pla_ug;
  bsel_t  pla_bsel;
  logic [2:0] oe;
  hinfo_t sel;

  icc_pla u_pla (
    .en    (|en),
    .dp2   (inc.r.need),
    .dp1   (bcr1.r.need),
    .dp0   (bcr0.r.need),
    .fb,
    .s1    (pla_s1),
    .s0    (pla_s0),
    .bsel  (pla_bsel),
    .nfb   (pla_nfb),
    .nfb_ld(pla_nfb_ld),
    .oe,
    .ug    (pla_ug)
  );

  always_comb begin
    unique case (oe)
      3'b001:  sel = bcr0;
      3'b010:  sel = bcr1;
      default: sel = inc;
    endcase
  end
  assign r = sel.r;

  // -------------------------------------------------------------- CTLREG
  typedef struct packed {
    logic       s1;
    logic       s0;
    bsel_t      bsel;
    logic       nfb;
    logic       nfb_ld;
    logic [1:0] en;
    logic       copy;
    logic       test;
    logic       bcn;
  } ctl_t;

  localparam ctl_t CTL_IDLE = '{s1: 1'b0, s0: 1'b0, bsel: BSEL_NONE, nfb: 1'b0,
                                nfb_ld: 1'b0, en: 2'b00, copy: 1'b0, test: 1'b0,
                                bcn: 1'b0};

  ctl_t dec;

  always_ff @(posedge clk) begin
    if (rst) begin
      dec <= CTL_IDLE;
      ug  <= 1'b1;
    end else if (ts.t16) begin
      dec <= '{s1: pla_s1, s0: pla_s0, bsel: pla_bsel, nfb: pla_nfb,
               nfb_ld: pla_nfb_ld, en: en, copy: sel.copy, test: sel.test,
               bcn: sel.bcn};
      ug  <= pla_ug;
    end
  end

  // data path controls
  logic  s0_q, s1_q;
  bsel_t bsel_q;
  logic [1:0] hen_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      s0_q   <= 1'b0;
      s1_q   <= 1'b0;
      bsel_q <= BSEL_NONE;
      hen_q  <= 2'b00;
      copy <= 1'b0;
      test <= 1'b0;
      bcn  <= 1'b0;
    end else begin
      if (ts.t19) begin
        s0_q   <= dec.s0;
        s1_q   <= dec.s1;
        bsel_q <= dec.bsel;
      end
      if (ts.t20) begin
        hen_q <= dec.en;
        copy <= dec.copy;
        test <= dec.test;
        bcn  <= dec.bcn;
      end
    end
  end

  // buffer control registers
  always_ff @(posedge clk) begin
    if (rst) begin
      bcr0 <= HINFO_NONE;
      bcr1 <= HINFO_NONE;
      fb   <= 1'b0;
    end else if (tld) begin
      bcr0 <= {bcr0[4:0], tsi};
      bcr1 <= {bcr1[4:0], bcr0[5]};
    end else if (ts.t22) begin
      if (dec.s0) bcr0 <= inc;
      if (dec.s1) bcr1 <= inc;
      if (dec.nfb_ld) fb <= dec.nfb;
    end
  end

  // test control replaces the shift selects, the path and the enables
  assign s0       = tsten ? 1'b0 : s0_q;
  assign s1       = tsten ? 1'b0 : s1_q;
  assign s0_force = tsten && tsi_s[0];
  assign s1_force = tsten && tsi_s[1];
  assign bsel     = tsten ? bsel_t'(tbi) : bsel_q;
  assign hen      = tsten ? tpi : hen_q;

  // observation
  assign tso_s = {s1_q, s0_q};
  assign tbo   = bsel_q;
  assign tpo   = hen_q;
  assign tso   = bcr1[5];

  always_comb begin
    unique case (tm)
      2'b00:   td = {pla_s1, pla_s0, pla_bsel, pla_nfb, oe};
      2'b01:   td = {r.need, r.p0, r.p1, |en, inc.r.need, bcr1.r.need, bcr0.r.need, fb};
      2'b10:   td = fan_word;
      default: td = rc_word;
    endcase
  end

  // --------------------------------------------------------------- errors
  logic [6:0] pw;         // words of the current packet still to check
  logic       nonempty;   // the packet at the tap is not an empty slot

  always_ff @(posedge clk) begin
    if (rst) begin
      pw       <= '0;
      nonempty <= 1'b0;
    end else if (ts.t1) begin
      pw       <= 7'(PKT_WORDS - 1);
      nonempty <= d[7:5] != RC_EMPTY;
    end else if (pw != '0) begin
      pw <= pw - 1'b1;
    end
  end

  assign perr    = pe && ((ts.t1 && d[7:5] != RC_EMPTY) || (!ts.t1 && pw != '0 && nonempty));
  assign hdr_err = ts.t16 && rcbad;

endmodule
