// Packet switch element (PSE): a buffered 2x2 switch with broadcast.
//
// Two input circuits (ipc, side A and side B) share the timing control circuit
// (tcc), the output control circuit (occ) and the error flag (pse_err). Side A
// owns output port 0 (dd0), side B output port 1 (dd1); each side can reach the
// other port through the crosspoint inside its header modification circuit.
//
// Interface. Packets of 80 nine-bit words (data 8:1, odd parity 0) arrive on
// udA/udB with word 0 in the clock in which pt is high; packet-times must be at
// least 80 clocks apart. A packet that is cut through leaves on dd0/dd1 24
// clocks later; a buffered packet leaves in a later packet cycle with the same
// 24-clock offset from that cycle's pt. ugA/ugB grant the upstream neighbours
// one packet in the next packet cycle and change 17 clocks after pt; dg0/dg1
// are the downstream neighbours' grants and must be stable 17 clocks after pt.
// om selects routing (01), distribution (10) or copy (11) network, sn is the
// stage number (0 is the last stage), rrf rotates the routing field of test
// packets. err reports parity and header errors until srst or hrst.
//
// One rising-edge clock replaces the chip's two-phase non-overlapping clock
// and its third phase; hrst is synchronous.
//
// Test access, as in the document: tm selects what tdA/tdB show (PLA outputs;
// request vector and PLA inputs; FAN register; RC register). ten replaces the
// decoded request, copy and test bits by a test register, which this design
// loads from data bits 4:0 of packet word 2. tld shifts the four buffer
// control registers as one serial chain from tsi to tso. With tsten high,
// tsi0/tsi1 shift the buffers, tbi selects the path, tpiA/tpiB enable the
// outputs and tmei selects the output multiplexors, replacing the control
// logic; tsoA/B, tboA/B and tpoA/B show what the control logic drives.
// The test-register load word and the td bit order are this design's own.
module pse
  import pse_pkg::*;
#(
  parameter int unsigned DEPTH = PKT_WORDS   // packet buffer length
) (
  input  logic       clk,
  input  logic       hrst,
  input  logic       srst,
  input  logic       pt,
  input  logic [1:0] om,
  input  logic [2:0] sn,
  input  logic       rrf,
  input  word_t      udA,
  input  word_t      udB,
  output logic       ugA,
  output logic       ugB,
  output word_t      dd0,
  output word_t      dd1,
  input  logic       dg0,
  input  logic       dg1,
  output logic       err,
  // test access
  input  logic       ten,     // take requests from the test registers
  input  logic [1:0] tm,      // td observation select (both sides)
  output logic [7:0] tdA,
  output logic [7:0] tdB,
  input  logic       tld,     // shift the BCR chain
  input  logic       tsi,     // chain: B.BCR0, B.BCR1, A.BCR0, A.BCR1
  output logic       tso,
  input  logic       tsten,   // external control of buffers, paths, enables
  input  logic       tsi0,    // BSR0 shift, both sides
  input  logic       tsi1,    // BSR1 shift, both sides
  input  logic [1:0] tbi,     // path select, both sides
  input  logic [1:0] tpiA,    // output enables of side A
  input  logic [1:0] tpiB,    // output enables of side B
  input  logic [1:0] tmei,    // output multiplexor select, both sides
  output logic [1:0] tsoA,    // observed {BSR1, BSR0} shift selects
  output logic [1:0] tsoB,
  output logic [1:0] tboA,    // observed path selects
  output logic [1:0] tboB,
  output logic [1:0] tpoA,    // observed output enables
  output logic [1:0] tpoB
);

  tstrobe_t ts;
  req_t     ra, rb;
  logic [1:0] ea, eb;
  word_t    tpA, tpB;
  logic     perrA, perrB, herrA, herrB;
  logic     ui, uo;
  om_t      omode;
  logic     tso_b;     // serial BCR chain from side B to side A

  assign omode = om_t'(om);

  tcc u_tcc (.clk, .rst(hrst), .pt, .ts);

  ipc #(.OWN(1'b0), .DEPTH(DEPTH)) u_ipcA (
    .clk, .rst(hrst), .ud(udA), .ug(ugA), .om(omode), .sn, .rrf, .ts,
    .r(ra), .en(ea), .op(tpB), .tp(tpA), .dd(dd0),
    .perr(perrA), .hdr_err(herrA),
    .ten, .tm, .td(tdA), .tld, .tsi(tso_b), .tso, .tsten, .tsi_s({tsi1, tsi0}),
    .tbi, .tpi(tpiA), .tmei, .tso_s(tsoA), .tbo(tboA), .tpo(tpoA)
  );

  ipc #(.OWN(1'b1), .DEPTH(DEPTH)) u_ipcB (
    .clk, .rst(hrst), .ud(udB), .ug(ugB), .om(omode), .sn, .rrf, .ts,
    .r(rb), .en(eb), .op(tpA), .tp(tpB), .dd(dd1),
    .perr(perrB), .hdr_err(herrB),
    .ten, .tm, .td(tdB), .tld, .tsi, .tso(tso_b), .tsten, .tsi_s({tsi1, tsi0}),
    .tbi, .tpi(tpiB), .tmei, .tso_s(tsoB), .tbo(tboB), .tpo(tpoB)
  );

  occ u_occ (
    .clk, .rst(hrst), .ra, .rb, .dg({dg1, dg0}), .t16(ts.t16),
    .ea, .eb, .ui, .uo
  );

  pse_err u_err (
    .clk, .hrst, .srst,
    .perr_a(perrA), .perr_b(perrB), .hdr_err_a(herrA), .hdr_err_b(herrB),
    .err
  );

endmodule
