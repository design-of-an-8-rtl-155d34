// Input circuit (IPC) of one side of the packet switch element.
//
// The upstream data enter the input shift register (isrp); its header tap
// feeds the input control circuit (icc), its 21-clock output feeds both packet
// buffers (bsr) and the cut-through path. The icc presents a request to the
// shared output control circuit, receives the enables, and steers the buffer
// shifts and the path into the header modification circuit (hmc), whose two
// outputs are the word for the port this side owns (through its output
// register, to dd) and the word for the other side's port (tp). A buffer
// shifts only inside the 80-clock window tshift.
// Structure as in the document's input circuit diagram.
module ipc
  import pse_pkg::*;
#(
  parameter bit          OWN   = 1'b0,       // output port this side drives
  parameter int unsigned DEPTH = PKT_WORDS   // packet buffer length
) (
  input  logic       clk,
  input  logic       rst,
  input  word_t      ud,      // upstream data
  output logic       ug,      // upstream grant
  input  om_t        om,
  input  logic [2:0] sn,
  input  logic       rrf,
  input  tstrobe_t   ts,
  output req_t       r,       // to the output control circuit
  input  logic [1:0] en,      // from the output control circuit
  input  word_t      op,      // other side's word for this side's port
  output word_t      tp,      // this side's word for the other side's port
  output word_t      dd,      // downstream data of port OWN
  output logic       perr,
  output logic       hdr_err,
  // test access (see icc and hmc)
  input  logic       ten,
  input  logic [1:0] tm,
  output logic [7:0] td,
  input  logic       tld,
  input  logic       tsi,
  output logic       tso,
  input  logic       tsten,
  input  logic [1:0] tsi_s,
  input  logic [1:0] tbi,
  input  logic [1:0] tpi,
  input  logic [1:0] tmei,
  output logic [1:0] tso_s,
  output logic [1:0] tbo,
  output logic [1:0] tpo
);

  logic [7:0] hd;
  logic       pe;
  word_t      isr_out, b0_out, b1_out;

  isrp u_isrp (.clk, .di(ud), .d(hd), .pe, .dout(isr_out));

  logic  s0, s1, s0_force, s1_force, copy, test, bcn, rcbad;
  bsel_t bsel;
  logic [1:0] hen;

  icc u_icc (
    .clk, .rst, .d(hd), .pe, .om, .sn, .ts, .en,
    .r, .ug, .s0, .s1, .s0_force, .s1_force, .bsel, .hen, .copy, .test, .bcn,
    .rcbad, .hdr_err, .perr,
    .ten, .tm, .td, .tld, .tsi, .tso, .tsten, .tsi_s, .tbi, .tpi,
    .tso_s, .tbo, .tpo
  );

  bsr #(.DEPTH(DEPTH)) u_bsr0 (.clk, .s((s0 && ts.tshift) || s0_force), .di(isr_out), .dout(b0_out));
  bsr #(.DEPTH(DEPTH)) u_bsr1 (.clk, .s((s1 && ts.tshift) || s1_force), .di(isr_out), .dout(b1_out));

  hmc #(.OWN(OWN)) u_hmc (
    .clk, .rst,
    .d0(b0_out), .d1(isr_out), .d2(b1_out),
    .bsel, .hen, .copy, .test, .bcn, .rrf, .tsten, .tmei, .ts,
    .op, .tp, .dout(dd)
  );

endmodule
