// Error flag (ERROR) of the packet switch element.
//
// err goes high on a parity error in any word of a non-empty packet or on an
// invalid routing control field, at either input, and stays high until a soft
// reset (srst) or a hard reset (hrst) clears it. The sources and the two
// resets are the document's; holding the flag until it is cleared is this
// design's reading of "report errors".
module pse_err (
  input  logic clk,
  input  logic hrst,
  input  logic srst,
  input  logic perr_a,
  input  logic perr_b,
  input  logic hdr_err_a,
  input  logic hdr_err_b,
  output logic err
);

  always_ff @(posedge clk) begin
    if (hrst || srst) err <= 1'b0;
    else if (perr_a || perr_b || hdr_err_a || hdr_err_b) err <= 1'b1;
  end

endmodule
