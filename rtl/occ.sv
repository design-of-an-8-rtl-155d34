// Output control circuit (OCC).
//
// Arbitrates the two output ports between the request vectors ra and rb of
// the two inputs, given the ports the downstream neighbours have granted
// (dg[1:0]). The enables ea/eb are combinational; the last-used bits are
// registered and take their new values on t16, when the input control
// circuits latch the enables. Policy, from the document's enable table:
//   - a request for a specific port beats a request for either port;
//   - a request for both ports (copy) beats a request for either port; a
//     request for both ports is granted only when both ports are free;
//   - a lone request for either port with both ports free goes to the port
//     not used last (uO), and uO is toggled;
//   - two requests competing for the same port(s) are settled by uI, the
//     input favoured last: the other input wins and uI is set to the winner;
//   - with both ports free and two requests for either port, a goes to the
//     port uO names and b to the other (uO unchanged).
// uI = 0 names input a, uI = 1 input b. The enable table prints, for the ties
// over one specific port and over a single free port, the enable for the input
// favoured last; this design follows the table's own definition of uI, its
// update column and its both-ports row, which all say the other input wins.
module occ
  import pse_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  req_t       ra,
  input  req_t       rb,
  input  logic [1:0] dg,    // ports available
  input  logic       t16,   // latch the last-used bits
  output logic [1:0] ea,
  output logic [1:0] eb,
  output logic       ui,    // last-used bits (observation)
  output logic       uo
);

  typedef enum logic [2:0] {C_NONE, C_EITHER, C_P0, C_P1, C_BOTH} cls_t;

  function automatic cls_t classify(req_t r);
    if (!r.need)              return C_NONE;
    unique case ({r.p1, r.p0})
      2'b00:   return C_EITHER;
      2'b01:   return C_P0;
      2'b10:   return C_P1;
      default: return C_BOTH;
    endcase
  endfunction

  // port named by a specific request
  function automatic logic [1:0] port_of(cls_t c);
    return (c == C_P1) ? 2'b10 : 2'b01;
  endfunction

  logic nui, nuo;
  cls_t ca, cb;
  cls_t c1;          // the single active request
  logic [1:0] e1;    // its enable

  always_comb begin
    ca  = classify(ra);
    cb  = classify(rb);
    ea  = 2'b00;
    eb  = 2'b00;
    nui = ui;
    nuo = uo;
    c1  = (cb == C_NONE) ? ca : cb;
    e1  = 2'b00;

    if (dg != 2'b00) begin
      // ---- only one input asks
      if (cb == C_NONE || ca == C_NONE) begin
        unique case (c1)
          C_EITHER: begin
            if (dg == 2'b11) begin
              e1  = uo ? 2'b01 : 2'b10;
              nuo = !uo;
            end else begin
              e1 = dg;
            end
          end
          C_P0, C_P1: e1 = port_of(c1) & dg;
          C_BOTH:     e1 = (dg == 2'b11) ? 2'b11 : 2'b00;
          default:    e1 = 2'b00;
        endcase
        if (cb == C_NONE) ea = e1;
        else              eb = e1;
      end
      // ---- two specific requests
      else if ((ca == C_P0 || ca == C_P1) && (cb == C_P0 || cb == C_P1)) begin
        if (ca != cb) begin
          ea = port_of(ca) & dg;
          eb = port_of(cb) & dg;
        end else if ((port_of(ca) & dg) != 2'b00) begin
          if (ui) ea = port_of(ca);
          else    eb = port_of(cb);
          nui = !ui;
        end
      end
      // ---- a specific request against a request for either port
      else if ((ca == C_P0 || ca == C_P1) && cb == C_EITHER) begin
        ea = port_of(ca) & dg;
        eb = ~port_of(ca) & dg;
      end
      else if ((cb == C_P0 || cb == C_P1) && ca == C_EITHER) begin
        eb = port_of(cb) & dg;
        ea = ~port_of(cb) & dg;
      end
      // ---- two requests for either port
      else if (ca == C_EITHER && cb == C_EITHER) begin
        if (dg == 2'b11) begin
          ea = uo ? 2'b10 : 2'b01;
          eb = uo ? 2'b01 : 2'b10;
        end else begin
          if (ui) ea = dg;
          else    eb = dg;
          nui = !ui;
        end
      end
      // ---- both inputs ask for both ports
      else if (ca == C_BOTH && cb == C_BOTH) begin
        if (dg == 2'b11) begin
          if (ui) ea = 2'b11;
          else    eb = 2'b11;
          nui = !ui;
        end
      end
      // ---- a request for both ports against a single-port request
      else if (ca == C_BOTH) begin
        if (dg == 2'b11)                                 ea = 2'b11;
        else if (cb == C_EITHER)                         eb = dg;
        else                                             eb = port_of(cb) & dg;
      end
      else begin  // cb == C_BOTH
        if (dg == 2'b11)                                 eb = 2'b11;
        else if (ca == C_EITHER)                         ea = dg;
        else                                             ea = port_of(ca) & dg;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ui <= 1'b0;
      uo <= 1'b0;
    end else if (t16) begin
      ui <= nui;
      uo <= nuo;
    end
  end

endmodule
