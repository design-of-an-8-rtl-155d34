// Self-checking testbench of the output control circuit (occ).
// Every combination of the two request vectors, the port availability and the
// last-used bits is applied; the enables and the new last-used bits (seen one
// clock after t16) are compared with the rows of the routing-policy table,
// written here as text in the table's own notation (X: any, -: unchanged).
// In the tie rows the enable goes to the input not favoured last, as the
// table's definition of uI and its update column say.
module tb_occ;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, t16, ui, uo;
  req_t ra, rb;
  logic [1:0] dg, ea, eb;
  int checks = 0, failures = 0, matched = 0;

  occ dut (.clk, .rst, .ra, .rb, .dg, .t16, .ea, .eb, .ui, .uo);

  // "rb ra p uIuO eb ea newu"
  string tbl [] = '{
    "XXX XXX 00 XX 00 00 --",
    "0XX 0XX XX XX 00 00 --",
    "0XX 100 01 XX 00 01 --", "0XX 100 10 XX 00 10 --",
    "0XX 100 11 X0 00 10 -1", "0XX 100 11 X1 00 01 -0",
    "0XX 101 X0 XX 00 00 --", "0XX 101 X1 XX 00 01 --",
    "0XX 110 0X XX 00 00 --", "0XX 110 1X XX 00 10 --",
    "0XX 111 0X XX 00 00 --", "0XX 111 X0 XX 00 00 --", "0XX 111 11 XX 00 11 --",
    "100 0XX 01 XX 01 00 --", "100 0XX 10 XX 10 00 --",
    "100 0XX 11 X0 10 00 -1", "100 0XX 11 X1 01 00 -0",
    "101 0XX X0 XX 00 00 --", "101 0XX X1 XX 01 00 --",
    "110 0XX 0X XX 00 00 --", "110 0XX 1X XX 10 00 --",
    "111 0XX 0X XX 00 00 --", "111 0XX X0 XX 00 00 --", "111 0XX 11 XX 11 00 --",
    "101 110 01 XX 01 00 --", "101 110 10 XX 00 10 --", "101 110 11 XX 01 10 --",
    "110 101 01 XX 00 01 --", "110 101 10 XX 10 00 --", "110 101 11 XX 10 01 --",
    "101 101 X0 XX 00 00 --", "101 101 X1 0X 01 00 1-", "101 101 X1 1X 00 01 0-",
    "110 110 0X XX 00 00 --", "110 110 1X 0X 10 00 1-", "110 110 1X 1X 00 10 0-",
    "100 101 01 XX 00 01 --", "100 101 10 XX 10 00 --", "100 101 11 XX 10 01 --",
    "100 110 01 XX 01 00 --", "100 110 10 XX 00 10 --", "100 110 11 XX 01 10 --",
    "101 100 01 XX 01 00 --", "101 100 10 XX 00 10 --", "101 100 11 XX 01 10 --",
    "110 100 01 XX 00 01 --", "110 100 10 XX 10 00 --", "110 100 11 XX 10 01 --",
    "100 100 01 0X 01 00 1-", "100 100 01 1X 00 01 0-",
    "100 100 10 0X 10 00 1-", "100 100 10 1X 00 10 0-",
    "100 100 11 X0 10 01 -0", "100 100 11 X1 01 10 -1",
    "100 111 01 XX 01 00 --", "100 111 10 XX 10 00 --", "100 111 11 XX 00 11 --",
    "111 100 01 XX 00 01 --", "111 100 10 XX 00 10 --", "111 100 11 XX 11 00 --",
    "101 111 01 XX 01 00 --", "101 111 10 XX 00 00 --", "101 111 11 XX 00 11 --",
    "110 111 01 XX 00 00 --", "110 111 10 XX 10 00 --", "110 111 11 XX 00 11 --",
    "111 101 01 XX 00 01 --", "111 101 10 XX 00 00 --", "111 101 11 XX 11 00 --",
    "111 110 01 XX 00 00 --", "111 110 10 XX 00 10 --", "111 110 11 XX 11 00 --",
    "111 111 01 XX 00 00 --", "111 111 10 XX 00 00 --",
    "111 111 11 0X 11 00 1-", "111 111 11 1X 00 11 0-"
  };

  function automatic bit fits(string pat, logic [7:0] v, int w);
    byte c;
    for (int i = 0; i < w; i++) begin
      c = pat[i];
      if (c == "X") continue;
      if ((c == "1") != v[w-1-i]) return 0;
    end
    return 1;
  endfunction

  function automatic logic [1:0] bits2(string pat);
    return {pat[0] == "1", pat[1] == "1"};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; t16 = 1'b0; ra = '0; rb = '0; dg = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int v = 0; v < 1024; v++) begin
      logic [2:0] vrb, vra;
      logic [1:0] vp, vu;
      int hit;
      {vrb, vra, vp, vu} = 10'(v);
      // set the last-used bits through the circuit: reset, then drive a
      // lone request for either port (toggles uO) and a tie (toggles uI)
      rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
      if (vu[0]) begin
        ra = REQ_EITHER; rb = REQ_NONE; dg = 2'b11; t16 = 1'b1;
        @(posedge clk); #1 t16 = 1'b0;
      end
      if (vu[1]) begin
        ra = REQ_PORT0; rb = REQ_PORT0; dg = 2'b01; t16 = 1'b1;
        @(posedge clk); #1 t16 = 1'b0;
      end
      checks++;
      if ({ui, uo} !== vu) begin
        failures++;
        $display("could not set u=%b (got %b%b)", vu, ui, uo);
      end
      rb = vrb; ra = vra; dg = vp;
      #1;
      hit = -1;
      foreach (tbl[i]) begin
        string t;
        t = tbl[i];
        if (fits(t.substr(0, 2), 8'(vrb), 3) && fits(t.substr(4, 6), 8'(vra), 3) &&
            fits(t.substr(8, 9), 8'(vp), 2) && fits(t.substr(11, 12), 8'(vu), 2)) begin
          hit = i;
          break;
        end
      end
      // requests with N=1 and a cleared port field never miss the table
      if (hit < 0) begin
        checks++; failures++;
        $display("no table row for rb=%b ra=%b p=%b u=%b", vrb, vra, vp, vu);
        continue;
      end
      matched++;
      begin
        string t;
        logic [1:0] eeb, eea, nu;
        t = tbl[hit];
        eeb = bits2(t.substr(14, 15));
        eea = bits2(t.substr(17, 18));
        nu[1] = (t[20] == "-") ? vu[1] : (t[20] == "1");
        nu[0] = (t[21] == "-") ? vu[0] : (t[21] == "1");
        checks++;
        if (eb !== eeb || ea !== eea) begin
          failures++;
          $display("rb=%b ra=%b p=%b u=%b: eb=%b ea=%b expected %b %b (%s)",
                   vrb, vra, vp, vu, eb, ea, eeb, eea, t);
        end
        t16 = 1'b1; @(posedge clk); #1 t16 = 1'b0;
        checks++;
        if ({ui, uo} !== nu) begin
          failures++;
          $display("rb=%b ra=%b p=%b u=%b: new u=%b%b expected %b", vrb, vra, vp, vu, ui, uo, nu);
        end
      end
    end
    checks++;
    if (matched != 1024) begin failures++; $display("only %0d combinations matched", matched); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
