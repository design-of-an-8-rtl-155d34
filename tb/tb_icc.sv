// Self-checking testbench of the input control circuit (icc).
// Runs 300 packet cycles with random packets (empty, point-to-point to port 0
// or 1, test, invalid RC) in the routing network at stage 0 and a random
// grant from the output control side. A slot-level model of the two packet
// buffers (oldest packet first, a refused packet goes to a free buffer, BSR0
// first, a sent buffer takes in the incoming packet) predicts the request
// presented, the upstream grant, the buffer shift selects, the path select and
// the output enables, each checked the clock after the strobe that loads it.
// Parity errors injected on random words must raise perr exactly for
// non-empty packets, and an invalid RC must raise hdr_err at t16. The td
// observation output is checked with a random tm in every packet; then the
// serial BCR chain, the tsten overrides and the ten test register are checked.
module tb_icc;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, pe;
  logic [7:0] d;
  tstrobe_t ts;
  logic [1:0] en;
  req_t r;
  logic ug, s0, s1, copy, test, bcn, rcbad, hdr_err, perr;
  bsel_t bsel;
  logic [1:0] hen;
  logic ten, tld, tsi, tso, tsten, s0_force, s1_force;
  logic [1:0] tm, tsi_s, tbi, tpi, tso_s, tbo, tpo;
  logic [7:0] td;
  int checks = 0, failures = 0;
  int n_cut = 0, n_buf = 0, n_full = 0, n_send0 = 0, n_send1 = 0, n_perr = 0, n_bad = 0;

  icc dut (.clk, .rst, .d, .pe, .om(OM_RN), .sn(3'd0), .ts, .en, .r, .ug, .s0, .s1,
           .bsel, .hen, .copy, .test, .bcn, .rcbad, .hdr_err, .perr, .s0_force, .s1_force,
           .ten, .tm, .td, .tld, .tsi, .tso, .tsten, .tsi_s, .tbi, .tpi, .tso_s, .tbo, .tpo);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit valid; logic [2:0] r; bit test; bit bcn; } pk_t;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    pk_t slot [2];
    int  first;                 // index of the older buffered packet
    pk_t inc, pres;
    int  pres_src;              // 0/1 buffer, 2 incoming
    logic [7:0] w [80];
    logic [2:0] rc;
    bit  bad;
    logic [1:0] e;
    logic exp_s0, exp_s1, exp_ug;
    bsel_t exp_bsel;
    logic [1:0] exp_hen;
    logic exp_test, exp_bcn;
    logic [2:0] prev_rc;

    slot[0].valid = 0; slot[1].valid = 0; first = 0;
    rst = 1'b1; ts = '0; d = '0; pe = 1'b0; en = '0;
    ten = 0; tld = 0; tsi = 0; tsten = 0; tm = 0; tsi_s = 0; tbi = 0; tpi = 0;
    prev_rc = '0;
    exp_ug = 1'b1;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      // new packet
      case ($urandom_range(0, 6))
        0: rc = 3'b000;
        1, 2, 3: rc = 3'b001;
        4: rc = 3'b100;
        5: rc = 3'b000;
        default: rc = 3'b011;
      endcase
      if (!exp_ug) rc = 3'b000;      // no grant: upstream sends an empty slot
      bad = (rc == 3'b011);
      for (int k = 0; k < 80; k++) w[k] = 8'($urandom);
      w[0][7:5] = rc;
      inc.valid = (rc != 3'b000);
      inc.r     = !inc.valid ? 3'b000 : (w[1][0] ? 3'b110 : 3'b101);
      inc.test  = (rc == 3'b100);
      inc.bcn   = w[3][0];
      if (bad) n_bad++;
      // oldest first
      if (slot[0].valid && slot[1].valid) pres_src = first;
      else if (slot[0].valid) pres_src = 0;
      else if (slot[1].valid) pres_src = 1;
      else pres_src = 2;
      pres = (pres_src == 2) ? inc : slot[pres_src];
      tm = 2'($urandom);
      e = ($urandom_range(0, 2) != 0 && pres.valid) ? (pres.r[1] ? 2'b10 : 2'b01) : 2'b00;
      // one packet cycle of 80 clocks; the tap shows word k at t(k+1)
      for (int c = 0; c < 80; c++) begin
        logic ep;
        @(posedge clk);
        #1;
        ts = '0;
        ts.t1 = c == 2; ts.t2 = c == 3; ts.t3 = c == 4; ts.t4 = c == 5;
        ts.t16 = c == 17; ts.t19 = c == 20; ts.t20 = c == 21; ts.t22 = c == 23;
        ts.trot = c == 23 || c == 24;
        // tap word: word (c-2) of this packet, or word 78/79 of the previous one
        ep = ($urandom_range(0, 60) == 0);
        if (c >= 2) d = w[c-2];
        pe = ep;
        if (c == 2 && ep && rc != 3'b000) begin
          // parity error in the RC word: bad header, handled as point-to-point
          bad = 1; inc.test = 0; n_bad++;
          if (pres_src == 2) pres = inc;
        end
        en = (c >= 6) ? e : 2'b00;
        #1;
        if (c >= 2) chk(perr === (ep && rc != 3'b000), $sformatf("perr word %0d", c - 2));
        else        chk(perr === (ep && prev_rc != 3'b000), "perr tail");
        if (perr) n_perr++;
        if (c == 17) begin
          chk(r === pres.r, $sformatf("pkt %0d request %b expected %b", n, r, pres.r));
          chk(hdr_err === bad, "hdr_err");
          chk(rcbad === bad, "rcbad");
          // observation multiplexor
          if (tm == 2'b11) chk(td[7:5] === rc, "td RC register");
          if (tm == 2'b10) chk(td === w[1], "td FAN register");
          if (tm == 2'b01) chk(td[7:5] === {r.need, r.p0, r.p1} && td[4] === |en, "td request");
          if (tm == 2'b00) chk(td[2:0] === 3'b001 || td[2:0] === 3'b010 || td[2:0] === 3'b100,
                               "td PLA oe");
        end
        if (c == 18) chk(ug === exp_ug, $sformatf("pkt %0d ug=%b expected %b", n, ug, exp_ug));
        if (c == 21) chk(s0 === exp_s0 && s1 === exp_s1 && bsel === exp_bsel,
                         $sformatf("pkt %0d s1s0=%b%b bsel=%0d expected %b%b %0d",
                                   n, s1, s0, bsel, exp_s1, exp_s0, exp_bsel));
        if (c == 22) chk(hen === exp_hen && (exp_hen == 0 || (bcn === exp_bcn && test === exp_test))
                         && copy === 1'b0,
                         $sformatf("pkt %0d hen=%b expected %b", n, hen, exp_hen));
        if (c == 16) begin
          // model the decision
          exp_s0 = 0; exp_s1 = 0; exp_bsel = BSEL_NONE;
          exp_hen = e; exp_test = pres.test && (e != 0); exp_bcn = pres.bcn;
          if (e != 0) begin
            if (pres_src == 2) begin exp_bsel = BSEL_CUT; n_cut++; end
            else begin
              exp_bsel = (pres_src == 0) ? BSEL_BSR0 : BSEL_BSR1;
              if (pres_src == 0) begin exp_s0 = 1; n_send0++; end
              else begin exp_s1 = 1; n_send1++; end
              // the sent buffer takes the incoming packet
              slot[pres_src] = inc;
              first = slot[1 - pres_src].valid ? 1 - pres_src : pres_src;
            end
          end else begin
            if (inc.valid) begin
              n_buf++;
              if (!slot[0].valid) begin
                exp_s0 = 1; slot[0] = inc;
                first = slot[1].valid ? 1 : 0;
              end else begin
                exp_s1 = 1; slot[1] = inc; first = 0;
              end
            end
          end
          exp_ug = !(slot[0].valid && slot[1].valid);
          if (!exp_ug) n_full++;
          if (exp_hen == 0) exp_test = 0;
        end
      end
      prev_rc = rc;
    end
    chk(n_cut > 0 && n_buf > 0 && n_full > 0 && n_send0 > 0 && n_send1 > 0 && n_perr > 0 && n_bad > 0,
        $sformatf("coverage cut=%0d buf=%0d full=%0d send0=%0d send1=%0d perr=%0d bad=%0d",
                  n_cut, n_buf, n_full, n_send0, n_send1, n_perr, n_bad));
    $display("cut=%0d buffered=%0d full=%0d send0=%0d send1=%0d", n_cut, n_buf, n_full, n_send0, n_send1);

    // ---- test access
    // serial BCR chain: 12 bits in, each one reappears at tso 12 clocks later
    begin
      bit sb [24];
      en = 0; ts = '0;
      for (int k = 0; k < 24; k++) sb[k] = 1'($urandom);
      tld = 1;
      for (int k = 0; k < 24; k++) begin
        tsi = sb[k];
        #1;
        if (k >= 12) chk(tso === sb[k-12], $sformatf("BCR chain bit %0d", k));
        @(posedge clk); #1;
      end
      tld = 0;
    end
    // external control replaces shift, path and enables; observation is unchanged
    for (int k = 0; k < 16; k++) begin
      logic [1:0] o_s, o_b, o_p;
      o_s = {s1, s0}; o_b = bsel; o_p = hen;
      tsten = 1; tsi_s = 2'($urandom); tbi = 2'($urandom); tpi = 2'($urandom);
      #1;
      chk(s0 === 1'b0 && s1 === 1'b0 && {s1_force, s0_force} === tsi_s, "tsten shift");
      chk(bsel === bsel_t'(tbi) && hen === tpi, "tsten path/enable");
      chk(tso_s === o_s && tbo === o_b && tpo === o_p, "tsten observation");
      tsten = 0;
      #1;
      chk({s1_force, s0_force} === 2'b00 && bsel === bsel_t'(o_b) && hen === o_p, "tsten off");
    end
    // test register: an empty packet carries a request in word 2
    for (int k = 0; k < 8; k++) begin
      logic [4:0] tv;
      tv = 5'($urandom);
      rst = 1; @(posedge clk); #1 rst = 0;
      ten = k[0];
      for (int c = 0; c < 20; c++) begin
        @(posedge clk); #1;
        ts = '0;
        ts.t1 = c == 2; ts.t2 = c == 3; ts.t3 = c == 4; ts.t4 = c == 5; ts.t16 = c == 17;
        d = (c == 4) ? {3'b000, tv} : 8'h00;
        #1;
        if (c == 17) begin
          if (ten) chk(r === req_t'(tv[4:2]), $sformatf("ten request %b expected %b", r, tv[4:2]));
          else     chk(r === REQ_NONE, "decoder request of empty packet");
        end
      end
      ten = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
