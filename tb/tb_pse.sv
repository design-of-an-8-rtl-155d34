// End-to-end testbench of the packet switch element (pse) at its default
// sizes (80-word packets, 80-word buffers, 21-stage input registers).
//
// Two sources send random traffic on udA/udB and obey the upstream grants;
// two sinks give random downstream grants. The test runs the routing,
// copy and distribution network modes at several stage numbers, test packets
// with and without rotation, and a phase with parity errors and invalid
// routing control codes. Every packet carries a unique number in words 5-6.
// A scoreboard, written from the packet format and routing rules, knows for
// each packet which port(s) may carry it and what each copy must look like
// (fanout halves, rotated routing field). It checks every packet leaving on
// dd0/dd1: content, allowed port, a downstream grant for that port, start
// exactly 24 clocks after a packet-time, and arrival order per input. After
// each phase the switch is drained and no packet may be missing. The run also
// counts how often each mechanism of the switch happened (cut-through,
// buffering in BSR0/BSR1, both buffers full, sending from a buffer, copy,
// rotation, refusal for lack of a downstream grant, input tie-break, output
// toggle, parity and header errors, soft reset) and fails if one never did.
// A last phase drives the test-access pins: the serial BCR chain, the td/tso/
// tbo/tpo observation outputs, external control of paths, enables, output
// multiplexors and buffer shifts (tsten), and a request taken from the test
// register (ten); each of these is counted as a mechanism as well.
module tb_pse;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic hrst, srst, pt, rrf, dg0, dg1, ugA, ugB, err;
  logic [1:0] om;
  logic [2:0] sn;
  word_t udA, udB, dd0, dd1;

  logic ten, tld, tsi, tso, tsten, tsi0, tsi1;
  logic [1:0] tm, tbi, tpiA, tpiB, tmei, tsoA, tsoB, tboA, tboB, tpoA, tpoB;
  logic [7:0] tdA, tdB;
  bit   mon_on = 1'b1;   // packet monitor active (off during the test-access phase)

  pse dut (.clk, .hrst, .srst, .pt, .om, .sn, .rrf, .udA, .udB, .ugA, .ugB,
           .dd0, .dd1, .dg0, .dg1, .err,
           .ten, .tm, .tdA, .tdB, .tld, .tsi, .tso, .tsten, .tsi0, .tsi1, .tbi,
           .tpiA, .tpiB, .tmei, .tsoA, .tsoB, .tboA, .tboB, .tpoA, .tpoB);

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    int         id;
    int         src;         // 0: input A, 1: input B
    logic [1:0] ports;       // allowed / required ports
    bit         both;        // must leave on both ports at once
    word_t      w [2][80];   // expected words on port 0 / port 1
  } exp_t;

  exp_t pending [int];       // by id
  int   last_out [2] = '{-1, -1};
  int   next_id = 1;

  // counters of mechanisms
  int n_cut, n_store, n_full, n_send0, n_send1, n_copy, n_rot, n_block,
      n_tie, n_tog, n_perr, n_rcbad, n_srst, n_delivered,
      n_tchain, n_tobs, n_tpath, n_tbuf, n_ten;

  function automatic word_t mk(logic [7:0] v);
    return mkword(v);
  endfunction

  // build a packet and its expectations
  function automatic void make_packet(input int src, input int kind, input bit perr_inj,
                                      input logic [1:0] m, input int s, input bit rot,
                                      output word_t pk [80]);
    exp_t e;
    logic [2:0] rc;
    logic [7:0] fan, w1;
    int   k;
    bit   bad, copy;
    int   eff;
    e.id  = next_id++;
    e.src = src;
    case (kind)
      0: rc = 3'b001;            // point-to-point
      1: rc = 3'b010;            // broadcast
      2: rc = 3'b100;            // test
      default: rc = 3'b110;      // invalid
    endcase
    bad = (kind == 3);
    if (kind == 1) w1 = 8'($urandom_range(1, 2 << s));
    else           w1 = 8'($urandom);
    pk[0] = mk({rc, 5'($urandom)});
    pk[1] = mk(w1);
    pk[2] = mk(8'($urandom));
    pk[3] = mk(8'($urandom));
    pk[4] = mk(8'(src));
    pk[5] = mk(8'(e.id >> 8));
    pk[6] = mk(8'(e.id));
    for (k = 7; k < 80; k++) pk[k] = mk(8'($urandom));
    if (perr_inj) begin
      k = $urandom_range(7, 79);
      pk[k][0] = ~pk[k][0];
    end
    // routing
    eff  = bad ? 0 : kind;
    copy = 0;
    e.both = 0;
    if (eff == 2 || m == 2'b01 || m == 2'b00) e.ports = w1[s] ? 2'b10 : 2'b01;
    else if (m == 2'b11 && eff == 1 && int'(w1) > (1 << s)) begin
      e.ports = 2'b11; e.both = 1; copy = 1;
    end else e.ports = 2'b11;
    for (int p = 0; p < 2; p++) begin
      for (k = 0; k < 80; k++) e.w[p][k] = pk[k];
      if (copy) begin
        if ((p == 0) == pk[3][1]) e.w[p][1] = mk(w1 >> 1);
        else                      e.w[p][1] = mk(8'((9'(w1) + 9'd1) >> 1));
      end
      if (eff == 2 && rot) begin
        e.w[p][1] = pk[2]; e.w[p][2] = pk[3]; e.w[p][3] = pk[1];
      end
    end
    pending[e.id] = e;
  endfunction

  // ------------------------------------------------------------- monitor
  int   pt_times [$];
  logic [1:0] dg_at [int];   // downstream grants in force for the cycle of pt
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  word_t cap [2][80];
  int    cap_k [2] = '{-1, -1};
  int    cap_pt [2];

  task automatic finish_capture(int p);
    int id;
    id = int'({wdata(cap[p][5]), wdata(cap[p][6])});
    if (!pending.exists(id)) begin
      chk(0, $sformatf("port %0d: unknown or duplicate packet %0d", p, id));
      return;
    end
    begin
      exp_t e;
      bit   ok;
      e = pending[id];
      chk(e.ports[p], $sformatf("packet %0d on port %0d, allowed %b", id, p, e.ports));
      ok = 1;
      for (int k = 0; k < 80; k++) if (cap[p][k] !== e.w[p][k]) ok = 0;
      chk(ok, $sformatf("packet %0d content on port %0d", id, p));
      chk(dg_at.exists(cap_pt[p]) && dg_at[cap_pt[p]][p],
          $sformatf("packet %0d sent on port %0d without downstream grant", id, p));
      if (e.both) begin
        // the copy on the other port must be in flight in the same cycle
        chk(cap_k[1-p] >= 0 || cap_pt[1-p] == cap_pt[p],
            $sformatf("packet %0d: copies not simultaneous", id));
        e.ports[p] = 1'b0;
        if (e.ports == 0) begin pending.delete(id); n_delivered++; end
        else pending[id] = e;
      end else begin
        pending.delete(id);
        n_delivered++;
      end
      if (!e.both || e.ports == 0) begin
        chk(id > last_out[e.src], $sformatf("packet %0d out of order (after %0d)", id, last_out[e.src]));
        last_out[e.src] = id;
      end
    end
  endtask

  always @(posedge clk) begin
    #2;
    for (int p = 0; p < 2 && mon_on; p++) begin
      word_t w;
      w = (p == 1) ? dd1 : dd0;
      if (cap_k[p] >= 0) begin
        cap[p][cap_k[p]] = w;
        cap_k[p]++;
        if (cap_k[p] == 80) begin
          cap_k[p] = -1;
          finish_capture(p);
        end
      end else begin
        // a packet may only start 24 clocks after a packet-time
        bit at_start;
        at_start = 0;
        foreach (pt_times[i]) if (cyc == pt_times[i] + 24) begin
          at_start = 1;
          cap_pt[p] = pt_times[i];
        end
        if (w[8:6] != 3'b000) begin
          chk(at_start, $sformatf("port %0d: packet start not 24 clocks after pt", p));
          cap[p][0] = w;
          cap_k[p] = 1;
        end else if (at_start) begin
          // empty slot: all data bits zero
          chk(w == '0, $sformatf("port %0d: idle word %h", p, w));
        end
      end
    end
  end

  // mechanism counters from inside the switch
  always @(posedge clk) begin
    if (!hrst) begin
      if (dut.ts.t22) begin
        if (dut.u_ipcA.hen != 0 && dut.u_ipcA.bsel == BSEL_CUT)  n_cut++;
        if (dut.u_ipcB.hen != 0 && dut.u_ipcB.bsel == BSEL_CUT)  n_cut++;
        if (dut.u_ipcA.hen != 0 && dut.u_ipcA.bsel == BSEL_BSR0) n_send0++;
        if (dut.u_ipcB.hen != 0 && dut.u_ipcB.bsel == BSEL_BSR0) n_send0++;
        if (dut.u_ipcA.hen != 0 && dut.u_ipcA.bsel == BSEL_BSR1) n_send1++;
        if (dut.u_ipcB.hen != 0 && dut.u_ipcB.bsel == BSEL_BSR1) n_send1++;
        if (dut.u_ipcA.copy && dut.u_ipcA.hen == 2'b11) n_copy++;
        if (dut.u_ipcB.copy && dut.u_ipcB.hen == 2'b11) n_copy++;
        if (dut.u_ipcA.test && rrf && dut.u_ipcA.hen != 0) n_rot++;
        if (dut.u_ipcB.test && rrf && dut.u_ipcB.hen != 0) n_rot++;
      end
      if (dut.perrA || dut.perrB) n_perr++;
      if (dut.herrA || dut.herrB) n_rcbad++;
      if (dut.ts.t16) begin
        if (dut.ea == 0 && dut.u_ipcA.u_icc.inc.r.need && dut.u_ipcA.u_icc.sel == dut.u_ipcA.u_icc.inc) n_store++;
        if (dut.eb == 0 && dut.u_ipcB.u_icc.inc.r.need && dut.u_ipcB.u_icc.sel == dut.u_ipcB.u_icc.inc) n_store++;
        if ((dut.ra.need && dut.ea == 0 || dut.rb.need && dut.eb == 0) && {dg1, dg0} != 2'b11) n_block++;
        if (dut.u_occ.nui != dut.u_occ.ui) n_tie++;
        if (dut.u_occ.nuo != dut.u_occ.uo) n_tog++;
      end
    end
  end

  // ------------------------------------------------------------- driver
  word_t pkA [80], pkB [80];

  task automatic packet_cycle(input int L, input int load, input int mix, input bit errs,
                              input bit drain);
    logic gA, gB;
    gA = ugA; gB = ugB;
    if (!gA || !gB) n_full++;
    // sinks
    if (drain) {dg1, dg0} = 2'b11;
    else {dg1, dg0} = ($urandom_range(0, 3) == 0) ? 2'($urandom) : 2'b11;
    for (int s = 0; s < 2; s++) begin
      word_t pk [80];
      bit    send;
      send = !drain && (s == 0 ? gA : gB) && ($urandom_range(0, 99) < load);
      if (send) begin
        int kind, r;
        bit pe_inj;
        r = $urandom_range(0, 99);
        case (mix)
          0: kind = (r < 80) ? 0 : 2;                 // routing: point, test
          1: kind = (r < 60) ? 1 : (r < 85 ? 0 : 2);  // copy: broadcast heavy
          2: kind = (r < 50) ? 0 : (r < 85 ? 1 : 2);  // distribution
          default: kind = (r < 50) ? 0 : 3;           // errors: invalid RC
        endcase
        pe_inj = errs && ($urandom_range(0, 3) == 0);
        make_packet(s, kind, pe_inj, om, int'(sn), rrf, pk);
      end else begin
        for (int k = 0; k < 80; k++) pk[k] = mk(8'h00);
      end
      if (s == 0) pkA = pk; else pkB = pk;
    end
    dg_at[cyc] = {dg1, dg0};
    pt_times.push_back(cyc);
    for (int k = 0; k < L; k++) begin
      pt  = (k == 0);
      udA = (k < 80) ? pkA[k] : word_t'(0);
      udB = (k < 80) ? pkB[k] : word_t'(0);
      @(posedge clk);
      #1;
    end
    pt = 1'b0;
  endtask

  // Test access at the pins: serial BCR chain, observation outputs, external
  // control of path, enables, output multiplexors and buffer shifts, and a
  // request taken from the test register.
  task automatic test_access();
    word_t hA [$], hB [$];
    bit    sb [48];
    mon_on = 0;
    // serial chain through both sides: 24 bits long
    tld = 1;
    for (int k = 0; k < 48; k++) sb[k] = 1'($urandom);
    for (int k = 0; k < 48; k++) begin
      tsi = sb[k];
      #1;
      if (k >= 24) begin chk(tso === sb[k-24], $sformatf("BCR chain bit %0d", k)); n_tchain++; end
      @(posedge clk); #1;
    end
    tld = 0;
    // observation: request vector and PLA output
    for (int k = 0; k < 20; k++) begin
      tm = 2'($urandom_range(0, 1));
      #1;
      if (tm == 2'b01) chk(tdA[7:5] === {dut.ra.need, dut.ra.p0, dut.ra.p1} &&
                           tdB[7:5] === {dut.rb.need, dut.rb.p0, dut.rb.p1}, "td request vector");
      else             chk($countones(tdA[2:0]) == 1 && $countones(tdB[2:0]) == 1, "td PLA oe");
      chk(tsoA === {dut.u_ipcA.u_icc.s1_q, dut.u_ipcA.u_icc.s0_q} && tboA === dut.u_ipcA.u_icc.bsel_q
          && tpoB === dut.u_ipcB.u_icc.hen_q, "tso/tbo/tpo observation");
      n_tobs++;
      @(posedge clk); #1;
    end
    // external control: cut-through paths, delayed words, straight then crossed
    tsten = 1; tbi = 2'b10; tmei = 2'b10;
    for (int k = 0; k < 300; k++) begin
      if (k < 150) begin tpiA = 2'b01; tpiB = 2'b10; end
      else         begin tpiA = 2'b10; tpiB = 2'b01; end
      udA = mkword(8'($urandom)); udB = mkword(8'($urandom));
      hA.push_front(udA); hB.push_front(udB);
      @(posedge clk); #1;
      if (k >= 30 && k < 148) begin
        chk(dd0 === hA[23] && dd1 === hB[23], "tsten straight path"); n_tpath++;
      end
      if (k >= 180) begin
        chk(dd0 === hB[23] && dd1 === hA[23], "tsten crossed path"); n_tpath++;
      end
    end
    // external buffer shift: BSR0 shifts every clock and feeds the outputs
    tbi = 2'b00; tpiA = 2'b01; tpiB = 2'b10; tsi0 = 1;
    hA.delete(); hB.delete();
    for (int k = 0; k < 300; k++) begin
      udA = mkword(8'($urandom)); udB = mkword(8'($urandom));
      hA.push_front(udA); hB.push_front(udB);
      @(posedge clk); #1;
      if (k >= 110) begin
        chk(dd0 === hA[103] && dd1 === hB[103], "tsi0 buffer path"); n_tbuf++;
      end
    end
    tsten = 0; tsi0 = 0; tbi = 0; tpiA = 0; tpiB = 0; tmei = 0; udA = '0; udB = '0;
    // request from the test register: an empty packet whose word 2 asks for port 0
    hrst = 1; @(posedge clk); #1 hrst = 0;
    ten = 1; om = 2'b01; sn = 3'd0; dg0 = 1; dg1 = 1;
    hA.delete();
    for (int k = 0; k < 110; k++) begin
      pt = (k == 0);
      udA = (k < 80) ? mkword((k == 2) ? 8'b000_10100 : (k == 0 ? 8'h00 : 8'($urandom))) : '0;
      if (k < 80) hA.push_back(udA);
      udB = '0;
      @(posedge clk); #1;
      if (k >= 23 && k < 103) begin
        chk(dd0 === hA[k-23] && dd1 === '0, $sformatf("test register packet word %0d", k - 23));
        n_ten++;
      end
    end
    pt = 0; ten = 0; udA = '0;
    hrst = 1; @(posedge clk); #1 hrst = 0;
    repeat (100) @(posedge clk);
    #1 mon_on = 1;
  endtask

  task automatic phase(input logic [1:0] m, input int s, input bit r, input int n,
                       input int load, input int mix, input bit errs);
    om = m; sn = 3'(s); rrf = r;
    for (int i = 0; i < n; i++)
      packet_cycle(($urandom_range(0, 3) == 0) ? 80 + $urandom_range(1, 6) : 80, load, mix, errs, 0);
    for (int i = 0; i < 6; i++) packet_cycle(80, 0, 0, 0, 1);
    chk(pending.size() == 0, $sformatf("%0d packets missing after phase om=%b sn=%0d", pending.size(), m, s));
    pending.delete();
  endtask

  initial begin
    hrst = 1'b1; srst = 1'b0; pt = 1'b0; om = 2'b01; sn = 3'd0; rrf = 1'b0;
    udA = '0; udB = '0; dg0 = 1'b1; dg1 = 1'b1;
    ten = 0; tld = 0; tsi = 0; tsten = 0; tsi0 = 0; tsi1 = 0; tm = 0; tbi = 0;
    tpiA = 0; tpiB = 0; tmei = 0;
    n_tchain = 0; n_tobs = 0; n_tpath = 0; n_tbuf = 0; n_ten = 0;
    n_cut = 0; n_store = 0; n_full = 0; n_send0 = 0; n_send1 = 0; n_copy = 0; n_rot = 0;
    n_block = 0; n_tie = 0; n_tog = 0; n_perr = 0; n_rcbad = 0; n_srst = 0; n_delivered = 0;
    repeat (3) @(posedge clk);
    #1 hrst = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    phase(2'b01, 2, 0, 60, 90, 0, 0);    // routing network, stage 2
    phase(2'b01, 0, 1, 30, 70, 0, 0);    // routing network, last stage, rotate test packets
    phase(2'b11, 2, 0, 60, 90, 1, 0);    // copy network, stage 2
    phase(2'b11, 0, 0, 30, 80, 1, 0);    // copy network, stage 0
    phase(2'b10, 1, 0, 50, 90, 2, 0);    // distribution network
    chk(err === 1'b0, "err set without an error");
    // errors
    phase(2'b01, 1, 0, 20, 80, 3, 1);
    chk(err === 1'b1, "err not set by parity / header errors");
    srst = 1'b1; @(posedge clk); #1 srst = 1'b0;
    chk(err === 1'b0, "srst did not clear err");
    n_srst = int'(!err);
    test_access();
    $display("delivered=%0d cut=%0d stored=%0d full=%0d send0=%0d send1=%0d copy=%0d rot=%0d block=%0d tie=%0d toggle=%0d perr=%0d rcbad=%0d",
             n_delivered, n_cut, n_store, n_full, n_send0, n_send1, n_copy, n_rot, n_block, n_tie, n_tog, n_perr, n_rcbad);
    chk(n_cut > 0,   "no cut-through");
    chk(n_store > 0, "no packet buffered");
    chk(n_full > 0,  "both buffers never full");
    chk(n_send0 > 0, "nothing sent from BSR0");
    chk(n_send1 > 0, "nothing sent from BSR1");
    chk(n_copy > 0,  "no copy");
    chk(n_rot > 0,   "no rotation");
    chk(n_block > 0, "no refusal for lack of downstream grant");
    chk(n_tie > 0,   "no input tie-break");
    chk(n_tog > 0,   "no output toggle");
    chk(n_perr > 0 && n_rcbad > 0 && n_srst > 0, "error flag path not exercised");
    $display("test access: chain=%0d observe=%0d path=%0d buffer=%0d testreg=%0d",
             n_tchain, n_tobs, n_tpath, n_tbuf, n_ten);
    chk(n_tchain > 0, "BCR serial chain not exercised");
    chk(n_tobs > 0,   "observation outputs not exercised");
    chk(n_tpath > 0,  "external path/enable control not exercised");
    chk(n_tbuf > 0,   "external buffer shift not exercised");
    chk(n_ten > 0,    "test register request not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
