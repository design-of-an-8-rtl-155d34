// Workload testbench: an 8x8 switch fabric of twelve switch elements.
//
// The fabric is the three-stage banyan that a switch module with eight fabric
// ports needs: stage numbers 2, 1, 0 from input to output, four elements per
// stage. In the stage with stage number k an element joins the two lines whose
// numbers differ only in bit k; line with bit k = 0 enters side A and leaves
// on port 0, the other enters side B and leaves on port 1. So a packet whose
// link number has bit k set leaves the stage on the line with bit k set, and
// after the last stage it is on the line equal to its link number. Each stage
// runs its packet-time 24 clocks after the previous stage (the cut-through
// latency), and an element's downstream grants are the upstream grants of the
// elements it feeds; the fabric outputs always grant.
//
// Three workloads run at the default sizes:
//   routing network (om = 01): every source sends point-to-point packets to
//     random link numbers; each must leave exactly once, unchanged, on the line
//     equal to its link number;
//   copy network (om = 11): sources send broadcast packets with fanout 1..8
//     and point-to-point packets; a broadcast packet must leave as exactly FAN
//     copies on FAN different lines, each with fanout 1 and otherwise
//     unchanged, and a point-to-point packet exactly once, on any line.
//   distribution network (om = 10): point-to-point packets, each must leave
//     exactly once, unchanged, on any line.
// In all three, one packet in eight is a test packet, which must reach the line
// named by word 1 whatever the mode; the last stage has rrf set, so its words
// 1, 2, 3 must leave as 2, 3, 1.
// Sources obey the upstream grants of the first stage. The test counts
// packets, copies, blocked cycles and packets that did not arrive with the
// minimum 72-clock latency (buffered somewhere), and fails if any of these
// mechanisms never happened.
module tb_fabric;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NS = 3;   // stages
  localparam int NL = 8;   // lines

  logic  hrst;
  logic [1:0] om;
  logic  pt [NS];
  word_t line [NS+1][NL];
  logic  ugl  [NS][NL];
  logic  dgl  [NS][NL];

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar st = 0; st < NS; st++) begin : g_st
    localparam int K = NS - 1 - st;   // stage number
    for (genvar j = 0; j < NL / 2; j++) begin : g_el
      // lower line of element j: j with a 0 inserted at bit K
      localparam int LA = ((j >> K) << (K + 1)) | (j & ((1 << K) - 1));
      localparam int LB = LA + (1 << K);
      logic ugA, ugB;
      pse u_pse (
        .clk, .hrst, .srst(1'b0), .pt(pt[st]), .om, .sn(3'(K)), .rrf(K == 0),
        .udA(line[st][LA]), .udB(line[st][LB]), .ugA, .ugB,
        .dd0(line[st+1][LA]), .dd1(line[st+1][LB]),
        .dg0(dgl[st][LA]), .dg1(dgl[st][LB]), .err(),
        .ten(1'b0), .tm(2'b00), .tdA(), .tdB(), .tld(1'b0), .tsi(1'b0), .tso(),
        .tsten(1'b0), .tsi0(1'b0), .tsi1(1'b0), .tbi(2'b00), .tpiA(2'b00), .tpiB(2'b00),
        .tmei(2'b00), .tsoA(), .tsoB(), .tboA(), .tboB(), .tpoA(), .tpoB()
      );
      assign ugl[st][LA] = ugA;
      assign ugl[st][LB] = ugB;
    end
  end

  for (genvar st = 0; st < NS; st++) begin : g_dg
    for (genvar l = 0; l < NL; l++) begin : g_l
      if (st == NS - 1) begin : g_sink
        assign dgl[st][l] = 1'b1;
      end else begin : g_next
        assign dgl[st][l] = ugl[st+1][l];
      end
    end
  end

  // packet-times: stage st runs 24*st clocks after stage 0
  int   cyc = 0;
  logic pt0;
  always @(posedge clk) cyc <= cyc + 1;
  always_comb begin
    pt[0] = pt0;
  end
  logic pt_d [NS*24+1];
  always_ff @(posedge clk) begin
    pt_d[0] <= pt0;
    for (int i = 1; i <= NS*24; i++) pt_d[i] <= pt_d[i-1];
  end
  assign pt[1] = pt_d[23];
  assign pt[2] = pt_d[47];

  // ------------------------------------------------------- scoreboard
  typedef struct {
    int    src;
    int    start;     // clock of word 0 at the source
    int    copies;    // copies still expected
    bit    bcast;
    bit    routed;    // must leave on line ln
    bit    test;      // test packet: words 1..3 leave rotated
    logic [7:0] ln;   // link number / fanout
    bit    seen [NL];
  } exp_t;
  exp_t  ex [int];
  word_t body [int][80];
  int    n_sent = 0, n_out = 0, n_copy_pk = 0, n_late = 0, n_blocked = 0, n_test = 0;

  word_t cap [NL][80];
  int    cap_k [NL];
  int    cap_t [NL];

  initial for (int l = 0; l < NL; l++) cap_k[l] = -1;

  always @(posedge clk) begin
    #2;
    for (int l = 0; l < NL; l++) begin
      word_t w;
      w = line[NS][l];
      if (cap_k[l] >= 0) begin
        cap[l][cap_k[l]] = w;
        cap_k[l]++;
        if (cap_k[l] == 80) begin
          cap_k[l] = -1;
          check_out(l);
        end
      end else if (w[8:6] != 3'b000) begin
        cap[l][0] = w;
        cap_k[l] = 1;
        cap_t[l] = cyc;
      end
    end
  end

  task automatic check_out(int l);
    int id;
    id = int'({wdata(cap[l][5]), wdata(cap[l][6])});
    n_out++;
    if (!ex.exists(id)) begin
      chk(0, $sformatf("line %0d: unknown packet %0d", l, id));
      return;
    end
    if (cap_t[l] - ex[id].start > 72) n_late++;
    chk(cap_t[l] - ex[id].start >= 72, $sformatf("packet %0d faster than 72 clocks", id));
    chk(!ex[id].seen[l], $sformatf("packet %0d twice on line %0d", id, l));
    ex[id].seen[l] = 1;
    if (ex[id].bcast) begin
      chk(wdata(cap[l][1]) == 8'd1, $sformatf("copy of %0d leaves with fanout %0d", id, wdata(cap[l][1])));
    end else if (ex[id].routed) begin
      chk(l == int'(ex[id].ln[2:0]), $sformatf("packet %0d for link %0d on line %0d", id, ex[id].ln, l));
    end
    for (int k = 0; k < 80; k++) begin
      if (k == 1 && ex[id].bcast) continue;
      if (cap[l][k] !== body[id][k]) begin
        chk(0, $sformatf("packet %0d word %0d is %h expected %h", id, k, cap[l][k], body[id][k]));
        break;
      end
    end
    checks++;
    ex[id].copies--;
    if (ex[id].copies < 0) begin failures++; $display("packet %0d: too many copies", id); end
    if (ex[id].copies == 0) ex.delete(id);
  endtask

  // ---------------------------------------------------------- sources
  int next_id = 1;

  task automatic make_packet(int src, bit cn, bit dn, output word_t pk [80]);
    int id;
    logic [7:0] ln;
    bit bc, tp;
    id = next_id++;
    tp = ($urandom_range(0, 7) == 0);
    bc = !tp && cn && ($urandom_range(0, 3) != 0);
    ln = bc ? 8'($urandom_range(1, 8)) : 8'($urandom_range(0, 7));
    for (int k = 0; k < 80; k++) pk[k] = mkword(8'($urandom));
    pk[0] = mkword({tp ? RC_TEST : (bc ? RC_BCAST : RC_POINT), 5'b00000});
    pk[1] = mkword(ln);
    pk[5] = mkword(8'(id >> 8));
    pk[6] = mkword(8'(id));
    ex[id].src = src;
    ex[id].start = cyc;
    ex[id].copies = bc ? int'(ln) : 1;
    ex[id].bcast = bc;
    ex[id].routed = (!cn && !dn) || tp;
    ex[id].test = tp;
    if (tp) n_test++;
    ex[id].ln = ln;
    for (int l = 0; l < NL; l++) ex[id].seen[l] = 0;
    for (int k = 0; k < 80; k++) body[id][k] = pk[k];
    if (tp) begin
      // the last stage rotates the path words: 1,2,3 leave as 2,3,1
      body[id][1] = pk[2];
      body[id][2] = pk[3];
      body[id][3] = pk[1];
    end
    n_sent++;
    if (bc && ln > 1) n_copy_pk++;
  endtask

  task automatic run(bit cn, bit dn, int cycles, int load, int drain);
    word_t pk [NL][80];
    om = cn ? 2'b11 : (dn ? 2'b10 : 2'b01);
    for (int c = 0; c < cycles + drain; c++) begin
      for (int l = 0; l < NL; l++) begin
        if (c < cycles && ugl[0][l] && $urandom_range(0, 99) < load) begin
          word_t p [80];
          make_packet(l, cn, dn, p);
          for (int k = 0; k < 80; k++) pk[l][k] = p[k];
        end else begin
          if (c < cycles && !ugl[0][l]) n_blocked++;
          for (int k = 0; k < 80; k++) pk[l][k] = '0;
        end
      end
      for (int k = 0; k < 80; k++) begin
        pt0 = (k == 0);
        for (int l = 0; l < NL; l++) line[0][l] = pk[l][k];
        @(posedge clk); #1;
      end
    end
    pt0 = 0;
    chk(ex.size() == 0, $sformatf("%0d packets missing or short of copies", ex.size()));
    ex.delete();
  endtask

  initial begin
    hrst = 1; pt0 = 0; om = 2'b01;
    for (int l = 0; l < NL; l++) line[0][l] = '0;
    repeat (3) @(posedge clk);
    #1 hrst = 0;
    repeat (3) @(posedge clk);
    #1;
    run(0, 0, 60, 70, 12);
    $display("routing network: sent=%0d out=%0d late=%0d blocked=%0d", n_sent, n_out, n_late, n_blocked);
    chk(n_late > 0 && n_sent > 0, "routing network: no buffering in the fabric");
    n_sent = 0; n_out = 0; n_late = 0;
    run(1, 0, 60, 40, 15);
    $display("copy network: sent=%0d out=%0d replicated=%0d late=%0d blocked=%0d",
             n_sent, n_out, n_copy_pk, n_late, n_blocked);
    chk(n_copy_pk > 0 && n_out > n_sent, "copy network: no replication");
    n_sent = 0; n_out = 0; n_late = 0;
    run(0, 1, 40, 70, 12);
    $display("distribution network: sent=%0d out=%0d late=%0d", n_sent, n_out, n_late);
    chk(n_out == n_sent && n_sent > 0, "distribution network: packets lost");
    chk(n_blocked > 0, "sources never held back by a grant");
    chk(n_test > 0, "no test packets");
    $display("test packets: %0d", n_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
