// Self-checking testbench of the header modification circuit (hmc), both
// halves (owning port 0 and port 1). Strobes follow the timing control
// circuit's schedule: a packet's word k is on the chosen path t20+k, its
// controls take effect at t20 (path) and t21 (enables). Each packet cycle
// picks a random path (BSR0, cut-through, BSR1), random enables, copy, test,
// BCN bit and rrf; the other half's words arrive on op. Expected outputs are
// built from whole packets: fanout halves for copies (port 0 gets FAN/2 when
// the BCN bit is odd), routing-field rotation 1,2,3 -> 2,3,1 for test packets
// with rrf, parity of every modified word, and the 24-clock latency from pt
// to the first word on dout. Finally the tsten/tmei test control of the
// output multiplexors is checked for all four selections.
module tb_hmc;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, rrf, tsten;
  logic [1:0] tmei;
  word_t d0, d1, d2;
  bsel_t bsel;
  logic [1:0] hen;
  logic copy, test, bcn;
  tstrobe_t ts;
  word_t op0, op1, tp0, tp1, do0, do1;
  int checks = 0, failures = 0;
  int n_copy = 0, n_rot = 0;

  hmc #(.OWN(1'b0)) dut0 (.clk, .rst, .d0, .d1, .d2, .bsel, .hen, .copy, .test, .bcn,
                          .rrf, .tsten, .tmei, .ts, .op(op0), .tp(tp0), .dout(do0));
  hmc #(.OWN(1'b1)) dut1 (.clk, .rst, .d0, .d1, .d2, .bsel, .hen, .copy, .test, .bcn,
                          .rrf, .tsten, .tmei, .ts, .op(op1), .tp(tp1), .dout(do1));

  localparam int NPKT = 40;
  int         pstart [NPKT];
  word_t      pk     [NPKT][80];
  bsel_t      pbsel  [NPKT];
  logic [1:0] phen   [NPKT];
  logic       pcopy  [NPKT], ptest [NPKT], pbcn [NPKT], prrf [NPKT];
  word_t      expect0 [$], expect1 [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected word k of packet j on port p
  function automatic word_t port_word(int j, int p, int k);
    logic [7:0] fan;
    if (pcopy[j] && k == 1) begin
      fan = wdata(pk[j][1]);
      if ((p == 0) == pbcn[j]) return mkword(fan >> 1);
      else                     return mkword(8'((9'(fan) + 9'd1) >> 1));
    end
    if (ptest[j] && prrf[j] && k >= 1 && k <= 3) return pk[j][(k % 3) + 1];
    return pk[j][k];
  endfunction

  // packet whose word is at offset base..base+79 after its pt, or -1
  function automatic int find(int c, int base, output int k);
    for (int j = NPKT - 1; j >= 0; j--) begin
      if (c >= pstart[j] + base && c < pstart[j] + base + 80) begin
        k = c - pstart[j] - base;
        return j;
      end
    end
    k = 0;
    return -1;
  endfunction

  function automatic int latest(int c, int off);
    for (int j = NPKT - 1; j >= 0; j--) if (c >= pstart[j] + off) return j;
    return -1;
  endfunction

  initial begin
    int t;
    // packet schedule
    tsten = 0; tmei = 0;
    t = 5;
    for (int j = 0; j < NPKT; j++) begin
      pstart[j] = t;
      t += ($urandom_range(0, 2) == 0) ? 80 + $urandom_range(1, 10) : 80;
      for (int k = 0; k < 80; k++) pk[j][k] = mkword(8'($urandom));
      pbsel[j] = bsel_t'($urandom_range(0, 3));
      phen[j]  = 2'($urandom);
      pcopy[j] = ($urandom_range(0, 2) == 0);
      ptest[j] = !pcopy[j] && ($urandom_range(0, 1) == 0);
      pbcn[j]  = 1'($urandom);
      prrf[j]  = 1'($urandom);
      if (pcopy[j]) phen[j] = 2'b11;
      if (pbsel[j] == BSEL_NONE) phen[j] = 2'b00;
    end

    rst = 1'b1; rrf = 1'b0; {d0, d1, d2, op0, op1} = '0;
    bsel = BSEL_NONE; hen = '0; {copy, test, bcn} = '0; ts = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int c = 1; c < t + 120; c++) begin
      int j, k, jl, jc, jh;
      word_t own0, own1, oth0, oth1, w;
      @(posedge clk);
      #1;
      // strobes from the most recent pt
      jl = latest(c, 0);
      ts = '0;
      if (jl >= 0) begin
        int off;
        off = c - pstart[jl];
        ts.t1 = off == 2; ts.t2 = off == 3; ts.t3 = off == 4; ts.t4 = off == 5;
        ts.t16 = off == 17; ts.t19 = off == 20; ts.t20 = off == 21;
        ts.t22 = off == 23; ts.trot = off == 23 || off == 24;
      end
      // path word
      j = find(c, 21, k);
      ts.tshift = j >= 0;
      d0 = word_t'($urandom); d1 = word_t'($urandom); d2 = word_t'($urandom);
      jc = latest(c, 21);
      bsel = (jc >= 0) ? pbsel[jc] : BSEL_NONE;
      if (j >= 0) begin
        case (pbsel[j])
          BSEL_BSR0: d0 = pk[j][k];
          BSEL_CUT:  d1 = pk[j][k];
          BSEL_BSR1: d2 = pk[j][k];
          default: ;
        endcase
      end
      jh = latest(c, 22);
      if (jh >= 0) begin
        hen = phen[jh]; copy = pcopy[jh]; test = ptest[jh]; bcn = pbcn[jh]; rrf = prrf[jh];
      end
      op0 = word_t'($urandom); op1 = word_t'($urandom);
      // expected words in the delay stage this clock
      j = find(c, 22, k);
      own0 = '0; own1 = '0; oth0 = '0; oth1 = '0;
      if (j >= 0) begin
        if (phen[j][0]) begin own0 = port_word(j, 0, k); oth1 = own0; end
        if (phen[j][1]) begin own1 = port_word(j, 1, k); oth0 = own1; end
        if (k == 1 && pcopy[j]) n_copy++;
        if (k == 1 && ptest[j] && prrf[j] && |phen[j]) n_rot++;
      end
      #1;
      checks += 2;
      if (tp0 !== oth0) begin failures++; $display("c=%0d tp0 %h expected %h", c, tp0, oth0); end
      if (tp1 !== oth1) begin failures++; $display("c=%0d tp1 %h expected %h", c, tp1, oth1); end
      expect0.push_back(own0 | op0);
      expect1.push_back(own1 | op1);
      if (expect0.size() > 2) begin
        w = expect0.pop_front();
        checks++;
        if (do0 !== w) begin failures++; $display("c=%0d dout0 %h expected %h", c, do0, w); end
        w = expect1.pop_front();
        checks++;
        if (do1 !== w) begin failures++; $display("c=%0d dout1 %h expected %h", c, do1, w); end
      end
      // latency: word 0 of a packet that port 0 carries is on dout 24 clocks after pt
      j = find(c, 24, k);
      if (j >= 0 && k == 0 && phen[j][0]) begin
        checks++;
        if (do0 !== (pk[j][0] | op0_hist(c - 2))) begin
          failures++; $display("latency: packet %0d word 0 not on port 0 at pt+24", j);
        end
      end
      op0_log.push_back(op0);
    end
    checks++;
    if (n_copy == 0 || n_rot == 0) begin failures++; $display("coverage copy=%0d rot=%0d", n_copy, n_rot); end

    // external multiplexor control: tmei picks the output multiplexor input for
    // both ports, independent of the packet window
    begin
      word_t prev, cur, ex;
      logic [7:0] fd;
      logic [8:0] sum;
      ts = '0; copy = 0; test = 0; op0 = '0; op1 = '0; bsel = BSEL_CUT; tsten = 1;
      prev = '0;
      for (int k = 0; k < 200; k++) begin
        @(posedge clk); #1;
        cur = mkword(8'($urandom));
        d1 = cur; tmei = 2'($urandom); hen = 2'($urandom);
        #1;
        fd = wdata(prev);
        sum = {1'b0, fd} + 9'd1;
        unique case (tmei)
          2'b00:   ex = mkword(fd >> 1);
          2'b01:   ex = mkword(sum[8:1]);
          2'b10:   ex = prev;
          default: ex = cur;
        endcase
        if (k > 0) begin
          checks++;
          if (tp0 !== (hen[1] ? ex : '0) || tp1 !== (hen[0] ? ex : '0)) begin
            failures++; $display("tsten tmei=%b tp0=%h tp1=%h expected %h", tmei, tp0, tp1, ex);
          end
        end
        prev = cur;
      end
      tsten = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t op0_log [$];
  function automatic word_t op0_hist(int c);
    // op0 driven in clock c (clock 1 is the first entry)
    return op0_log[c - 1];
  endfunction
endmodule
