// Self-checking testbench of one input circuit (ipc, owning port 0).
// The testbench plays the output control circuit: in each packet cycle it
// picks which output ports are free and grants the presented request when its
// port(s) are free. Random traffic that obeys the upstream grant runs in the
// routing and copy network modes. Each packet must come out once, in order,
// on the right port (dd for port 0, 24 clocks after a packet-time; tp for
// port 1, 22 clocks after), with the fanout split for copies, and only on a
// port that was free. The run must see cut-through, buffering and both
// buffers full.
module tb_ipc;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, ug, rrf, perr, hdr_err;
  word_t ud, dd, tp;
  om_t om;
  logic [2:0] sn;
  tstrobe_t ts;
  req_t r;
  logic [1:0] en, avail;
  int checks = 0, failures = 0;
  int n_cut = 0, n_full = 0, n_store = 0, n_copy = 0, n_out = 0;

  ipc #(.OWN(1'b0)) dut (.clk, .rst, .ud, .ug, .om, .sn, .rrf, .ts, .r, .en,
                         .op(word_t'(0)), .tp, .dd, .perr, .hdr_err,
                         .ten(1'b0), .tm(2'b00), .td(), .tld(1'b0), .tsi(1'b0), .tso(),
                         .tsten(1'b0), .tsi_s(2'b00), .tbi(2'b00), .tpi(2'b00), .tmei(2'b00),
                         .tso_s(), .tbo(), .tpo());
  tcc u_tcc (.clk, .rst, .pt, .ts);

  logic pt;

  // output control stand-in
  always_comb begin
    en = 2'b00;
    if (r.need) begin
      unique case ({r.p1, r.p0})
        2'b00:   en = avail[0] ? 2'b01 : (avail[1] ? 2'b10 : 2'b00);
        2'b01:   en = avail[0] ? 2'b01 : 2'b00;
        2'b10:   en = avail[1] ? 2'b10 : 2'b00;
        default: en = (avail == 2'b11) ? 2'b11 : 2'b00;
      endcase
    end
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int id; logic [1:0] ports; bit both; word_t w [2][80]; } exp_t;
  exp_t q [$];                 // packets in arrival order
  int   next_id = 1;
  int   cyc = 0;
  int   pts [$];
  logic [1:0] avail_at [int];
  always @(posedge clk) cyc <= cyc + 1;

  // capture both outputs; port 0 on dd (offset 24), port 1 on tp (offset 22)
  word_t cap [2][80];
  int    ck [2] = '{-1, -1};
  int    cpt [2];
  int    got [2][$];           // ids seen per port, in order

  always @(posedge clk) begin
    #2;
    for (int p = 0; p < 2; p++) begin
      word_t w;
      int off;
      w   = (p == 1) ? tp : dd;
      off = (p == 1) ? 22 : 24;
      if (ck[p] >= 0) begin
        cap[p][ck[p]] = w;
        ck[p]++;
        if (ck[p] == 80) begin
          int id;
          bit found;
          ck[p] = -1;
          id = int'({wdata(cap[p][5]), wdata(cap[p][6])});
          found = 0;
          foreach (q[i]) if (q[i].id == id && q[i].ports[p]) begin
            bit ok;
            found = 1;
            ok = 1;
            for (int k = 0; k < 80; k++) if (cap[p][k] !== q[i].w[p][k]) ok = 0;
            chk(ok, $sformatf("packet %0d content on port %0d", id, p));
            chk(avail_at[cpt[p]][p], $sformatf("packet %0d on busy port %0d", id, p));
            chk(got[p].size() == 0 || got[p][$] < id, $sformatf("packet %0d out of order", id));
            got[p].push_back(id);
            if (q[i].both) begin q[i].ports[p] = 1'b0; if (p == 1) n_copy++; end
            else q[i].ports = 2'b00;
            n_out++;
            break;
          end
          chk(found, $sformatf("unexpected packet %0d on port %0d", id, p));
        end
      end else if (w[8:6] != 3'b000) begin
        bit at;
        at = 0;
        foreach (pts[i]) if (cyc == pts[i] + off) begin at = 1; cpt[p] = pts[i]; end
        chk(at, $sformatf("port %0d packet start at wrong time", p));
        cap[p][0] = w;
        ck[p] = 1;
      end
    end
  end

  always @(posedge clk) begin
    if (ts.t16 && !rst) begin
      if (dut.u_icc.inc.r.need && en == 0 && dut.u_icc.sel == dut.u_icc.inc) n_store++;
      if (en != 0 && dut.u_icc.sel == dut.u_icc.inc) n_cut++;
    end
  end

  task automatic cycle(bit drain, int mix);
    word_t pk [80];
    bit send;
    if (!ug) n_full++;
    send = !drain && ug && $urandom_range(0, 9) < 9;
    avail = drain ? 2'b11 : 2'($urandom);
    for (int k = 0; k < 80; k++) pk[k] = mkword(8'h00);
    if (send) begin
      exp_t e;
      logic [7:0] w1;
      bit bc;
      bc = (mix == 1) && ($urandom_range(0, 1) == 1);
      w1 = bc ? 8'($urandom_range(1, 4)) : 8'($urandom);
      e.id = next_id++;
      pk[0] = mkword({bc ? 3'b010 : 3'b001, 5'd0});
      pk[1] = mkword(w1);
      for (int k = 2; k < 80; k++) pk[k] = mkword(8'($urandom));
      pk[5] = mkword(8'(e.id >> 8));
      pk[6] = mkword(8'(e.id));
      e.both = (om == OM_CN) && bc && int'(w1) > (1 << sn);
      if (om == OM_RN) e.ports = w1[sn] ? 2'b10 : 2'b01;
      else             e.ports = 2'b11;
      for (int p = 0; p < 2; p++) for (int k = 0; k < 80; k++) e.w[p][k] = pk[k];
      if (e.both) begin
        e.w[0][1] = ((pk[3][1]) ? mkword(w1 >> 1) : mkword(8'((9'(w1) + 9'd1) >> 1)));
        e.w[1][1] = ((pk[3][1]) ? mkword(8'((9'(w1) + 9'd1) >> 1)) : mkword(w1 >> 1));
      end
      q.push_back(e);
    end
    avail_at[cyc] = avail;
    pts.push_back(cyc);
    for (int k = 0; k < 80; k++) begin
      pt = (k == 0);
      ud = pk[k];
      @(posedge clk);
      #1;
    end
  endtask


  initial begin
    rst = 1'b1; pt = 1'b0; ud = '0; rrf = 1'b0; om = OM_RN; sn = 3'd1; avail = 2'b11;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 60; i++) cycle(0, 0);
    for (int i = 0; i < 5; i++) cycle(1, 0);
    om = OM_CN; sn = 3'd1;
    for (int i = 0; i < 60; i++) cycle(0, 1);
    for (int i = 0; i < 5; i++) cycle(1, 1);
    // every packet delivered: copies on both ports, others on exactly one
    foreach (q[i]) chk(q[i].ports == 2'b00, $sformatf("packet %0d lost (%b)", q[i].id, q[i].ports));
    $display("out=%0d cut=%0d stored=%0d full=%0d copies=%0d", n_out, n_cut, n_store, n_full, n_copy);
    chk(n_cut > 0 && n_store > 0 && n_full > 0 && n_copy > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
