// Self-checking testbench of the timing control circuit (tcc).
// Gives packet-times 80, 93 and 120 clocks apart and checks, clock by clock,
// that each strobe t_i is high exactly i+1 clocks after packet-time, that trot
// covers t22 and t23, that tshift is high for exactly 80 clocks from t20 (also
// across back-to-back packet cycles), and that after a hard reset nothing
// happens until the next packet-time.
module tb_tcc;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, pt;
  tstrobe_t ts;
  int checks = 0, failures = 0;

  tcc dut (.clk, .rst, .pt, .ts);

  int cyc = 0;
  int last_pt = -1000;
  int pts [$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected strobes for the current clock
  function automatic tstrobe_t expected(int now);
    tstrobe_t e;
    int off;
    e = '0;
    off = now - last_pt;
    if (last_pt >= 0) begin
      e.t1   = off == 2;
      e.t2   = off == 3;
      e.t3   = off == 4;
      e.t4   = off == 5;
      e.t16  = off == 17;
      e.t19  = off == 20;
      e.t20  = off == 21;
      e.t22  = off == 23;
      e.trot = off == 23 || off == 24;
    end
    foreach (pts[i]) if (now - pts[i] >= 21 && now - pts[i] < 101) e.tshift = 1'b1;
    return e;
  endfunction

  int shift_clocks = 0;

  task automatic run(int n);
    repeat (n) begin
      @(posedge clk);
      #1;
      if (pt_q) begin
        last_pt = cyc - 1;
        pts.push_back(cyc - 1);
      end
      checks++;
      if (ts !== expected(cyc)) begin
        failures++;
        $display("cycle %0d: strobes %b expected %b", cyc, ts, expected(cyc));
      end
      if (ts.tshift) shift_clocks++;
    end
  endtask

  logic pt_q;
  always @(posedge clk) pt_q <= pt;

  initial begin
    rst = 1'b1; pt = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    // idle after reset: no strobes
    run(30);
    for (int k = 0; k < 6; k++) begin
      int gap;
      gap = (k < 3) ? 80 : (k == 3 ? 93 : 120);
      #0 pt = 1'b1;
      run(1);
      pt = 1'b0;
      run(gap - 1);
    end
    run(150);
    checks++;
    if (shift_clocks != 6 * 80) begin
      failures++;
      $display("tshift high for %0d clocks, expected %0d", shift_clocks, 6 * 80);
    end
    // reset in the middle of a packet cycle cancels it
    pt = 1'b1; run(1); pt = 1'b0; run(5);
    rst = 1'b1; run(1); rst = 1'b0;
    last_pt = -1000; pts.delete();
    run(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
