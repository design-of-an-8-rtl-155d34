// Self-checking testbench of the packet buffer shift register (bsr).
// Shifts with a random shift/hold pattern and checks that the output is the
// word written 80 shifts earlier, that holding keeps the output, and that one
// 80-clock shift moves out a stored packet while storing the next one.
module tb_bsr;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  s;
  word_t di, dout;
  int checks = 0, failures = 0;
  word_t written [$];

  bsr dut (.clk, .s, .di, .dout);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(string what);
    if (written.size() >= 80) begin
      checks++;
      if (dout !== written[written.size() - 80]) begin
        failures++;
        $display("%s: dout %h expected %h", what, dout, written[written.size() - 80]);
      end
    end
  endtask

  initial begin
    s = 1'b0; di = '0;
    // random shift / hold
    for (int n = 0; n < 2000; n++) begin
      s  = ($urandom_range(0, 3) != 0);
      di = word_t'($urandom);
      @(posedge clk);
      if (s) written.push_back(di);
      #1 check_out("random");
    end
    // whole packets: 80 shifts, then a hold period
    for (int p = 0; p < 5; p++) begin
      word_t pk [80];
      for (int k = 0; k < 80; k++) pk[k] = mkword(8'(p * 80 + k));
      for (int k = 0; k < 80; k++) begin
        s = 1'b1; di = pk[k];
        @(posedge clk);
        written.push_back(di);
        #1 check_out("packet");
      end
      s = 1'b0;
      repeat (17) begin
        @(posedge clk);
        #1;
        checks++;
        if (dout !== pk[0]) begin
          failures++;
          $display("hold: first word of packet %0d not at output", p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
