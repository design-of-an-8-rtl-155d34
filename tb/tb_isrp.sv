// Self-checking testbench of the input shift register (isrp).
// Drives random words, some with broken parity, and checks that dout is the
// input 21 clocks earlier, that the header tap shows the data byte 2 clocks
// earlier and that pe flags exactly the words with even parity.
module tb_isrp;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  word_t      di, dout;
  logic [7:0] d;
  logic       pe;
  int checks = 0, failures = 0;

  isrp dut (.clk, .di, .d, .pe, .dout);

  word_t hist [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    di = '0;
    for (int n = 0; n < 600; n++) begin
      word_t w;
      w = mkword(8'($urandom));
      if ($urandom_range(0, 4) == 0) w[0] = ~w[0];
      di = w;
      @(posedge clk);
      hist.push_front(w);
      #1;
      if (hist.size() > 21) begin
        checks++;
        if (dout !== hist[20]) begin
          failures++;
          $display("dout mismatch at %0d: %h vs %h", n, dout, hist[20]);
        end
      end
      if (hist.size() >= 2) begin
        checks += 2;
        if (d !== hist[1][8:1]) begin
          failures++;
          $display("tap mismatch at %0d", n);
        end
        if (pe !== ~^hist[1]) begin
          failures++;
          $display("pe mismatch at %0d", n);
        end
      end
      if (hist.size() > 30) void'(hist.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
