// Self-checking testbench of the error flag (pse_err): every error source sets
// err, err holds, and both srst and hrst clear it.
module tb_pse_err;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic hrst, srst, pa, pb, ha, hb, err;
  int checks = 0, failures = 0;

  pse_err dut (.clk, .hrst, .srst, .perr_a(pa), .perr_b(pb),
               .hdr_err_a(ha), .hdr_err_b(hb), .err);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_err(logic v, string what);
    checks++;
    if (err !== v) begin
      failures++;
      $display("%s: err=%b expected %b", what, err, v);
    end
  endtask

  initial begin
    {hrst, srst, pa, pb, ha, hb} = 6'b100000;
    @(posedge clk); #1 hrst = 1'b0;
    expect_err(1'b0, "after hrst");
    for (int src = 0; src < 4; src++) begin
      {pa, pb, ha, hb} = 4'b1000 >> src;
      @(posedge clk); #1 {pa, pb, ha, hb} = '0;
      expect_err(1'b1, "set");
      repeat (5) @(posedge clk);
      #1 expect_err(1'b1, "held");
      if (src[0]) srst = 1'b1; else hrst = 1'b1;
      @(posedge clk); #1 {srst, hrst} = '0;
      expect_err(1'b0, "cleared");
    end
    // reset wins over a simultaneous error
    pa = 1'b1; srst = 1'b1;
    @(posedge clk); #1 {pa, srst} = '0;
    expect_err(1'b0, "srst with error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
