// Self-checking testbench of the header registers and decoder (hdr_dec).
// Loads random headers (all routing control codes, invalid ones and RC words
// with parity errors, fanouts around 2^sn) in every operation mode and stage
// number, and compares request, copy, test, BCN bit and rcbad with a model of
// the routing rules written from the packet-type and mode descriptions.
module tb_hdr_dec;
  import pse_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst, pe, ld_rc, ld_fan, ld_bcn, rcbad;
  logic [7:0] d, rc_word, fan_word;
  om_t        om;
  logic [2:0] sn;
  hinfo_t     hi;
  int checks = 0, failures = 0;
  int n_copy = 0, n_bad = 0, n_test = 0;

  hdr_dec dut (.clk, .rst, .d, .pe, .ld_rc, .ld_fan, .ld_bcn, .om, .sn,
               .hi, .rcbad, .rc_word, .fan_word);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model(input logic [2:0] rc, input logic rc_pe,
                                input logic [7:0] fan, input logic [7:0] bw,
                                input logic [1:0] m, input int s,
                                output logic [2:0] r, output logic cp,
                                output logic tst, output logic bad);
    int kind;
    logic portbit;
    bad = !(rc == 3'd0 || rc == 3'd1 || rc == 3'd2 || rc == 3'd4) ||
          (rc != 3'd0 && rc_pe);
    kind = bad ? 1 : int'(rc);
    portbit = fan[s];
    cp = 1'b0; tst = 1'b0;
    if (kind == 0) r = 3'b000;
    else if (kind == 4) begin
      tst = 1'b1;
      r = portbit ? 3'b110 : 3'b101;
    end else if (m == 2'b10) r = 3'b100;
    else if (m == 2'b11) begin
      if (kind == 2 && int'(fan) > (1 << s)) begin r = 3'b111; cp = 1'b1; end
      else r = 3'b100;
    end else r = portbit ? 3'b110 : 3'b101;
  endfunction

  task automatic load(input logic [7:0] v, input logic p, input int which);
    d = v; pe = p;
    ld_rc = (which == 0); ld_fan = (which == 1); ld_bcn = (which == 3);
    @(posedge clk);
    #1 {ld_rc, ld_fan, ld_bcn} = '0;
  endtask

  initial begin
    logic [2:0] rc, er;
    logic [7:0] fan, bw;
    logic       rpe, ecp, etst, ebad;
    int         s;
    rst = 1'b1; {ld_rc, ld_fan, ld_bcn, pe} = '0; d = '0;
    om = OM_RN; sn = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      case ($urandom_range(0, 5))
        0: rc = 3'd0;
        1: rc = 3'd1;
        2, 3: rc = 3'd2;
        4: rc = 3'd4;
        default: rc = 3'($urandom);
      endcase
      rpe = ($urandom_range(0, 15) == 0);
      s   = $urandom_range(0, 7);
      case ($urandom_range(0, 3))
        0: fan = 8'((1 << s) - 1 + $urandom_range(0, 2));
        default: fan = 8'($urandom);
      endcase
      bw  = 8'($urandom);
      om  = om_t'($urandom_range(0, 3));
      sn  = 3'(s);
      load({rc, 5'($urandom)}, rpe, 0);
      load(fan, 1'b0, 1);
      load(8'($urandom), 1'b0, 2);   // word 2 is not stored
      load(bw, 1'b0, 3);
      model(rc, rpe, fan, bw, om, s, er, ecp, etst, ebad);
      checks++;
      if (hi !== '{r: er, copy: ecp, test: etst, bcn: bw[0]} || rcbad !== ebad) begin
        failures++;
        $display("rc=%b pe=%b fan=%0d sn=%0d om=%b: got r=%b copy=%b test=%b bcn=%b bad=%b exp r=%b copy=%b test=%b bad=%b",
                 rc, rpe, fan, s, om, hi.r, hi.copy, hi.test, hi.bcn, rcbad, er, ecp, etst, ebad);
      end
      checks++;
      if (rc_word[7:5] !== rc || fan_word !== fan) begin
        failures++;
        $display("header registers wrong");
      end
      n_copy += ecp; n_bad += ebad; n_test += etst;
    end
    checks++;
    if (n_copy == 0 || n_bad == 0 || n_test == 0) begin
      failures++;
      $display("coverage: copy=%0d bad=%0d test=%0d", n_copy, n_bad, n_test);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
