// Self-checking testbench of the input-control PLA (icc_pla).
// Applies every input combination and compares with the state table: buffer
// shift selects, path select, first-buffer update (where the table gives one)
// and upstream grant, plus the rule that the oldest waiting packet's request
// is the one presented. Rows for impossible inputs (all three packets
// present) are checked only for a withheld grant.
module tb_icc_pla;
  import pse_pkg::*;

  logic en, dp2, dp1, dp0, fb, s1, s0, nfb, nfb_ld, ug;
  bsel_t bsel;
  logic [2:0] oe;
  int checks = 0, failures = 0;

  icc_pla dut (.en, .dp2, .dp1, .dp0, .fb, .s1, .s0, .bsel, .nfb, .nfb_ld, .oe, .ug);

  // table rows: {en,dp2,dp1,dp0,fb}, fb '?' coded with fbx=1
  // expected {s1,s0,bsel[1:0],nfb(2 = unchanged/don't care),ug}
  typedef struct {
    logic [3:0] in;
    int         fbv;     // -1: any
    logic       s1, s0;
    logic [1:0] bsel;
    int         nfbv;    // -1: unchanged
    logic       ug;
  } row_t;

  row_t rows [] = '{
    '{4'b0000, -1, 0, 0, 2'b11, -1, 1},
    '{4'b0001, -1, 0, 0, 2'b11,  0, 1},
    '{4'b0010, -1, 0, 0, 2'b11,  1, 1},
    '{4'b0011, -1, 0, 0, 2'b11, -1, 0},
    '{4'b0100, -1, 0, 1, 2'b11,  0, 1},
    '{4'b0101, -1, 1, 0, 2'b11,  0, 0},
    '{4'b0110, -1, 0, 1, 2'b11,  1, 0},
    '{4'b1000, -1, 0, 0, 2'b11, -1, 1},
    '{4'b1001, -1, 0, 1, 2'b00, -1, 1},
    '{4'b1010, -1, 1, 0, 2'b01, -1, 1},
    '{4'b1011,  0, 0, 1, 2'b00,  1, 1},
    '{4'b1011,  1, 1, 0, 2'b01,  0, 1},
    '{4'b1100, -1, 0, 0, 2'b10, -1, 1},
    '{4'b1101, -1, 0, 1, 2'b00,  0, 1},
    '{4'b1110, -1, 1, 0, 2'b01,  1, 1}
  };

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [2:0] exp_oe;
      {en, dp2, dp1, dp0, fb} = 5'(v);
      #1;
      // oldest waiting packet
      if (dp1 && dp0) exp_oe = fb ? 3'b010 : 3'b001;
      else if (dp0)   exp_oe = 3'b001;
      else if (dp1)   exp_oe = 3'b010;
      else            exp_oe = 3'b100;
      checks++;
      if (oe !== exp_oe) begin
        failures++;
        $display("in=%b: oe=%b expected %b", 5'(v), oe, exp_oe);
      end
      if (dp2 && dp1 && dp0) begin
        checks++;
        if (ug !== 1'b0) begin failures++; $display("in=%b: grant given", 5'(v)); end
        continue;
      end
      foreach (rows[i]) begin
        if (rows[i].in == {en, dp2, dp1, dp0} && (rows[i].fbv < 0 || rows[i].fbv == int'(fb))) begin
          checks++;
          if (s1 !== rows[i].s1 || s0 !== rows[i].s0 || bsel !== bsel_t'(rows[i].bsel) ||
              ug !== rows[i].ug ||
              (rows[i].nfbv < 0 && nfb_ld) ||
              (rows[i].nfbv >= 0 && (!nfb_ld || nfb !== 1'(rows[i].nfbv)))) begin
            failures++;
            $display("in=%b: s1=%b s0=%b bsel=%b nfb=%b/%b ug=%b", 5'(v), s1, s0, bsel, nfb, nfb_ld, ug);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
