// Testbench of the Regime+Exponent stage, driven through a Posit11 decoder.
// For all 2048 words the merged regime, exponent and fraction must equal the
// reference decode of the whole 11-bit word (including regimes that run from
// the first half into the second), the scale must be (-1)^s (4r + e + s), the
// significand {s, ~s, f} and fw_act the number of live fraction bits.
module tb_regime_exponent;
  import posit_hub_pkg::*;
  import posit_ref_pkg::*;

  logic              clk = 1'b0;
  logic [10:0]       p;
  logic              s;
  hub_dec6_t         h1, h2;
  logic [9:0]        body;
  logic signed [4:0] r;
  logic [1:0]        e;
  logic [6:0]        f;
  logic [2:0]        fw_act;
  logic signed [8:0] scale;
  logic [8:0]        sig;
  int checks = 0, failures = 0, spans = 0;

  posit11_decoder u_dec (.p(p), .s(s), .h1(h1), .h2(h2), .body(body),
                         .is_zero(), .is_nar());
  regime_exponent dut (.s(s), .h1(h1), .h2(h2), .body(body), .r(r), .e(e),
                       .f(f), .fw_act(fw_act), .scale(scale), .sig(sig));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    int rr, ee, sc, k, fi;
    real ff, v;
    for (int w = 1; w < 2048; w++) begin
      if (w == 1024) continue;
      p = 11'(w);
      @(negedge clk);
      decode(16'(w), 11, 1'b1, rr, ee, ff, sc, v);
      k  = (rr >= 0) ? rr + 1 : -rr;
      fi = int'(ff * 128.0);
      if (k > 5) spans = spans + 1;
      expect_eq(int'(r), rr, $sformatf("r %b", p));
      expect_eq(int'(e), ee, $sformatf("e %b", p));
      expect_eq(int'(f), fi, $sformatf("f %b", p));
      expect_eq(int'(scale), sc, $sformatf("scale %b", p));
      expect_eq(int'(sig), (w >> 10) ? (256 + fi) : (128 + fi), $sformatf("sig %b", p));
      expect_eq(int'(fw_act), (k <= 7) ? 8 - k : 0, $sformatf("fw_act %b", p));
    end
    checks++;
    if (spans == 0) begin failures++; $display("FAIL no regime spans both halves"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
