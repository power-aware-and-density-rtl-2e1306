// Testbench of the HUB posit encoder at Posit(11,2) widths.
// 1. Round trip: every word except zero and NaR is decoded by the reference
//    model (fraction with its iLSB) and encoded again; truncation must drop
//    the iLSB and give back the word.
// 2. Random sign, regime (beyond both ends of the range), exponent and
//    9-bit fraction: the word must be the reference truncating encode of the
//    exact value, and clamped must flag saturation at maxpos and minpos.
module tb_hub_posit_encoder;
  import posit_ref_pkg::*;

  logic              clk = 1'b0;
  logic              s;
  logic signed [6:0] r;
  logic [1:0]        e;
  logic [8:0]        f;
  logic [10:0]       p;
  logic              clamped;
  int checks = 0, failures = 0, n_clamp = 0;

  hub_posit_encoder dut (.s(s), .r(r), .e(e), .f(f), .p(p), .clamped(clamped));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr, ee, sc;
    real ff, v, minv;
    logic [15:0] ex;
    for (int w = 1; w < 2048; w++) begin
      if (w == 1024) continue;
      decode(16'(w), 11, 1'b1, rr, ee, ff, sc, v);
      s = w[10];
      r = 7'(rr);
      e = 2'(ee);
      f = 9'(int'(ff * 512.0));
      @(negedge clk);
      checks++;
      if (p !== 11'(w)) begin
        failures++;
        if (failures < 10) $display("FAIL round trip %h -> %h", w, p);
      end
    end
    for (int i = 0; i < 30000; i++) begin
      s = 1'($urandom);
      r = 7'($urandom_range(0, 28) - 14);
      e = 2'($urandom);
      f = 9'($urandom);
      @(negedge clk);
      sc = 4 * int'(r) + int'(e);
      if (s) sc = -(sc + 1);
      v  = (s ? (real'(f) / 512.0 - 2.0) : (1.0 + real'(f) / 512.0)) * (2.0 ** sc);
      ex = encode(v, 11);
      checks++;
      if (p !== 11'(ex)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b r=%0d e=%0d f=%h got %h exp %h", s, r, e, f, p, ex);
      end
      minv = conv_value(s ? 16'h401 : 16'h001, 11);
      checks++;
      if (clamped !== ((!s && v < minv) || (s && v < minv) || int'(r) >= 9)) begin
        failures++;
        if (failures < 10) $display("FAIL clamped s=%b r=%0d", s, r);
      end
      if (clamped) n_clamp++;
    end
    checks++;
    if (n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
