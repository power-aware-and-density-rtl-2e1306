// Testbench of the Posit11 decoder (two HUB Posit6 decoders on the halves).
// First the two operands of the reference simulation, a = 613 and b = 6bd
// (hex), whose half decodes are known: regimes 0, 0, 0, 2 and exponents
// 0, 1, 2, 3 for a1, a2, b1, b2. Then all 2048 words: each half must be the
// reference HUB Posit6 decode of {sign, half}, and zero/NaR must be flagged.
module tb_posit11_decoder;
  import posit_hub_pkg::*;
  import posit_ref_pkg::*;

  logic        clk = 1'b0;
  logic [10:0] p;
  logic        s, is_zero, is_nar;
  hub_dec6_t   h1, h2;
  logic [9:0]  body;
  int checks = 0, failures = 0;

  posit11_decoder dut (.p(p), .s(s), .h1(h1), .h2(h2), .body(body),
                       .is_zero(is_zero), .is_nar(is_nar));

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

  task automatic check_half(input hub_dec6_t h, input logic [5:0] w, input string nm);
    int r, e, sc;
    real f, v;
    decode(16'(w), 6, 1'b1, r, e, f, sc, v);
    expect_eq(int'(h.r), r, $sformatf("%s r %b", nm, w));
    expect_eq(int'(h.e), e, $sformatf("%s e %b", nm, w));
    expect_eq(int'(h.f), int'(f * 4.0), $sformatf("%s f %b", nm, w));
  endtask

  initial begin
    p = 11'h613;
    @(negedge clk);
    expect_eq(int'(s), 1, "sig_a");
    expect_eq(int'(h1.r), 0, "r_hub_a1");
    expect_eq(int'(h2.r), 0, "r_hub_a2");
    expect_eq(int'(h1.e), 0, "e_hub_a1");
    expect_eq(int'(h2.e), 1, "e_hub_a2");
    p = 11'h6bd;
    @(negedge clk);
    expect_eq(int'(s), 1, "sig_b");
    expect_eq(int'(h1.r), 0, "r_hub_b1");
    expect_eq(int'(h2.r), 2, "r_hub_b2");
    expect_eq(int'(h1.e), 2, "e_hub_b1");
    expect_eq(int'(h2.e), 3, "e_hub_b2");
    for (int w = 0; w < 2048; w++) begin
      p = 11'(w);
      @(negedge clk);
      expect_eq(int'(s), w >> 10, "s");
      expect_eq(int'(body), w & 1023, "body");
      expect_eq(int'(is_zero), int'(w == 0), "zero");
      expect_eq(int'(is_nar), int'(w == 1024), "nar");
      check_half(h1, {p[10], p[9:5]}, "h1");
      check_half(h2, {p[10], p[4:0]}, "h2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
