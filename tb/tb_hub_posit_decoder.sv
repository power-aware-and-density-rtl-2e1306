// Testbench of the HUB posit decoder. The Posit6 decoder is checked on the
// eight example words of the HUB column of the conventional/HUB comparison
// table (r, e, f), then on all 64 words and a Posit11 instance on all 2048
// words against the bit-serial reference decode of posit_ref_pkg (regime,
// exponent, fraction with the iLSB). The live-fraction width and the
// regime-terminated flag are checked against their definitions.
module tb_hub_posit_decoder;
  import posit_ref_pkg::*;

  logic              clk = 1'b0;
  logic [5:0]        p6;
  logic              s6, t6;
  logic signed [3:0] r6;
  logic [1:0]        e6, f6;
  logic [2:0]        k6;
  logic [1:0]        a6;
  logic [10:0]       p11;
  logic              s11, t11;
  logic signed [4:0] r11;
  logic [1:0]        e11;
  logic [6:0]        f11;
  logic [3:0]        k11;
  logic [2:0]        a11;
  int checks = 0, failures = 0;

  hub_posit_decoder dut6 (.p(p6), .s(s6), .r(r6), .e(e6), .f(f6), .k(k6),
                          .fw_act(a6), .term(t6));
  hub_posit_decoder #(.N(11)) dut11 (.p(p11), .s(s11), .r(r11), .e(e11), .f(f11),
                                     .k(k11), .fw_act(a11), .term(t11));

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

  // Live fraction bits: from the top of f down to the last nonzero bit
  // that the stored bits or the iLSB can set.
  function automatic int live(input int n, input int k);
    return (k <= n - 4) ? n - 3 - k : 0;
  endfunction

  // HUB columns of the table: word, r, e, f*4. The row 100001 expects e = 2:
  // its iLSB follows the regime terminator and becomes the exponent's top
  // bit, as it does for 000011 and 111101.
  localparam int TBL [8][4] = '{'{6'b000011, -3, 3, 0}, '{6'b001011, -1, 1, 3},
                                '{6'b010000,  0, 0, 1}, '{6'b011111,  5, 0, 0},
                                '{6'b100001, -4, 2, 0}, '{6'b110000,  0, 0, 1},
                                '{6'b110101,  0, 2, 3}, '{6'b111101,  2, 3, 0}};

  initial begin
    int r, e, sc, k;
    real f, v;
    for (int i = 0; i < 8; i++) begin
      p6 = 6'(TBL[i][0]);
      @(negedge clk);
      expect_eq(int'(r6), TBL[i][1], $sformatf("table r %b", p6));
      expect_eq(int'(e6), TBL[i][2], $sformatf("table e %b", p6));
      expect_eq(int'(f6), TBL[i][3], $sformatf("table f %b", p6));
    end
    for (int w = 0; w < 64; w++) begin
      p6 = 6'(w);
      @(negedge clk);
      decode(16'(w), 6, 1'b1, r, e, f, sc, v);
      k = (r >= 0) ? r + 1 : -r;
      expect_eq(int'(s6), w >> 5, "s6");
      expect_eq(int'(r6), r, $sformatf("r6 %b", p6));
      expect_eq(int'(e6), e, $sformatf("e6 %b", p6));
      expect_eq(int'(f6), int'(f * 4.0), $sformatf("f6 %b", p6));
      expect_eq(int'(k6), k, $sformatf("k6 %b", p6));
      expect_eq(int'(t6), int'(k <= 4), $sformatf("t6 %b", p6));
      expect_eq(int'(a6), live(6, k), $sformatf("fw_act6 %b", p6));
    end
    for (int w = 0; w < 2048; w++) begin
      p11 = 11'(w);
      @(negedge clk);
      decode(16'(w), 11, 1'b1, r, e, f, sc, v);
      k = (r >= 0) ? r + 1 : -r;
      expect_eq(int'(r11), r, $sformatf("r11 %b", p11));
      expect_eq(int'(e11), e, $sformatf("e11 %b", p11));
      expect_eq(int'(f11), int'(f * 128.0), $sformatf("f11 %b", p11));
      expect_eq(int'(a11), live(11, k), $sformatf("fw_act11 %b", p11));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
