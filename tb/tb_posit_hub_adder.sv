// End-to-end testbench of the HUB posit adder at its default size, Posit(11,2).
//
// Streams one operand pair per cycle (directed corner cases, then random
// pairs, then pairs picked to reach each special mechanism) and compares
// every result, one cycle later, with the reference model of posit_ref_pkg.
// It checks the one-cycle latency through out_valid, and counts how often
// each mechanism of the adder acted (negative operand shifted out entirely,
// cancellation with the discarded bit put back, gated adder segments,
// saturation, zero and NaR results, and regimes running from the first
// 5-bit half into the second); a mechanism that never occurs is a failure.
module tb_posit_hub_adder;
  import posit_hub_pkg::*;
  import posit_ref_pkg::*;

  localparam int N = 11;
  localparam int NRAND = 200000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [N-1:0] a, b;
  logic         out_valid;
  logic [N-1:0] result;
  add_flags_t   flags;

  posit_hub_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .result(result), .flags(flags)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_excess = 0, n_cancel = 0, n_gated = 0, n_clamp = 0, n_zero = 0;
  int n_nar = 0, n_span = 0, n_mixed = 0;
  longint cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (NRAND + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected results travel with the cycle in which the pair was applied.
  logic [N-1:0] exp_q[$];
  logic [N-1:0] a_q[$], b_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [N-1:0] ex, aa, bb;
      ex = exp_q.pop_front();
      aa = a_q.pop_front();
      bb = b_q.pop_front();
      checks++;
      if (result !== ex) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%h b=%h got=%h exp=%h", aa, bb, result, ex);
      end
      if (flags.excess_shift) n_excess++;
      if (flags.cancel)       n_cancel++;
      if (flags.seg_gated)    n_gated++;
      if (flags.clamped)      n_clamp++;
      if (flags.zero)         n_zero++;
      if (flags.nar)          n_nar++;
    end
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    @(negedge clk);
    a = x;
    b = y;
    in_valid = 1'b1;
    exp_q.push_back(N'(add(16'(x), 16'(y), N)));
    a_q.push_back(x);
    b_q.push_back(y);
    if (x[9:5] == 5'b11111 || x[9:5] == 5'b00000) n_span++;
    if (x[N-1] != y[N-1]) n_mixed++;
  endtask

  initial begin
    logic [N-1:0] x, y;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Latency: one pair, then idle; out_valid must follow one cycle later.
    @(negedge clk);
    a = 11'h613; b = 11'h6bd; in_valid = 1'b1;
    exp_q.push_back(N'(add(16'h613, 16'h6bd, N)));
    a_q.push_back(11'h613); b_q.push_back(11'h6bd);
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (out_valid !== 1'b1) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid held"); end

    // Directed cases: zero, NaR, x + (-x), maxpos + maxpos, minpos + minpos.
    apply(11'h000, 11'h123);
    apply(11'h400, 11'h123);
    apply(11'h1a5, 11'h000);
    apply(11'h3ff, 11'h3ff);
    apply(11'h001, 11'h001);
    apply(11'h7ff, 11'h7ff);
    apply(11'h200, 11'h600);   // 1 + (-1)
    apply(11'h200, 11'h200);   // 1 + 1

    // Random pairs.
    for (int i = 0; i < NRAND; i++) apply(N'($urandom), N'($urandom));

    // A large positive value and a tiny negative one: the negative operand
    // is shifted past its whole significand.
    for (int i = 0; i < 200; i++) begin
      x = {1'b0, 4'b1110, 6'($urandom)};
      y = {1'b1, 3'b000, 7'($urandom)};
      apply(x, y);
    end
    // Close values of opposite sign: cancellation.
    for (int i = 0; i < 2000; i++) begin
      x = {1'b0, 10'($urandom)};
      y = {1'b1, 10'(~x[9:0] + 10'($urandom_range(0, 3)))};
      apply(x, y);
    end

    // Sweep of the words nearest zero and nearest NaR (the smallest and
    // largest magnitudes), against each other: saturation at both ends.
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        x = (i < 64) ? N'(i) : N'(11'h7c0 + i - 64);
        y = (j < 64) ? N'(11'h3c0 + j) : N'(11'h400 + j - 64);
        apply(x, y);
      end

    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("mechanisms: excess_shift=%0d cancel=%0d seg_gated=%0d clamped=%0d zero=%0d nar=%0d regime_span=%0d mixed_signs=%0d",
             n_excess, n_cancel, n_gated, n_clamp, n_zero, n_nar, n_span, n_mixed);
    checks++; if (n_excess == 0) begin failures++; $display("FAIL excess shift never seen"); end
    checks++; if (n_cancel == 0) begin failures++; $display("FAIL cancellation never seen"); end
    checks++; if (n_gated  == 0) begin failures++; $display("FAIL segment gating never seen"); end
    checks++; if (n_clamp  == 0) begin failures++; $display("FAIL saturation never seen"); end
    checks++; if (n_zero   == 0) begin failures++; $display("FAIL zero result never seen"); end
    checks++; if (n_nar    == 0) begin failures++; $display("FAIL NaR never seen"); end
    checks++; if (n_span   == 0) begin failures++; $display("FAIL regime span never seen"); end
    checks++; if (n_mixed  == 0) begin failures++; $display("FAIL mixed signs never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
