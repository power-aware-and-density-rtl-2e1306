// Testbench of the exponent equalizer at Posit(11,2) widths. Random operand
// pairs (scales in the Posit11 range, significands {s, ~s, f} whose fraction
// has fw live bits ending in the iLSB) are applied; the expected aligned
// smaller operand is floor(value / 2^d) in units of half the adder's last
// place, computed with real arithmetic, or zero when d exceeds the 9-bit
// significand. Also checked: the larger operand and its scale, the guard
// bit, the excess flag, and that no bit below lsb_pos is set in either
// aligned operand while lsb_pos does not lie above the larger operand's iLSB.
module tb_exponent_equalizer;
  logic              clk = 1'b0;
  logic signed [8:0] scale_a, scale_b, scale_big;
  logic [8:0]        sig_a, sig_b;
  logic [2:0]        fw_a, fw_b;
  logic [9:0]        big_sig, small_sig;
  logic              guard, excess;
  logic [4:0]        lsb_pos;
  int checks = 0, failures = 0, n_excess = 0, n_guard = 0;

  exponent_equalizer dut (
    .scale_a(scale_a), .sig_a(sig_a), .fw_a(fw_a),
    .scale_b(scale_b), .sig_b(sig_b), .fw_b(fw_b),
    .scale_big(scale_big), .big_sig(big_sig), .small_sig(small_sig),
    .guard(guard), .lsb_pos(lsb_pos), .excess(excess)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Random significand with fw live fraction bits, the last of them the iLSB.
  function automatic logic [8:0] rand_sig(input logic s, input int fw);
    logic [6:0] f;
    f = 7'($urandom);
    for (int i = 0; i < 7; i++) if (i < 7 - fw) f[i] = 1'b0;
    if (fw > 0) f[7 - fw] = 1'b1;
    return {s, ~s, f};
  endfunction

  initial begin
    int d, big_is_a, ssig, bsig, exp_al, pb, fws, fwb;
    real q;
    for (int i = 0; i < 50000; i++) begin
      fw_a    = 3'($urandom_range(0, 7));
      fw_b    = 3'($urandom_range(0, 7));
      scale_a = 9'($urandom_range(0, 88) - 44);
      scale_b = (i % 3 == 0) ? 9'(int'(scale_a) + $urandom_range(0, 4) - 2)
                             : 9'($urandom_range(0, 88) - 44);
      sig_a   = rand_sig(1'($urandom), int'(fw_a));
      sig_b   = rand_sig(1'($urandom), int'(fw_b));
      @(negedge clk);
      big_is_a = (scale_a >= scale_b);
      d    = big_is_a ? scale_a - scale_b : scale_b - scale_a;
      bsig = big_is_a ? int'(signed'(sig_a)) : int'(signed'(sig_b));
      ssig = big_is_a ? int'(signed'(sig_b)) : int'(signed'(sig_a));
      fwb  = big_is_a ? int'(fw_a) : int'(fw_b);
      fws  = big_is_a ? int'(fw_b) : int'(fw_a);
      q    = $floor((2.0 * ssig) / (2.0 ** d));
      exp_al = (d > 9) ? 0 : int'(q);
      expect_eq(int'(scale_big), big_is_a ? int'(scale_a) : int'(scale_b), "scale_big");
      expect_eq(int'(signed'(big_sig)), bsig, "big_sig");
      expect_eq(int'(signed'({small_sig, guard})), exp_al, $sformatf("aligned d=%0d", d));
      expect_eq(int'(excess), int'(d > 9 && ssig < 0), "excess");
      if (excess) n_excess++;
      if (guard) n_guard++;
      checks++;
      if (int'(lsb_pos) > 7 - fwb) failures++;
      for (int bit_i = 0; bit_i < 10; bit_i++)
        if (bit_i < int'(lsb_pos)) begin
          checks++;
          if (big_sig[bit_i] || small_sig[bit_i]) begin
            failures++;
            if (failures < 20) $display("FAIL live bit %0d below lsb_pos %0d", bit_i, lsb_pos);
          end
        end
      // The lowest live bit of the smaller operand, when inside the adder,
      // bounds lsb_pos from above.
      if (d <= 9 && 7 - fws - d >= 0) expect_eq(int'(lsb_pos <= 7 - fws - d), 1, "lsb_pos small");
    end
    checks++;
    if (n_excess == 0 || n_guard == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
