// Testbench of the normalizer at Posit(11,2) widths. For random adder outputs,
// guard bits and scales the value before normalization,
// {sum, guard} * 2^(scale_big - 8), must equal the value the outputs stand
// for, ((1-3s) + frac/512) * 2^scale with scale = (-1)^s (4r + e + s); an
// all-zero input must raise zero; cancel must be set exactly when the guard
// bit is 1 and the normalization shift is 2 or more.
module tb_hub_normalizer;
  logic              clk = 1'b0;
  logic [9:0]        sum;
  logic              guard;
  logic signed [8:0] scale_big;
  logic              s, zero, cancel;
  logic signed [6:0] r;
  logic [1:0]        e;
  logic [8:0]        frac;
  int checks = 0, failures = 0, n_cancel = 0;

  hub_normalizer dut (.sum(sum), .guard(guard), .scale_big(scale_big), .s(s),
                      .r(r), .e(e), .frac(frac), .zero(zero), .cancel(cancel));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, sc, shift;
    real vin, vout;
    for (int i = 0; i < 40000; i++) begin
      // One in four inputs is close to zero (small positive or negative),
      // the case after a cancellation.
      sum = 10'($urandom);
      if (i % 4 == 0) sum = sum[9] ? (10'h3fc | 10'(sum[1:0])) : 10'(sum[1:0]);
      guard = 1'($urandom);
      if (i == 5) begin sum = '0; guard = 1'b0; end
      scale_big = 9'($urandom_range(0, 88) - 44);
      @(negedge clk);
      t   = int'(signed'({sum, guard}));
      sc  = int'(scale_big) - 8;
      vin = real'(t) * (2.0 ** sc);
      checks++;
      if (zero !== (t == 0)) failures++;
      if (t != 0) begin
        sc   = s ? -(4 * int'(r) + int'(e) + 1) : 4 * int'(r) + int'(e);
        vout = (s ? (real'(frac) / 512.0 - 2.0) : (1.0 + real'(frac) / 512.0)) * (2.0 ** sc);
        checks++;
        if (vout != vin || s !== (t < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL sum=%b g=%b sc=%0d got %f exp %f", sum, guard, scale_big, vout, vin);
        end
        shift = int'(scale_big) + 1 - sc;
        checks++;
        if (cancel !== (guard && shift >= 2)) failures++;
        if (cancel) n_cancel++;
      end
    end
    checks++;
    if (n_cancel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
