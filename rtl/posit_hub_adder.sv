// HUB posit adder, Posit(N, 2), N = 11 by default.
//
// HUB (half-unit biased) posits append an implicit 1 below the last stored
// bit, so every word stands for the midpoint of the interval that plain
// truncation maps onto it. Truncating is then rounding to nearest, and the
// adder needs no round, guard or sticky logic and no rounding increment.
//
// Datapath, all combinational up to the output register:
//   1. decode: for N = 11 each operand goes through posit11_decoder (two
//      HUB Posit6 decoders on the 5-bit halves) and regime_exponent (merge
//      of the halves, scale factor and two's complement significand); for
//      any other N a single hub_posit_decoder is used;
//   2. exponent_equalizer: larger scale wins, the other significand is
//      shifted right (a negative operand shifted out completely becomes 0);
//   3. mantissa_neutralizer: adder segments below the lowest live bit, known
//      from the regime lengths, are switched off;
//   4. csla_bec: square-root carry-select adder with excess-1 converters
//      adds the two N-1 bit significands;
//   5. hub_normalizer: the bit lost in alignment is appended, the sum is
//      normalized and its scale split into regime and exponent;
//   6. hub_posit_encoder: packing by truncation, saturating at maxpos and
//      minpos.
// Zero (all zeros) and NaR (1 then zeros) follow the usual posit rules:
// NaR in gives NaR, a zero operand gives the other operand, and an exact
// zero sum gives zero; these rules and the register stage are this design's
// choices.
//
// Interface: a, b and in_valid are sampled on the rising clock edge; result,
// flags and out_valid appear one cycle later (latency 1, one addition per
// cycle). rst_n is synchronous and active low and clears out_valid, result
// and flags. flags tells which special mechanisms acted on the result.
module posit_hub_adder
  import posit_hub_pkg::*;
#(
  parameter int N = 11,
  localparam int FW  = N - ES - 2,
  localparam int SW  = FW + 2,
  localparam int AW  = SW + 1,
  localparam int SCW = scale_w(N),
  localparam int RIW = SCW - ES,
  localparam int AWW = $clog2(FW + 1),
  localparam int LW  = $clog2(AW) + 1,
  localparam int NG  = num_grps(AW)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] result,
  output add_flags_t   flags
);
  localparam logic [N-1:0] NAR = {1'b1, {(N-1){1'b0}}};

  logic signed [SCW-1:0] scale_a, scale_b;
  logic [SW-1:0]         sig_a, sig_b;
  logic [AWW-1:0]        fw_a, fw_b;
  logic                  a_zero, b_zero, a_nar, b_nar;

  // ---- 1. decode -------------------------------------------------------
  if (N == 11) begin : g_p11
    logic      sa, sb;
    hub_dec6_t a1, a2, b1, b2;
    logic [9:0] body_a, body_b;
    logic signed [4:0] ra, rb;
    logic [1:0] ea, eb;
    logic [6:0] fa, fb;

    posit11_decoder u_dec_a (.p(a), .s(sa), .h1(a1), .h2(a2), .body(body_a),
                             .is_zero(a_zero), .is_nar(a_nar));
    posit11_decoder u_dec_b (.p(b), .s(sb), .h1(b1), .h2(b2), .body(body_b),
                             .is_zero(b_zero), .is_nar(b_nar));
    regime_exponent u_re_a (.s(sa), .h1(a1), .h2(a2), .body(body_a), .r(ra),
                            .e(ea), .f(fa), .fw_act(fw_a), .scale(scale_a),
                            .sig(sig_a));
    regime_exponent u_re_b (.s(sb), .h1(b1), .h2(b2), .body(body_b), .r(rb),
                            .e(eb), .f(fb), .fw_act(fw_b), .scale(scale_b),
                            .sig(sig_b));
  end else begin : g_pn
    logic sa, sb;
    logic signed [$clog2(N):0] ra, rb;
    logic [ES-1:0] ea, eb;
    logic [FW-1:0] fa, fb;

    hub_posit_decoder #(.N(N), .ES(ES)) u_dec_a (
      .p(a), .s(sa), .r(ra), .e(ea), .f(fa), .k(), .fw_act(fw_a), .term()
    );
    hub_posit_decoder #(.N(N), .ES(ES)) u_dec_b (
      .p(b), .s(sb), .r(rb), .e(eb), .f(fb), .k(), .fw_act(fw_b), .term()
    );
    assign scale_a = ((SCW'(ra) <<< ES) + SCW'(signed'({1'b0, ea}))) ^ {SCW{sa}};
    assign scale_b = ((SCW'(rb) <<< ES) + SCW'(signed'({1'b0, eb}))) ^ {SCW{sb}};
    assign sig_a   = {sa, ~sa, fa};
    assign sig_b   = {sb, ~sb, fb};
    assign a_zero  = (a == '0);
    assign b_zero  = (b == '0);
    assign a_nar   = (a == NAR);
    assign b_nar   = (b == NAR);
  end

  // ---- 2. exponent equalizer -------------------------------------------
  logic signed [SCW-1:0] scale_big;
  logic [AW-1:0]         big_sig, small_sig;
  logic                  guard, excess;
  logic [LW-1:0]         lsb_pos;

  exponent_equalizer #(.N(N)) u_eq (
    .scale_a(scale_a), .sig_a(sig_a), .fw_a(fw_a),
    .scale_b(scale_b), .sig_b(sig_b), .fw_b(fw_b),
    .scale_big(scale_big), .big_sig(big_sig), .small_sig(small_sig),
    .guard(guard), .lsb_pos(lsb_pos), .excess(excess)
  );

  // ---- 3. mantissa neutralizer -----------------------------------------
  logic [AW-1:0] add_a, add_b;
  logic [NG-1:0] seg_en;

  mantissa_neutralizer #(.WIDTH(AW)) u_neut (
    .a_in(big_sig), .b_in(small_sig), .lsb_pos(lsb_pos),
    .a_out(add_a), .b_out(add_b), .seg_en(seg_en)
  );

  // ---- 4. mantissa addition --------------------------------------------
  logic [AW-1:0] sum;

  csla_bec #(.WIDTH(AW)) u_add (
    .a(add_a), .b(add_b), .cin(1'b0), .sum(sum), .cout()
  );

  // ---- 5. normalization ------------------------------------------------
  logic                  s_r, zero_r, cancel;
  logic signed [RIW-1:0] r_r;
  logic [ES-1:0]         e_r;
  logic [AW-2:0]         frac_r;

  hub_normalizer #(.N(N)) u_norm (
    .sum(sum), .guard(guard), .scale_big(scale_big), .s(s_r), .r(r_r),
    .e(e_r), .frac(frac_r), .zero(zero_r), .cancel(cancel)
  );

  // ---- 6. encoding -----------------------------------------------------
  logic [N-1:0] packed_r;
  logic         clamped;

  hub_posit_encoder #(.N(N), .FIW(AW - 1)) u_enc (
    .s(s_r), .r(r_r), .e(e_r), .f(frac_r), .p(packed_r), .clamped(clamped)
  );

  // ---- special values and output register --------------------------------
  logic [N-1:0] res_d;
  add_flags_t   flags_d;

  always_comb begin
    flags_d = '0;
    if (a_nar || b_nar) begin
      res_d       = NAR;
      flags_d.nar = 1'b1;
    end else if (a_zero || b_zero) begin
      res_d        = a_zero ? b : a;
      flags_d.zero = (res_d == '0);
    end else if (zero_r) begin
      res_d        = '0;
      flags_d.zero = 1'b1;
    end else begin
      res_d                = packed_r;
      flags_d.excess_shift = excess;
      flags_d.cancel       = cancel;
      flags_d.seg_gated    = ~&seg_en;
      flags_d.clamped      = clamped;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        result <= res_d;
        flags  <= flags_d;
      end
    end
  end
endmodule
