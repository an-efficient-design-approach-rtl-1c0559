// dwt_1d: 1D discrete wavelet transform, CDF 9/7 lifting scheme, one
// even/odd sample pair per enabled clock.
//
// With e[n] = x[2n] and o[n] = x[2n+1] the four lifting steps are
//   predict 1  d1[n] = o[n]  + alpha * (e[n]   + e[n+1])
//   update 1   s1[n] = e[n]  + beta  * (d1[n-1] + d1[n])
//   predict 2  d2[n] = d1[n] + gamma * (s1[n]  + s1[n+1])
//   update 2   s2[n] = s1[n] + delta * (d2[n-1] + d2[n])
// followed by scaling: low[n] = K * s2[n], high[n] = d2[n] / K.
// Each step is a lift_step (adder, delay register, coefficient multiplier,
// adder), the chain of four steps and the two scaling multipliers is the
// structure of the design; delay_lines realign each bypass operand.
//
// Number format: samples enter as IN_W-bit integers (unsigned 8-bit pixels
// by default, or signed coefficients when IN_SIGNED is set, as in the
// column pass of the 2D transform) and are carried as DW-bit
// two's-complement numbers with FRAC fraction bits; the outputs are
// rounded to integers and saturated to OUT_W signed bits. Widths, rounding
// and the zero value of samples before the first and after the last input
// pair (the stream is zero-padded) are this design's choices.
//
// Timing: all registers advance only while en is high. The pair presented
// with enable number t produces low/high for pair t - LATENCY, visible on
// lout/hout while enable number t is presented; LATENCY = dwt_latency(MULT)
// (7 with Vedic cores, 12 with pipelined Wallace-tree cores). Active-low
// asynchronous reset clears every register.
module dwt_1d
  import dwt_pkg::*;
#(
  parameter mult_kind_e MULT  = MULT_VEDIC,
  parameter int         DW    = 16,
  parameter int         FRAC  = 4,
  parameter int         OUT_W = 10,
  parameter int         IN_W  = 8,
  parameter bit         IN_SIGNED = 1'b0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [IN_W-1:0]         even_in,
  input  logic [IN_W-1:0]         odd_in,
  output logic signed [OUT_W-1:0] lout,
  output logic signed [OUT_W-1:0] hout
);
  localparam int L = mult_latency(MULT);

  logic signed [DW-1:0] e, o, o_d;
  logic signed [DW-1:0] d1, s1, d2, s2;
  logic signed [DW-1:0] e_d, d1_d, s1_d, d2_d;
  logic signed [OUT_W-1:0] lo_w, hi_w;

  always_comb begin
    if (IN_SIGNED) begin
      e = DW'($signed(even_in)) <<< FRAC;
      o = DW'($signed(odd_in))  <<< FRAC;
    end else begin
      e = DW'({even_in, FRAC'(0)});
      o = DW'({odd_in,  FRAC'(0)});
    end
  end

  // Predict 1 (alpha): the odd sample waits one pair for e[n+1].
  delay_line #(.W(DW), .N(1)) u_r_odd (.clk, .rst_n, .en, .d(o), .q(o_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(ALPHA_MAG), .COEF_SHIFT(ALPHA_SH),
              .COEF_NEG(ALPHA_NEG))
    u_alpha (.clk, .rst_n, .en, .x_in(e), .y_in(o_d), .z_out(d1));

  // Update 1 (beta)
  delay_line #(.W(DW), .N(L + 2)) u_r_even (.clk, .rst_n, .en, .d(e), .q(e_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(BETA_MAG), .COEF_SHIFT(BETA_SH),
              .COEF_NEG(BETA_NEG))
    u_beta (.clk, .rst_n, .en, .x_in(d1), .y_in(e_d), .z_out(s1));

  // Predict 2 (gamma)
  delay_line #(.W(DW), .N(L + 2)) u_r_d1 (.clk, .rst_n, .en, .d(d1), .q(d1_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(GAMMA_MAG), .COEF_SHIFT(GAMMA_SH),
              .COEF_NEG(GAMMA_NEG))
    u_gamma (.clk, .rst_n, .en, .x_in(s1), .y_in(d1_d), .z_out(d2));

  // Update 2 (delta)
  delay_line #(.W(DW), .N(L + 2)) u_r_s1 (.clk, .rst_n, .en, .d(s1), .q(s1_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(DELTA_MAG), .COEF_SHIFT(DELTA_SH),
              .COEF_NEG(DELTA_NEG))
    u_delta (.clk, .rst_n, .en, .x_in(d2), .y_in(s1_d), .z_out(s2));

  // Scaling (low band) and inverse scaling (high band); the shift also drops
  // the FRAC fraction bits with rounding.
  delay_line #(.W(DW), .N(L + 1)) u_r_d2 (.clk, .rst_n, .en, .d(d2), .q(d2_d));

  coef_mult #(.MULT(MULT), .IN_W(DW + 1), .OUT_W(OUT_W), .COEF_MAG(KSC_MAG),
              .COEF_SHIFT(KSC_SH + FRAC), .COEF_NEG(1'b0))
    u_scale (.clk, .rst_n, .en, .x((DW+1)'(s2)), .y(lo_w));
  coef_mult #(.MULT(MULT), .IN_W(DW + 1), .OUT_W(OUT_W), .COEF_MAG(KINV_MAG),
              .COEF_SHIFT(KINV_SH + FRAC), .COEF_NEG(1'b0))
    u_iscale (.clk, .rst_n, .en, .x((DW+1)'(d2_d)), .y(hi_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lout <= '0;
      hout <= '0;
    end else if (en) begin
      lout <= lo_w;
      hout <= hi_w;
    end
  end
endmodule
