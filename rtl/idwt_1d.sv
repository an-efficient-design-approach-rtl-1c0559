// idwt_1d: inverse 1D discrete wavelet transform (9/7 lifting run
// backwards), rebuilding one even/odd pixel pair per enabled clock from a
// low/high coefficient pair.
//
// The forward steps are undone in reverse order with the signs of the
// coefficients flipped:
//   s2[n] = low[n] / K          d2[n] = high[n] * K
//   s1[n] = s2[n] - delta * (d2[n-1] + d2[n])
//   d1[n] = d2[n] - gamma * (s1[n]   + s1[n+1])
//   e[n]  = s1[n] - beta  * (d1[n-1] + d1[n])
//   o[n]  = d1[n] - alpha * (e[n]    + e[n+1])
// and the even/odd samples are rounded and clamped to 8-bit pixels. It uses
// the same lift_step and coef_mult units (Vedic or Wallace-tree cores) as
// the forward engine. The design says the same lifting process is repeated
// to recover the ROI; this engine's structure, number format and latency
// are this design's.
//
// Timing: registers advance only while en is high. The coefficient pair
// presented with enable number t yields pixel pair t - LATENCY, visible on
// even_out/odd_out while enable number t is presented, with
// LATENCY = idwt_latency(MULT) (8 Vedic, 13 Wallace-tree). Reconstruction
// is exact up to the rounding of coefficients and pixels when the input is
// the forward engine's complete output stream, including the few
// coefficients just outside the picture that its zero padding produces.
module idwt_1d
  import dwt_pkg::*;
#(
  parameter mult_kind_e MULT  = MULT_VEDIC,
  parameter int         DW    = 16,
  parameter int         FRAC  = 4,
  parameter int         IN_W  = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [IN_W-1:0] lin,
  input  logic signed [IN_W-1:0] hin,
  output logic [7:0]             even_out,
  output logic [7:0]             odd_out
);
  localparam int L = mult_latency(MULT);

  logic signed [DW:0]   lfix, hfix;
  logic signed [DW-1:0] s2_w, d2_w, s2, d2;
  logic signed [DW-1:0] s1, d1, e, o;
  logic signed [DW-1:0] d2_d, s1_d, d1_d, e_d;

  always_comb begin
    lfix = (DW+1)'(lin) <<< FRAC;
    hfix = (DW+1)'(hin) <<< FRAC;
  end

  // Undo the scaling: low * (1/K), high * K, registered.
  coef_mult #(.MULT(MULT), .IN_W(DW + 1), .OUT_W(DW), .COEF_MAG(KINV_MAG),
              .COEF_SHIFT(KINV_SH), .COEF_NEG(1'b0))
    u_unscale_lo (.clk, .rst_n, .en, .x(lfix), .y(s2_w));
  coef_mult #(.MULT(MULT), .IN_W(DW + 1), .OUT_W(DW), .COEF_MAG(KSC_MAG),
              .COEF_SHIFT(KSC_SH), .COEF_NEG(1'b0))
    u_unscale_hi (.clk, .rst_n, .en, .x(hfix), .y(d2_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2 <= '0;
      d2 <= '0;
    end else if (en) begin
      s2 <= s2_w;
      d2 <= d2_w;
    end
  end

  // Undo update 2 (delta): both operands already aligned.
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(DELTA_MAG), .COEF_SHIFT(DELTA_SH),
              .COEF_NEG(!DELTA_NEG))
    u_delta (.clk, .rst_n, .en, .x_in(d2), .y_in(s2), .z_out(s1));

  // Undo predict 2 (gamma)
  delay_line #(.W(DW), .N(L + 2)) u_r_d2 (.clk, .rst_n, .en, .d(d2), .q(d2_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(GAMMA_MAG), .COEF_SHIFT(GAMMA_SH),
              .COEF_NEG(!GAMMA_NEG))
    u_gamma (.clk, .rst_n, .en, .x_in(s1), .y_in(d2_d), .z_out(d1));

  // Undo update 1 (beta)
  delay_line #(.W(DW), .N(L + 2)) u_r_s1 (.clk, .rst_n, .en, .d(s1), .q(s1_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(BETA_MAG), .COEF_SHIFT(BETA_SH),
              .COEF_NEG(!BETA_NEG))
    u_beta (.clk, .rst_n, .en, .x_in(d1), .y_in(s1_d), .z_out(e));

  // Undo predict 1 (alpha)
  delay_line #(.W(DW), .N(L + 2)) u_r_d1 (.clk, .rst_n, .en, .d(d1), .q(d1_d));
  lift_step #(.MULT(MULT), .DW(DW), .COEF_MAG(ALPHA_MAG), .COEF_SHIFT(ALPHA_SH),
              .COEF_NEG(!ALPHA_NEG))
    u_alpha (.clk, .rst_n, .en, .x_in(e), .y_in(d1_d), .z_out(o));

  delay_line #(.W(DW), .N(L + 2)) u_r_e (.clk, .rst_n, .en, .d(e), .q(e_d));

  // Round to integer pixels and clamp to 0..255.
  function automatic logic [7:0] to_pixel(logic signed [DW-1:0] v);
    logic signed [DW:0] r;
    r = ((DW+1)'(v) + (DW+1)'(1 << (FRAC - 1))) >>> FRAC;
    if (r < 0)         return 8'd0;
    else if (r > 255)  return 8'd255;
    else               return 8'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      even_out <= '0;
      odd_out  <= '0;
    end else if (en) begin
      even_out <= to_pixel(e_d);
      odd_out  <= to_pixel(o);
    end
  end
endmodule
