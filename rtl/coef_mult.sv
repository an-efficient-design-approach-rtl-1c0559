// coef_mult: multiplies a signed lifting value by one fixed 9/7 coefficient
// on 8x8 unsigned multiplier cores (Vedic or Wallace-tree).
//
// The input is split into sign and magnitude; the magnitude is cut into
// bytes, each byte is multiplied by the 8-bit coefficient mantissa on its
// own 8x8 core, and the byte products are added at their weights. The sum
// is rounded (half away from zero), shifted right by COEF_SHIFT, given the
// sign (input sign xor coefficient sign) and saturated to OUT_W bits.
// The design states that the coefficient products use 8x8 Wallace-tree or
// Vedic multipliers; the sign-magnitude split, byte slicing, rounding and
// saturation are this design's choices.
// Latency: mult_latency(MULT) en-qualified clocks (0 for Vedic, 1 for
// Wallace-tree). Reset is active-low, asynchronous.
module coef_mult
  import dwt_pkg::*;
#(
  parameter mult_kind_e MULT       = MULT_VEDIC,
  parameter int         IN_W       = 17,
  parameter int         OUT_W      = 16,
  parameter logic [7:0] COEF_MAG   = ALPHA_MAG,
  parameter int         COEF_SHIFT = ALPHA_SH,
  parameter bit         COEF_NEG   = ALPHA_NEG
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  localparam int LAT  = mult_latency(MULT);
  localparam int MW   = IN_W - 1;              // magnitude width
  localparam int NB   = (MW + 7) / 8;          // bytes of magnitude
  localparam int PW   = 8 * NB + 8;            // full product width
  localparam logic [PW-1:0] RND = (COEF_SHIFT > 0) ? (PW'(1) << (COEF_SHIFT - 1)) : '0;
  localparam logic signed [OUT_W:0] YMAX = (OUT_W+1)'((1 << (OUT_W - 1)) - 1);

  logic              sgn, sgn_d;
  logic [MW-1:0]     mag;
  logic [8*NB-1:0]   mag_x;
  logic [15:0]       bp [NB];
  logic [PW-1:0]     full, scaled;
  logic signed [OUT_W:0] val;

  always_comb begin
    sgn = x[IN_W-1];
    mag = sgn ? MW'(-x) : x[MW-1:0];
    // -2**MW has no MW-bit magnitude: clamp it to the largest one.
    if (sgn && x[MW-1:0] == '0) mag = '1;
    mag_x = (8*NB)'(mag);
  end

  for (genvar k = 0; k < NB; k++) begin : g_core
    if (MULT == MULT_WALLACE) begin : g_wm
      wallace_mult #(.PIPELINED(1'b1)) u_wm (
        .clk(clk), .rst_n(rst_n), .en(en),
        .a(mag_x[8*k +: 8]), .b(COEF_MAG), .p(bp[k]));
    end else begin : g_vm
      vedic_8x8 u_vm (.a(mag_x[8*k +: 8]), .b(COEF_MAG), .p(bp[k]));
    end
  end

  // The sign travels alongside the core pipeline.
  delay_line #(.W(1), .N(LAT)) u_sgn_dly (
    .clk(clk), .rst_n(rst_n), .en(en), .d(sgn ^ COEF_NEG), .q(sgn_d));

  always_comb begin
    full = '0;
    for (int k = 0; k < NB; k++) full += PW'(bp[k]) << (8 * k);
    scaled = (full + RND) >> COEF_SHIFT;
    if (scaled > PW'(YMAX)) val = YMAX;
    else                    val = (OUT_W+1)'(scaled);
    y = sgn_d ? OUT_W'(-val) : OUT_W'(val);
  end
endmodule
