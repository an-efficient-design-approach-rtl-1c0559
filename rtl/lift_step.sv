// lift_step: one prediction or update step of the 9/7 lifting scheme,
//   z = y + C * (x[n] + x[n-1])
// where x is the stream being filtered, x[n-1] its previous sample (held in
// the step's delay register) and y the bypass stream of the other polyphase
// component. The sum goes through a coef_mult; y is delayed to meet the
// product, and the result is registered.
// This is the Add/Register/Multiplier group the design repeats four times
// (alpha, beta, gamma, delta); the output register is this design's
// pipeline stage. All registers advance only when en is high, so latency is
// counted in samples: z for the sum presented with x[n] appears
// mult_latency(MULT)+1 enables later. Overflow cannot occur for 8-bit
// pixels with the default widths; the adder saturates anyway.
module lift_step
  import dwt_pkg::*;
#(
  parameter mult_kind_e MULT       = MULT_VEDIC,
  parameter int         DW         = 16,
  parameter logic [7:0] COEF_MAG   = ALPHA_MAG,
  parameter int         COEF_SHIFT = ALPHA_SH,
  parameter bit         COEF_NEG   = ALPHA_NEG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  output logic signed [DW-1:0] z_out
);
  localparam int LAT = mult_latency(MULT);
  localparam logic signed [DW:0] ZMAX = (DW+1)'((1 << (DW - 1)) - 1);
  localparam logic signed [DW:0] ZMIN = -(DW+1)'(1 << (DW - 1));

  logic signed [DW-1:0] x_prev, y_d, prod;
  logic signed [DW:0]   sum, z_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_prev <= '0;
    else if (en) x_prev <= x_in;
  end

  assign sum = (DW+1)'(x_in) + (DW+1)'(x_prev);

  coef_mult #(
    .MULT(MULT), .IN_W(DW+1), .OUT_W(DW),
    .COEF_MAG(COEF_MAG), .COEF_SHIFT(COEF_SHIFT), .COEF_NEG(COEF_NEG)
  ) u_mul (.clk(clk), .rst_n(rst_n), .en(en), .x(sum), .y(prod));

  delay_line #(.W(DW), .N(LAT)) u_y_dly (
    .clk(clk), .rst_n(rst_n), .en(en), .d(y_in), .q(y_d));

  assign z_w = (DW+1)'(y_d) + (DW+1)'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z_out <= '0;
    else if (en) begin
      if      (z_w > ZMAX) z_out <= DW'(ZMAX);
      else if (z_w < ZMIN) z_out <= DW'(ZMIN);
      else                 z_out <= DW'(z_w);
    end
  end
endmodule
