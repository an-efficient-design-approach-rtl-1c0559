// compressor_row: a W-bit row of 4:2 compressors.
//
// Four W-bit operands in, two out (sum, and carry already shifted to its
// weight), with sum + carry == x1 + x2 + x3 + x4 modulo 2**W. The lateral
// carries are chained from bit 0 (cin = 0) upwards; what leaves bit W-1 is
// dropped because the product is taken modulo 2**W. Combinational.
module compressor_row #(
  parameter int W = 16
) (
  input  logic [W-1:0] x1, x2, x3, x4,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0]   lat;      // lateral carry chain
  logic [W-1:0] cy;

  assign lat[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_bit
    compressor_4_2 u_c42 (
      .x1(x1[j]), .x2(x2[j]), .x3(x3[j]), .x4(x4[j]), .cin(lat[j]),
      .sum(s[j]), .carry(cy[j]), .cout(lat[j+1])
    );
  end

  assign c = {cy[W-2:0], 1'b0};
endmodule
