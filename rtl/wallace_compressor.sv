// wallace_compressor: partial-product reduction tree of the Wallace-tree
// multiplier.
//
// The five Booth rows (shifted to weights 4**i), the row of negation bits
// and the sign-extension-prevention constant make seven 16-bit operands.
// Rows 0..3 go through a first 4:2 compressor row; its two outputs, row 4
// and the negation bits through a second; a final row of full adders folds
// in the constant. The result is two 16-bit rows whose sum, modulo 2**16,
// is the product. The document names compressors feeding the tree adder;
// the arrangement of three levels is this design's. Combinational.
module wallace_compressor
  import dwt_pkg::*;
(
  input  logic [9:0]              row [BOOTH_DIGITS],
  input  logic [BOOTH_DIGITS-1:0] neg,
  output logic [15:0]             sum,
  output logic [15:0]             carry
);
  // Constant that undoes the inverted sign bits: -sum(2**(9+2i)) mod 2**16.
  localparam logic [15:0] SIGN_FIX = 16'h5600;

  logic [15:0] r [BOOTH_DIGITS];
  logic [15:0] nrow;
  logic [15:0] s1, c1, s2, c2;

  always_comb begin
    nrow = '0;
    for (int i = 0; i < BOOTH_DIGITS; i++) begin
      r[i] = 16'({6'b0, row[i]} << (2*i));
      nrow[2*i] = neg[i];
    end
  end

  compressor_row #(.W(16)) u_lvl1 (.x1(r[0]), .x2(r[1]), .x3(r[2]), .x4(r[3]), .s(s1), .c(c1));
  compressor_row #(.W(16)) u_lvl2 (.x1(s1), .x2(c1), .x3(r[4]), .x4(nrow), .s(s2), .c(c2));

  // Level 3: 3:2 (full adder) row with the constant.
  always_comb begin
    sum   = s2 ^ c2 ^ SIGN_FIX;
    carry = {((s2[14:0] & c2[14:0]) | (s2[14:0] & SIGN_FIX[14:0]) |
              (c2[14:0] & SIGN_FIX[14:0])), 1'b0};
  end
endmodule
