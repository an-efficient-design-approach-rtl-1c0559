// pp_generator: Booth partial-product rows for the Wallace-tree multiplier.
//
// For each Booth digit the 8-bit multiplicand a is selected as 0, a or 2a
// (9 bits), and complemented when the digit is negative; the +1 that
// completes the two's complement is returned separately in neg[i] so the
// compressor tree adds it at the row's least significant position.
// Sign-extension prevention: row bit 9 carries the inverted sign instead of
// a run of sign bits; the compressor tree adds the matching constant.
// Row i has weight 4**i. Combinational.
module pp_generator
  import dwt_pkg::*;
(
  input  logic [7:0]   a,
  input  booth_digit_t dig [BOOTH_DIGITS],
  output logic [9:0]   row [BOOTH_DIGITS],
  output logic [BOOTH_DIGITS-1:0] neg
);
  logic [9:0] sel;

  always_comb begin
    for (int i = 0; i < BOOTH_DIGITS; i++) begin
      sel = dig[i].two ? {1'b0, a, 1'b0} :
            dig[i].one ? {2'b00, a}      : 10'd0;
      if (dig[i].neg) sel = ~sel;
      row[i] = {~sel[9], sel[8:0]};
      neg[i] = dig[i].neg;
    end
  end
endmodule
