// booth_encoder: radix-4 Booth recoding of an unsigned 8-bit multiplier.
//
// The multiplier is extended with a zero below bit 0 and two zeros above
// bit 7 and cut into overlapping 3-bit groups {b[2i+1], b[2i], b[2i-1]},
// i = 0..4. Each group is recoded by the radix-4 table
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// into a digit {one, two, neg}. The table is the design's; treating the
// multiplier as unsigned, which needs a fifth digit, is this design's
// choice so the Wallace-tree core computes the same product as the Vedic
// core. Combinational.
module booth_encoder
  import dwt_pkg::*;
(
  input  logic [7:0]   b,
  output booth_digit_t dig [BOOTH_DIGITS]
);
  logic [10:0] bx;   // {00, b, 0}

  always_comb begin
    bx = {2'b00, b, 1'b0};
    for (int i = 0; i < BOOTH_DIGITS; i++) begin
      unique case (bx[2*i +: 3])
        3'b000, 3'b111: dig[i] = '{one: 1'b0, two: 1'b0, neg: 1'b0};
        3'b001, 3'b010: dig[i] = '{one: 1'b1, two: 1'b0, neg: 1'b0};
        3'b011:         dig[i] = '{one: 1'b0, two: 1'b1, neg: 1'b0};
        3'b100:         dig[i] = '{one: 1'b0, two: 1'b1, neg: 1'b1};
        default:        dig[i] = '{one: 1'b1, two: 1'b0, neg: 1'b1}; // 101, 110
      endcase
    end
  end
endmodule
