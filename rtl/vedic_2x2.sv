// vedic_2x2: 2x2-bit Urdhva-Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf of the Vedic multiplier tree.
//
// The vertical product a0&b0 is bit 0. The two crosswise products a1&b0 and
// a0&b1 meet in a first half adder (bit 1); its carry and the vertical
// product a1&b1 meet in a second half adder (bits 2 and 3). Two half adders,
// as the design describes; purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  always_comb begin
    p[0]        = a[0] & b[0];
    {c1, p[1]}  = {1'b0, a[1] & b[0]} + {1'b0, a[0] & b[1]};   // half adder 1
    {p[3], p[2]} = {1'b0, a[1] & b[1]} + {1'b0, c1};          // half adder 2
  end
endmodule
