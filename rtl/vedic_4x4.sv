// vedic_4x4: 4x4-bit Vedic multiplier built from four 2x2 Vedic multipliers,
// one 4-bit adder and two 6-bit adders.
//
// q0 = a[1:0]*b[1:0] gives product bits [1:0] directly. The 4-bit adder sums
// the crosswise product q1 = a[3:2]*b[1:0] with the upper half of q0. The
// first 6-bit adder joins the other crosswise product q2 = a[1:0]*b[3:2]
// with the vertical product q3 = a[3:2]*b[3:2] shifted up two places, and
// the second 6-bit adder adds the two partial sums to give bits [5:0] of
// p[7:2]. This mirrors, one level down, the 8x8 arrangement the design
// documents; combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] add4;
  logic [5:0] add6_1, add6_2;

  vedic_2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_q1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_q2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  always_comb begin
    add4   = q1 + {2'b00, q0[3:2]};          // cannot overflow: 9 + 2 < 16
    add6_1 = {q3, 2'b00} + {2'b00, q2};      // 36 + 9 < 64
    add6_2 = {2'b00, add4} + add6_1;         // 11 + 45 < 64
    p      = {add6_2, q0[1:0]};
  end
endmodule
