// compressor_4_2: one bit of a 4:2 compressor.
//
// Five inputs of equal weight (x1..x4 and the lateral carry cin from the
// next lower bit) are reduced to a sum of the same weight and two outputs of
// double weight (carry, and cout which feeds cin of the next higher bit).
// Built from two full adders; cout does not depend on cin, so the lateral
// chain is only one level deep. Combinational.
module compressor_4_2 (
  input  logic x1, x2, x3, x4, cin,
  output logic sum, carry, cout
);
  logic s1;

  always_comb begin
    s1    = x1 ^ x2 ^ x3;
    cout  = (x1 & x2) | (x1 & x3) | (x2 & x3);
    sum   = s1 ^ x4 ^ cin;
    carry = (s1 & x4) | (s1 & cin) | (x4 & cin);
  end
endmodule
