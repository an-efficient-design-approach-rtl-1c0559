// vedic_8x8: 8x8-bit unsigned Vedic (Urdhva-Tiryakbhyam) multiplier.
//
// Four 4x4 Vedic multipliers form the vertical and crosswise products
//   VM1 = a[3:0]*b[3:0]  VM2 = a[7:4]*b[3:0]
//   VM3 = a[3:0]*b[7:4]  VM4 = a[7:4]*b[7:4].
// VM1[3:0] is product bit slice s[3:0]. An 8-bit adder adds VM2 and
// {4'b0, VM1[7:4]}; 12-bit adder 1 adds {VM4, 4'b0} and {4'b0, VM3};
// 12-bit adder 2 adds {4'b0, 8-bit sum} and the first 12-bit sum and gives
// s[15:4]. The adder count and widths follow the design; the placement of
// the zero padding is the one that makes the arithmetic exact.
// Combinational: product valid in the same cycle as the operands.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0]  vm1, vm2, vm3, vm4;
  logic [7:0]  add8;
  logic [11:0] add12_1, add12_2;

  vedic_4x4 u_vm1 (.a(a[3:0]), .b(b[3:0]), .p(vm1));
  vedic_4x4 u_vm2 (.a(a[7:4]), .b(b[3:0]), .p(vm2));
  vedic_4x4 u_vm3 (.a(a[3:0]), .b(b[7:4]), .p(vm3));
  vedic_4x4 u_vm4 (.a(a[7:4]), .b(b[7:4]), .p(vm4));

  always_comb begin
    add8    = vm2 + {4'b0000, vm1[7:4]};          // 225 + 14 < 256
    add12_1 = {vm4, 4'b0000} + {4'b0000, vm3};    // 3600 + 225 < 4096
    add12_2 = {4'b0000, add8} + add12_1;          // 239 + 3825 < 4096
    p       = {add12_2, vm1[3:0]};
  end
endmodule
