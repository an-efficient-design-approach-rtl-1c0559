// tree_adder: final carry-propagate adder of the Wallace-tree multiplier.
//
// Adds the sum and carry rows left by the compressor tree and returns the
// 16-bit product (modulo 2**16, which holds the whole 8x8 unsigned product).
// The document names this adder; it does not give its internal structure,
// so it is written as a plain adder for the synthesis tool to map onto the
// FPGA carry chain. Combinational.
module tree_adder #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a + b;
endmodule
