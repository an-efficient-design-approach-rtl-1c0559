// wallace_mult: 8x8 unsigned Wallace-tree multiplier with radix-4 Booth
// encoding, pipelined.
//
// Booth encoder -> partial-product generator -> compressor tree -> register
// -> tree adder, as in the design's block diagram. The register between the
// compressor tree and the final adder is the pipeline stage (its position is
// this design's choice); it loads when en is high, so the multiplier can sit
// in a stalling pipeline. Latency: one en-qualified clock (PIPELINED = 1), or
// none (PIPELINED = 0). Reset is active-low and asynchronous.
module wallace_mult
  import dwt_pkg::*;
#(
  parameter bit PIPELINED = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  a,     // multiplicand
  input  logic [7:0]  b,     // multiplier (Booth encoded)
  output logic [15:0] p
);
  booth_digit_t dig [BOOTH_DIGITS];
  logic [9:0]   row [BOOTH_DIGITS];
  logic [BOOTH_DIGITS-1:0] neg;
  logic [15:0]  cs_sum, cs_carry;
  logic [15:0]  q_sum, q_carry;

  booth_encoder      u_enc  (.b(b), .dig(dig));
  pp_generator       u_ppg  (.a(a), .dig(dig), .row(row), .neg(neg));
  wallace_compressor u_cmp  (.row(row), .neg(neg), .sum(cs_sum), .carry(cs_carry));

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q_sum   <= '0;
        q_carry <= '0;
      end else if (en) begin
        q_sum   <= cs_sum;
        q_carry <= cs_carry;
      end
    end
  end else begin : g_comb
    assign q_sum   = cs_sum;
    assign q_carry = cs_carry;
  end

  tree_adder #(.W(16)) u_add (.a(q_sum), .b(q_carry), .y(p));
endmodule
