// delay_line: N-stage register chain that shifts only when en is high.
//
// Used to align the bypass operands of the lifting steps with the outputs
// of their multipliers, counted in samples rather than clocks. N = 0 is a
// wire. Reset (active-low, asynchronous) clears every stage to zero.
module delay_line #(
  parameter int W = 16,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [N];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < N; i++) sr[i] <= '0;
      end else if (en) begin
        sr[0] <= d;
        for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
