// dwt_ctrl: address and timing controller of the ROI DWT.
//
// After start it steps the pair address mem_adrs from 0 to n_pairs-1, one
// pair per clock, and keeps the engines enabled for REC_LATENCY further
// clocks with zero padding so the last pairs drain out of both the forward
// and the inverse transform. The pixel memory answers one clock after
// rd_en, so the engine enable (dwt_en), the padding flag (pad) and the
// output flags follow the address by one clock. out_valid marks the clocks
// on which the forward engines show the low/high pair number out_idx
// (LATENCY enables after the pair went in); rec_valid marks those on which
// the inverse engines show rebuilt pixel pair rec_idx (REC_LATENCY enables
// after); done is high with the last rebuilt pair. n_pairs is sampled at
// start and clamped to 1..N_PAIRS. Stepping one address per clock follows
// the design's simulation traces; the drain phase and the interface are
// this design's. Reset is active-low, asynchronous.
module dwt_ctrl #(
  parameter int N_PAIRS = 3870,
  parameter int LATENCY = 12,
  parameter int REC_LATENCY = 25,
  parameter int PAW     = $clog2(N_PAIRS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PAW:0]   n_pairs,
  output logic           busy,
  output logic           rd_en,
  output logic [PAW-1:0] mem_adrs,
  output logic           dwt_en,
  output logic           pad,
  output logic           out_valid,
  output logic [PAW-1:0] out_idx,
  output logic           rec_valid,
  output logic [PAW-1:0] rec_idx,
  output logic           done
);
  localparam int CW = $clog2(N_PAIRS + REC_LATENCY + 1);

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e        state;
  logic [CW-1:0] k, nlim, last, tick_k;
  logic          tick_v;

  assign busy     = (state == S_RUN) || tick_v;
  assign rd_en    = (state == S_RUN) && (k < nlim);
  assign mem_adrs = PAW'(k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      nlim  <= '0;
      last  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          k     <= '0;
          if (n_pairs == '0) begin
            nlim <= CW'(1);
            last <= CW'(REC_LATENCY);
          end else if (int'(n_pairs) > N_PAIRS) begin
            nlim <= CW'(N_PAIRS);
            last <= CW'(N_PAIRS + REC_LATENCY - 1);
          end else begin
            nlim <= CW'(n_pairs);
            last <= CW'(n_pairs) + CW'(REC_LATENCY - 1);
          end
        end
        S_RUN: begin
          if (k == last) state <= S_IDLE;
          k <= k + 1'b1;
        end
      endcase
    end
  end

  // Tick stage: aligned with the memory's registered output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_v <= 1'b0;
      tick_k <= '0;
      pad    <= 1'b0;
    end else begin
      tick_v <= (state == S_RUN);
      tick_k <= k;
      pad    <= (k >= nlim);
    end
  end

  assign dwt_en    = tick_v;
  assign out_valid = tick_v && (tick_k >= CW'(LATENCY)) && (tick_k < nlim + CW'(LATENCY));
  assign out_idx   = PAW'(tick_k - CW'(LATENCY));
  assign rec_valid = tick_v && (tick_k >= CW'(REC_LATENCY));
  assign rec_idx   = PAW'(tick_k - CW'(REC_LATENCY));
  assign done      = tick_v && (tick_k == last);

  // The engines only produce a result on an enabled clock.
  a_valid_enabled: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> dwt_en);
  a_rec_enabled:   assert property (@(posedge clk) disable iff (!rst_n) rec_valid |-> dwt_en);
endmodule
