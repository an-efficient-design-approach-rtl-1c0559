// dwt_2d_col: second (column) pass of the 2D DWT: stores the low/high
// results of the 1D row pass as a ROWS x COLS coefficient image and runs the
// 1D lifting transform again down every column.
//
// Row-pass pair k (pixels 2k, 2k+1 of the raster stream) belongs to image
// row r = 2k / COLS and column p = k mod (COLS/2); its low coefficient is
// stored at (r, p) and its high coefficient at (r, COLS/2 + p), so each row
// holds COLS/2 low values followed by COLS/2 high values. The store is four
// banks ({low half, high half} x {even row, odd row}); both coefficients of
// a row-pass result are written in one clock, and a column pass reads rows
// 2m and 2m+1 of one column in one clock.
// After start, columns 0..COLS-1 are transformed one after another, one row
// pair per clock, each followed by PADS zero pairs (at least the engine
// latency plus a few) that drain the engine so columns do not mix. Result pair m of column c (c_lo: low band of the
// column, c_hi: high band) is flagged by c_valid with c_col = c, c_idx = m;
// done comes with the last one. The row-pass results must arrive in order
// starting at k = 0 and all be written before start.
// Repeating the 1D transform on its own output to form the 2D transform
// follows the design; the storage layout, column order and handshake are
// this design's. Active-low asynchronous reset.
module dwt_2d_col
  import dwt_pkg::*;
#(
  parameter mult_kind_e MULT  = MULT_VEDIC,
  parameter int         ROWS  = 90,
  parameter int         COLS  = 86,
  parameter int         IN_W  = 10,
  parameter int         DW    = 18,
  parameter int         FRAC  = 4,
  parameter int         OUT_W = 11,
  parameter int         PADS  = dwt_latency(MULT) + 4,
  parameter int         PAW   = $clog2(ROWS * COLS / 2),
  parameter int         CW    = $clog2(COLS),
  parameter int         MW    = $clog2(ROWS / 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // row-pass results
  input  logic                    rp_valid,
  input  logic [PAW-1:0]          rp_idx,
  input  logic signed [IN_W-1:0]  rp_lo,
  input  logic signed [IN_W-1:0]  rp_hi,
  // column pass
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output logic                    c_valid,
  output logic [CW-1:0]           c_col,
  output logic [MW-1:0]           c_idx,
  output logic signed [OUT_W-1:0] c_lo,
  output logic signed [OUT_W-1:0] c_hi
);
  localparam int HC    = COLS / 2;            // columns per half
  localparam int HR    = ROWS / 2;            // row pairs per column
  localparam int BD    = HR * HC;             // words per bank
  localparam int BAW   = $clog2(BD);
  localparam int LAT   = dwt_latency(MULT);
  localparam int TICKS = HR + PADS;           // engine clocks per column
  localparam int TW    = $clog2(TICKS + 1);
  localparam int RW    = $clog2(ROWS);
  localparam int PW    = $clog2(HC);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  // ---- coefficient store ----
  logic [IN_W-1:0] bank_le [BD];   // low half, even rows
  logic [IN_W-1:0] bank_lo [BD];   // low half, odd rows
  logic [IN_W-1:0] bank_he [BD];   // high half, even rows
  logic [IN_W-1:0] bank_ho [BD];   // high half, odd rows

  // Write position, tracked by counters (row r, half-column p).
  logic [RW-1:0]  wr_r, nx_r;
  logic [PW-1:0]  wr_p, nx_p;
  logic [BAW-1:0] wr_a;

  always_comb begin
    if (rp_idx == '0) begin
      wr_r = '0;
      wr_p = '0;
    end else begin
      wr_r = nx_r;
      wr_p = nx_p;
    end
    wr_a = BAW'(int'(wr_r[RW-1:1]) * HC + int'(wr_p));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nx_r <= '0;
      nx_p <= '0;
    end else if (rp_valid) begin
      if (int'(wr_p) == HC - 1) begin
        nx_p <= '0;
        nx_r <= wr_r + 1'b1;
      end else begin
        nx_p <= wr_p + 1'b1;
        nx_r <= wr_r;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rp_valid && !wr_r[0] && int'(wr_a) < BD) begin
      bank_le[wr_a] <= rp_lo;
      bank_he[wr_a] <= rp_hi;
    end
  end

  always_ff @(posedge clk) begin
    if (rp_valid && wr_r[0] && int'(wr_a) < BD) begin
      bank_lo[wr_a] <= rp_lo;
      bank_ho[wr_a] <= rp_hi;
    end
  end

  // ---- column sequencer ----
  state_e         state;
  logic           half;          // 0: low half, 1: high half
  logic [PW-1:0]  cp;            // column within the half
  logic [TW-1:0]  m;             // tick within the column
  logic [BAW-1:0] rd_a;
  logic           rd_en;
  logic [IN_W-1:0] q_le, q_lo, q_he, q_ho;

  assign rd_en = (state == S_RUN) && (int'(m) < HR);
  assign rd_a  = BAW'(int'(m) * HC + int'(cp));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      half  <= 1'b0;
      cp    <= '0;
      m     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          half  <= 1'b0;
          cp    <= '0;
          m     <= '0;
        end
        S_RUN: begin
          if (int'(m) == TICKS - 1) begin
            m <= '0;
            if (int'(cp) == HC - 1) begin
              cp <= '0;
              if (half) state <= S_IDLE;
              half <= 1'b1;
            end else begin
              cp <= cp + 1'b1;
            end
          end else begin
            m <= m + 1'b1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      q_le <= bank_le[rd_a];
      q_lo <= bank_lo[rd_a];
      q_he <= bank_he[rd_a];
      q_ho <= bank_ho[rd_a];
    end
  end

  // Tick stage, aligned with the registered bank outputs.
  logic          t_v, t_pad, t_half;
  logic [TW-1:0] t_m;
  logic [CW-1:0] t_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_v    <= 1'b0;
      t_pad  <= 1'b0;
      t_half <= 1'b0;
      t_m    <= '0;
      t_col  <= '0;
    end else begin
      t_v    <= (state == S_RUN);
      t_pad  <= !rd_en;
      t_half <= half;
      t_m    <= m;
      t_col  <= CW'(int'(half) * HC + int'(cp));
    end
  end

  logic [IN_W-1:0] ev, od;
  always_comb begin
    if (t_pad)       begin ev = '0;   od = '0;   end
    else if (t_half) begin ev = q_he; od = q_ho; end
    else             begin ev = q_le; od = q_lo; end
  end

  dwt_1d #(.MULT(MULT), .DW(DW), .FRAC(FRAC), .OUT_W(OUT_W), .IN_W(IN_W), .IN_SIGNED(1'b1))
    u_col (.clk, .rst_n, .en(t_v), .even_in(ev), .odd_in(od), .lout(c_lo), .hout(c_hi));

  assign busy    = (state == S_RUN) || t_v;
  assign c_valid = t_v && (int'(t_m) >= LAT) && (int'(t_m) < LAT + HR);
  assign c_idx   = MW'(int'(t_m) - LAT);
  assign c_col   = t_col;
  assign done    = c_valid && (int'(t_col) == COLS - 1) && (int'(t_m) == LAT + HR - 1);

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
