// roi_workload_run: testbench helper that takes one roi_dwt_top, sized
// ROWS x COLS, through a complete operation on a synthetic MRI-like image
// of that size. The image (an elliptical head with a darker interior, a
// bright rim, a bright blob and noise on a dark background) is scaled to
// the ROI size and generated here. After reset the helper loads the image,
// starts a run over all pairs and checks:
//   - every row-pass coefficient of both chains against the reference model;
//   - every rebuilt pixel of both chains to within one grey level;
//   - every column-pass result of both chains against the reference model
//     run down each column of the row-pass coefficient image;
//   - the run length (N pairs + 13 clocks to the last row result).
// It raises finished when the column pass is over and keeps its counts in
// checks/failures for the calling testbench.
module roi_workload_run
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int    ROWS = 90,
  parameter int    COLS = 86,
  parameter string NAME = "roi"
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int NP  = ROWS * COLS / 2;
  localparam int HC  = COLS / 2;
  localparam int HR  = ROWS / 2;
  localparam int AW  = $clog2(2 * NP);
  localparam int PAW = $clog2(NP);
  localparam int CW  = $clog2(COLS);
  localparam int MW  = $clog2(HR);
  localparam int LAT = dwt_latency(MULT_WALLACE) + 1;

  logic ld_en = 1'b0, start = 1'b0;
  logic [AW-1:0]  ld_addr = '0;
  logic [7:0]     ld_data = '0;
  logic [PAW:0]   n_pairs = '0;
  logic busy, done, out_valid, rec_valid, col_valid, col_done;
  logic [PAW-1:0] mem_adrs, out_idx, rec_idx;
  logic signed [9:0] lout_wm, hout_wm, lout_vm, hout_vm;
  logic [7:0] rec_even_wm, rec_odd_wm, rec_even_vm, rec_odd_vm;
  logic [CW-1:0] col_col;
  logic [MW-1:0] col_idx;
  logic signed [10:0] col_lo_wm, col_hi_wm, col_lo_vm, col_hi_vm;

  roi_dwt_top #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .n_pairs, .busy, .done, .mem_adrs,
    .out_valid, .out_idx, .lout_wm, .hout_wm, .lout_vm, .hout_vm,
    .rec_valid, .rec_idx, .rec_even_wm, .rec_odd_wm, .rec_even_vm, .rec_odd_vm,
    .col_valid, .col_col, .col_idx, .col_lo_wm, .col_hi_wm, .col_lo_vm, .col_hi_vm, .col_done);

  int img[], lo[], hi[], x[];
  int cl[COLS][], ch[COLS][];
  longint sq = 0;
  int max_err = 0;
  real e_ll = 0.0, e_all = 0.0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 6) $display("FAIL %s: %s", NAME, msg);
    end
  endtask

  task automatic check_px(int got, int want);
    automatic int d = (got > want) ? got - want : want - got;
    if (d > max_err) max_err = d;
    sq += d * d;
    check(d <= 1, $sformatf("rebuilt pixel %0d expected %0d", got, want));
  endtask

  initial begin
    automatic int outs = 0, recs = 0, cols = 0, dones = 0, cdones = 0;
    automatic int t = 0, first_rd = -1, last_out = -1;
    automatic real mse;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    img = new[ROWS * COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic real y = (r - ROWS / 2.0) / (0.45 * ROWS);
        automatic real xx = (c - COLS / 2.0) / (0.42 * COLS);
        automatic real q = xx * xx + y * y;
        automatic real by = (r - ROWS / 3.0) / (ROWS / 14.0);
        automatic real bx = (c - COLS * 0.64) / (COLS / 14.0);
        automatic int v;
        if (q > 1.0)       v = 8;
        else if (q > 0.85) v = 210;
        else               v = 90 + int'(60.0 * (1.0 - q));
        if (bx * bx + by * by < 1.0) v = 235;
        v += int'($urandom % 12);
        img[r * COLS + c] = (v > 255) ? 255 : v;
      end
    dwt_ref(img, 16, 4, 10, lo, hi);
    x = new[ROWS];
    for (int c = 0; c < COLS; c++) begin
      for (int r = 0; r < ROWS; r++) x[r] = (c < HC) ? lo[r * HC + c] : hi[r * HC + c - HC];
      dwt_ref(x, 18, 4, 11, cl[c], ch[c]);
    end
    wait (rst_n);
    foreach (img[i]) begin
      @(negedge clk);
      ld_en = 1'b1; ld_addr = AW'(i); ld_data = 8'(img[i]);
    end
    @(negedge clk);
    ld_en = 1'b0;
    n_pairs = (PAW+1)'(NP);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while ((busy || t == 0) && t < 4 * NP + 4 * COLS * LAT) begin
      if (dut.rd_en && first_rd < 0) first_rd = t;
      if (done) dones++;
      if (out_valid) begin
        last_out = t;
        check(int'(out_idx) == outs && lout_wm == lo[outs] && hout_wm == hi[outs] &&
              lout_vm == lo[outs] && hout_vm == hi[outs], $sformatf("row pair %0d", outs));
        outs++;
      end
      if (rec_valid) begin
        check(int'(rec_idx) == recs, "rebuilt index");
        check_px(rec_even_wm, img[2*recs]);
        check_px(rec_odd_wm,  img[2*recs+1]);
        check_px(rec_even_vm, img[2*recs]);
        check_px(rec_odd_vm,  img[2*recs+1]);
        recs++;
      end
      if (col_valid) begin
        automatic int c = cols / HR, m = cols % HR;
        check(int'(col_col) == c && int'(col_idx) == m &&
              col_lo_wm == cl[c][m] && col_hi_wm == ch[c][m] &&
              col_lo_vm == cl[c][m] && col_hi_vm == ch[c][m], $sformatf("column %0d idx %0d", c, m));
        e_all += real'(col_lo_wm) ** 2 + real'(col_hi_wm) ** 2;
        if (c < HC) e_ll += real'(col_lo_wm) ** 2;
        cols++;
      end
      if (col_done) cdones++;
      @(negedge clk);
      t++;
    end
    check(outs == NP, $sformatf("%0d row results", outs));
    check(recs == NP, $sformatf("%0d rebuilt pairs", recs));
    check(cols == COLS * HR, $sformatf("%0d column results", cols));
    check(dones == 1 && cdones == 1, "done pulses");
    check(last_out - first_rd == NP - 1 + LAT, $sformatf("row pass took %0d clocks", last_out - first_rd + 1));
    mse = real'(sq) / real'(4 * NP);
    $display("%s: %0dx%0d, %0d pairs, row pass %0d clocks, column pass done after %0d clocks",
             NAME, ROWS, COLS, NP, last_out - first_rd + 1, t);
    $display("%s: round trip max error %0d, MSE %0.4f, PSNR %0.2f dB; LL energy share %0.2f %%", NAME,
             max_err, mse, (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse), 100.0 * e_ll / e_all);
    finished = 1'b1;
  end
endmodule
