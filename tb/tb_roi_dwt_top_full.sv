// tb_roi_dwt_top_full: one complete 1D-DWT of a full-size 90x86 ROI (7740
// pixels, 3870 even/odd pairs) with the top at its default parameters.
// The synthetic ROI is an MRI-like slice: an elliptical head with a darker
// interior region, a bright rim, a lesion-like blob and noise, on a dark
// background, stored in raster order. Every low/high result of both
// engines is compared with the reference lifting model, and the run must
// take 3870 + 13 clocks from the first address to the last result. The
// inverse engines must rebuild every pixel within one grey level; the
// round-trip MSE and PSNR of both chains are printed. The column pass that
// follows must match the reference model run down each of the 86 columns
// of the row-pass coefficient image, for both chains, giving the 2D
// transform; the share of energy in the LL quarter is printed.
module tb_roi_dwt_top_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int ROWS = 90, COLS = 86;
  localparam int NP   = ROWS * COLS / 2;
  localparam int LAT  = dwt_latency(MULT_WALLACE) + 1;
  localparam int HC   = COLS / 2;
  localparam int HR   = ROWS / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en = 1'b0, start = 1'b0;
  logic [12:0] ld_addr = '0;
  logic [7:0]  ld_data = '0;
  logic [12:0] n_pairs = '0;
  logic busy, done, out_valid;
  logic [11:0] mem_adrs, out_idx;
  logic signed [9:0] lout_wm, hout_wm, lout_vm, hout_vm;
  logic rec_valid;
  logic [11:0] rec_idx;
  logic [7:0] rec_even_wm, rec_odd_wm, rec_even_vm, rec_odd_vm;
  longint sq_wm = 0, sq_vm = 0;
  logic col_valid, col_done;
  logic [6:0] col_col;
  logic [5:0] col_idx;
  logic signed [10:0] col_lo_wm, col_hi_wm, col_lo_vm, col_hi_vm;
  int cl[COLS][], ch[COLS][], x[];
  int cols = 0, cdone = 0;
  real e_ll = 0.0, e_all = 0.0;
  int n_px = 0, max_err = 0;

  int checks = 0, failures = 0, cycles = 0;
  int img[], lo[], hi[];
  int outs = 0, recs = 0, t = 0, first_rd = -1, last_out = -1, dones = 0;

  roi_dwt_top dut (
    .clk, .rst_n, .ld_en, .ld_addr, .ld_data, .start, .n_pairs, .busy, .done, .mem_adrs,
    .out_valid, .out_idx, .lout_wm, .hout_wm, .lout_vm, .hout_vm,
    .rec_valid, .rec_idx, .rec_even_wm, .rec_odd_wm, .rec_even_vm, .rec_odd_vm,
    .col_valid, .col_col, .col_idx, .col_lo_wm, .col_hi_wm, .col_lo_vm, .col_hi_vm, .col_done);

  // Rebuilt pixels must be within one grey level of the ROI; the squared
  // errors give the MSE and PSNR of the round trip.
  task automatic check_rec(int k, int p0, int p1);
    int got [4];
    got = '{int'(rec_even_wm), int'(rec_odd_wm), int'(rec_even_vm), int'(rec_odd_vm)};
    for (int j = 0; j < 4; j++) begin
      automatic int ref_px = (j % 2) ? p1 : p0;
      automatic int d = got[j] - ref_px;
      if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      if (j < 2) sq_wm += d * d; else sq_vm += d * d;
      checks++;
      if (d > 1) begin
        failures++;
        if (failures < 10) $display("FAIL rebuilt pair %0d: %0d expected %0d", k, got[j], ref_px);
      end
    end
    n_px += 2;
  endtask

  function automatic real psnr(longint sq, int n);
    real mse = real'(sq) / real'(n);
    return (mse == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    img = new[ROWS * COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic real y = (r - 45.0) / 40.0, x = (c - 43.0) / 36.0;
        automatic real q = x * x + y * y;
        automatic real b = ((r - 30.0) * (r - 30.0) + (c - 55.0) * (c - 55.0)) / 36.0;
        automatic int v;
        if (q > 1.0)       v = 8;
        else if (q > 0.85) v = 210;
        else               v = 90 + int'(60.0 * (1.0 - q));
        if (b < 1.0) v = 235;
        v += int'($urandom % 12);
        img[r * COLS + c] = (v > 255) ? 255 : v;
      end
    dwt_ref(img, 16, 4, 10, lo, hi);
    x = new[ROWS];
    for (int c = 0; c < COLS; c++) begin
      for (int r = 0; r < ROWS; r++) x[r] = (c < HC) ? lo[r * HC + c] : hi[r * HC + c - HC];
      dwt_ref(x, 18, 4, 11, cl[c], ch[c]);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (img[i]) begin
      @(negedge clk);
      ld_en = 1'b1; ld_addr = 13'(i); ld_data = 8'(img[i]);
    end
    @(negedge clk);
    ld_en = 1'b0;
    n_pairs = 13'(NP);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while ((busy || t == 0) && t < 4 * NP) begin
      if (dut.rd_en && first_rd < 0) first_rd = t;
      if (done) dones++;
      if (out_valid) begin
        last_out = t;
        checks += 4;
        if (int'(out_idx) != outs) failures++;
        if (lout_wm != lo[outs] || hout_wm != hi[outs]) begin
          failures++;
          if (failures < 10) $display("FAIL WM pair %0d", outs);
        end
        if (lout_vm != lo[outs] || hout_vm != hi[outs]) begin
          failures++;
          if (failures < 10) $display("FAIL VM pair %0d", outs);
        end
        outs++;
      end
      if (rec_valid) begin
        checks++;
        if (int'(rec_idx) != recs) failures++;
        check_rec(recs, img[2*recs], img[2*recs+1]);
        recs++;
      end
      if (col_valid) begin
        automatic int c = cols / HR, m = cols % HR;
        checks++;
        if (int'(col_col) != c || int'(col_idx) != m ||
            col_lo_wm != cl[c][m] || col_hi_wm != ch[c][m] ||
            col_lo_vm != cl[c][m] || col_hi_vm != ch[c][m]) begin
          failures++;
          if (failures < 10) $display("FAIL column %0d idx %0d", c, m);
        end
        e_all += real'(col_lo_wm) ** 2 + real'(col_hi_wm) ** 2;
        if (c < HC) e_ll += real'(col_lo_wm) ** 2;
        cols++;
      end
      if (col_done) cdone++;
      @(negedge clk);
      t++;
    end
    checks += 3;
    if (outs != NP) begin failures++; $display("FAIL %0d results", outs); end
    if (recs != NP) begin failures++; $display("FAIL %0d rebuilt pairs", recs); end
    if (last_out - first_rd != NP - 1 + LAT) begin
      failures++;
      $display("FAIL run took %0d clocks", last_out - first_rd + 1);
    end
    if (dones != 1) failures++;
    checks += 2;
    if (cols != COLS * HR) begin failures++; $display("FAIL %0d column results", cols); end
    if (cdone != 1) begin failures++; $display("FAIL column done count %0d", cdone); end
    $display("round trip: max error %0d, WM MSE %0.4f PSNR %0.2f dB, VM MSE %0.4f PSNR %0.2f dB",
             max_err, real'(sq_wm) / n_px, psnr(sq_wm, n_px), real'(sq_vm) / n_px, psnr(sq_vm, n_px));
    $display("results=%0d clocks from first address to last result=%0d", outs, last_out - first_rd + 1);
    $display("2D: column results=%0d, LL energy share %0.2f %%, first start to column done %0d clocks",
             cols, 100.0 * e_ll / e_all, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
