// tb_roi_dwt_top: end-to-end test of the ROI DWT system at a reduced
// memory size (64 pair addresses). A synthetic ROI (smooth blob, noise and
// a sharp edge) is loaded through the load port, then three runs are made:
// the whole memory, a shorter ROI (n_pairs = 40) and an oversize request
// that is clamped to the memory size. Every low/high output of both the
// Wallace-tree and the Vedic engine is compared with the reference lifting
// model, and every rebuilt pixel of both inverse engines must be within one
// grey level of the ROI. The testbench also checks one result per clock,
// the 13-clock latency from mem_adrs to result, and that each mechanism
// (memory reads with even/odd split, drain padding, both engines,
// clamping, reconstruction) happened. After each run that covers the whole
// 8 x 16 ROI, the column pass results of both chains are compared with the
// reference model run down each column of the row-pass coefficient image.
module tb_roi_dwt_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int ROWS = 8;
  localparam int COLS = 16;
  localparam int NP  = ROWS * COLS / 2;
  localparam int HC  = COLS / 2;
  localparam int HR  = ROWS / 2;
  localparam int AW  = $clog2(2 * NP);
  localparam int PAW = $clog2(NP);
  localparam int LAT = dwt_latency(MULT_WALLACE) + 1;   // from mem_adrs to result

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_en = 1'b0, start = 1'b0;
  logic [AW-1:0]  ld_addr = '0;
  logic [7:0]     ld_data = '0;
  logic [PAW:0]   n_pairs = '0;
  logic busy, done, out_valid;
  logic [PAW-1:0] mem_adrs, out_idx;
  logic signed [9:0] lout_wm, hout_wm, lout_vm, hout_vm;
  logic rec_valid;
  logic [PAW-1:0] rec_idx;
  logic [7:0] rec_even_wm, rec_odd_wm, rec_even_vm, rec_odd_vm;
  logic col_valid, col_done;
  logic [3:0] col_col;
  logic [1:0] col_idx;
  logic signed [10:0] col_lo_wm, col_hi_wm, col_lo_vm, col_hi_vm;
  int n_col = 0, n_col_runs = 0;
  longint sq_wm = 0, sq_vm = 0;
  int n_px = 0, max_err = 0;

  int checks = 0, failures = 0, cycles = 0;
  int n_reads = 0, n_pads = 0, n_wm = 0, n_vm = 0, n_clamp = 0, n_runs = 0, n_rec = 0;
  int img[];

  roi_dwt_top #(.ROWS(ROWS), .COLS(COLS)) dut (
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
  always @(posedge clk) if (rst_n && dut.rd_en) n_reads++;
  always @(posedge clk) if (rst_n && dut.dwt_en && dut.pad) n_pads++;

  task automatic run(int req);
    int n = (req > NP) ? NP : (req == 0 ? 1 : req);
    int sub[], lo[], hi[];
    int outs = 0, recs = 0, t = 0, first_rd = -1, first_out = -1, last_out = -1;
    int cols = 0, cdone = 0;
    int cl[COLS][], ch[COLS][], x[];
    bit full = (req >= NP);
    sub = new[2*n];
    foreach (sub[i]) sub[i] = img[i];
    dwt_ref(sub, 16, 4, 10, lo, hi);
    // column reference: row-pass pair k is row 2k/COLS, columns k mod HC
    // (low) and HC + k mod HC (high) of the coefficient image
    if (full) begin
      x = new[ROWS];
      for (int c = 0; c < COLS; c++) begin
        for (int r = 0; r < ROWS; r++) begin
          automatic int k = r * HC + (c % HC);
          x[r] = (c < HC) ? lo[k] : hi[k];
        end
        dwt_ref(x, 18, 4, 11, cl[c], ch[c]);
      end
    end
    if (req > NP) n_clamp++;
    @(negedge clk);
    n_pairs = (PAW+1)'(req);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while ((busy || t == 0) && t < 20 * NP) begin
      if (dut.rd_en && first_rd < 0) first_rd = t;
      if (out_valid) begin
        if (first_out < 0) first_out = t;
        last_out = t;
        checks += 4;
        if (int'(out_idx) != outs) begin
          failures++;
          $display("FAIL index %0d expected %0d", out_idx, outs);
        end
        if (lout_wm != lo[outs] || hout_wm != hi[outs]) begin
          failures++;
          if (failures < 10) $display("FAIL WM pair %0d: %0d %0d / %0d %0d", outs, lout_wm, hout_wm, lo[outs], hi[outs]);
        end else n_wm++;
        if (lout_vm != lo[outs] || hout_vm != hi[outs]) begin
          failures++;
          if (failures < 10) $display("FAIL VM pair %0d: %0d %0d / %0d %0d", outs, lout_vm, hout_vm, lo[outs], hi[outs]);
        end else n_vm++;
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
        if (!full || int'(col_col) != c || int'(col_idx) != m ||
            col_lo_wm != cl[c][m] || col_hi_wm != ch[c][m] ||
            col_lo_vm != cl[c][m] || col_hi_vm != ch[c][m]) begin
          failures++;
          if (failures < 10)
            $display("FAIL column %0d/%0d idx %0d/%0d: WM %0d %0d VM %0d %0d expected %0d %0d",
                     col_col, c, col_idx, m, col_lo_wm, col_hi_wm, col_lo_vm, col_hi_vm,
                     full ? cl[c][m] : 0, full ? ch[c][m] : 0);
        end
        cols++;
      end
      if (col_done) cdone++;
      @(negedge clk);
      t++;
    end
    checks += 2;
    if (cols != (full ? COLS * HR : 0)) begin failures++; $display("FAIL %0d column results", cols); end
    if (cdone != (full ? 1 : 0)) begin failures++; $display("FAIL column done count %0d", cdone); end
    n_col += cols;
    if (full) n_col_runs++;
    checks += 3;
    if (outs != n) begin failures++; $display("FAIL %0d results for %0d pairs", outs, n); end
    if (recs != n) begin failures++; $display("FAIL %0d rebuilt pairs for %0d", recs, n); end
    n_rec += recs;
    if (first_out - first_rd != LAT) begin
      failures++;
      $display("FAIL latency %0d expected %0d", first_out - first_rd, LAT);
    end
    if (last_out - first_out != n - 1) begin failures++; $display("FAIL results not one per clock"); end
    n_runs++;
  endtask

  initial begin
    img = new[2*NP];
    foreach (img[i]) begin
      automatic int r = i / 16, c = i % 16;
      automatic int d2 = (r - 4) * (r - 4) + (c - 8) * (c - 8);
      img[i] = (d2 < 30 ? 180 - 4 * d2 : 40) + int'($urandom % 16);
      if (c == 12) img[i] = 250;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (img[i]) begin
      @(negedge clk);
      ld_en = 1'b1; ld_addr = AW'(i); ld_data = 8'(img[i]);
    end
    @(negedge clk);
    ld_en = 1'b0;
    run(NP);
    run(40);
    run(NP + 5);
    $display("mechanism counts: runs=%0d pair_reads=%0d drain_pads=%0d wm_results=%0d vm_results=%0d clamps=%0d rebuilt_pairs=%0d column_passes=%0d column_results=%0d",
             n_runs, n_reads, n_pads, n_wm, n_vm, n_clamp, n_rec, n_col_runs, n_col);
    $display("round trip: max error %0d, WM PSNR %0.2f dB, VM PSNR %0.2f dB", max_err,
             psnr(sq_wm, n_px), psnr(sq_vm, n_px));
    checks += 7;
    if (n_reads == 0 || n_pads == 0 || n_wm == 0 || n_vm == 0 || n_clamp == 0 || n_rec == 0 ||
        n_col == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
