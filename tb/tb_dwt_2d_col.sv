// tb_dwt_2d_col: a random signed 10 x 12 coefficient image is written into
// a Vedic and a Wallace-tree column pass as a row-pass stream (with gaps),
// then the column transform is started. Every column result is compared
// with the reference lifting model run down that column of the image, and
// the result order, the done pulse and the result count are checked. A
// second image is then written and transformed to check a repeated run.
module tb_dwt_2d_col;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int ROWS = 10;
  localparam int COLS = 12;
  localparam int HC   = COLS / 2;
  localparam int HR   = ROWS / 2;
  localparam int NPR  = ROWS * HC;
  localparam int PAW  = $clog2(NPR);
  localparam int CW   = $clog2(COLS);
  localparam int MW   = $clog2(HR);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rp_valid = 1'b0;
  logic [PAW-1:0] rp_idx = '0;
  logic signed [9:0] rp_lo = '0, rp_hi = '0;
  logic busy[2], done[2], cv[2];
  logic [CW-1:0] ccol[2];
  logic [MW-1:0] cidx[2];
  logic signed [10:0] clo[2], chi[2];
  int checks = 0, failures = 0, cycles = 0;
  int img[ROWS][COLS];
  int rl[COLS][], rh[COLS][];
  int seen[2], dones[2];
  int exp_col[2], exp_idx[2];

  dwt_2d_col #(.MULT(MULT_VEDIC), .ROWS(ROWS), .COLS(COLS)) u_v (
    .clk, .rst_n, .rp_valid, .rp_idx, .rp_lo, .rp_hi, .start, .busy(busy[0]), .done(done[0]),
    .c_valid(cv[0]), .c_col(ccol[0]), .c_idx(cidx[0]), .c_lo(clo[0]), .c_hi(chi[0]));
  dwt_2d_col #(.MULT(MULT_WALLACE), .ROWS(ROWS), .COLS(COLS)) u_w (
    .clk, .rst_n, .rp_valid, .rp_idx, .rp_lo, .rp_hi, .start, .busy(busy[1]), .done(done[1]),
    .c_valid(cv[1]), .c_col(ccol[1]), .c_idx(cidx[1]), .c_lo(clo[1]), .c_hi(chi[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // Compare results as they come out.
  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 2; u++) begin
      if (cv[u]) begin
        automatic int c = int'(ccol[u]);
        automatic int m = int'(cidx[u]);
        check(c == exp_col[u] && m == exp_idx[u],
              $sformatf("engine %0d order: col %0d idx %0d, expected %0d %0d", u, c, m, exp_col[u], exp_idx[u]));
        if (c < COLS && m < HR)
          check(int'(clo[u]) == rl[c][m] && int'(chi[u]) == rh[c][m],
                $sformatf("engine %0d col %0d idx %0d: %0d %0d expected %0d %0d",
                          u, c, m, clo[u], chi[u], rl[c][m], rh[c][m]));
        seen[u]++;
        if (exp_idx[u] == HR - 1) begin exp_idx[u] = 0; exp_col[u]++; end
        else exp_idx[u]++;
      end
      if (done[u]) begin
        dones[u]++;
        check(cv[u] && exp_col[u] == COLS, $sformatf("engine %0d done out of place", u));
      end
    end
  end

  task automatic run(int maxv);
    int x[];
    // random image, with a flat block and a large-swing column
    foreach (img[r, c]) img[r][c] = int'($urandom % (2 * maxv + 1)) - maxv;
    for (int r = 2; r < 6; r++) for (int c = 0; c < 4; c++) img[r][c] = 100;
    for (int r = 0; r < ROWS; r++) img[r][7] = (r % 2) ? 511 : -512;
    x = new[ROWS];
    for (int c = 0; c < COLS; c++) begin
      for (int r = 0; r < ROWS; r++) x[r] = img[r][c];
      dwt_ref(x, 18, 4, 11, rl[c], rh[c]);
    end
    // row-pass stream: pair k -> row 2k/COLS, low column k mod HC
    for (int k = 0; k < NPR; ) begin
      @(negedge clk);
      rp_valid = ($urandom % 4) != 0;
      if (rp_valid) begin
        rp_idx = PAW'(k);
        rp_lo  = 10'(img[(2*k)/COLS][k % HC]);
        rp_hi  = 10'(img[(2*k)/COLS][HC + k % HC]);
        k++;
      end
    end
    @(negedge clk);
    rp_valid = 1'b0;
    for (int u = 0; u < 2; u++) begin seen[u] = 0; dones[u] = 0; exp_col[u] = 0; exp_idx[u] = 0; end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (busy[0] && busy[1]);
    wait (!busy[0] && !busy[1]);
    repeat (3) @(posedge clk);
    for (int u = 0; u < 2; u++) begin
      check(seen[u] == COLS * HR, $sformatf("engine %0d gave %0d results", u, seen[u]));
      check(dones[u] == 1, $sformatf("engine %0d done count %0d", u, dones[u]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run(511);
    run(60);
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
