// tb_idwt_1d: two checks of the inverse engine, for Vedic and Wallace-tree
// cores.
// 1. Exact: a random coefficient stream (random enable pattern) must give
//    the pixels of the reference inverse model, LATENCY samples later
//    (8 Vedic, 13 Wallace-tree).
// 2. Round trip: a random pixel line through dwt_1d and straight into
//    idwt_1d (same enable) must come back within one grey level.
module tb_idwt_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int NP   = 150;
  localparam int LIV  = idwt_latency(MULT_VEDIC);
  localparam int LIW  = idwt_latency(MULT_WALLACE);
  localparam int LFV  = dwt_latency(MULT_VEDIC);
  localparam int LFW  = dwt_latency(MULT_WALLACE);
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [9:0] lin = '0, hin = '0;
  logic [7:0] ev, ov, ew, ow;
  // round trip
  logic [7:0] pe = '0, po = '0;
  logic signed [9:0] fl_v, fh_v, fl_w, fh_w;
  logic [7:0] re_v, ro_v, re_w, ro_w;
  int checks = 0, failures = 0, cycles = 0, maxerr = 0;
  int lo[], hi[], px[], pix[];
  int c = 0;

  idwt_1d #(.MULT(MULT_VEDIC))   u_iv (.clk, .rst_n, .en, .lin, .hin, .even_out(ev), .odd_out(ov));
  idwt_1d #(.MULT(MULT_WALLACE)) u_iw (.clk, .rst_n, .en, .lin, .hin, .even_out(ew), .odd_out(ow));

  dwt_1d  #(.MULT(MULT_VEDIC))   u_fv (.clk, .rst_n, .en, .even_in(pe), .odd_in(po), .lout(fl_v), .hout(fh_v));
  idwt_1d #(.MULT(MULT_VEDIC))   u_rv (.clk, .rst_n, .en, .lin(fl_v), .hin(fh_v), .even_out(re_v), .odd_out(ro_v));
  dwt_1d  #(.MULT(MULT_WALLACE)) u_fw (.clk, .rst_n, .en, .even_in(pe), .odd_in(po), .lout(fl_w), .hout(fh_w));
  idwt_1d #(.MULT(MULT_WALLACE)) u_rw (.clk, .rst_n, .en, .lin(fl_w), .hin(fh_w), .even_out(re_w), .odd_out(ro_w));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic cmp(string what, int n, int ge, int go, int xe, int xo, int tol);
    int d = (ge > xe ? ge - xe : xe - ge);
    int d2 = (go > xo ? go - xo : xo - go);
    checks += 2;
    if (d2 > d) d = d2;
    if (tol > 0 && d > maxerr) maxerr = d;
    if (d > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s pair %0d: %0d %0d expected %0d %0d", what, n, ge, go, xe, xo);
    end
  endtask

  initial begin
    lo = new[NP]; hi = new[NP]; pix = new[2*NP];
    foreach (lo[i]) begin
      lo[i] = int'($urandom % 360);
      hi[i] = int'($urandom % 120) - 60;
    end
    foreach (pix[i]) pix[i] = (i > 100 && i < 140) ? 77 : int'($urandom % 256);
    idwt_ref(lo, hi, 16, 4, px);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (c < NP + LFW + LIW) begin
      @(negedge clk);
      if (c >= LIV && c - LIV < NP) cmp("vedic", c - LIV, ev, ov, px[2*(c-LIV)], px[2*(c-LIV)+1], 0);
      if (c >= LIW && c - LIW < NP) cmp("wallace", c - LIW, ew, ow, px[2*(c-LIW)], px[2*(c-LIW)+1], 0);
      if (c >= LFV + LIV && c - LFV - LIV < NP)
        cmp("round trip vedic", c - LFV - LIV, re_v, ro_v, pix[2*(c-LFV-LIV)], pix[2*(c-LFV-LIV)+1], 1);
      if (c >= LFW + LIW && c - LFW - LIW < NP)
        cmp("round trip wallace", c - LFW - LIW, re_w, ro_w, pix[2*(c-LFW-LIW)], pix[2*(c-LFW-LIW)+1], 1);
      en = ($urandom % 4) != 0;
      lin = (c < NP) ? 10'(lo[c]) : '0;
      hin = (c < NP) ? 10'(hi[c]) : '0;
      pe  = (c < NP) ? 8'(pix[2*c])   : '0;
      po  = (c < NP) ? 8'(pix[2*c+1]) : '0;
      @(posedge clk);
      if (en) c++;
    end
    $display("round-trip max error %0d grey levels", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
