// tb_dwt_1d: a random 400-pixel line (with a flat run and a sharp edge) is
// streamed into a Vedic and a Wallace-tree 1D-DWT engine, first with a
// random enable pattern and then back to back, followed by zero padding.
// Every low/high output is compared with the reference lifting model, and
// the latency (7 and 12 samples) is checked by where each result appears:
// after c enabled clocks the engines show pair c - LATENCY.
module tb_dwt_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int NP   = 200;
  localparam int LATV = dwt_latency(MULT_VEDIC);
  localparam int LATW = dwt_latency(MULT_WALLACE);
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] even_in = '0, odd_in = '0;
  logic signed [9:0] lv, hv, lw, hw;
  int checks = 0, failures = 0, cycles = 0;
  int pix[], lo[], hi[];
  int c = 0;

  dwt_1d #(.MULT(MULT_VEDIC)) u_v (.clk, .rst_n, .en, .even_in, .odd_in, .lout(lv), .hout(hv));
  dwt_1d #(.MULT(MULT_WALLACE)) u_w (.clk, .rst_n, .en, .even_in, .odd_in, .lout(lw), .hout(hw));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic cmp(string what, int n, int got_l, int got_h);
    checks += 2;
    if (got_l != lo[n] || got_h != hi[n]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s pair %0d: low %0d/%0d high %0d/%0d", what, n, got_l, lo[n], got_h, hi[n]);
    end
  endtask

  initial begin
    pix = new[2*NP];
    foreach (pix[i]) pix[i] = $urandom % 256;
    for (int i = 40; i < 80; i++) pix[i] = 200;             // flat run
    for (int i = 80; i < 90; i++) pix[i] = (i % 2) ? 255 : 0; // sharp edges
    dwt_ref(pix, 16, 4, 10, lo, hi);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (c < NP + LATW) begin
      @(negedge clk);
      if (c >= LATV && c - LATV < NP) cmp("vedic", c - LATV, lv, hv);
      if (c >= LATW && c - LATW < NP) cmp("wallace", c - LATW, lw, hw);
      en = (c > NP / 2) ? 1'b1 : (($urandom % 3) != 0);
      even_in = (c < NP) ? 8'(pix[2*c])   : 8'd0;
      odd_in  = (c < NP) ? 8'(pix[2*c+1]) : 8'd0;
      @(posedge clk);
      if (en) c++;
    end
    @(negedge clk);
    if (c - LATW < NP) cmp("wallace", c - LATW, lw, hw);
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
