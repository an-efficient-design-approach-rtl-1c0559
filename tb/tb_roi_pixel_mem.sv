// tb_roi_pixel_mem: loads all 7740 pixels of a full ROI with a hashed
// pattern, then reads every pair address in order and 2000 random ones,
// checking even_out = pixel 2k and odd_out = pixel 2k+1 one clock after
// the read, and that the outputs hold while rd_en is low.
module tb_roi_pixel_mem;
  localparam int DEPTH = 7740;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [12:0] wr_addr = '0;
  logic [7:0]  wr_data = '0, even_out, odd_out;
  logic [11:0] pair_addr = '0;
  int checks = 0, failures = 0, cycles = 0;
  logic [7:0] img [DEPTH];

  roi_pixel_mem #(.DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .pair_addr,
                                      .even_out, .odd_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic read_check(int k);
    @(negedge clk);
    rd_en = 1'b1;
    pair_addr = 12'(k);
    @(negedge clk);
    rd_en = 1'b0;
    pair_addr = 12'(($urandom % (DEPTH / 2)));
    checks++;
    if (even_out !== img[2*k] || odd_out !== img[2*k+1]) begin
      failures++;
      if (failures < 10) $display("FAIL pair %0d: %h %h", k, even_out, odd_out);
    end
    @(negedge clk);
    checks++;
    if (even_out !== img[2*k] || odd_out !== img[2*k+1]) failures++;  // held
  endtask

  initial begin
    foreach (img[i]) img[i] = 8'((i * 37) ^ (i >> 5));
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = 13'(i); wr_data = img[i];
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < DEPTH / 2; k++) read_check(k);
    for (int t = 0; t < 2000; t++) read_check($urandom % (DEPTH / 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
