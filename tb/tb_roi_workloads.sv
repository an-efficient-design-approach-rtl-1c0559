// tb_roi_workloads: runs the other ROI sizes of interest through the whole
// system, each in its own top sized for it: the 86x90 and 90x90 ROIs and a
// whole 256x256 slice. The 86x90 ROI uses the default 7740-pixel store in
// the other orientation; the 90x90 ROI and the full slice need larger
// stores (8100 and 65536 pixels). Each run checks every row coefficient,
// rebuilt pixel and column result of both chains (see roi_workload_run).
module tb_roi_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin [3];
  int chk [3], fail [3];
  int cycles = 0;

  roi_workload_run #(.ROWS(86),  .COLS(90),  .NAME("ROI 86x90"))  u_a (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  roi_workload_run #(.ROWS(90),  .COLS(90),  .NAME("ROI 90x90"))  u_b (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  roi_workload_run #(.ROWS(256), .COLS(256), .NAME("slice 256x256")) u_c (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2]);
    $finish;
  end

  initial begin
    wait (cycles == 400000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end
endmodule
