// tb_dwt_ctrl: runs the controller (20 pair addresses, coefficient latency
// 5, reconstruction latency 9) with n_pairs = 10, 0 (taken as 1) and 30
// (clamped to 20). For each run it checks the address sequence, the number
// of memory reads, engine enables and padding clocks, that out_idx and
// rec_idx count 0..n-1 with out_valid / rec_valid exactly LATENCY /
// REC_LATENCY enables after the matching address, and that done comes
// once, with the last rebuilt pair.
module tb_dwt_ctrl;
  localparam int NP = 20, LAT = 5, RLAT = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [5:0] n_pairs = '0;
  logic busy, rd_en, dwt_en, pad, out_valid, rec_valid, done;
  logic [4:0] mem_adrs, out_idx, rec_idx;
  int checks = 0, failures = 0, cycles = 0;

  dwt_ctrl #(.N_PAIRS(NP), .LATENCY(LAT), .REC_LATENCY(RLAT), .PAW(5)) dut (
    .clk, .rst_n, .start, .n_pairs, .busy, .rd_en, .mem_adrs, .dwt_en, .pad,
    .out_valid, .out_idx, .rec_valid, .rec_idx, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int req, int n);
    int reads = 0, ens = 0, pads = 0, outs = 0, recs = 0, dones = 0, t = 0;
    int read_cycle[$];
    @(negedge clk);
    n_pairs = 6'(req);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy && t < 200) begin
      if (rd_en) begin
        if (int'(mem_adrs) != reads) begin failures++; $display("FAIL address %0d", mem_adrs); end
        read_cycle.push_back(t);
        reads++;
      end
      if (dwt_en) begin ens++; if (pad) pads++; end
      if (out_valid) begin
        checks++;
        if (int'(out_idx) != outs || t != read_cycle[outs] + 1 + LAT) begin
          failures++;
          $display("FAIL out %0d at %0d", out_idx, t);
        end
        outs++;
      end
      if (rec_valid) begin
        checks++;
        if (int'(rec_idx) != recs || t != read_cycle[recs] + 1 + RLAT) begin
          failures++;
          $display("FAIL rec %0d at %0d", rec_idx, t);
        end
        recs++;
      end
      if (done) begin
        dones++;
        checks++;
        if (!rec_valid || int'(rec_idx) != n - 1) failures++;
      end
      @(negedge clk);
      t++;
    end
    check("reads", reads, n);
    check("enables", ens, n + RLAT);
    check("pads", pads, RLAT);
    check("outputs", outs, n);
    check("rebuilt", recs, n);
    check("done", dones, 1);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(10, 10);
    run(0, 1);
    run(30, NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
