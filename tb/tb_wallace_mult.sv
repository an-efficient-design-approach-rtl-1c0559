// tb_wallace_mult: all 65536 operand pairs streamed through the pipelined
// Wallace-tree multiplier, one per clock, checking each product exactly one
// enabled clock after its operands; a random en pattern checks that the
// pipeline holds while en is low.
module tb_wallace_mult;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0]  a = '0, b = '0;
  logic [15:0] p;
  int checks = 0, failures = 0, cycles = 0;
  int exp_q = 0;
  bit have_exp = 1'b0;

  wallace_mult #(.PIPELINED(1'b1)) dut (.clk, .rst_n, .en, .a, .b, .p);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    int v = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (v < 65536) begin
      @(negedge clk);
      // The product of the last operands accepted shows now.
      if (have_exp) begin
        checks++;
        if (p !== 16'(exp_q)) begin
          failures++;
          if (failures < 10) $display("FAIL expected %0d got %0d", exp_q, p);
        end
      end
      en = ($urandom % 8) != 0;
      a = 8'(v % 256);
      b = 8'(v / 256);
      if (en) begin
        exp_q = (v % 256) * (v / 256);
        have_exp = 1'b1;
        v++;
      end
    end
    @(negedge clk);
    checks++;
    if (p !== 16'(exp_q)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
