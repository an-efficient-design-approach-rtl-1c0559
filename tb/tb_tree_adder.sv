// tb_tree_adder: random and corner operands against a + b mod 2**16.
module tb_tree_adder;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  tree_adder #(.W(16)) dut (.a, .b, .y);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      a = (t < 4) ? 16'hffff : 16'($urandom);
      b = (t < 2) ? 16'h0001 : 16'($urandom);
      #1;
      checks++;
      if (y !== 16'(int'(a) + int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h = %h", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
