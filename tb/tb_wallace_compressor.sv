// tb_wallace_compressor: random partial-product rows and negation bits;
// the two output rows must add (mod 2**16) to the weighted sum of the rows,
// the negation bits and the sign-extension constant 0x5600. A second pass
// drives rows produced from real Booth digits and checks the product.
module tb_wallace_compressor;
  import dwt_pkg::*;
  logic [9:0]  row [BOOTH_DIGITS];
  logic [BOOTH_DIGITS-1:0] neg;
  logic [15:0] sum, carry;
  int checks = 0, failures = 0;

  wallace_compressor dut (.row, .neg, .sum, .carry);

  initial begin
    for (int t = 0; t < 5000; t++) begin
      automatic int exp = 'h5600;
      for (int i = 0; i < BOOTH_DIGITS; i++) begin
        row[i] = 10'($urandom);
        exp += int'(row[i]) << (2*i);
      end
      neg = BOOTH_DIGITS'($urandom);
      for (int i = 0; i < BOOTH_DIGITS; i++) exp += int'(neg[i]) << (2*i);
      #1;
      checks++;
      if (16'(sum + carry) !== 16'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d %h+%h != %h", t, sum, carry, 16'(exp));
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
