// tb_pp_generator: for every multiplicand and every Booth digit
// (0, +-1, +-2) the partial-product row, read with its inverted sign bit
// (value = row[8:0] + 512*row[9] - 512) plus its negation bit, must equal
// digit * multiplicand.
module tb_pp_generator;
  import dwt_pkg::*;
  logic [7:0]   a;
  booth_digit_t dig [BOOTH_DIGITS];
  logic [9:0]   row [BOOTH_DIGITS];
  logic [BOOTH_DIGITS-1:0] neg;
  int checks = 0, failures = 0;

  pp_generator dut (.a, .dig, .row, .neg);

  localparam booth_digit_t CODES [5] = '{
    '{one:1'b0, two:1'b0, neg:1'b0}, '{one:1'b1, two:1'b0, neg:1'b0},
    '{one:1'b0, two:1'b1, neg:1'b0}, '{one:1'b1, two:1'b0, neg:1'b1},
    '{one:1'b0, two:1'b1, neg:1'b1}};
  localparam int VALS [5] = '{0, 1, 2, -1, -2};

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < 5; c++) begin
        a = 8'(v);
        for (int i = 0; i < BOOTH_DIGITS; i++) dig[i] = CODES[(c + i) % 5];
        #1;
        for (int i = 0; i < BOOTH_DIGITS; i++) begin
          automatic int got = int'(row[i][8:0]) + 512 * int'(row[i][9]) - 512 + int'(neg[i]);
          automatic int exp = VALS[(c + i) % 5] * v;
          checks++;
          if (got != exp) begin
            failures++;
            $display("FAIL a=%0d digit %0d: %0d expected %0d", v, VALS[(c+i)%5], got, exp);
          end
        end
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
