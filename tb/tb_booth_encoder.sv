// tb_booth_encoder: every 8-bit multiplier value is recoded; each digit is
// checked against the radix-4 recoding table and the digits, weighted by
// 4**i, must add back up to the multiplier.
module tb_booth_encoder;
  import dwt_pkg::*;
  logic [7:0]   b;
  booth_digit_t dig [BOOTH_DIGITS];
  int checks = 0, failures = 0;

  booth_encoder dut (.b, .dig);

  function automatic int table_digit(logic [2:0] g);
    case (g)
      3'b000: return 0;  3'b001: return 1;  3'b010: return 1;  3'b011: return 2;
      3'b100: return -2; 3'b101: return -1; 3'b110: return -1; default: return 0;
    endcase
  endfunction

  function automatic int dval(booth_digit_t d);
    int m = d.two ? 2 : d.one ? 1 : 0;
    return d.neg ? -m : m;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      automatic logic [10:0] bx;
      automatic int total = 0;
      b = 8'(v);
      bx = {2'b00, b, 1'b0};
      #1;
      for (int i = 0; i < BOOTH_DIGITS; i++) begin
        total += dval(dig[i]) * (4 ** i);
        checks++;
        if (dval(dig[i]) != table_digit(bx[2*i +: 3]) || (dig[i].one && dig[i].two)) begin
          failures++;
          $display("FAIL b=%0d digit %0d", v, i);
        end
      end
      checks++;
      if (total != v) begin
        failures++;
        $display("FAIL b=%0d recodes to %0d", v, total);
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
