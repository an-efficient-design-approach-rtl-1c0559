// tb_coef_mult: random signed inputs (with the extreme values) through four
// coefficient multipliers: alpha on Vedic cores, alpha on Wallace-tree cores,
// K with integer rounding on Vedic cores (10-bit, saturating) and delta on
// Wallace-tree cores. Vedic results are checked in the same clock, Wallace-
// tree results one enabled clock later, against the reference model.
module tb_coef_mult;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [16:0] x = '0;
  logic signed [15:0] y_va, y_wa, y_wd;
  logic signed [9:0]  y_vk;
  int checks = 0, failures = 0, cycles = 0;
  longint exp_wa = 0, exp_wd = 0;
  bit have = 1'b0;

  coef_mult #(.MULT(MULT_VEDIC), .IN_W(17), .OUT_W(16), .COEF_MAG(ALPHA_MAG),
              .COEF_SHIFT(ALPHA_SH), .COEF_NEG(ALPHA_NEG))
    u_va (.clk, .rst_n, .en, .x, .y(y_va));
  coef_mult #(.MULT(MULT_WALLACE), .IN_W(17), .OUT_W(16), .COEF_MAG(ALPHA_MAG),
              .COEF_SHIFT(ALPHA_SH), .COEF_NEG(ALPHA_NEG))
    u_wa (.clk, .rst_n, .en, .x, .y(y_wa));
  coef_mult #(.MULT(MULT_VEDIC), .IN_W(17), .OUT_W(10), .COEF_MAG(KSC_MAG),
              .COEF_SHIFT(KSC_SH + 4), .COEF_NEG(1'b0))
    u_vk (.clk, .rst_n, .en, .x, .y(y_vk));
  coef_mult #(.MULT(MULT_WALLACE), .IN_W(17), .OUT_W(16), .COEF_MAG(DELTA_MAG),
              .COEF_SHIFT(DELTA_SH), .COEF_NEG(DELTA_NEG))
    u_wd (.clk, .rst_n, .en, .x, .y(y_wd));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, longint got, longint exp, longint xin);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d got %0d expected %0d", what, xin, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if (have) begin
        check("wallace alpha", y_wa, exp_wa, 0);
        check("wallace delta", y_wd, exp_wd, 0);
      end
      en = ($urandom % 4) != 0;
      case (t % 50)
        0: x = 17'sh10000;   // most negative
        1: x = 17'sh0ffff;   // most positive
        2: x = '0;
        default: x = (t % 3 == 0) ? 17'($signed(8'($urandom))) : 17'($urandom);
      endcase
      #1;
      check("vedic alpha", y_va, coef_mul(x, ALPHA_MAG, ALPHA_SH, ALPHA_NEG, 17, 16), x);
      check("vedic K",     y_vk, coef_mul(x, KSC_MAG, KSC_SH + 4, 1'b0, 17, 10), x);
      if (en) begin
        exp_wa = coef_mul(x, ALPHA_MAG, ALPHA_SH, ALPHA_NEG, 17, 16);
        exp_wd = coef_mul(x, DELTA_MAG, DELTA_SH, DELTA_NEG, 17, 16);
        have = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
