// tb_lift_step: random x and y streams with a random enable pattern into a
// Vedic (alpha) and a Wallace-tree (gamma) lifting step. After c enabled
// clocks the output must be y[n] + C*(x[n] + x[n-1]) for n = c - (LAT+1),
// i.e. the latency is exactly LAT+1 samples (1 for Vedic, 2 for Wallace).
module tb_lift_step;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
  localparam int LV = mult_latency(MULT_VEDIC) + 1;
  localparam int LW = mult_latency(MULT_WALLACE) + 1;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [15:0] x = '0, y = '0, zv, zw;
  int checks = 0, failures = 0, cycles = 0;
  longint xs[$], ys[$];

  lift_step #(.MULT(MULT_VEDIC), .DW(16), .COEF_MAG(ALPHA_MAG), .COEF_SHIFT(ALPHA_SH),
              .COEF_NEG(ALPHA_NEG)) u_v (.clk, .rst_n, .en, .x_in(x), .y_in(y), .z_out(zv));
  lift_step #(.MULT(MULT_WALLACE), .DW(16), .COEF_MAG(GAMMA_MAG), .COEF_SHIFT(GAMMA_SH),
              .COEF_NEG(GAMMA_NEG)) u_w (.clk, .rst_n, .en, .x_in(x), .y_in(y), .z_out(zw));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic longint expect_z(int n, int mag, int sh, bit neg);
    longint xp = (n > 0) ? xs[n-1] : 0;
    return sat(ys[n] + coef_mul(xs[n] + xp, mag, sh, neg, 17, 16), 16);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (xs.size() >= LV) begin
        checks++;
        if (zv != expect_z(xs.size() - LV, ALPHA_MAG, ALPHA_SH, ALPHA_NEG)) begin
          failures++;
          if (failures < 10) $display("FAIL vedic n=%0d got %0d", xs.size() - LV, zv);
        end
      end
      if (xs.size() >= LW) begin
        checks++;
        if (zw != expect_z(xs.size() - LW, GAMMA_MAG, GAMMA_SH, GAMMA_NEG)) begin
          failures++;
          if (failures < 10) $display("FAIL wallace n=%0d got %0d", xs.size() - LW, zw);
        end
      end
      en = ($urandom % 3) != 0;
      x = 16'($signed(13'($urandom)));
      y = 16'($signed(13'($urandom)));
      if (en) begin
        xs.push_back(x);
        ys.push_back(y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
