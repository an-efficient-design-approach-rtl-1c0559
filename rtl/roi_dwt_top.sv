// roi_dwt_top: ROI-based DWT system with the Wallace-tree chain (DWT-WM)
// and the Vedic chain (DWT-VM) side by side.
//
// The ROI pixels are loaded into roi_pixel_mem through the ld_* port.
// A start pulse makes dwt_ctrl stream the even/odd pairs 0..n_pairs-1 from
// the memory, one pair per clock, into both 9/7 lifting engines at once,
// followed by zero padding while the pipelines drain. Each forward engine
// feeds an inverse engine that rebuilds the ROI pixels from the low/high
// stream. The Vedic chain has the shorter pipelines; its outputs are
// delayed to line up with the Wallace-tree chain's, so out_valid/out_idx
// apply to the four coefficient outputs and rec_valid/rec_idx to the four
// rebuilt pixel outputs. The design evaluates the two multiplier options as
// separate builds; they are kept in one top here so both are exercised on
// the same stream.
//
// The ROI is a ROWS x COLS raster (ROWS and COLS even). When a run covered
// the whole memory (n_pairs >= N_PAIRS), each chain's row-pass results are
// also stored and, after done, transformed down every column by a
// dwt_2d_col block, giving the 2D transform. Column results come out on
// col_valid/col_col/col_idx with both chains aligned, ending with col_done.
// busy stays high, and start is ignored, until the column pass is over.
//
// Timing: mem_adrs runs one address per clock; the low/high pair for
// address k appears dwt_latency(MULT_WALLACE) + 1 = 13 clocks after k was on
// mem_adrs, the rebuilt pixel pair 13 + idwt_latency(MULT_WALLACE) = 26
// clocks after. Active-low asynchronous reset (rst_n), as in the design.
module roi_dwt_top
  import dwt_pkg::*;
#(
  parameter int ROWS    = 90,
  parameter int COLS    = 86,
  parameter int N_PAIRS = ROWS * COLS / 2,
  parameter int DW      = 16,
  parameter int FRAC    = 4,
  parameter int OUT_W   = 10,
  parameter int AW      = $clog2(2 * N_PAIRS),
  parameter int PAW     = $clog2(N_PAIRS),
  parameter int CW      = $clog2(COLS),
  parameter int MW      = $clog2(ROWS / 2)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pixel load port
  input  logic                    ld_en,
  input  logic [AW-1:0]           ld_addr,
  input  logic [7:0]              ld_data,
  // control
  input  logic                    start,
  input  logic [PAW:0]            n_pairs,
  output logic                    busy,
  output logic                    done,
  output logic [PAW-1:0]          mem_adrs,
  // results
  output logic                    out_valid,
  output logic [PAW-1:0]          out_idx,
  output logic signed [OUT_W-1:0] lout_wm,
  output logic signed [OUT_W-1:0] hout_wm,
  output logic signed [OUT_W-1:0] lout_vm,
  output logic signed [OUT_W-1:0] hout_vm,
  // rebuilt ROI pixels
  output logic                    rec_valid,
  output logic [PAW-1:0]          rec_idx,
  output logic [7:0]              rec_even_wm,
  output logic [7:0]              rec_odd_wm,
  output logic [7:0]              rec_even_vm,
  output logic [7:0]              rec_odd_vm,
  // column pass (2D transform)
  output logic                    col_valid,
  output logic [CW-1:0]           col_col,
  output logic [MW-1:0]           col_idx,
  output logic signed [OUT_W:0]   col_lo_wm,
  output logic signed [OUT_W:0]   col_hi_wm,
  output logic signed [OUT_W:0]   col_lo_vm,
  output logic signed [OUT_W:0]   col_hi_vm,
  output logic                    col_done
);
  localparam int LAT_WM = dwt_latency(MULT_WALLACE);
  localparam int LAT_VM = dwt_latency(MULT_VEDIC);
  localparam int REC_WM = LAT_WM + idwt_latency(MULT_WALLACE);
  localparam int REC_VM = LAT_VM + idwt_latency(MULT_VEDIC);
  localparam int PADS2D = LAT_WM + 4;

  logic       row_busy, row_done, row_start, full_run, col_busy_wm, col_busy_vm;
  logic signed [OUT_W:0] clo_vm_raw, chi_vm_raw;

  logic       rd_en, dwt_en, pad;
  logic [7:0] mem_even, mem_odd, even_in, odd_in;
  logic signed [OUT_W-1:0] lvm_raw, hvm_raw;
  logic [7:0] rev_raw, rov_raw;

  roi_pixel_mem #(.DEPTH(2 * N_PAIRS), .AW(AW), .PAW(PAW)) u_mem (
    .clk, .wr_en(ld_en), .wr_addr(ld_addr), .wr_data(ld_data),
    .rd_en, .pair_addr(mem_adrs), .even_out(mem_even), .odd_out(mem_odd));

  dwt_ctrl #(.N_PAIRS(N_PAIRS), .LATENCY(LAT_WM), .REC_LATENCY(REC_WM), .PAW(PAW)) u_ctrl (
    .clk, .rst_n, .start(row_start), .n_pairs, .busy(row_busy), .rd_en, .mem_adrs,
    .dwt_en, .pad, .out_valid, .out_idx, .rec_valid, .rec_idx, .done(row_done));

  assign even_in = pad ? 8'd0 : mem_even;
  assign odd_in  = pad ? 8'd0 : mem_odd;

  dwt_1d #(.MULT(MULT_WALLACE), .DW(DW), .FRAC(FRAC), .OUT_W(OUT_W)) u_dwt_wm (
    .clk, .rst_n, .en(dwt_en), .even_in, .odd_in, .lout(lout_wm), .hout(hout_wm));

  dwt_1d #(.MULT(MULT_VEDIC), .DW(DW), .FRAC(FRAC), .OUT_W(OUT_W)) u_dwt_vm (
    .clk, .rst_n, .en(dwt_en), .even_in, .odd_in, .lout(lvm_raw), .hout(hvm_raw));

  delay_line #(.W(2 * OUT_W), .N(LAT_WM - LAT_VM)) u_vm_align (
    .clk, .rst_n, .en(dwt_en), .d({lvm_raw, hvm_raw}), .q({lout_vm, hout_vm}));

  idwt_1d #(.MULT(MULT_WALLACE), .DW(DW), .FRAC(FRAC), .IN_W(OUT_W)) u_idwt_wm (
    .clk, .rst_n, .en(dwt_en), .lin(lout_wm), .hin(hout_wm),
    .even_out(rec_even_wm), .odd_out(rec_odd_wm));

  idwt_1d #(.MULT(MULT_VEDIC), .DW(DW), .FRAC(FRAC), .IN_W(OUT_W)) u_idwt_vm (
    .clk, .rst_n, .en(dwt_en), .lin(lvm_raw), .hin(hvm_raw),
    .even_out(rev_raw), .odd_out(rov_raw));

  delay_line #(.W(16), .N(REC_WM - REC_VM)) u_vm_rec_align (
    .clk, .rst_n, .en(dwt_en), .d({rev_raw, rov_raw}), .q({rec_even_vm, rec_odd_vm}));

  // ---- column pass ----
  assign row_start = start && !busy;
  assign busy      = row_busy || col_busy_wm || col_busy_vm;
  assign done      = row_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         full_run <= 1'b0;
    else if (row_start) full_run <= (int'(n_pairs) >= N_PAIRS);
  end

  dwt_2d_col #(.MULT(MULT_WALLACE), .ROWS(ROWS), .COLS(COLS), .IN_W(OUT_W), .DW(DW + 2),
               .FRAC(FRAC), .OUT_W(OUT_W + 1), .PADS(PADS2D), .PAW(PAW), .CW(CW), .MW(MW)) u_col_wm (
    .clk, .rst_n, .rp_valid(out_valid), .rp_idx(out_idx), .rp_lo(lout_wm), .rp_hi(hout_wm),
    .start(row_done && full_run), .busy(col_busy_wm), .done(col_done),
    .c_valid(col_valid), .c_col(col_col), .c_idx(col_idx), .c_lo(col_lo_wm), .c_hi(col_hi_wm));

  // The Vedic column engine follows the same schedule LAT_WM - LAT_VM
  // clocks earlier; its results are delayed to line up.
  dwt_2d_col #(.MULT(MULT_VEDIC), .ROWS(ROWS), .COLS(COLS), .IN_W(OUT_W), .DW(DW + 2),
               .FRAC(FRAC), .OUT_W(OUT_W + 1), .PADS(PADS2D), .PAW(PAW), .CW(CW), .MW(MW)) u_col_vm (
    .clk, .rst_n, .rp_valid(out_valid), .rp_idx(out_idx), .rp_lo(lout_vm), .rp_hi(hout_vm),
    .start(row_done && full_run), .busy(col_busy_vm), .done(),
    .c_valid(), .c_col(), .c_idx(), .c_lo(clo_vm_raw), .c_hi(chi_vm_raw));

  delay_line #(.W(2 * OUT_W + 2), .N(LAT_WM - LAT_VM)) u_vm_col_align (
    .clk, .rst_n, .en(1'b1), .d({clo_vm_raw, chi_vm_raw}), .q({col_lo_vm, col_hi_vm}));
endmodule
