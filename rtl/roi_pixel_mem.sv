// roi_pixel_mem: ROI image store and even/odd splitter.
//
// Holds DEPTH 8-bit pixels in raster order. Pixels are written one at a time
// by linear address; reads return one even/odd pair per clock: pair address
// k gives pixel 2k on even_out and pixel 2k+1 on odd_out. The store is two
// banks (even and odd addresses), each with one write and one read port, so
// each maps onto a simple dual-port block RAM. The read is synchronous:
// data appear the clock after rd_en. DEPTH = 7740 is the 90x86 ROI of the
// design (3870 pair addresses). No reset: contents are whatever was loaded.
module roi_pixel_mem #(
  parameter int DEPTH = 7740,
  parameter int AW    = $clog2(DEPTH),
  parameter int PAW   = $clog2(DEPTH / 2)
) (
  input  logic           clk,
  // load port
  input  logic           wr_en,
  input  logic [AW-1:0]  wr_addr,
  input  logic [7:0]     wr_data,
  // pair read port
  input  logic           rd_en,
  input  logic [PAW-1:0] pair_addr,
  output logic [7:0]     even_out,
  output logic [7:0]     odd_out
);
  localparam int PAIRS = DEPTH / 2;

  logic [7:0] bank_even [PAIRS];
  logic [7:0] bank_odd  [PAIRS];

  logic [PAW-1:0] wr_pair;
  assign wr_pair = PAW'(wr_addr >> 1);

  always_ff @(posedge clk) begin
    if (wr_en && !wr_addr[0] && int'(wr_pair) < PAIRS) bank_even[wr_pair] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr[0] && int'(wr_pair) < PAIRS) bank_odd[wr_pair] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en && int'(pair_addr) < PAIRS) begin
      even_out <= bank_even[pair_addr];
      odd_out  <= bank_odd[pair_addr];
    end
  end
endmodule
