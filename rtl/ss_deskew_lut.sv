// ss_deskew_lut: deskew look-up table of an SS pin slice.
//
// The coarse and fine delay elements are not linear, so a delay cannot be programmed by
// arithmetic. Calibration measures the elements and writes, for every desired delay in
// 2.5 ps steps, the coarse/fine code that comes closest; later a desired delay is turned
// into a code by one read. Write and read are synchronous; the read data appear one clock
// after rd_en. The table has 2**DTIME_W entries (0 to 1277.5 ps).
//
// The table and its 2.5 ps resolution are the document's; its depth, the one-clock read
// and keeping it in hardware (the document does not say where the table lives) are own
// choices. The contents are not reset: calibration must write every entry it uses.
module ss_deskew_lut
  import ss_pkg::*;
#(
  parameter int unsigned AW = ss_pkg::DTIME_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  dly_code_t     wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output dly_code_t     rdata
);

  dly_code_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
