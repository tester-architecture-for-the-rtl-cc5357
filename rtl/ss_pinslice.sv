// ss_pinslice: compare side of one source synchronous pin slice (eight tester channels).
//
// Pins are taken in even/odd pairs (0/1, 2/3, 4/5, 6/7). In normal mode each channel
// receives its own pin's ACH/BCL bits. In mux mode the ACH/BCL bits of one pin of the pair
// (the even pin, or the odd pin when mux_odd is set) go to both channels, so the even and
// odd response ICs together strobe one pin at twice the channel rate. Even channels take
// their strobe from estb and odd channels from ostb, the two data strobes this slice gets
// from its DSR card.
//
// Every channel has an ACH and a BCL delay line (line 2*pin and 2*pin+1). Software programs
// a line by giving the desired delay in 2.5 ps steps (dly_we, dly_line, dly_time); the slice
// looks the codes up in its deskew table and loads the line's code register one clock
// later. Calibration fills the table through lut_we/lut_addr/lut_wdata.
//
// The pin mux, mux mode, per-pin SS enable, delay lines and table follow the document; the
// programming port, the table read on programming and code registers reset to zero are own
// choices.
module ss_pinslice
  import ss_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // data strobes from the DSR card
  input  logic                  estb,
  input  logic                  ostb,
  // digitized DUT outputs from the pin electronics
  input  logic [SLICE_PINS-1:0] ach,
  input  logic [SLICE_PINS-1:0] bcl,
  // configuration
  input  logic [SLICE_PAIRS-1:0] mux_mode,
  input  logic [SLICE_PAIRS-1:0] mux_odd,
  input  logic [SLICE_PINS-1:0]  ss_en,
  // deskew table fill
  input  logic                  lut_we,
  input  logic [DTIME_W-1:0]    lut_addr,
  input  dly_code_t             lut_wdata,
  // delay programming
  input  logic                  dly_we,
  input  logic [$clog2(SLICE_LINES)-1:0] dly_line,
  input  logic [DTIME_W-1:0]    dly_time,
  // tester strobes and expected data
  input  logic [SLICE_PINS-1:0] tstb,
  input  expect_e               exp_st [SLICE_PINS],
  input  logic                  clr,
  // results
  output logic [SLICE_PINS-1:0] cmp_valid,
  output logic [SLICE_PINS-1:0] fail,
  output logic [SLICE_PINS-1:0] fail_sticky,
  output logic                  dly_overflow
);

  localparam int unsigned LW = $clog2(SLICE_LINES);

  dly_code_t               code_q [SLICE_LINES];
  dly_code_t               lut_rdata;
  logic                    load_q;
  logic [LW-1:0]           line_q;
  logic [SLICE_PINS-1:0]   mach, mbcl;   // pin mux outputs
  logic [SLICE_PINS-1:0]   ovf;

  ss_deskew_lut u_lut (
    .clk, .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
    .rd_en(dly_we), .raddr(dly_time), .rdata(lut_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q <= 1'b0;
      line_q <= '0;
      for (int i = 0; i < SLICE_LINES; i++) code_q[i] <= '0;
    end else begin
      load_q <= dly_we;
      line_q <= dly_line;
      if (load_q) code_q[line_q] <= lut_rdata;
    end
  end

  // pin mux
  always_comb begin
    for (int p = 0; p < SLICE_PAIRS; p++) begin
      if (mux_mode[p]) begin
        mach[2*p]   = mux_odd[p] ? ach[2*p+1] : ach[2*p];
        mbcl[2*p]   = mux_odd[p] ? bcl[2*p+1] : bcl[2*p];
        mach[2*p+1] = mach[2*p];
        mbcl[2*p+1] = mbcl[2*p];
      end else begin
        mach[2*p]   = ach[2*p];
        mbcl[2*p]   = bcl[2*p];
        mach[2*p+1] = ach[2*p+1];
        mbcl[2*p+1] = bcl[2*p+1];
      end
    end
  end

  for (genvar i = 0; i < SLICE_PINS; i++) begin : g_ch
    ss_pin_channel u_ch (
      .clk, .rst_n,
      .dstb        ((i % 2 == 0) ? estb : ostb),
      .code_a      (code_q[2*i]),
      .code_b      (code_q[2*i+1]),
      .ss_en       (ss_en[i]),
      .ach         (mach[i]),
      .bcl         (mbcl[i]),
      .tstb        (tstb[i]),
      .exp_st      (exp_st[i]),
      .clr,
      .cmp_valid   (cmp_valid[i]),
      .fail        (fail[i]),
      .fail_sticky (fail_sticky[i]),
      .dly_overflow(ovf[i]),
      .lat_ach     (),
      .lat_bcl     ()
    );
  end

  assign dly_overflow = |ovf;

endmodule
