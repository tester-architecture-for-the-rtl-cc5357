// ss_option_top: the source synchronous test option of the tester.
//
// A DUT with a source synchronous bus sends its own clock next to its data. Instead of
// searching for that clock and placing fixed tester strobes, the option turns the DUT clock
// itself into the strobe that samples the data: jitter that moves clock and data together
// then cancels out. The design has N_DSR groups. Each group is one data strobe receiver
// (DSR) card, which makes even and odd data strobes from up to four DUT clocks, and eight
// SS pin slices, each of which delays the strobes it gets, latches the ACH/BCL bits of its
// eight data pins with them and lets its response ICs compare the latched bits at the
// tester strobe. Slice k of group g (index 8*g+k) takes even and odd output k of DSR g.
//
// Everything runs on one sample clock, one period per 2.5 ps time step. The DUT clock
// comparator bits (achi), data comparator bits (ach, bcl), the DINH events, tester strobes
// and expected states come from outside: pin electronics, cables, the DSR pin slice and the
// pattern/timing parts of the pin slices are not part of this RTL. Cable delays are
// expected to be applied to the inputs. Deskew table fill and delay programming use one
// shared address/data bus with a write enable per slice.
//
// Group count and slices per DSR follow the document (up to eight DSR cards, each wired to
// up to eight pin slices); the port grouping and the shared programming bus are own choices.
module ss_option_top
  import ss_pkg::*;
#(
  parameter int unsigned N_DSR = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // DSR cards
  input  logic [DSR_CLOCKS-1:0]   achi          [N_DSR],
  input  logic [DSR_CLOCKS-1:0]   dinh_e        [N_DSR],
  input  logic [DSR_CLOCKS-1:0]   dinh_o        [N_DSR],
  input  stb_gen_cfg_t            cfg_e         [N_DSR][DSR_CLOCKS],
  input  stb_gen_cfg_t            cfg_o         [N_DSR][DSR_CLOCKS],
  input  dly_code_t               dinh_code_e   [N_DSR][DSR_CLOCKS],
  input  dly_code_t               dinh_code_o   [N_DSR][DSR_CLOCKS],
  input  logic [1:0]              sel_e         [N_DSR][DSR_OUTPUTS],
  input  logic [1:0]              sel_o         [N_DSR][DSR_OUTPUTS],
  output logic [N_DSR-1:0]        dinh_overflow,
  // SS pin slices
  input  logic [SLICE_PINS-1:0]   ach           [N_DSR*DSR_OUTPUTS],
  input  logic [SLICE_PINS-1:0]   bcl           [N_DSR*DSR_OUTPUTS],
  input  logic [SLICE_PAIRS-1:0]  mux_mode      [N_DSR*DSR_OUTPUTS],
  input  logic [SLICE_PAIRS-1:0]  mux_odd       [N_DSR*DSR_OUTPUTS],
  input  logic [SLICE_PINS-1:0]   ss_en         [N_DSR*DSR_OUTPUTS],
  input  logic [N_DSR*DSR_OUTPUTS-1:0] lut_we,
  input  logic [DTIME_W-1:0]      lut_addr,
  input  dly_code_t               lut_wdata,
  input  logic [N_DSR*DSR_OUTPUTS-1:0] dly_we,
  input  logic [$clog2(SLICE_LINES)-1:0] dly_line,
  input  logic [DTIME_W-1:0]      dly_time,
  input  logic [SLICE_PINS-1:0]   tstb          [N_DSR*DSR_OUTPUTS],
  input  expect_e                 exp_st        [N_DSR*DSR_OUTPUTS][SLICE_PINS],
  input  logic                    clr,
  output logic [SLICE_PINS-1:0]   cmp_valid     [N_DSR*DSR_OUTPUTS],
  output logic [SLICE_PINS-1:0]   fail          [N_DSR*DSR_OUTPUTS],
  output logic [SLICE_PINS-1:0]   fail_sticky   [N_DSR*DSR_OUTPUTS],
  output logic [N_DSR*DSR_OUTPUTS-1:0] dly_overflow
);

  for (genvar g = 0; g < N_DSR; g++) begin : g_grp
    logic [DSR_OUTPUTS-1:0] estb, ostb;

    ss_dsr u_dsr (
      .clk, .rst_n,
      .achi         (achi[g]),
      .dinh_e       (dinh_e[g]),
      .dinh_o       (dinh_o[g]),
      .cfg_e        (cfg_e[g]),
      .cfg_o        (cfg_o[g]),
      .dinh_code_e  (dinh_code_e[g]),
      .dinh_code_o  (dinh_code_o[g]),
      .sel_e        (sel_e[g]),
      .sel_o        (sel_o[g]),
      .estb, .ostb,
      .dinh_overflow(dinh_overflow[g])
    );

    for (genvar k = 0; k < DSR_OUTPUTS; k++) begin : g_sl
      localparam int unsigned S = g * DSR_OUTPUTS + k;
      ss_pinslice u_slice (
        .clk, .rst_n,
        .estb        (estb[k]),
        .ostb        (ostb[k]),
        .ach         (ach[S]),
        .bcl         (bcl[S]),
        .mux_mode    (mux_mode[S]),
        .mux_odd     (mux_odd[S]),
        .ss_en       (ss_en[S]),
        .lut_we      (lut_we[S]),
        .lut_addr,
        .lut_wdata,
        .dly_we      (dly_we[S]),
        .dly_line,
        .dly_time,
        .tstb        (tstb[S]),
        .exp_st      (exp_st[S]),
        .clr,
        .cmp_valid   (cmp_valid[S]),
        .fail        (fail[S]),
        .fail_sticky (fail_sticky[S]),
        .dly_overflow(dly_overflow[S])
      );
    end
  end

endmodule
