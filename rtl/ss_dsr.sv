// ss_dsr: strobe clock generation, select and fan-out of the data strobe receiver (DSR)
// card.
//
// The card receives four DUT clocks (the ACHI comparator outputs of its channels 1, 3, 5
// and 7). From each clock an even and an odd strobe generator make strobes on the rising,
// falling or both edges, optionally divided by two. The divider of each generator starts
// on its own drive-inhibit signal (DINH) from the DSR pin slice, which first passes a
// programmable delay line so that calibration can place the DINH event correctly: four
// DINH delay lines for the even and four for the odd generators. Eight 4:1 muxes select
// one of the four even strobes for each of the eight even outputs, and eight more do the
// same for the odd outputs; output k goes to SS pin slice k. Even and odd strobe of one
// slice may come from two different DUT clocks.
//
// A DINH level is delayed by sending each of its transitions through the delay line and
// toggling a register when it comes out; DINH must therefore stay at one level for longer
// than the line holds transitions in flight.
//
// Timing: a strobe output follows the ACHI sample that shows the edge by one step; the
// output muxes are combinational. Counts (4 clocks, 8+8 outputs, 8 DINH delay lines,
// edge modes, by-2 divider, enable) are the document's; the rest is own choice.
module ss_dsr
  import ss_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [DSR_CLOCKS-1:0]   achi,
  input  logic [DSR_CLOCKS-1:0]   dinh_e,
  input  logic [DSR_CLOCKS-1:0]   dinh_o,
  input  stb_gen_cfg_t            cfg_e [DSR_CLOCKS],
  input  stb_gen_cfg_t            cfg_o [DSR_CLOCKS],
  input  dly_code_t               dinh_code_e [DSR_CLOCKS],
  input  dly_code_t               dinh_code_o [DSR_CLOCKS],
  input  logic [1:0]              sel_e [DSR_OUTPUTS],
  input  logic [1:0]              sel_o [DSR_OUTPUTS],
  output logic [DSR_OUTPUTS-1:0]  estb,
  output logic [DSR_OUTPUTS-1:0]  ostb,
  output logic                    dinh_overflow
);

  logic [DSR_CLOCKS-1:0] gen_e, gen_o;
  logic [DSR_CLOCKS-1:0] dinh_e_q, dinh_o_q;    // previous DINH input level
  logic [DSR_CLOCKS-1:0] dinh_e_d, dinh_o_d;    // delayed DINH level
  logic [DSR_CLOCKS-1:0] tr_e, tr_o;            // delayed DINH transitions
  logic [DSR_CLOCKS-1:0] ovf_e, ovf_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dinh_e_q <= '0;
      dinh_o_q <= '0;
      dinh_e_d <= '0;
      dinh_o_d <= '0;
    end else begin
      dinh_e_q <= dinh_e;
      dinh_o_q <= dinh_o;
      dinh_e_d <= dinh_e_d ^ tr_e;
      dinh_o_d <= dinh_o_d ^ tr_o;
    end
  end

  for (genvar c = 0; c < DSR_CLOCKS; c++) begin : g_clk
    ss_delay_line u_dinh_dly_e (
      .clk, .rst_n, .code(dinh_code_e[c]), .in_pulse(dinh_e[c] ^ dinh_e_q[c]),
      .out_pulse(tr_e[c]), .overflow(ovf_e[c])
    );
    ss_delay_line u_dinh_dly_o (
      .clk, .rst_n, .code(dinh_code_o[c]), .in_pulse(dinh_o[c] ^ dinh_o_q[c]),
      .out_pulse(tr_o[c]), .overflow(ovf_o[c])
    );
    ss_strobe_gen u_gen_e (
      .clk, .rst_n, .cfg(cfg_e[c]), .achi(achi[c]), .dinh(dinh_e_d[c]), .stb(gen_e[c])
    );
    ss_strobe_gen u_gen_o (
      .clk, .rst_n, .cfg(cfg_o[c]), .achi(achi[c]), .dinh(dinh_o_d[c]), .stb(gen_o[c])
    );
  end

  // fan-out: eight 4:1 muxes per strobe kind
  always_comb begin
    for (int k = 0; k < DSR_OUTPUTS; k++) begin
      estb[k] = gen_e[sel_e[k]];
      ostb[k] = gen_o[sel_o[k]];
    end
  end

  assign dinh_overflow = |{ovf_e, ovf_o};

endmodule
