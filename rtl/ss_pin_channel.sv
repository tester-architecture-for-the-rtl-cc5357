// ss_pin_channel: compare side of one tester channel of the SS pin slice.
//
// The channel's data strobe (even strobe for an even pin, odd strobe for an odd pin) passes
// through two delay lines, A for the ACH path and B for the BCL path. Each delayed strobe
// loads its source sync latch with the ACH or BCL bit coming from the pin mux. A 2:1 source
// sync mux per bit hands the response IC either the latch output (ss_en set) or the live
// ACH/BCL bit (ss_en clear, normal strobing), and the response IC compares at the tester
// strobe. With SS strobing the tester strobe only has to fall in the quiet time between two
// latch loads, not on the data eye itself.
//
// Structure (delay line, latch, 2:1 mux, RIC4 per bit) follows the document. The latch is
// an edge-loaded register in this step-sampled model. The latch is reset to 0.
module ss_pin_channel
  import ss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      dstb,        // data strobe from the DSR (even or odd)
  input  dly_code_t code_a,      // ACH path delay
  input  dly_code_t code_b,      // BCL path delay
  input  logic      ss_en,       // source sync strobing on for this pin
  input  logic      ach,         // from the pin mux
  input  logic      bcl,
  input  logic      tstb,        // tester strobe
  input  expect_e   exp_st,
  input  logic      clr,
  output logic      cmp_valid,
  output logic      fail,
  output logic      fail_sticky,
  output logic      dly_overflow,
  output logic      lat_ach,     // latch contents, for observation
  output logic      lat_bcl
);

  logic clk_a, clk_b;  // delayed strobes (ClknA, ClknB)
  logic ovf_a, ovf_b;
  logic ric_ach, ric_bcl;

  ss_delay_line u_dly_a (
    .clk, .rst_n, .code(code_a), .in_pulse(dstb), .out_pulse(clk_a), .overflow(ovf_a)
  );
  ss_delay_line u_dly_b (
    .clk, .rst_n, .code(code_b), .in_pulse(dstb), .out_pulse(clk_b), .overflow(ovf_b)
  );

  assign dly_overflow = ovf_a | ovf_b;

  // source sync latches
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_ach <= 1'b0;
      lat_bcl <= 1'b0;
    end else begin
      if (clk_a) lat_ach <= ach;
      if (clk_b) lat_bcl <= bcl;
    end
  end

  // source sync mux
  assign ric_ach = ss_en ? lat_ach : ach;
  assign ric_bcl = ss_en ? lat_bcl : bcl;

  ss_ric_compare u_ric (
    .clk, .rst_n, .clr, .tstb, .exp_st, .ach(ric_ach), .bcl(ric_bcl),
    .cmp_valid, .fail, .fail_sticky
  );

endmodule
