// ss_ric_compare: pass/fail decision of the response IC (RIC4) of one tester channel.
//
// At each tester strobe (tstb) the digitized DUT output, given by the two comparator bits
// ACH (above comparator high) and BCL (below comparator low), is compared with the expected
// state: H needs ACH, L needs BCL, Z needs neither, X masks the compare. The result is
// registered: one step after the strobe, cmp_valid is high for one step and fail tells the
// outcome. fail_sticky collects every failure until clr.
//
// The document names the response IC and says it makes the pass/fail decision from ACH and
// BCL; the expect encoding and the sticky flag are own choices of the simplest such check.
module ss_ric_compare
  import ss_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    tstb,
  input  expect_e exp_st,
  input  logic    ach,
  input  logic    bcl,
  output logic    cmp_valid,
  output logic    fail,
  output logic    fail_sticky
);

  logic bad;

  always_comb begin
    unique case (exp_st)
      EXP_H:   bad = !ach;
      EXP_L:   bad = !bcl;
      EXP_Z:   bad = ach || bcl;
      default: bad = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_valid   <= 1'b0;
      fail        <= 1'b0;
      fail_sticky <= 1'b0;
    end else begin
      cmp_valid <= tstb;
      fail      <= tstb && bad;
      if (clr) fail_sticky <= 1'b0;
      else if (tstb && bad) fail_sticky <= 1'b1;
    end
  end

endmodule
