// tb_ss_ric_compare: self-checking test of the response IC pass/fail decision.
//
// Random ACH/BCL bits, expected states and tester strobes are applied. The testbench
// decides pass or fail from a truth table written out case by case (H passes only on ACH,
// L only on BCL, Z only with both clear, X always) and checks cmp_valid and fail one step
// after each strobe, no result without a strobe, and the sticky flag and its clear.
module tb_ss_ric_compare;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, tstb = 0, ach = 0, bcl = 0;
  expect_e exp_st = EXP_X;
  logic cmp_valid, fail, fail_sticky;
  int checks = 0, failures = 0, nfail = 0;

  ss_ric_compare dut (.clk, .rst_n, .clr, .tstb, .exp_st, .ach, .bcl, .cmp_valid, .fail, .fail_sticky);

  always #5 clk = ~clk;

  function automatic bit truth(expect_e e, bit h, bit l);
    // returns 1 on a failure
    case ({e, h, l})
      {EXP_H, 2'b10}, {EXP_H, 2'b11}: return 0;
      {EXP_H, 2'b00}, {EXP_H, 2'b01}: return 1;
      {EXP_L, 2'b01}, {EXP_L, 2'b11}: return 0;
      {EXP_L, 2'b00}, {EXP_L, 2'b10}: return 1;
      {EXP_Z, 2'b00}:                 return 0;
      {EXP_Z, 2'b01}, {EXP_Z, 2'b10}, {EXP_Z, 2'b11}: return 1;
      default:                        return 0;
    endcase
  endfunction

  initial begin
    bit exp_f, sticky;
    bit t;
    sticky = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      t = 1'($urandom_range(1));
      tstb = t; ach = 1'($urandom_range(1)); bcl = 1'($urandom_range(1));
      exp_st = expect_e'($urandom_range(3));
      clr = ($urandom_range(49) == 0);
      exp_f = t && truth(exp_st, ach, bcl);
      if (clr) sticky = 0; else if (exp_f) sticky = 1;
      @(negedge clk);
      tstb = 0;
      clr = 0;
      checks += 3;
      if (cmp_valid !== t) begin failures++; $display("FAIL cmp_valid"); end
      if (fail !== exp_f) begin failures++; $display("FAIL fail %0b exp %0b (e=%0d h=%0b l=%0b)", fail, exp_f, exp_st, ach, bcl); end
      if (fail_sticky !== sticky) begin failures++; $display("FAIL sticky"); end
      if (exp_f) nfail++;
    end
    checks++;
    if (nfail < 100) begin failures++; $display("FAIL too few failing compares"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
