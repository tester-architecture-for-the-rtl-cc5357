// tb_ss_pin_channel: self-checking test of one SS pin channel.
//
// A DUT data stream with a 64-step unit interval wanders by up to +-20 steps; the DUT clock
// wanders with it. The strobe reaches the channel 10 steps before its data edge (shorter
// strobe cable) and the ACH/BCL delay lines are programmed to 42 steps, so the latched
// strobe falls 32 steps into each bit, the middle of the eye. The tester strobe sits at a
// fixed 60 steps into every nominal bit. With SS strobing on, every compare must pass and
// the latch must hold the bit being tested. With SS strobing off the response IC sees the
// live data; the testbench predicts from its own waveform which compares must fail under
// the wander and checks every result against that prediction.
module tb_ss_pin_channel;
  import ss_pkg::*;

  localparam int UI = 64, NB = 300, T0 = 100;

  logic clk = 0, rst_n = 0;
  logic dstb = 0, ss_en = 0, ach = 0, bcl = 1, tstb = 0, clr = 0;
  dly_code_t code_a, code_b;
  expect_e exp_st = EXP_X;
  logic cmp_valid, fail, fail_sticky, dly_overflow, lat_ach, lat_bcl;
  int checks = 0, failures = 0;
  int j [NB + 1];
  bit bits [NB];

  ss_pin_channel dut (.clk, .rst_n, .dstb, .code_a, .code_b, .ss_en, .ach, .bcl, .tstb, .exp_st,
                      .clr, .cmp_valid, .fail, .fail_sticky, .dly_overflow, .lat_ach, .lat_bcl);

  always #5 clk = ~clk;

  // data bit on the wire at step t (bit -1 is 0)
  function automatic bit wire_bit(int t);
    for (int k = NB - 1; k >= 0; k--) if (t >= T0 + k * UI + j[k]) return bits[k];
    return 0;
  endfunction

  task automatic run_pass(bit ss, output int nfail, output int npred);
    bit pred_q;
    bit have_q;
    nfail = 0; npred = 0; have_q = 0; pred_q = 0;
    ss_en = ss;
    for (int t = 0; t < T0 + NB * UI + 100; t++) begin
      @(negedge clk);
      // check the result of the compare strobed one step earlier
      if (have_q) begin
        checks++;
        if (!cmp_valid || fail !== pred_q) begin
          failures++;
          $display("FAIL t=%0d ss=%0b fail=%0b predicted %0b", t, ss, fail, pred_q);
        end
        if (fail) nfail++;
        if (pred_q) npred++;
      end
      have_q = 0;
      b = wire_bit(t);
      ach = b; bcl = ~b;
      dstb = 0;
      for (int k = 0; k < NB; k++) if (t == T0 + k * UI + j[k] - 10) dstb = 1;
      tstb = 0; exp_st = EXP_X;
      if (t >= T0 + 60 && (t - T0 - 60) % UI == 0 && (t - T0 - 60) / UI < NB) begin
        int k = (t - T0 - 60) / UI;
        tstb = 1;
        exp_st = bits[k] ? EXP_H : EXP_L;
        have_q = 1;
        pred_q = ss ? 1'b0 : (b != bits[k]);
        if (ss) begin
          checks++;
          if (lat_ach !== bits[k] || lat_bcl !== !bits[k]) begin
            failures++;
            $display("FAIL latch holds %0b/%0b, bit %0d is %0b", lat_ach, lat_bcl, k, bits[k]);
          end
        end
      end
    end
  endtask

  bit b;

  initial begin
    int nf, np;
    j[0] = 0;
    for (int k = 1; k <= NB; k++) begin
      j[k] = j[k-1] + $urandom_range(6) - 3;
      if (j[k] > 20) j[k] = 20;
      if (j[k] < -20) j[k] = -20;
    end
    for (int k = 0; k < NB; k++) bits[k] = 1'($urandom_range(1));
    code_a = '{coarse: 2, fine: 2};   // 8 + 32 + 2 = 42 steps
    code_b = '{coarse: 2, fine: 2};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass(1, nf, np);
    $display("SS strobing on: %0d failing compares", nf);
    checks++;
    if (nf != 0 || fail_sticky) begin failures++; $display("FAIL SS strobing must pass"); end
    clr = 1; @(negedge clk) clr = 0;
    run_pass(0, nf, np);
    $display("SS strobing off: %0d failing compares, %0d predicted", nf, np);
    checks++;
    if (np == 0) begin failures++; $display("FAIL wander too small to show the difference"); end
    checks++;
    if (dly_overflow) begin failures++; $display("FAIL delay line overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
