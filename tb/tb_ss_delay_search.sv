// tb_ss_delay_search: per-pin search of the clock-to-data delay, the way a test program
// shmoos the SS delay to measure a device's valid-before/valid-after timing.
//
// One SS pin slice runs in mux mode at 1600 Mbps (UI 250 steps). Pins 0, 2, 4 and 6 carry
// an alternating 0101.. pattern whose bit edges follow the device clock by a different skew
// per pin (20, 60, 100, 140 steps). Clock and data wander together in a slow triangle of
// +-40 steps. For every delay setting from 8 to 460 steps, all delay lines are programmed
// through the deskew table and 16 bits are compared; a setting passes on a pin when no
// compare of either channel of that pin fails.
//
// With SS strobing on, the tester strobe follows the delay (it sits one UI after the latch
// point), and the passing window of each pin must start exactly at the pin's skew and be
// as wide as the shortest bit of the wandering stream. With SS strobing off, the swept
// delay is the tester strobe position itself and the wander must narrow the window by
// about its peak-to-peak size.
module tb_ss_delay_search;
  import ss_pkg::*;

  localparam int UI = 250, NBITS = 16, T0 = 300, AMP = 40;
  localparam int DMIN = 8, DMAX = 460;

  logic clk = 0, rst_n = 0;
  logic estb = 0, ostb = 0;
  logic [7:0] ach = '0, bcl = '0, ss_en = '0, tstb = '0;
  logic [3:0] mux_mode = '1, mux_odd = '0;
  logic lut_we = 0, dly_we = 0, clr = 0;
  logic [DTIME_W-1:0] lut_addr = '0, dly_time = '0;
  dly_code_t lut_wdata = '0;
  logic [3:0] dly_line = '0;
  expect_e exp_st [8];
  logic [7:0] cmp_valid, fail, fail_sticky;
  logic dly_overflow;
  int checks = 0, failures = 0;
  int skew [4] = '{20, 60, 100, 140};
  int w [NBITS + 4];

  ss_pinslice dut (.clk, .rst_n, .estb, .ostb, .ach, .bcl, .mux_mode, .mux_odd, .ss_en,
                   .lut_we, .lut_addr, .lut_wdata, .dly_we, .dly_line, .dly_time,
                   .tstb, .exp_st, .clr, .cmp_valid, .fail, .fail_sticky, .dly_overflow);

  always #5 clk = ~clk;

  function automatic int clk_t(int k);   // device clock edge of bit k at the slice
    return T0 + k * UI + w[k];
  endfunction

  // one setting: returns per data pin whether every compare passed
  task automatic run_point(int d, bit ss, output bit pass [4], output int ncmp);
    for (int p = 0; p < 4; p++) pass[p] = 1;
    ncmp = 0;
    for (int l = 0; l < 16; l++) begin
      @(negedge clk);
      dly_we = 1; dly_line = 4'(l); dly_time = DTIME_W'(d);
    end
    @(negedge clk) dly_we = 0;
    ss_en = {8{ss}};
    repeat (3) @(negedge clk);
    for (int t = 0; t < T0 + (NBITS + 4) * UI; t++) begin
      @(negedge clk);
      for (int i = 0; i < 8; i++) if (cmp_valid[i]) begin
        ncmp++;
        if (fail[i]) pass[i / 2] = 0;
      end
      estb = 0; ostb = 0;
      for (int k = 0; k < NBITS + 4; k++) if (t == clk_t(k)) begin
        if (k % 2 == 0) estb = 1; else ostb = 1;
      end
      for (int p = 0; p < 4; p++) begin
        int kd;
        kd = -1;
        for (int k = 0; k < NBITS + 4; k++) if (t >= clk_t(k) + skew[p]) kd = k;
        ach[2*p] = (kd >= 0) ? kd[0] : 1'b0;
        bcl[2*p] = ~ach[2*p];
      end
      tstb = '0;
      for (int i = 0; i < 8; i++) exp_st[i] = EXP_X;
      // tester strobe of bit k: one UI after the latch point (SS on), or at the swept
      // position itself (SS off)
      for (int k = 0; k < NBITS; k++) if (t == T0 + k * UI + d + (ss ? UI : 0)) begin
        for (int p = 0; p < 4; p++) begin
          int ch;
          ch = 2 * p + k % 2;
          tstb[ch] = 1;
          exp_st[ch] = (k % 2 == 1) ? EXP_H : EXP_L;
        end
      end
    end
  endtask

  initial begin
    int lo [2][4], hi [2][4];
    int minbit;
    bit pass [4];
    int n;
    for (int i = 0; i < 8; i++) exp_st[i] = EXP_X;
    for (int k = 0; k < NBITS + 4; k++) begin
      int ph, tw;
      ph = k % 16;
      tw = (ph <= 4) ? ph : (ph <= 12) ? 8 - ph : ph - 16;
      w[k] = AMP * tw / 4;
    end
    minbit = UI;
    for (int k = 0; k < NBITS + 1; k++) if (clk_t(k + 1) - clk_t(k) < minbit) minbit = clk_t(k + 1) - clk_t(k);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2**DTIME_W; t++) begin
      int c, f;
      c = (t < 8) ? 0 : (t - 8) / 16;
      f = (t < 8) ? 0 : (t - 8) % 16;
      @(negedge clk);
      lut_we = 1; lut_addr = DTIME_W'(t); lut_wdata = '{coarse: COARSE_W'(c), fine: FINE_W'(f)};
    end
    @(negedge clk) lut_we = 0;
    for (int s = 0; s < 2; s++) for (int p = 0; p < 4; p++) begin lo[s][p] = -1; hi[s][p] = -1; end
    for (int s = 1; s >= 0; s--) begin
      for (int d = DMIN; d <= DMAX; d++) begin
        run_point(d, s[0], pass, n);
        checks++;
        if (n != 4 * NBITS) begin failures++; $display("FAIL %0d compares at delay %0d", n, d); end
        for (int p = 0; p < 4; p++) if (pass[p]) begin
          if (lo[s][p] < 0) lo[s][p] = d;
          hi[s][p] = d;
        end
      end
      for (int p = 0; p < 4; p++)
        $display("SS strobing %s, pin %0d (skew %0d): passing delays %0d..%0d, width %0d steps",
                 s ? "on " : "off", 2 * p, skew[p], lo[s][p], hi[s][p], hi[s][p] - lo[s][p] + 1);
    end
    for (int p = 0; p < 4; p++) begin
      checks += 3;
      if (lo[1][p] != skew[p]) begin failures++; $display("FAIL pin %0d: window starts at %0d", 2*p, lo[1][p]); end
      if (hi[1][p] - lo[1][p] + 1 != minbit) begin
        failures++; $display("FAIL pin %0d: SS window %0d, shortest bit %0d", 2*p, hi[1][p] - lo[1][p] + 1, minbit);
      end
      if (hi[0][p] - lo[0][p] + 1 > minbit - 2 * AMP + 2 * AMP / 4) begin
        failures++; $display("FAIL pin %0d: fixed-strobe window not narrowed by the wander", 2*p);
      end
    end
    checks++;
    if (dly_overflow) begin failures++; $display("FAIL delay line overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
