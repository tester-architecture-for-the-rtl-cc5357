// tb_ss_option_top: end-to-end test of the full source synchronous option at its default
// size (eight DSR cards, 64 SS pin slices, 512 data channels).
//
// One DUT is imitated: a source synchronous data bus whose clocks and data wander together
// (a slow triangle through +-amp over 16 bits, plus a little random jitter), with the clocks reaching the DSR cards 40 steps before the data
// reach the pin slices (shorter strobe cables). Every data pin gets its own bit sequence,
// and a few bits per pin are driven wrong on purpose; the expected states are always the
// correct bits, so each wrong bit that is tested must fail and every other compare must
// pass. The deskew tables of all slices are filled, and all delay lines are programmed
// through them to put the latching strobe half a unit interval after each data edge.
//
// Test cases (UI = unit interval in 2.5 ps steps):
//   1  two clocks, rising edges, mux mode, one pass, 1600 Mbps (UI 250), wander +-60
//   2  the same with the by-2 divider: first pass (bits 0,1,4,5,..) and second pass with
//      DINH one DUT clock later (bits 2,3,6,7,..), wander +-300 (more than one UI)
//   3  case 1 again with wander +-300: one-pass SS strobing must now see failures
//   4  one clock, rising edge to even and falling edge to odd strobes, mux mode
//   5  one clock, double strobe (both edges) to every channel, normal mode, 800 Mbps
//   6  SS strobing switched off: fixed tester strobes at the nominal eye centre, wander
//      +-150, so wrongly failing compares must appear
// Each mechanism must occur: compares in every case, failures where they are predicted,
// extra failures in cases 3 and 6.
module tb_ss_option_top;
  import ss_pkg::*;

  localparam int ND = 8, NS = ND * 8, NPIN = NS * 8;
  localparam int NB = 48;          // bits per test
  localparam int PRE = 8;          // clock cycles before the data
  localparam int CABLE = 40;       // strobe cable shorter by 40 steps

  logic clk = 0, rst_n = 0;
  logic [3:0] achi [ND], dinh_e [ND], dinh_o [ND];
  stb_gen_cfg_t cfg_e [ND][4], cfg_o [ND][4];
  dly_code_t dinh_code_e [ND][4], dinh_code_o [ND][4];
  logic [1:0] sel_e [ND][8], sel_o [ND][8];
  logic [ND-1:0] dinh_overflow;
  logic [7:0] ach [NS], bcl [NS], ss_en [NS], tstb [NS];
  logic [3:0] mux_mode [NS], mux_odd [NS];
  logic [NS-1:0] lut_we, dly_we, dly_overflow;
  logic [DTIME_W-1:0] lut_addr, dly_time;
  dly_code_t lut_wdata;
  logic [3:0] dly_line;
  expect_e exp_st [NS][8];
  logic clr;
  logic [7:0] cmp_valid [NS], fail [NS], fail_sticky [NS];

  ss_option_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int bits [NB + 2 * PRE];   // random bit source
  bit bad_bit [NPIN][NB];    // bits driven wrong
  int jw [NB + 2 * PRE];     // wander of each bit edge
  int compares [7], fails_seen [7], fails_pred [7];

  // correct data of pin p, bit k
  function automatic bit good_bit(int p, int k);
    return bits[(k + 7 * p) % NB][0];
  endfunction

  function automatic int edge_t(int t0, int ui, int k);
    return t0 + k * ui + jw[k + PRE];
  endfunction

  task automatic set_cfg(stb_gen_cfg_t ce0, stb_gen_cfg_t co0, stb_gen_cfg_t co1,
                         int so, bit mux, bit ss);
    for (int g = 0; g < ND; g++) begin
      for (int c = 0; c < 4; c++) begin
        cfg_e[g][c] = '0; cfg_o[g][c] = '0;
        dinh_code_e[g][c] = '0; dinh_code_o[g][c] = '0;
      end
      cfg_e[g][0] = ce0; cfg_o[g][0] = co0; cfg_o[g][1] = co1;
      for (int k = 0; k < 8; k++) begin sel_e[g][k] = 2'd0; sel_o[g][k] = 2'(so); end
    end
    for (int s = 0; s < NS; s++) begin
      mux_mode[s] = {4{mux}}; mux_odd[s] = '0; ss_en[s] = {8{ss}};
    end
  endtask

  task automatic program_delay(int d);
    @(negedge clk);
    for (int l = 0; l < 16; l++) begin
      dly_we = '1; dly_line = 4'(l); dly_time = DTIME_W'(d);
      @(negedge clk);
    end
    dly_we = '0;
    repeat (3) @(negedge clk);
  endtask

  // run one test
  //   ui: unit interval; amp: wander bound; off: tester strobe offset after the nominal bit
  //   start; tested: which bits channel parity tests (0 = all bits, 2 = by parity,
  //   4 = bits with (k mod 4) in {2*pass, 2*pass+1} by parity); two_clk: clock2 present;
  //   mux: mux mode; exact: check every compare result
  task automatic run_case(int id, int ui, int amp, int off, int tested, int pass,
                          bit mux, bit exact, bit use_dinh);
    int t0, tend, step;
    bit pend [NS][8], pend_f [NS][8];
    t0 = 20 + PRE * ui;
    // wander: triangle of 16 bits period through +-amp, plus a little random jitter
    step = amp / 20 + 1;
    for (int k = 0; k < NB + 2 * PRE; k++) begin
      int ph, tw;
      ph = (k - PRE) % 16;
      tw = (ph <= 4) ? ph : (ph <= 12) ? 8 - ph : ph - 16;
      jw[k] = (k <= PRE) ? 0 : amp * tw / 4 + int'($urandom_range(2 * step)) - step;
    end
    for (int s = 0; s < NS; s++) for (int i = 0; i < 8; i++) begin pend[s][i] = 0; pend_f[s][i] = 0; end
    tend = t0 + NB * ui + 3 * ui;
    for (int t = 0; t < tend; t++) begin
      int kd, kc;
      @(negedge clk);
      // results of the compares strobed one step earlier
      for (int s = 0; s < NS; s++) for (int i = 0; i < 8; i++) if (pend[s][i]) begin
        if (exact) begin
          checks++;
          if (!cmp_valid[s][i] || fail[s][i] !== pend_f[s][i]) begin
            failures++;
            if (failures < 10) $display("FAIL case %0d t=%0d slice %0d ch %0d fail=%0b predicted %0b",
                                        id, t, s, i, fail[s][i], pend_f[s][i]);
          end
        end
        compares[id]++;
        if (fail[s][i]) fails_seen[id]++;
        if (pend_f[s][i]) fails_pred[id]++;
        pend[s][i] = 0;
      end
      // bit on the data wires (-1 before the data) and clock phase at the DSR
      kd = -PRE - 1;
      kc = -PRE - 1;
      for (int k = -PRE; k < NB + PRE; k++) begin
        if (t >= edge_t(t0, ui, k)) kd = k;
        if (t + CABLE >= edge_t(t0, ui, k)) kc = k;
      end
      for (int g = 0; g < ND; g++) begin
        achi[g] = '0;
        achi[g][0] = (kc % 2 == 0);
        achi[g][1] = (kc % 2 != 0);
        if (use_dinh) begin
          dinh_e[g] = (t >= t0 - CABLE - 100 + 2 * pass * ui) ? 4'b1111 : 4'b0000;
          dinh_o[g] = dinh_e[g];
        end
      end
      for (int s = 0; s < NS; s++) begin
        for (int i = 0; i < 8; i++) begin
          int p;
          bit b;
          p = 8 * s + i;
          if (kd < 0 || kd >= NB) b = 0;
          else b = good_bit(p, kd) ^ bad_bit[p][kd];
          if (mux && i % 2 == 1) b = ~b;   // odd pins carry unrelated data in mux mode
          ach[s][i] = b; bcl[s][i] = ~b;
          tstb[s][i] = 0; exp_st[s][i] = EXP_X;
          if (t >= t0 + off && (t - t0 - off) % ui == 0) begin
            int k, dp;
            k = (t - t0 - off) / ui;
            dp = mux ? 8 * s + (i & ~1) : p;   // the pin this channel compares
            if (k < NB && (tested == 0 || (tested == 2 && k % 2 == i % 2) ||
                           (tested == 4 && k % 4 == 2 * pass + i % 2))) begin
              tstb[s][i] = 1;
              exp_st[s][i] = good_bit(dp, k) ? EXP_H : EXP_L;
              pend[s][i] = 1;
              pend_f[s][i] = bad_bit[dp][k];
            end
          end
        end
      end
    end
    for (int g = 0; g < ND; g++) begin dinh_e[g] = '0; dinh_o[g] = '0; end
    repeat (4 * ui) @(negedge clk);
    $display("case %0d: %0d compares, %0d failing, %0d wrong bits tested", id,
             compares[id], fails_seen[id], fails_pred[id]);
  endtask

  localparam stb_gen_cfg_t OFF_C  = '{en: 0, mode: EDGE_RISE, div2: 0};
  localparam stb_gen_cfg_t RISE   = '{en: 1, mode: EDGE_RISE, div2: 0};
  localparam stb_gen_cfg_t FALL   = '{en: 1, mode: EDGE_FALL, div2: 0};
  localparam stb_gen_cfg_t BOTH   = '{en: 1, mode: EDGE_BOTH, div2: 0};
  localparam stb_gen_cfg_t RISE_2 = '{en: 1, mode: EDGE_RISE, div2: 1};

  initial begin
    clr = 0;
    lut_we = '0; dly_we = '0; lut_addr = '0; dly_time = '0; lut_wdata = '0; dly_line = '0;
    for (int g = 0; g < ND; g++) begin achi[g] = '0; dinh_e[g] = '0; dinh_o[g] = '0; end
    set_cfg(OFF_C, OFF_C, OFF_C, 0, 0, 0);
    for (int s = 0; s < NS; s++) begin
      ach[s] = '0; bcl[s] = '0; tstb[s] = '0;
      for (int i = 0; i < 8; i++) exp_st[s][i] = EXP_X;
    end
    for (int k = 0; k < NB + 2 * PRE; k++) bits[k] = $urandom_range(1);
    for (int p = 0; p < NPIN; p++) for (int k = 0; k < NB; k++) bad_bit[p][k] = ($urandom_range(29) == 0);
    for (int c = 0; c < 7; c++) begin compares[c] = 0; fails_seen[c] = 0; fails_pred[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // calibration: fill every deskew table, entry t -> codes of delay t
    for (int t = 0; t < 2**DTIME_W; t++) begin
      int c, f;
      c = (t < 8) ? 0 : (t - 8) / 16;
      f = (t < 8) ? 0 : (t - 8) % 16;
      if (c > 31) begin c = 31; f = 15; end
      @(negedge clk);
      lut_we = '1; lut_addr = DTIME_W'(t); lut_wdata = '{coarse: COARSE_W'(c), fine: FINE_W'(f)};
    end
    @(negedge clk) lut_we = '0;
    // 1600 Mbps: latch half a UI after the data edge (strobe 40 early, 1 step DSR latency)
    program_delay(125 + CABLE - 1);
    set_cfg(RISE, OFF_C, RISE, 1, 1, 1);
    run_case(1, 250, 60, 375, 2, 0, 1, 1, 0);
    set_cfg(RISE_2, OFF_C, RISE_2, 1, 1, 1);
    run_case(2, 250, 300, 625, 4, 0, 1, 1, 1);
    run_case(2, 250, 300, 625, 4, 1, 1, 1, 1);
    set_cfg(RISE, OFF_C, RISE, 1, 1, 1);
    run_case(3, 250, 300, 375, 2, 0, 1, 0, 0);
    set_cfg(RISE, FALL, OFF_C, 0, 1, 1);
    run_case(4, 250, 60, 375, 2, 0, 1, 1, 0);
    // 800 Mbps, double strobe, every channel on its own pin
    program_delay(250 + CABLE - 1);
    set_cfg(BOTH, BOTH, OFF_C, 0, 0, 1);
    run_case(5, 500, 100, 500, 0, 0, 0, 1, 0);
    // SS strobing off: tester strobe at the nominal eye centre
    set_cfg(RISE, OFF_C, RISE, 1, 1, 0);
    run_case(6, 250, 150, 125, 2, 0, 1, 0, 0);
    // every mechanism must have happened
    for (int c = 1; c <= 6; c++) begin
      checks++;
      if (compares[c] == 0) begin failures++; $display("FAIL case %0d made no compares", c); end
    end
    for (int c = 1; c <= 6; c++) if (c != 3 && c != 6) begin
      checks++;
      if (fails_pred[c] == 0) begin failures++; $display("FAIL case %0d tested no wrong bit", c); end
    end
    checks += 2;
    if (fails_seen[3] <= fails_pred[3]) begin failures++; $display("FAIL case 3: wander beyond 1 UI not seen"); end
    if (fails_seen[6] <= fails_pred[6]) begin failures++; $display("FAIL case 6: fixed strobes not hurt by wander"); end
    checks++;
    if (|dly_overflow || |dinh_overflow) begin failures++; $display("FAIL delay line overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
