// tb_ss_pinslice: self-checking test of one SS pin slice.
//
// The deskew table is filled with codes for every desired delay, all sixteen delay lines
// are programmed through the table with random delays, and each pair is set at random to
// normal or mux mode (from the even or the odd pin), with SS strobing on or off per pin.
// Random data, even/odd strobes, tester strobes and expected states are then applied. The
// testbench keeps its own per-pin model of the pin mux, the strobe delays (computed from the
// table entries it wrote) and the latches, predicts every compare result and checks all
// eight pins on every step. Four configurations are run.
module tb_ss_pinslice;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  logic estb = 0, ostb = 0;
  logic [7:0] ach = '0, bcl = '0, ss_en = '0, tstb = '0;
  logic [3:0] mux_mode = '0, mux_odd = '0;
  logic lut_we = 0, dly_we = 0, clr = 0;
  logic [DTIME_W-1:0] lut_addr = '0, dly_time = '0;
  dly_code_t lut_wdata = '0;
  logic [3:0] dly_line = '0;
  expect_e exp_st [8];
  logic [7:0] cmp_valid, fail, fail_sticky;
  logic dly_overflow;
  int checks = 0, failures = 0, n_fail = 0, n_mux = 0, n_ss = 0, n_lat = 0;
  int cyc = 0;
  bit running = 0;

  ss_pinslice dut (.clk, .rst_n, .estb, .ostb, .ach, .bcl, .mux_mode, .mux_odd, .ss_en,
                   .lut_we, .lut_addr, .lut_wdata, .dly_we, .dly_line, .dly_time,
                   .tstb, .exp_st, .clr, .cmp_valid, .fail, .fail_sticky, .dly_overflow);

  always #5 clk = ~clk;

  dly_code_t lut_m [2**DTIME_W];
  int dl [16];                  // delay of each line, in steps
  int due [16][$];
  bit lat [16];                 // model latches: line 2i = ACH of pin i, 2i+1 = BCL
  bit exp_fail [8], exp_valid [8];

  function automatic bit bad(expect_e e, bit h, bit l);
    if (e == EXP_H) return !h;
    if (e == EXP_L) return !l;
    if (e == EXP_Z) return h || l;
    return 0;
  endfunction

  always @(posedge clk) begin
    bit mh [8], ml [8];
    if (running) begin
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (cmp_valid[i] !== exp_valid[i] || fail[i] !== exp_fail[i]) begin
          failures++;
          $display("FAIL cyc %0d pin %0d fail %0b expected %0b", cyc, i, fail[i], exp_fail[i]);
        end
        if (fail[i]) n_fail++;
      end
      for (int p = 0; p < 4; p++) begin
        int src;
        for (int s = 0; s < 2; s++) begin
          src = mux_mode[p] ? (mux_odd[p] ? 2*p+1 : 2*p) : 2*p+s;
          mh[2*p+s] = ach[src];
          ml[2*p+s] = bcl[src];
        end
      end
      for (int i = 0; i < 8; i++) begin
        bit h, l;
        h = ss_en[i] ? lat[2*i] : mh[i];
        l = ss_en[i] ? lat[2*i+1] : ml[i];
        exp_valid[i] = tstb[i];
        exp_fail[i] = tstb[i] && bad(exp_st[i], h, l);
        if (tstb[i] && ss_en[i]) n_ss++;
        if (tstb[i] && mux_mode[i/2]) n_mux++;
      end
      for (int ln = 0; ln < 16; ln++) begin
        if (due[ln].size() > 0 && due[ln][0] == cyc) begin
          void'(due[ln].pop_front());
          lat[ln] = (ln % 2 == 0) ? mh[ln/2] : ml[ln/2];
          n_lat++;
        end
        if (((ln / 2) % 2 == 0) ? estb : ostb) due[ln].push_back(cyc + dl[ln]);
      end
    end
    cyc++;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin exp_st[i] = EXP_X; exp_fail[i] = 0; exp_valid[i] = 0; end
    for (int l = 0; l < 16; l++) lat[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // calibration: fill the table, entry t -> codes whose delay is closest to t
    for (int t = 0; t < 2**DTIME_W; t++) begin
      int c, f;
      c = (t < 8) ? 0 : (t - 8) / 16;
      f = (t < 8) ? 0 : (t - 8) % 16;
      if (c > 31) begin c = 31; f = 15; end
      @(negedge clk);
      lut_we = 1; lut_addr = DTIME_W'(t);
      lut_wdata = '{coarse: COARSE_W'(c), fine: FINE_W'(f)};
      lut_m[t] = lut_wdata;
    end
    @(negedge clk) lut_we = 0;
    for (int r = 0; r < 4; r++) begin
      // program delays and modes
      for (int l = 0; l < 16; l++) begin
        int t;
        t = $urandom_range(20, 300);
        @(negedge clk);
        dly_we = 1; dly_line = 4'(l); dly_time = DTIME_W'(t);
        dl[l] = 8 + 16 * int'(lut_m[t].coarse) + int'(lut_m[t].fine);
      end
      @(negedge clk) dly_we = 0;
      mux_mode = 4'($urandom);
      mux_odd  = 4'($urandom);
      ss_en    = 8'($urandom);
      repeat (3) @(negedge clk);
      running = 1;
      for (int t = 0; t < 6000; t++) begin
        @(negedge clk);
        if ($urandom_range(7) == 0) begin ach = 8'($urandom); bcl = 8'($urandom); end
        estb = (t % 150 == 3);
        ostb = (t % 150 == 80);
        tstb = 8'($urandom) & 8'($urandom);
        for (int i = 0; i < 8; i++) exp_st[i] = expect_e'($urandom_range(3));
      end
      @(negedge clk);
      estb = 0; ostb = 0; tstb = '0;
      repeat (600) @(negedge clk);
      running = 0;
      for (int i = 0; i < 8; i++) begin exp_fail[i] = 0; exp_valid[i] = 0; end
    end
    checks++;
    if (n_fail < 100 || n_mux == 0 || n_ss == 0 || n_lat < 100) begin
      failures++; $display("FAIL coverage fail %0d mux %0d ss %0d lat %0d", n_fail, n_mux, n_ss, n_lat);
    end
    checks++;
    if (dly_overflow) begin failures++; $display("FAIL delay line overflow"); end
    $display("compares failing %0d, in mux mode %0d, SS strobed %0d, latch loads %0d", n_fail, n_mux, n_ss, n_lat);
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
