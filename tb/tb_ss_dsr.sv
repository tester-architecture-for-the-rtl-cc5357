// tb_ss_dsr: self-checking test of the DSR strobe generation, select and fan-out.
//
// Four jittered DUT clocks of different rates drive the card. Edge modes, enables, the
// sixteen 4:1 output selections and the DINH delay codes are randomised several times. The
// testbench models each generator from the edges it produced itself and the DINH level it
// applied, delayed by the programmed 8 + 16*coarse + fine steps (plus one step for the
// level register), and checks all 16 strobe outputs on every step. Both one-pass
// (divider off) and two-pass (divider on, DINH raised at random times) operation are run.
module tb_ss_dsr;
  import ss_pkg::*;

  localparam int NCYC = 60000;

  logic clk = 0, rst_n = 0;
  logic [3:0] achi = '0, dinh_e = '0, dinh_o = '0;
  stb_gen_cfg_t cfg_e [4], cfg_o [4];
  dly_code_t dinh_code_e [4], dinh_code_o [4];
  logic [1:0] sel_e [8], sel_o [8];
  logic [7:0] estb, ostb;
  logic dinh_overflow;
  int checks = 0, failures = 0, n_e = 0, n_o = 0, n_div = 0;
  int cyc = 0;
  logic [3:0] hist_e [NCYC], hist_o [NCYC];

  ss_dsr dut (.clk, .rst_n, .achi, .dinh_e, .dinh_o, .cfg_e, .cfg_o, .dinh_code_e, .dinh_code_o,
              .sel_e, .sel_o, .estb, .ostb, .dinh_overflow);

  always #5 clk = ~clk;

  // reference generators
  bit prev [4];
  bit g_e [4], g_o [4];          // generator outputs for the next step
  int cnt_e [4], cnt_o [4];

  function automatic bit ev_of(edge_mode_e m, bit a, bit p);
    return (m == EDGE_RISE) ? (a && !p) : (m == EDGE_FALL) ? (!a && p) : (a != p);
  endfunction

  function automatic bit dly_level(logic [3:0] hist [NCYC], int c, dly_code_t code, int n);
    int d;
    d = 8 + 16 * int'(code.coarse) + int'(code.fine) + 1;
    return (n - d >= 0) ? hist[n - d][c] : 1'b0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 8; k++) begin
        checks += 2;
        if (estb[k] !== g_e[sel_e[k]]) begin failures++; $display("FAIL cyc %0d estb[%0d] got %0b sel %0d gen %b model %0b%0b%0b%0b achi %b", cyc, k, estb[k], sel_e[k], dut.gen_e, g_e[3],g_e[2],g_e[1],g_e[0], achi); end
        if (ostb[k] !== g_o[sel_o[k]]) begin failures++; $display("FAIL cyc %0d ostb[%0d]", cyc, k); end
        if (estb[k]) n_e++;
        if (ostb[k]) n_o++;
      end
      hist_e[cyc] = dinh_e;
      hist_o[cyc] = dinh_o;
      for (int c = 0; c < 4; c++) begin
        bit ee, eo, de, do_;
        ee = ev_of(cfg_e[c].mode, achi[c], prev[c]);
        eo = ev_of(cfg_o[c].mode, achi[c], prev[c]);
        de = dly_level(hist_e, c, dinh_code_e[c], cyc);
        do_ = dly_level(hist_o, c, dinh_code_o[c], cyc);
        g_e[c] = 0; g_o[c] = 0;
        if (!cfg_e[c].div2) begin g_e[c] = cfg_e[c].en && ee; cnt_e[c] = 0; end
        else if (!de) cnt_e[c] = 0;
        else if (ee) begin g_e[c] = cfg_e[c].en && (cnt_e[c] % 2 == 0); cnt_e[c]++; n_div++; end
        if (!cfg_o[c].div2) begin g_o[c] = cfg_o[c].en && eo; cnt_o[c] = 0; end
        else if (!do_) cnt_o[c] = 0;
        else if (eo) begin g_o[c] = cfg_o[c].en && (cnt_o[c] % 2 == 0); cnt_o[c]++; end
        prev[c] = achi[c];
      end
      cyc++;
    end
  end

  // DUT clocks
  for (genvar c = 0; c < 4; c++) begin : g_dclk
    initial begin
      forever begin
        repeat (4 + 2 * c + $urandom_range(2)) @(negedge clk);
        achi[c] = ~achi[c];
      end
    end
  end

  task automatic randomise(bit div);
    for (int c = 0; c < 4; c++) begin
      cfg_e[c] = '{en: ($urandom_range(7) != 0), mode: edge_mode_e'($urandom_range(2)), div2: div};
      cfg_o[c] = '{en: ($urandom_range(7) != 0), mode: edge_mode_e'($urandom_range(2)), div2: div};
    end
    for (int k = 0; k < 8; k++) begin
      sel_e[k] = 2'($urandom);
      sel_o[k] = 2'($urandom);
    end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin
      dinh_code_e[c] = '0; dinh_code_o[c] = '0;
      prev[c] = 0; g_e[c] = 0; g_o[c] = 0; cnt_e[c] = 0; cnt_o[c] = 0;
    end
    randomise(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      randomise(0);
      repeat (2000) @(negedge clk);
    end
    for (int r = 0; r < 8; r++) begin
      // two-pass operation: DINH low, new delay codes, then raise DINH at random times
      dinh_e = '0; dinh_o = '0;
      repeat (600) @(negedge clk);
      randomise(1);
      for (int c = 0; c < 4; c++) begin
        dinh_code_e[c] = '{coarse: COARSE_W'($urandom_range(8)), fine: FINE_W'($urandom)};
        dinh_code_o[c] = '{coarse: COARSE_W'($urandom_range(8)), fine: FINE_W'($urandom)};
      end
      repeat (300) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat ($urandom_range(20)) @(negedge clk);
        if (i < 4) dinh_e[i] = 1; else dinh_o[i-4] = 1;
      end
      repeat (2500) @(negedge clk);
    end
    checks++;
    if (n_e < 500 || n_o < 500 || n_div < 500) begin
      failures++; $display("FAIL too few strobes %0d %0d %0d", n_e, n_o, n_div);
    end
    checks++;
    if (dinh_overflow) begin failures++; $display("FAIL DINH delay overflow"); end
    $display("strobes: even %0d odd %0d, divided edges %0d", n_e, n_o, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
