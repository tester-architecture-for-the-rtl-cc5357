// tb_ss_strobe_gen: self-checking test of one DSR strobe generator.
//
// A jittered DUT clock (random half periods of 3 to 10 steps) drives the generator in each
// edge mode, with and without the by-2 divider, with strobe generation disabled, and with
// DINH raised at two different times (first and second pass). The expected strobe stream
// is worked out from the edges the testbench itself produced: a strobe must appear exactly
// one step after each selected edge, and with the divider on only for the 1st, 3rd, 5th ...
// selected edge after DINH rose.
module tb_ss_strobe_gen;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  stb_gen_cfg_t cfg;
  logic achi = 0, dinh = 0, stb;
  int checks = 0, failures = 0, strobes = 0;

  ss_strobe_gen dut (.clk, .rst_n, .cfg, .achi, .dinh, .stb);

  always #5 clk = ~clk;

  // reference: expected strobe for the next step
  logic exp_next = 0;
  logic prev_achi = 0;
  int   sel_count = 0;   // selected edges since DINH rose

  always @(posedge clk) begin
    logic r, f, ev;
    if (rst_n) begin
      checks++;
      if (stb !== exp_next) begin
        failures++;
        $display("FAIL t=%0t stb=%0b expected %0b", $time, stb, exp_next);
      end
      if (stb) strobes++;
    end
    r  = achi & ~prev_achi;
    f  = ~achi & prev_achi;
    ev = (cfg.mode == EDGE_RISE) ? r : (cfg.mode == EDGE_FALL) ? f : (r | f);
    exp_next = 0;
    if (!cfg.div2) begin
      exp_next  = cfg.en & ev;
      sel_count = 0;
    end else if (!dinh) begin
      sel_count = 0;
    end else if (ev) begin
      exp_next  = cfg.en & (sel_count % 2 == 0);
      sel_count++;
    end
    prev_achi = achi;
  end

  task automatic run_clock(int n_edges);
    for (int i = 0; i < n_edges; i++) begin
      repeat (3 + $urandom_range(7)) @(negedge clk);
      achi = ~achi;
    end
  endtask

  initial begin
    int s0;
    cfg = '{en: 1'b1, mode: EDGE_RISE, div2: 1'b0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // every edge mode, no divider
    for (int m = 0; m < 3; m++) begin
      cfg.mode = edge_mode_e'(m);
      s0 = strobes;
      run_clock(40);
      if (strobes - s0 < 15) begin failures++; $display("FAIL too few strobes mode %0d", m); end
      checks++;
    end
    // disabled: no strobes at all
    cfg.en = 0;
    s0 = strobes;
    run_clock(30);
    checks++;
    if (strobes != s0) begin failures++; $display("FAIL strobes while disabled"); end
    cfg.en = 1;
    // divider, first pass: DINH raised, then second pass with DINH raised later
    for (int m = 0; m < 3; m++) begin
      cfg.mode = edge_mode_e'(m);
      cfg.div2 = 1;
      dinh = 0;
      run_clock(6);
      checks++;
      if (dut.stb) begin failures++; $display("FAIL strobe while DINH low"); end
      dinh = 1;
      run_clock(40);
      dinh = 0;
      run_clock(4 + m);
      dinh = 1;
      run_clock(40);
    end
    cfg.div2 = 0;
    run_clock(4);
    $display("strobes seen: %0d", strobes);
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
