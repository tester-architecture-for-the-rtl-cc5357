// tb_ss_delay_line: self-checking test of the programmable strobe delay line.
//
// For random coarse/fine codes, strobe pulses are sent with random spacing. The testbench
// keeps its own list of the steps at which each pulse must come out (entry step + fixed
// 8 + 16*coarse + fine) and checks the output on every step, so both the delay and the
// absence of extra pulses are checked. Several pulses are kept in flight at once. At the
// end five pulses are sent back to back with a long delay: four must come out, the fifth
// must be dropped and raise the overflow flag.
module tb_ss_delay_line;
  import ss_pkg::*;

  logic clk = 0, rst_n = 0;
  dly_code_t code = '0;
  logic in_pulse = 0, out_pulse, overflow;
  int checks = 0, failures = 0, outs = 0;
  int cyc = 0;
  int due[$];

  ss_delay_line dut (.clk, .rst_n, .code, .in_pulse, .out_pulse, .overflow);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    bit hit;
    cyc++;
    if (rst_n) begin
      hit = 0;
      foreach (due[i]) if (due[i] == cyc) hit = 1;
      checks++;
      if (out_pulse !== hit) begin
        failures++;
        $display("FAIL cyc=%0d out=%0b expected %0b", cyc, out_pulse, hit);
      end
      if (out_pulse) outs++;
      if (in_pulse) due.push_back(cyc + 8 + 16 * int'(code.coarse) + int'(code.fine));
    end
  end

  task automatic send(int gap);
    @(negedge clk) in_pulse = 1;
    @(negedge clk) in_pulse = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    int d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      code.coarse = COARSE_W'($urandom);
      code.fine   = FINE_W'($urandom);
      d = 8 + 16 * int'(code.coarse) + int'(code.fine);
      // four pulses spaced so that at most four are in flight
      for (int p = 0; p < 4; p++) send(d / 4 + $urandom_range(5));
      repeat (d + 2) @(negedge clk);
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow without cause"); end
    // overflow: five pulses, longest delay, back to back
    code = '{coarse: '1, fine: '1};
    d = 8 + 16 * 31 + 15;
    @(negedge clk) in_pulse = 1;
    repeat (4) @(negedge clk);
    in_pulse = 0;
    @(negedge clk) in_pulse = 1;
    @(negedge clk) in_pulse = 0;
    // the fifth pulse is lost: remove it from the expected list
    void'(due.pop_back());
    repeat (d + 5) @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    checks++;
    if (outs != 40 * 4 + 4) begin failures++; $display("FAIL %0d pulses out", outs); end
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
