// tb_ss_deskew_lut: self-checking test of the deskew look-up table.
//
// Calibration is imitated by filling all 512 entries with codes from a made-up non-linear
// element model (coarse element k slightly longer than nominal), kept in a testbench copy.
// Random reads must return the written entry exactly one clock after rd_en, and the data
// must hold while rd_en is low. A second fill pass overwrites part of the table.
module tb_ss_deskew_lut;
  import ss_pkg::*;

  logic clk = 0;
  logic we = 0, rd_en = 0;
  logic [DTIME_W-1:0] waddr = '0, raddr = '0;
  dly_code_t wdata = '0, rdata;
  dly_code_t model [2**DTIME_W];
  int checks = 0, failures = 0;

  ss_deskew_lut dut (.clk, .we, .waddr, .wdata, .rd_en, .raddr, .rdata);

  always #5 clk = ~clk;

  // made-up non-linear element: coarse step k lasts 16 + k/8 time steps
  function automatic dly_code_t cal_code(int t);
    int best_err = 1 << 30;
    dly_code_t best = '0;
    for (int c = 0; c < 32; c++) begin
      int base = 8 + 16 * c + (c * (c - 1)) / 16;
      for (int f = 0; f < 16; f++) begin
        int err = (base + f > t) ? base + f - t : t - base - f;
        if (err < best_err) begin
          best_err = err;
          best = '{coarse: COARSE_W'(c), fine: FINE_W'(f)};
        end
      end
    end
    return best;
  endfunction

  task automatic fill(int from, int to);
    for (int a = from; a < to; a++) begin
      @(negedge clk);
      we = 1; waddr = DTIME_W'(a); wdata = cal_code(a + (from > 0 ? 3 : 0));
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
  endtask

  task automatic check_reads(int n);
    for (int i = 0; i < n; i++) begin
      int a = $urandom_range(2**DTIME_W - 1);
      @(negedge clk);
      rd_en = 1; raddr = DTIME_W'(a);
      @(negedge clk);
      rd_en = 0; raddr = DTIME_W'($urandom);
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL addr %0d got %h expected %h", a, rdata, model[a]);
      end
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read data not held"); end
    end
  endtask

  initial begin
    fill(0, 2**DTIME_W);
    check_reads(300);
    fill(100, 200);
    check_reads(300);
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
