// ss_delay_line: programmable strobe delay line.
//
// A strobe pulse entering at step t leaves at step t + FIXED + coarse*COARSE_STEP + fine:
// a common fixed delay followed by coarse and fine elements in series. Because the delay
// can exceed the spacing of strobes, up to SLOTS pulses may be in flight at once; each one
// occupies a slot holding a down-counter. A pulse that finds every slot busy is dropped
// and sets the sticky overflow flag, which only reset clears.
//
// The fixed + coarse + fine structure is the document's; the element sizes, the slot count
// and the overflow flag are own choices (the real delay line is an analog part with no
// such limit). The code may change at any time; a pulse keeps the delay it entered with.
module ss_delay_line
  import ss_pkg::*;
#(
  parameter int unsigned FIXED  = ss_pkg::FIXED_DLY,
  parameter int unsigned CSTEP  = ss_pkg::COARSE_STEP,
  parameter int unsigned SLOTS  = ss_pkg::DLY_SLOTS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dly_code_t code,
  input  logic      in_pulse,
  output logic      out_pulse,
  output logic      overflow
);

  localparam int unsigned MAXD = FIXED + ((1 << COARSE_W) - 1) * CSTEP + (1 << FINE_W) - 1;
  localparam int unsigned CW   = $clog2(MAXD + 1);

  logic [SLOTS-1:0]  busy;
  logic [CW-1:0]     cnt [SLOTS];
  logic [SLOTS-1:0]  fire;
  logic [CW-1:0]     total;
  logic              found;
  logic [$clog2(SLOTS > 1 ? SLOTS : 2)-1:0] free_idx;

  always_comb begin
    total = CW'(FIXED + 32'(code.coarse) * CSTEP + 32'(code.fine));
    for (int i = 0; i < SLOTS; i++) fire[i] = busy[i] && (cnt[i] == '0);
    found    = 1'b0;
    free_idx = '0;
    // a slot that fires this step is free again for a new pulse
    for (int i = SLOTS - 1; i >= 0; i--) begin
      if (!busy[i] || fire[i]) begin
        found    = 1'b1;
        free_idx = $bits(free_idx)'(i);
      end
    end
  end

  assign out_pulse = |fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < SLOTS; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < SLOTS; i++) begin
        if (fire[i]) busy[i] <= 1'b0;
        else if (busy[i]) cnt[i] <= cnt[i] - 1'b1;
      end
      if (in_pulse) begin
        if (found) begin
          busy[free_idx] <= 1'b1;
          cnt[free_idx]  <= total - 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

  // the fixed delay keeps every total delay at one step or more
  initial assert (FIXED >= 1) else $error("ss_delay_line: FIXED must be at least 1");

endmodule
