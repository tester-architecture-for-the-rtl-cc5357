// ss_strobe_gen: one data strobe generator of the DSR card.
//
// It watches the sampled comparator output (ACHI) of one DUT clock and makes a one-step
// strobe pulse for each selected edge: rising, falling or both (double strobe). With div2
// set, only every second selected edge makes a strobe; the divider is held in its start
// phase while the drive-inhibit event signal DINH is low, so the first edge after DINH
// rises gives a strobe, and moving DINH later by one DUT clock period moves the whole
// strobe sequence by one period (first and second pass of a two-pass test). Without div2,
// DINH has no effect. With en clear, no strobe leaves the block.
//
// Timing: stb is registered and follows the ACHI sample that shows the edge by one step.
// Edge selection, the by-2 divider, DINH start control and the software enable follow the
// document; the one-step latency and holding the divider while DINH is low are own choices.
module ss_strobe_gen
  import ss_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  stb_gen_cfg_t cfg,
  input  logic         achi,  // sampled DUT clock
  input  logic         dinh,  // drive-inhibit event, already delayed
  output logic         stb    // one-step strobe pulse
);

  logic achi_q;
  logic phase;  // by-2 divider state: 0 = next selected edge makes a strobe
  logic edge_ev;

  always_comb begin
    unique case (cfg.mode)
      EDGE_RISE: edge_ev = achi & ~achi_q;
      EDGE_FALL: edge_ev = ~achi & achi_q;
      EDGE_BOTH: edge_ev = achi ^ achi_q;
      default:   edge_ev = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      achi_q <= 1'b0;
      phase  <= 1'b0;
      stb    <= 1'b0;
    end else begin
      achi_q <= achi;
      stb    <= 1'b0;
      if (!cfg.div2) begin
        phase <= 1'b0;
        stb   <= cfg.en & edge_ev;
      end else if (!dinh) begin
        phase <= 1'b0;
      end else if (edge_ev) begin
        stb   <= cfg.en & ~phase;
        phase <= ~phase;
      end
    end
  end

endmodule
