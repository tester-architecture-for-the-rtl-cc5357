// ss_pkg: types and constants shared by the source synchronous (SS) test option.
//
// The whole option is written as a discrete-time timing model: one clock cycle of the
// common sample clock is one time step of STEP_FS femtoseconds (2.5 ps), the resolution of
// the deskew table. DUT clocks and comparator outputs are sampled once per step; a strobe
// is a one-step pulse at the step where the real strobe edge would fall.
//
// Document values: 2.5 ps table resolution, four DUT clocks per DSR card, eight even and
// eight odd strobe outputs per DSR, eight pins per pin slice, eight pin slices per DSR.
// Own choices: the delay element sizes (5-bit coarse code of 16 steps = 40 ps, 4-bit fine
// code of 1 step), the 20 ps common fixed delay and the expect encoding.
package ss_pkg;

  // one time step of the model, in femtoseconds (2.5 ps)
  localparam int unsigned STEP_FS = 2500;

  // DSR card
  localparam int unsigned DSR_CLOCKS  = 4;  // DUT clocks received per DSR card
  localparam int unsigned DSR_OUTPUTS = 8;  // even (and odd) strobe outputs per DSR card

  // SS pin slice
  localparam int unsigned SLICE_PINS  = 8;  // tester channels per pin slice
  localparam int unsigned SLICE_PAIRS = SLICE_PINS / 2;
  localparam int unsigned SLICE_LINES = 2 * SLICE_PINS;  // ACH and BCL delay line per pin

  // delay line elements
  localparam int unsigned COARSE_W    = 5;   // coarse code width
  localparam int unsigned FINE_W      = 4;   // fine code width
  localparam int unsigned COARSE_STEP = 16;  // time steps per coarse element (40 ps)
  localparam int unsigned FIXED_DLY   = 8;   // common fixed delay in time steps (20 ps)
  localparam int unsigned DLY_SLOTS   = 4;   // strobes a delay line can hold in flight
  localparam int unsigned DTIME_W     = 9;   // desired delay, in time steps, table index

  // strobe edge selection of a DSR strobe generator
  typedef enum logic [1:0] {
    EDGE_RISE = 2'd0,
    EDGE_FALL = 2'd1,
    EDGE_BOTH = 2'd2   // double strobe
  } edge_mode_e;

  typedef struct packed {
    logic       en;    // strobe generation enabled by software
    edge_mode_e mode;  // which ACHI edges make a strobe
    logic       div2;  // divide the strobes by two, started by DINH
  } stb_gen_cfg_t;

  // coarse and fine codes of one delay line
  typedef struct packed {
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } dly_code_t;

  // expected state of a DUT output at a tester strobe
  typedef enum logic [1:0] {
    EXP_X = 2'd0,  // masked, no compare
    EXP_L = 2'd1,  // low: below comparator low (BCL) must be set
    EXP_H = 2'd2,  // high: above comparator high (ACH) must be set
    EXP_Z = 2'd3   // between thresholds: ACH and BCL both clear
  } expect_e;

  // total delay of a line, in time steps, for a given code
  function automatic int unsigned dly_steps(dly_code_t c);
    return FIXED_DLY + int'(c.coarse) * COARSE_STEP + int'(c.fine);
  endfunction

endpackage
