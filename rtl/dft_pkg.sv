// dft_pkg - types and constants shared by the delay-fault-testable adder.
//
// The adder is split into three test sections, each with one footered dynamic
// gate: section 1 is the input propagate-generate units, section 2 the
// carry-merge units, section 3 the output multiplexers. The DFT logic is
// steered by three DC pins (T/N, Ctrl1, Ctrl2) whose truth table is decoded
// into the mode below. The 16-bit width, the 4-bit carry-select blocks, the
// three sections, the 20 % safety margin of the evaluation window and the
// 170 MHz low-frequency test clock follow the source design. The nominal
// section delays are this design's own estimate: a 20 % margin on them gives
// the smallest detectable faults reported for the three sections
// (19 ps, 35 ps and 46 ps).
package dft_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned ADDER_WIDTH = 16;   // A[15:0], B[15:0]
  localparam int unsigned BLOCK_WIDTH = 4;    // blocks A..D of the sum section
  localparam int unsigned NUM_SECTIONS = 3;   // sections under test

  // Nominal arrival time, after the rising clock edge, of the last signal of
  // each section (cumulative along the critical path), in ps.
  localparam int unsigned SEC1_ARRIVAL_PS = 95;
  localparam int unsigned SEC2_ARRIVAL_PS = 175;
  localparam int unsigned SEC3_ARRIVAL_PS = 230;

  // Evaluation window = arrival time plus a 20 % safety margin.
  localparam int unsigned MARGIN_PCT = 20;
  function automatic int unsigned window_ps(int unsigned arrival_ps);
    return (arrival_ps * (100 + MARGIN_PCT) + 50) / 100;
  endfunction

  localparam int unsigned SEC1_WINDOW_PS = 114;   // window_ps(95)
  localparam int unsigned SEC2_WINDOW_PS = 210;   // window_ps(175)
  localparam int unsigned SEC3_WINDOW_PS = 276;   // window_ps(230)

  // Low-frequency test clock period (170 MHz), in ps.
  localparam int unsigned TEST_PERIOD_PS = 5882;

  // Operating mode selected by T/N, Ctrl1, Ctrl2 (Table of the DFT logic).
  typedef enum logic [2:0] {
    MODE_NORMAL   = 3'd0,   // T/N = 0
    MODE_TEST_S1  = 3'd1,   // T/N = 1, Ctrl1 = 0, Ctrl2 = 0
    MODE_TEST_S2  = 3'd2,   // T/N = 1, Ctrl1 = 0, Ctrl2 = 1
    MODE_TEST_S3  = 3'd3,   // T/N = 1, Ctrl1 = 1, Ctrl2 = 0
    MODE_RESERVED = 3'd4    // T/N = 1, Ctrl1 = 1, Ctrl2 = 1 (32-bit adder)
  } dft_mode_e;

  // Select lines of one second-level footer multiplexer (one-hot).
  typedef struct packed {
    logic sel_vdd;       // footer held on (normal mode)
    logic sel_clk;       // footer driven by the system clock (relaxed window)
    logic sel_test_clk;  // footer driven by the delayed inverted clock
  } footer_sel_t;

  // One resistive delay defect inside a section: the extra delay and the
  // gate outputs whose evaluation path it lies on.
  typedef struct packed {
    logic [31:0] mask;      // affected gate outputs of the section
    logic [15:0] extra_ps;  // added evaluation delay, ps
  } defect_t;
endpackage
