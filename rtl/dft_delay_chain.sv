// dft_delay_chain - behavioural model of the DFT inverter delay chain.
//
// Behavioural model (not synthesizable): the real part is a chain of sized
// static CMOS inverters whose delay is set by transistor sizing. It takes
// node C (the system clock in test mode, VDD in normal mode) and gives one
// tap per test section, Test_clk[k], the inverted node C delayed by
// TAP_PS[k]. The falling edge of Test_clk[k] arrives TAP_PS[k] after the
// rising clock edge and closes the evaluation window of section k, so the
// window length is TAP_PS[k]. The taps lie along one chain, so each segment
// adds the difference of two successive taps. In normal mode node C is held
// at VDD and every tap rests at 0 without toggling.
//
// The inverted, delayed clock and the single chain with per-section taps
// follow the source design; the tap delays are this design's: the nominal
// arrival time of each section plus a 20 % safety margin (114, 210 and
// 276 ps). Delays are inertial (continuous assignments), in ps.
module dft_delay_chain
  import dft_pkg::*;
#(
  parameter int unsigned TAP1_PS = SEC1_WINDOW_PS,
  parameter int unsigned TAP2_PS = SEC2_WINDOW_PS,
  parameter int unsigned TAP3_PS = SEC3_WINDOW_PS
) (
  input  logic                    node_c,
  output logic [NUM_SECTIONS-1:0] test_clk
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SEG2_PS = TAP2_PS - TAP1_PS;
  localparam int unsigned SEG3_PS = TAP3_PS - TAP2_PS;

  // Odd number of inversions up to the first tap, even between taps.
  assign #(TAP1_PS) test_clk[0] = ~node_c;
  assign #(SEG2_PS) test_clk[1] = test_clk[0];
  assign #(SEG3_PS) test_clk[2] = test_clk[1];

  initial begin
    assert (TAP1_PS < TAP2_PS && TAP2_PS < TAP3_PS)
      else $error("delay chain taps must increase along the chain");
  end
endmodule
