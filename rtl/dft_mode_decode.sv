// dft_mode_decode - mode selection of the DFT logic.
//
// Decodes the three DC control pins into the operating mode and into the
// select lines of the DFT multiplexers:
//   T/N Ctrl1 Ctrl2   mode
//    0    x     x     normal: every footer held on, delay chain input at VDD
//    1    0     0     test section 1 (propagate-generate)
//    1    0     1     test section 2 (carry merge)
//    1    1     0     test section 3 (output multiplexers)
//    1    1     1     reserved (for a 32-bit adder)
// In a test mode the section under test takes the delayed inverted clock on
// its footer and the other sections take the system clock. The truth table
// follows the source design, which builds this logic from two- and
// three-input NAND/NOR gates; that the reserved code clocks every section with
// the system clock (no section under test) is this design's choice.
// Purely combinational.
module dft_mode_decode
  import dft_pkg::*;
(
  input  logic        tn,        // T/N: 1 = test, 0 = normal
  input  logic        ctrl1,
  input  logic        ctrl2,
  output dft_mode_e   mode,
  output logic        in_sel_clk,           // first-level mux: 1 = Clk, 0 = VDD
  output footer_sel_t sel [NUM_SECTIONS]    // second-level mux selects
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    unique casez ({tn, ctrl1, ctrl2})
      3'b0??:  mode = MODE_NORMAL;
      3'b100:  mode = MODE_TEST_S1;
      3'b101:  mode = MODE_TEST_S2;
      3'b110:  mode = MODE_TEST_S3;
      default: mode = MODE_RESERVED;
    endcase
  end

  always_comb begin
    in_sel_clk = tn;
    for (int k = 0; k < NUM_SECTIONS; k++) begin
      logic under_test;
      under_test = tn && ({ctrl1, ctrl2} == 2'(k));
      sel[k].sel_vdd      = !tn;
      sel[k].sel_test_clk = under_test;
      sel[k].sel_clk      = tn && !under_test;
    end
  end
endmodule
