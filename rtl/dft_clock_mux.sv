// dft_clock_mux - the two multiplexer levels of the DFT logic.
//
// The first-level (input) multiplexer drives node C, the input of the delay
// chain: the system clock in test mode, VDD in normal mode, so that no node of
// the chain floats or toggles during normal operation. One second-level
// multiplexer per test section drives the gate of that section's footer
// transistor with VDD (normal mode: footer always on), the system clock
// (relaxed evaluation window) or that section's delayed inverted clock
// Test_clk (evaluation window closed early). The structure follows the source
// design, where the multiplexers are C2MOS stages; here they are AND-OR
// logic on one-hot selects from dft_mode_decode. Purely combinational.
module dft_clock_mux
  import dft_pkg::*;
(
  input  logic                    clk,
  input  logic                    in_sel_clk,
  input  footer_sel_t             sel      [NUM_SECTIONS],
  input  logic [NUM_SECTIONS-1:0] test_clk,   // taps of the delay chain
  output logic                    node_c,     // input of the delay chain
  output logic [NUM_SECTIONS-1:0] footer      // footer gate, one per section
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    node_c = in_sel_clk ? clk : 1'b1;
    for (int k = 0; k < NUM_SECTIONS; k++)
      footer[k] = sel[k].sel_vdd
                | (sel[k].sel_clk      & clk)
                | (sel[k].sel_test_clk & test_clk[k]);
  end

  // The select lines of every second-level multiplexer are one-hot.
  for (genvar k = 0; k < NUM_SECTIONS; k++) begin : g_chk
    always_comb assert ($onehot({sel[k].sel_vdd, sel[k].sel_clk, sel[k].sel_test_clk}))
      else $error("footer mux %0d: selects not one-hot", k);
  end
endmodule
