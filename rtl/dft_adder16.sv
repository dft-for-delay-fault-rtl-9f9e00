// dft_adder16 - delay-fault-testable 16-bit compound-domino adder (top level).
//
// A 16-bit adder whose critical path is a chain of compound-domino gates, made
// testable for small delay faults at a low tester clock frequency. The adder
// is split into three test sections: (1) the propagate-generate units,
// (2) the carry-merge units, (3) the output multiplexers. The first dynamic
// gate of each section has an NMOS footer transistor. In normal mode every
// footer is held on and the adder works as a plain domino adder. In test mode
// (T/N = 1, Ctrl1/Ctrl2 choose the section) the footer of the section under
// test is driven by a locally delayed, inverted copy of the clock, Test_clk,
// while the other sections get the system clock. The evaluation window of the
// section under test therefore opens with the rising clock edge and closes
// with the falling edge of Test_clk, a fixed on-chip delay later; a defect
// that makes the section too slow leaves its dynamic nodes precharged, which
// shows as a wrong sum at the outputs. The window does not depend on the clock
// period, so the test runs at a low frequency (170 MHz).
//
// Composition: dft_mode_decode and dft_clock_mux (synthesizable DFT logic),
// dft_delay_chain (behavioural inverter chain), three cdl_section_timing
// models (behavioural domino timing) and adder16 (synthesizable datapath).
// The defect ports stand for a resistive defect in a section (zero extra
// delay = defect-free); they exist to exercise the test and are tied to zero
// in a product. Apply a, b, cin while clk is low (precharge); s and cout are
// valid from about 230 ps after the rising clock edge until clk falls.
// The partition, control truth table and clocking follow the source design;
// the delay numbers and the defect ports are this design's.
module dft_adder16
  import dft_pkg::*;
(
  input  logic                    clk,
  input  logic                    tn,        // T/N: 1 = test mode
  input  logic                    ctrl1,
  input  logic                    ctrl2,
  input  logic [ADDER_WIDTH-1:0]  a,
  input  logic [ADDER_WIDTH-1:0]  b,
  input  logic                    cin,
  input  defect_t                 defect [NUM_SECTIONS],
  output logic [ADDER_WIDTH-1:0]  s,
  output logic                    cout,
  output dft_mode_e               mode,
  output logic [NUM_SECTIONS-1:0] footer     // footer gates, for observation
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NBLK = ADDER_WIDTH / BLOCK_WIDTH;

  // DFT logic
  logic                    in_sel_clk, node_c;
  footer_sel_t             sel [NUM_SECTIONS];
  logic [NUM_SECTIONS-1:0] test_clk;

  dft_mode_decode u_decode (
    .tn(tn), .ctrl1(ctrl1), .ctrl2(ctrl2),
    .mode(mode), .in_sel_clk(in_sel_clk), .sel(sel));

  dft_clock_mux u_clkmux (
    .clk(clk), .in_sel_clk(in_sel_clk), .sel(sel), .test_clk(test_clk),
    .node_c(node_c), .footer(footer));

  dft_delay_chain u_chain (.node_c(node_c), .test_clk(test_clk));

  // Domino timing of the three sections
  logic [2*ADDER_WIDTH-1:0] eval_pg;
  logic [NBLK-1:0]          eval_cm;
  logic [ADDER_WIDTH-1:0]   eval_mux;
  logic                     done1, done2;

  cdl_section_timing #(.W(2*ADDER_WIDTH), .NOM_PS(SEC1_ARRIVAL_PS)) u_sec1 (
    .clk(clk), .footer(footer[0]), .start(clk), .defect(defect[0]),
    .eval(eval_pg), .done(done1));

  cdl_section_timing #(.W(NBLK), .NOM_PS(SEC2_ARRIVAL_PS - SEC1_ARRIVAL_PS)) u_sec2 (
    .clk(clk), .footer(footer[1]), .start(done1), .defect(defect[1]),
    .eval(eval_cm), .done(done2));

  cdl_section_timing #(.W(ADDER_WIDTH), .NOM_PS(SEC3_ARRIVAL_PS - SEC2_ARRIVAL_PS)) u_sec3 (
    .clk(clk), .footer(footer[2]), .start(done2), .defect(defect[2]),
    .eval(eval_mux), .done());

  // Datapath
  adder16 #(.WIDTH(ADDER_WIDTH), .BLOCK(BLOCK_WIDTH)) u_adder (
    .a(a), .b(b), .cin(cin),
    .eval_pg(eval_pg), .eval_cm(eval_cm), .eval_mux(eval_mux),
    .s(s), .cout(cout));
endmodule
