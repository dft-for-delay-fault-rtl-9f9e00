// sum_mux - 2:1 output multiplexer of one 4-bit sum block (test section 3).
//
// When the block's carry in, coming from the carry-merge tree, is valid, the
// multiplexer passes the sum of the carry-in-1 adder (sel = 1) or of the
// carry-in-0 adder (sel = 0) to the adder outputs. This follows the source
// design; in silicon the multiplexer is a compound-domino gate and the last
// stage of the critical path. Purely combinational.
module sum_mux #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] s0,   // sum assuming carry in 0
  input  logic [WIDTH-1:0] s1,   // sum assuming carry in 1
  input  logic             sel,  // block carry in
  output logic [WIDTH-1:0] s
);
  timeunit 1ps; timeprecision 1ps;

  always_comb s = sel ? s1 : s0;
endmodule
