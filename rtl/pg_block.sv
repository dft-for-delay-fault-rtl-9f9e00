// pg_block - propagate-generate block of the 16-bit adder (test section 1).
//
// Forms, for every bit position i, the propagate term P[i] = A[i] | B[i] and
// the generate term G[i] = A[i] & B[i], exactly as the source design's
// equations define them (propagate is the OR form, not the XOR form, which is
// valid for carry computation). Purely combinational: in silicon these are
// the first compound-domino stage, clocked by the system clock, and carry the
// footer transistor of test section 1.
module pg_block #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,   // propagate
  output logic [WIDTH-1:0] g    // generate
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    p = a | b;
    g = a & b;
  end
endmodule
