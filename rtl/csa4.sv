// csa4 - one carry-select adder of a 4-bit sum block.
//
// Adds two WIDTH-bit slices under a fixed, assumed carry in (parameter CIN):
// each block of the adder has two of them, one for carry in 0 and one for
// carry in 1, working in parallel with the carry-generate section. The source
// design builds them from static CMOS gates and gives only their function;
// the internal ripple chain here is this design's own choice. Purely
// combinational; no carry out is produced because the block carries come from
// the carry-merge tree.
module csa4 #(
  parameter int unsigned WIDTH = 4,
  parameter bit          CIN   = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    logic c;
    c = CIN;
    for (int i = 0; i < WIDTH; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
  end
endmodule
