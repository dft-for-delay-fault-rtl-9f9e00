// carry_merge_tree - binary carry-merge tree of the 16-bit adder (test section 2).
//
// Produces one carry per 4-bit block, C3, C7, C11 and C15, from the
// propagate/generate terms and the carry into bit 0. The tree applies the
// carry-merge recurrence C[i] = G[i] | P[i] & C[i-1] in binary form: level L
// merges pairs of aligned spans of 2**(L-1) bits into spans of 2**L bits,
//   G[hi:lo] = G[hi:m+1] | P[hi:m+1] & G[m:lo],  P[hi:lo] = P[hi:m+1] & P[m:lo],
// and the carry out of bit e is found by folding the aligned spans that make
// up bits e..0 (one span per set bit of e+1) onto the carry in, widest (lowest)
// span first. The recurrence, the binary merge and the 1-in-4 carries follow the
// source design; how the spans are combined and the carry-in port are this
// design's choice. Purely combinational.
//
// Ports: p, g (WIDTH bits), cin; c_blk[k] is the carry out of bit
// (k+1)*BLOCK-1, so c_blk = {C15, C11, C7, C3} at the default size.
module carry_merge_tree #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0]       p,
  input  logic [WIDTH-1:0]       g,
  input  logic                   cin,
  output logic [WIDTH/BLOCK-1:0] c_blk
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LEVELS = $clog2(WIDTH);
  localparam int unsigned NBLK   = WIDTH / BLOCK;

  // span_g[L][j], span_p[L][j]: group terms of bits j*2**L .. (j+1)*2**L-1
  logic [WIDTH-1:0] span_g [LEVELS+1];
  logic [WIDTH-1:0] span_p [LEVELS+1];

  always_comb begin
    for (int l = 0; l <= LEVELS; l++) begin
      span_g[l] = '0;
      span_p[l] = '0;
    end
    span_g[0] = g;
    span_p[0] = p;
    for (int l = 1; l <= LEVELS; l++) begin
      for (int j = 0; j < (WIDTH >> l); j++) begin
        span_g[l][j] = span_g[l-1][2*j+1] | (span_p[l-1][2*j+1] & span_g[l-1][2*j]);
        span_p[l][j] = span_p[l-1][2*j+1] & span_p[l-1][2*j];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      int unsigned n;     // number of bits from bit 0 up to the block end
      int unsigned base;  // lowest bit not yet folded in
      logic        c;
      n    = (k + 1) * BLOCK;
      base = 0;
      c    = cin;
      for (int l = LEVELS; l >= 0; l--) begin
        if (n[l]) begin
          c    = span_g[l][base >> l] | (span_p[l][base >> l] & c);
          base = base + (1 << l);
        end
      end
      c_blk[k] = c;
    end
  end
endmodule
