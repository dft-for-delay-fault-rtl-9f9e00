// adder16 - the 16-bit compound-domino adder datapath.
//
// Carry-generate section: the propagate-generate block feeds a binary
// carry-merge tree that yields one carry per 4-bit block (C3, C7, C11, C15).
// Sum-generate section: every 4-bit block has two static carry-select adders,
// one assuming carry in 0 and one assuming carry in 1, working in parallel
// with the carry-generate section; a 2:1 multiplexer per block then picks the
// right sum with the block's carry (cin for block A, C3, C7, C11 for blocks
// B, C, D). This architecture follows the source design.
//
// Domino behaviour: the propagate-generate gates, the carry-merge outputs and
// the output multiplexers are dynamic, low while precharged. Each of their
// outputs is therefore ANDed with an "evaluated" flag (eval_pg, eval_cm,
// eval_mux): 1 means that gate has finished evaluating in this clock phase,
// 0 means its output is still at the precharge level. Tying every flag to
// the system clock gives the fault-free zero-delay domino adder; a timing
// model (cdl_section_timing) drives the flags to show delay faults. The
// carry-select adders are static and ungated. The flags, the carry-in port
// and cout = C15 are this design's choices.
//
// Ports: a, b, cin; eval_pg = {G gates, P gates}; eval_cm[k] for the carry of
// block k; eval_mux per sum bit; s, cout. Purely combinational.
module adder16 #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned BLOCK = 4
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  input  logic [2*WIDTH-1:0]     eval_pg,
  input  logic [WIDTH/BLOCK-1:0] eval_cm,
  input  logic [WIDTH-1:0]       eval_mux,
  output logic [WIDTH-1:0]       s,
  output logic                   cout
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NBLK = WIDTH / BLOCK;

  // Section 1: propagate-generate
  logic [WIDTH-1:0] p_raw, g_raw, p_dyn, g_dyn;
  pg_block #(.WIDTH(WIDTH)) u_pg (.a(a), .b(b), .p(p_raw), .g(g_raw));
  assign p_dyn = p_raw & eval_pg[WIDTH-1:0];
  assign g_dyn = g_raw & eval_pg[2*WIDTH-1:WIDTH];

  // Section 2: carry-merge tree
  logic [NBLK-1:0] c_raw, c_dyn;
  carry_merge_tree #(.WIDTH(WIDTH), .BLOCK(BLOCK)) u_cmt (
    .p(p_dyn), .g(g_dyn), .cin(cin), .c_blk(c_raw));
  assign c_dyn = c_raw & eval_cm;

  // Sum-generate: carry-select adders and section 3, the output multiplexers
  logic [NBLK-1:0] blk_cin;
  assign blk_cin = {c_dyn[NBLK-2:0], cin};

  logic [WIDTH-1:0] s_mux;
  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [BLOCK-1:0] sum0, sum1;
    csa4 #(.WIDTH(BLOCK), .CIN(1'b0)) u_csa0 (
      .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .sum(sum0));
    csa4 #(.WIDTH(BLOCK), .CIN(1'b1)) u_csa1 (
      .a(a[k*BLOCK +: BLOCK]), .b(b[k*BLOCK +: BLOCK]), .sum(sum1));
    sum_mux #(.WIDTH(BLOCK)) u_mux (
      .s0(sum0), .s1(sum1), .sel(blk_cin[k]), .s(s_mux[k*BLOCK +: BLOCK]));
  end

  assign s    = s_mux & eval_mux;
  assign cout = c_dyn[NBLK-1];
endmodule
