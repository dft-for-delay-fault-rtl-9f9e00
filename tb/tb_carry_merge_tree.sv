// tb_carry_merge_tree - self-checking test of the binary carry-merge tree.
// Drives random propagate/generate vectors (both arbitrary ones and ones
// formed from operands) and compares the 1-in-4 block carries with a
// bit-serial evaluation of C[i] = G[i] | P[i] & C[i-1] in the testbench.
module tb_carry_merge_tree;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned WIDTH = 16, BLOCK = 4, NBLK = WIDTH / BLOCK;
  logic [WIDTH-1:0] p, g;
  logic             cin;
  logic [NBLK-1:0]  c_blk, expect_c;
  int checks = 0, failures = 0;

  carry_merge_tree #(.WIDTH(WIDTH), .BLOCK(BLOCK)) dut (
    .p(p), .g(g), .cin(cin), .c_blk(c_blk));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [WIDTH-1:0] a, b;
      logic c;
      a = WIDTH'($urandom); b = WIDTH'($urandom);
      cin = 1'($urandom);
      if (n % 2 == 0) begin p = a | b; g = a & b; end
      else begin p = WIDTH'($urandom); g = WIDTH'($urandom); end
      if (n == 1) begin p = '1; g = '0; cin = 1'b1; end   // full propagate
      if (n == 3) begin p = '1; g = '0; cin = 1'b0; end
      c = cin;
      for (int i = 0; i < WIDTH; i++) begin
        c = g[i] | (p[i] & c);
        if (i % BLOCK == BLOCK - 1) expect_c[i / BLOCK] = c;
      end
      #10;
      checks++;
      if (c_blk !== expect_c) begin
        failures++;
        $display("FAIL p=%h g=%h cin=%b c=%b expect %b", p, g, cin, c_blk, expect_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
