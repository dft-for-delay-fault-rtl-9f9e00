// tb_pg_block - self-checking test of the propagate-generate block.
// Random and corner operands; each bit of P and G is compared with the OR and
// AND of the operand bits computed bit by bit in the testbench.
module tb_pg_block;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned WIDTH = 16;
  logic [WIDTH-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  pg_block #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '0; end
        2: begin a = '1; b = '1; end
        3: begin a = 16'hAAAA; b = 16'h5555; end
        default: begin a = WIDTH'($urandom); b = WIDTH'($urandom); end
      endcase
      #10;
      for (int i = 0; i < WIDTH; i++) begin
        checks++;
        if (p[i] !== (a[i] || b[i]) || g[i] !== (a[i] && b[i])) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h p=%h g=%h", i, a, b, p, g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
