// tb_csa4 - self-checking test of the 4-bit carry-select adder.
// Exhaustive over both operands, for the carry-in-0 and carry-in-1 versions;
// the sums are compared with integer addition.
module tb_csa4;
  timeunit 1ps; timeprecision 1ps;
  logic [3:0] a, b, sum0, sum1;
  int checks = 0, failures = 0;

  csa4 #(.WIDTH(4), .CIN(1'b0)) dut0 (.a(a), .b(b), .sum(sum0));
  csa4 #(.WIDTH(4), .CIN(1'b1)) dut1 (.a(a), .b(b), .sum(sum1));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a = 4'(x); b = 4'(y);
        #10;
        checks += 2;
        if (sum0 !== 4'(x + y))     begin failures++; $display("FAIL cin0 %0d+%0d=%0d", x, y, sum0); end
        if (sum1 !== 4'(x + y + 1)) begin failures++; $display("FAIL cin1 %0d+%0d=%0d", x, y, sum1); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
