// tb_sum_mux - self-checking test of the 2:1 output multiplexer.
// Random sums on both inputs, both select values.
module tb_sum_mux;
  timeunit 1ps; timeprecision 1ps;
  logic [3:0] s0, s1, s;
  logic       sel;
  int checks = 0, failures = 0;

  sum_mux #(.WIDTH(4)) dut (.s0(s0), .s1(s1), .sel(sel), .s(s));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      s0 = 4'($urandom); s1 = 4'($urandom); sel = 1'(n);
      #10;
      checks++;
      if (s !== (sel ? s1 : s0)) begin
        failures++;
        $display("FAIL s0=%h s1=%h sel=%b s=%h", s0, s1, sel, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
