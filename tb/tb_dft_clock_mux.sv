// tb_dft_clock_mux - self-checking test of the DFT multiplexers.
// For each legal one-hot select of every footer multiplexer and every value
// of clk and the delay-chain taps, the footer and node C outputs are
// compared with the selected source.
module tb_dft_clock_mux;
  import dft_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic clk, in_sel_clk, node_c;
  footer_sel_t sel [NUM_SECTIONS];
  logic [NUM_SECTIONS-1:0] test_clk, footer;
  int checks = 0, failures = 0;

  dft_clock_mux dut (.clk(clk), .in_sel_clk(in_sel_clk), .sel(sel),
                     .test_clk(test_clk), .node_c(node_c), .footer(footer));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int choice [NUM_SECTIONS];
      clk = 1'($urandom); in_sel_clk = 1'($urandom);
      test_clk = NUM_SECTIONS'($urandom);
      for (int k = 0; k < NUM_SECTIONS; k++) begin
        choice[k] = $urandom % 3;
        sel[k] = footer_sel_t'(3'b100 >> choice[k]);   // vdd, clk, test_clk
      end
      #10;
      checks++;
      if (node_c !== (in_sel_clk ? clk : 1'b1)) begin
        failures++;
        $display("FAIL node_c=%b in_sel_clk=%b clk=%b", node_c, in_sel_clk, clk);
      end
      for (int k = 0; k < NUM_SECTIONS; k++) begin
        logic e;
        e = (choice[k] == 0) ? 1'b1 : (choice[k] == 1) ? clk : test_clk[k];
        checks++;
        if (footer[k] !== e) begin
          failures++;
          $display("FAIL footer %0d=%b choice=%0d expect %b", k, footer[k], choice[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
