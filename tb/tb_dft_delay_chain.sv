// tb_dft_delay_chain - self-checking test of the delay-chain model.
// Toggles node C like a clock and time-stamps the edges of every tap: each
// tap must be the inverse of node C, TAP_PS later. With node C held high
// (normal mode) every tap must rest low without toggling.
module tb_dft_delay_chain;
  import dft_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic node_c;
  logic [NUM_SECTIONS-1:0] test_clk;
  int checks = 0, failures = 0;
  localparam int unsigned TAP [NUM_SECTIONS] = '{SEC1_WINDOW_PS, SEC2_WINDOW_PS, SEC3_WINDOW_PS};

  dft_delay_chain dut (.node_c(node_c), .test_clk(test_clk));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time rise_c, fall_c;
  int  toggles [NUM_SECTIONS] = '{0, 0, 0};

  for (genvar k = 0; k < NUM_SECTIONS; k++) begin : g_mon
    always @(test_clk[k]) begin
      toggles[k]++;
      if (rise_c != 0) begin
        checks++;
        if (test_clk[k] == 1'b0 && $time != rise_c + TAP[k]) begin
          failures++;
          $display("FAIL tap %0d fell at %0t, clock rose at %0t", k, $time, rise_c);
        end
        if (test_clk[k] == 1'b1 && $time != fall_c + TAP[k]) begin
          failures++;
          $display("FAIL tap %0d rose at %0t, clock fell at %0t", k, $time, fall_c);
        end
      end
    end
  end

  initial begin
    rise_c = 0; fall_c = 0;
    node_c = 1'b1;            // normal mode: node C at VDD
    #2000;
    for (int k = 0; k < NUM_SECTIONS; k++) begin
      checks++;
      if (test_clk[k] !== 1'b0) begin failures++; $display("FAIL tap %0d not low", k); end
      toggles[k] = 0;
    end
    #2000;
    for (int k = 0; k < NUM_SECTIONS; k++) begin
      checks++;
      if (toggles[k] != 0) begin failures++; $display("FAIL tap %0d toggled in normal mode", k); end
    end
    // test mode: node C follows a 170 MHz clock, then a 1 GHz clock
    for (int c = 0; c < 20; c++) begin
      int unsigned half;
      half = (c < 10) ? TEST_PERIOD_PS / 2 : 500;
      node_c = 1'b0; fall_c = $time;
      #(half);
      node_c = 1'b1; rise_c = $time;
      #(half);
    end
    #1000;
    for (int k = 0; k < NUM_SECTIONS; k++) begin
      checks++;
      if (toggles[k] < 38) begin failures++; $display("FAIL tap %0d toggled %0d times", k, toggles[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
