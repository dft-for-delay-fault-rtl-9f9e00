// tb_dft_mode_decode - self-checking test of the DFT mode decoder.
// All eight combinations of T/N, Ctrl1, Ctrl2 against the mode table; the
// footer multiplexer selects are checked per section.
module tb_dft_mode_decode;
  import dft_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  logic tn, ctrl1, ctrl2, in_sel_clk;
  dft_mode_e mode;
  footer_sel_t sel [NUM_SECTIONS];
  int checks = 0, failures = 0;

  dft_mode_decode dut (.tn(tn), .ctrl1(ctrl1), .ctrl2(ctrl2), .mode(mode),
                       .in_sel_clk(in_sel_clk), .sel(sel));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dft_mode_e exp_mode;
    int        tested;   // section under test, -1 = none
    for (int v = 0; v < 8; v++) begin
      {tn, ctrl1, ctrl2} = 3'(v);
      #10;
      case (v)
        0, 1, 2, 3: begin exp_mode = MODE_NORMAL;   tested = -1; end
        4:          begin exp_mode = MODE_TEST_S1;  tested = 0;  end
        5:          begin exp_mode = MODE_TEST_S2;  tested = 1;  end
        6:          begin exp_mode = MODE_TEST_S3;  tested = 2;  end
        default:    begin exp_mode = MODE_RESERVED; tested = -1; end
      endcase
      checks++;
      if (mode !== exp_mode || in_sel_clk !== tn) begin
        failures++;
        $display("FAIL v=%0d mode=%0d expect %0d in_sel_clk=%b", v, mode, exp_mode, in_sel_clk);
      end
      for (int k = 0; k < NUM_SECTIONS; k++) begin
        footer_sel_t e;
        e.sel_vdd      = (tn == 1'b0);
        e.sel_test_clk = (tested == k);
        e.sel_clk      = tn && (tested != k);
        checks++;
        if (sel[k] !== e) begin
          failures++;
          $display("FAIL v=%0d section %0d sel=%b expect %b", v, k + 1, sel[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
