// tb_cdl_section_timing - self-checking test of the footered domino section model.
// One clock cycle per case. The footer is either held on or driven by a
// test clock whose falling edge comes WIN_PS after the rising clock edge.
// The testbench samples the evaluated flags just before and after the
// instants it works out itself (start + nominal delay, + defect delay) and
// after the clock falls (precharge), and checks that a defect evaluates only
// if it completes inside the window.
module tb_cdl_section_timing;
  import dft_pkg::*;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned W = 8, NOM = 50, WIN = 60, HALF = 1000;
  logic clk, footer, start, use_window, done;
  logic [W-1:0] eval;
  defect_t defect;
  logic window_clk;
  int checks = 0, failures = 0;
  int start_delay;

  assign #(WIN) window_clk = ~clk;
  assign footer = use_window ? window_clk : 1'b1;
  always @(clk) start <= #(start_delay) clk;

  cdl_section_timing #(.W(W), .NOM_PS(NOM)) dut (
    .clk(clk), .footer(footer), .start(start), .defect(defect),
    .eval(eval), .done(done));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: %b expect %b", what, $time, got, want);
    end
  endtask

  // One evaluation phase: the clock rises at t0, start rises sd later.
  task automatic cycle(bit win, int sd, int extra, logic [W-1:0] mask);
    int t_done;
    logic [W-1:0] fast_ok, slow_ok;
    use_window = win; start_delay = sd;
    defect.mask = 32'(mask); defect.extra_ps = 16'(extra);
    #(HALF);                       // precharge phase
    clk = 1'b1;                    // t0
    #(sd + NOM - 1);
    expect_eq("before nominal", eval, '0);
    #2;                            // t0 + sd + NOM + 1
    fast_ok = (!win || sd + NOM < WIN) ? ~(extra != 0 ? mask : '0) : '0;
    expect_eq("after nominal", eval, fast_ok);
    t_done  = sd + NOM + extra;
    slow_ok = (!win || t_done < WIN) ? (extra != 0 ? mask : '0) : '0;
    #(extra + 1);                  // past the defect delay
    expect_eq("after defect", eval, fast_ok | slow_ok);
    checks++;
    if (done !== 1'b1) begin failures++; $display("FAIL done low at %0t", $time); end
    #(HALF - (sd + NOM + extra + 2) - 1);
    expect_eq("end of phase", eval, fast_ok | slow_ok);
    clk = 1'b0;
    #1;
    expect_eq("precharge", eval, '0);
    checks++;
    if (done !== 1'b0) begin failures++; $display("FAIL done high in precharge"); end
  endtask

  initial begin
    clk = 1'b0; use_window = 1'b0; start_delay = 0; defect = '0;
    #(2 * HALF);
    cycle(0, 0, 0, '0);              // footer on, no defect
    cycle(0, 0, 400, 8'h0F);         // large defect, relaxed window: passes
    cycle(1, 0, 0, '0);              // window, no defect
    cycle(1, 0, 5, 8'h30);           // small defect inside the window
    cycle(1, 0, 15, 8'h30);          // defect closes window: bits stay low
    cycle(1, 20, 0, '0);             // late inputs: nominal past the window
    cycle(1, 5, 3, 8'h01);
    cycle(1, 5, 6, 8'h01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
