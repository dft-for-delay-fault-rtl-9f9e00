// tb_dft_adder16 - end-to-end test of the delay-fault-testable adder, at its
// default (full) size.
//
// Each operation is one clock cycle: operands are applied in the precharge
// phase (clk low), the clock rises, and s/cout are strobed 1 ps before the
// clock falls, as a tester would. For every operation the testbench works
// out on its own which gate outputs finish evaluating in time: from the
// nominal section delays, the defect delay, and the evaluation window of the
// section (the delay-chain tap in test mode for the section under test,
// otherwise the clock's high phase). It then forms the expected outputs with
// a bit-serial ripple reference in which late gates stay at the precharge
// level, and compares.
//
// Campaign (one defect at a time, like the defect study it reproduces):
//  * defect-free operation in normal mode at 170 MHz and at 1.67 GHz, and in
//    every test mode including the reserved code;
//  * ten representative defects F1..F10 placed in the three sections (the
//    gate outputs each one slows are this testbench's choice). Each is run in
//    its own section's test mode just above and just below the detection
//    limit of that section (window minus nominal arrival: 19, 35, 46 ps), in
//    the other sections' test modes, and in normal mode at 170 MHz, where a
//    defect of that size must escape;
//  * the same detection at 1 GHz as at 170 MHz (window set on chip, not by
//    the clock period), and at-speed detection of a large defect in normal
//    mode, as a design without the DFT logic would have to do it.
// Each mechanism is counted and a failure is counted for any that never ran.
module tb_dft_adder16;
  import dft_pkg::*;
  timeunit 1ps; timeprecision 1ps;

  logic clk, tn, ctrl1, ctrl2, cin, cout;
  logic [15:0] a, b, s;
  defect_t defect [NUM_SECTIONS];
  dft_mode_e mode;
  logic [NUM_SECTIONS-1:0] footer;
  int checks = 0, failures = 0;

  dft_adder16 dut (
    .clk(clk), .tn(tn), .ctrl1(ctrl1), .ctrl2(ctrl2), .a(a), .b(b), .cin(cin),
    .defect(defect), .s(s), .cout(cout), .mode(mode), .footer(footer));

  initial begin : watchdog
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Timing the testbench assumes (independent copy of the design intent).
  localparam int ARRIVE [3] = '{95, 175, 230};   // nominal end of each section
  localparam int NOMD   [3] = '{95, 80, 55};     // nominal delay of each section
  localparam int WINDOW [3] = '{114, 210, 276};  // 1.2 x arrival, rounded
  localparam int WIDTHS [3] = '{32, 4, 16};

  // Mechanism counters
  int n_normal, n_test [3], n_reserved, n_lowfreq, n_fast, n_detect, n_escape,
      n_atspeed_detect, n_freq_indep;

  task automatic set_mode(int m);   // 0 normal, 1..3 test section, 4 reserved
    case (m)
      0: {tn, ctrl1, ctrl2} = 3'b000;
      1: {tn, ctrl1, ctrl2} = 3'b100;
      2: {tn, ctrl1, ctrl2} = 3'b101;
      3: {tn, ctrl1, ctrl2} = 3'b110;
      default: {tn, ctrl1, ctrl2} = 3'b111;
    endcase
  endtask

  // Expected outputs for the current inputs, mode m, clock high phase 'half'.
  task automatic expected(int m, int half, output logic [15:0] rs, output logic rc);
    logic [31:0] ev [3];
    int t_start;
    logic c;
    logic [3:0] cb;
    logic [4:0] bc;
    t_start = 0;
    for (int k = 0; k < 3; k++) begin
      int win, slow_t;
      logic [31:0] mask;
      win    = (m == k + 1) ? WINDOW[k] : half;
      mask   = (defect[k].extra_ps != 0) ? defect[k].mask : '0;
      if (WIDTHS[k] < 32) mask = mask & ((32'd1 << WIDTHS[k]) - 1);
      slow_t = t_start + NOMD[k] + int'(defect[k].extra_ps);
      ev[k]  = '0;
      if (t_start + NOMD[k] < win) ev[k] = ~mask;
      if (slow_t < win)            ev[k] = ev[k] | mask;
      t_start = t_start + NOMD[k] + ((mask != 0) ? int'(defect[k].extra_ps) : 0);
    end
    c = cin;
    for (int i = 0; i < 16; i++) begin
      logic pi, gi;
      pi = (a[i] | b[i]) & ev[0][i];
      gi = (a[i] & b[i]) & ev[0][16 + i];
      c  = gi | (pi & c);
      if (i % 4 == 3) cb[i / 4] = c & ev[1][i / 4];
    end
    bc = {cb, cin};
    for (int k = 0; k < 4; k++)
      rs[4*k +: 4] = 4'(a[4*k +: 4] + b[4*k +: 4] + 4'(bc[k]));
    rs = rs & ev[2][15:0];
    rc = cb[3];
  endtask

  // One clock cycle; returns 1 when the outputs differ from the true sum.
  task automatic op(int m, int half, logic [15:0] av, logic [15:0] bv, logic ci,
                    output bit detected);
    logic [15:0] rs;
    logic rc;
    set_mode(m);
    a = av; b = bv; cin = ci;
    clk = 1'b0;
    #(half);
    clk = 1'b1;
    #(half - 1);
    expected(m, half, rs, rc);
    checks++;
    if (s !== rs || cout !== rc) begin
      failures++;
      $display("FAIL mode %0d half %0d: %h+%h+%b -> %b_%h expect %b_%h", m, half,
               av, bv, ci, cout, s, rc, rs);
    end
    detected = ({cout, s} != 17'(av) + 17'(bv) + 17'(ci));
    if (m == 0) n_normal++; else if (m == 4) n_reserved++; else n_test[m-1]++;
    if (half >= TEST_PERIOD_PS / 2) n_lowfreq++; else n_fast++;
    #1;
  endtask

  // Run nvec operations; return how many showed a wrong sum.
  task automatic run(int m, int half, int nvec, output int ndet);
    bit d;
    ndet = 0;
    for (int v = 0; v < nvec; v++) begin
      logic [15:0] av, bv;
      logic ci;
      case (v)
        0: begin av = 16'hFFFF; bv = 16'h0001; ci = 1'b0; end
        1: begin av = 16'hFFFF; bv = 16'hFFFF; ci = 1'b1; end
        2: begin av = 16'h0F0F; bv = 16'h0F0F; ci = 1'b1; end
        default: begin av = 16'($urandom); bv = 16'($urandom); ci = 1'($urandom); end
      endcase
      op(m, half, av, bv, ci, d);
      if (d) ndet++;
    end
  endtask

  typedef struct { int sec; logic [31:0] mask; } fault_t;
  fault_t faults [10];

  initial begin
    int nd;
    int limit [3];
    clk = 1'b0; set_mode(0); a = '0; b = '0; cin = 1'b0;
    for (int k = 0; k < 3; k++) defect[k] = '0;
    n_normal = 0; n_reserved = 0; n_lowfreq = 0; n_fast = 0; n_detect = 0;
    n_escape = 0; n_atspeed_detect = 0; n_freq_indep = 0;
    for (int k = 0; k < 3; k++) begin n_test[k] = 0; limit[k] = WINDOW[k] - ARRIVE[k]; end
    #5000;

    // Defect-free operation in every mode
    for (int m = 0; m <= 4; m++) begin
      run(m, TEST_PERIOD_PS / 2, 60, nd);
      checks++;
      if (nd != 0) begin failures++; $display("FAIL defect-free mode %0d: %0d wrong sums", m, nd); end
    end
    run(0, 300, 60, nd);   // at speed
    checks++;
    if (nd != 0) begin failures++; $display("FAIL defect-free at speed: %0d wrong sums", nd); end

    // Defects F1..F10: section and slowed gate outputs
    faults[0] = '{0, 32'h0000_0022};  // F1: P1, P5
    faults[1] = '{0, 32'h0200_0000};  // F2: G9
    faults[2] = '{1, 32'h1};          // F3: C3
    faults[3] = '{1, 32'h2};          // F4: C7
    faults[4] = '{1, 32'h4};          // F5: C11
    faults[5] = '{1, 32'h8};          // F6: C15
    faults[6] = '{1, 32'h6};          // F7: C7, C11
    faults[7] = '{0, 32'h0000_F000};  // F8: P12..P15
    faults[8] = '{2, 32'h0000_00F0};  // F9: output mux of block B
    faults[9] = '{0, 32'h0001_0001};  // F10: P0, G0

    foreach (faults[f]) begin
      int k;
      k = faults[f].sec;
      for (int j = 0; j < 3; j++) defect[j] = '0;
      defect[k].mask = faults[f].mask;

      // just above the limit, own section under test: detected
      defect[k].extra_ps = 16'(limit[k] + 6);
      run(k + 1, TEST_PERIOD_PS / 2, 80, nd);
      checks++;
      if (nd == 0) begin failures++; $display("FAIL F%0d not detected in its test mode", f + 1); end
      else n_detect++;

      // same defect, other sections under test: no failure there
      for (int j = 0; j < 3; j++) if (j != k) begin
        run(j + 1, TEST_PERIOD_PS / 2, 20, nd);
        checks++;
        if (nd != 0) begin failures++; $display("FAIL F%0d seen while testing section %0d", f + 1, j + 1); end
      end

      // same defect in normal mode at 170 MHz: escapes
      run(0, TEST_PERIOD_PS / 2, 40, nd);
      checks++;
      if (nd != 0) begin failures++; $display("FAIL F%0d seen in normal mode", f + 1); end
      else n_escape++;

      // just below the limit: inside the safety margin, passes
      defect[k].extra_ps = 16'(limit[k] - 6);
      run(k + 1, TEST_PERIOD_PS / 2, 40, nd);
      checks++;
      if (nd != 0) begin failures++; $display("FAIL F%0d below limit rejected", f + 1); end
      else n_escape++;
    end

    // Detection does not depend on the clock period: 1 GHz as at 170 MHz
    for (int k = 0; k < 3; k++) begin
      int nd_slow, nd_fast;
      for (int j = 0; j < 3; j++) defect[j] = '0;
      defect[k].mask = (k == 0) ? 32'h0000_FFFF : (k == 1) ? 32'hF : 32'hFFFF;
      defect[k].extra_ps = 16'(limit[k] + 4);
      process::self().srandom(100 + k);
      run(k + 1, TEST_PERIOD_PS / 2, 40, nd_slow);
      process::self().srandom(100 + k);
      run(k + 1, 500, 40, nd_fast);
      checks++;
      if (nd_slow == 0 || nd_slow != nd_fast) begin
        failures++;
        $display("FAIL section %0d: %0d detections at 170 MHz, %0d at 1 GHz", k + 1, nd_slow, nd_fast);
      end else n_freq_indep++;
    end

    // Without the DFT window a defect is seen only if it overruns the
    // clock's high phase: 300 ps phase, 230 ps nominal.
    for (int j = 0; j < 3; j++) defect[j] = '0;
    defect[0].mask = 32'h0000_FFFF;
    defect[0].extra_ps = 16'd100;
    run(0, 300, 40, nd);
    checks++;
    if (nd == 0) begin failures++; $display("FAIL at-speed large defect missed"); end
    else n_atspeed_detect++;
    defect[0].extra_ps = 16'd50;
    run(0, 300, 40, nd);
    checks++;
    if (nd != 0) begin failures++; $display("FAIL at-speed small defect seen"); end
    defect[0] = '0;

    $display("mechanisms: normal=%0d test_s1=%0d test_s2=%0d test_s3=%0d reserved=%0d",
             n_normal, n_test[0], n_test[1], n_test[2], n_reserved);
    $display("  low_freq=%0d fast=%0d detected=%0d escaped=%0d freq_indep=%0d at_speed=%0d",
             n_lowfreq, n_fast, n_detect, n_escape, n_freq_indep, n_atspeed_detect);
    foreach (n_test[k]) begin checks++; if (n_test[k] == 0) failures++; end
    checks++; if (n_normal == 0) failures++;
    checks++; if (n_reserved == 0) failures++;
    checks++; if (n_lowfreq == 0) failures++;
    checks++; if (n_fast == 0) failures++;
    checks++; if (n_detect == 0) failures++;
    checks++; if (n_escape == 0) failures++;
    checks++; if (n_freq_indep == 0) failures++;
    checks++; if (n_atspeed_detect == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
