// tb_adder16 - self-checking test of the 16-bit adder datapath.
// Part 1: every gate evaluated; sum and carry out against integer addition.
// Part 2: random gates left unevaluated (still precharged); the expected
// result comes from a bit-serial reference that forces those gate outputs
// low: P/G terms into a ripple carry chain, the block carries, and each sum
// block added with its (possibly wrong) carry in.
module tb_adder16;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned WIDTH = 16, BLOCK = 4, NBLK = 4;
  logic [WIDTH-1:0]   a, b, s;
  logic               cin, cout;
  logic [2*WIDTH-1:0] eval_pg;
  logic [NBLK-1:0]    eval_cm;
  logic [WIDTH-1:0]   eval_mux;
  int checks = 0, failures = 0;

  adder16 #(.WIDTH(WIDTH), .BLOCK(BLOCK)) dut (
    .a(a), .b(b), .cin(cin), .eval_pg(eval_pg), .eval_cm(eval_cm),
    .eval_mux(eval_mux), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reference(output logic [WIDTH-1:0] rs, output logic rc);
    logic c;
    logic [NBLK-1:0] cb;
    logic [NBLK:0] bc;
    c = cin;
    for (int i = 0; i < WIDTH; i++) begin
      logic pi, gi;
      pi = (a[i] | b[i]) & eval_pg[i];
      gi = (a[i] & b[i]) & eval_pg[WIDTH + i];
      c = gi | (pi & c);
      if (i % BLOCK == BLOCK - 1) cb[i / BLOCK] = c & eval_cm[i / BLOCK];
    end
    bc = {cb, cin};
    for (int k = 0; k < NBLK; k++)
      rs[k*BLOCK +: BLOCK] = 4'(a[k*BLOCK +: BLOCK] + b[k*BLOCK +: BLOCK] + 4'(bc[k]));
    rs = rs & eval_mux;
    rc = cb[NBLK-1];
  endtask

  initial begin
    logic [WIDTH-1:0] rs;
    logic rc;
    for (int n = 0; n < 3000; n++) begin
      a = WIDTH'($urandom); b = WIDTH'($urandom); cin = 1'($urandom);
      if (n == 0) begin a = 16'hFFFF; b = 16'h0000; cin = 1'b1; end
      if (n == 1) begin a = 16'hFFFF; b = 16'hFFFF; cin = 1'b1; end
      eval_pg = '1; eval_cm = '1; eval_mux = '1;
      #10;
      checks++;
      if ({cout, s} !== 17'(a) + 17'(b) + 17'(cin)) begin
        failures++;
        $display("FAIL %h+%h+%b = %b_%h", a, b, cin, cout, s);
      end
      // a few gates still precharged
      eval_pg  = ~(32'(1) << ($urandom % 32));
      eval_cm  = (n % 3 == 0) ? ~(4'(1) << ($urandom % 4)) : '1;
      eval_mux = (n % 5 == 0) ? ~(16'(1) << ($urandom % 16)) : '1;
      if (n % 7 == 0) eval_pg = '1;
      #10;
      reference(rs, rc);
      checks++;
      if (s !== rs || cout !== rc) begin
        failures++;
        $display("FAIL gated %h+%h+%b pg=%h cm=%b mux=%h: %b_%h expect %b_%h",
                 a, b, cin, eval_pg, eval_cm, eval_mux, cout, s, rc, rs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
