// cdl_section_timing - behavioural timing model of one footered CDL test section.
//
// Behavioural model (not synthesizable): it stands for the analog behaviour
// of a run of compound-domino gates whose first dynamic gate has an NMOS
// footer transistor. It produces, for each gate output of the section, the
// "evaluated" flag that adder16 ANDs onto that output.
//
// How it works: while clk is low the section precharges and every flag is 0.
// When the section's inputs are valid (rising edge of start: the system clock
// for section 1, the done output of the previous section otherwise) the gates
// need NOM_PS to evaluate, plus defect.extra_ps for the outputs in
// defect.mask that lie on the path of a resistive defect. An output
// evaluates only if, at the moment its evaluation would complete, clk is still
// high and the footer is still on; otherwise its dynamic node keeps the
// precharge level for the rest of the cycle, and the output reads as a stuck
// value. done rises NOM_PS (plus the defect delay, if any output has the
// defect) after start, while clk is high; it starts the next section.
//
// The footer gating and the conversion of a too-late evaluation into a logic
// failure follow the source design; the per-section nominal delays and the
// single-delay defect description are this design's. Only one evaluation is
// tracked per clock cycle: a defect delay must stay below the evaluation
// phase. Times in ps.
module cdl_section_timing
  import dft_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned NOM_PS = 55
) (
  input  logic         clk,      // system clock: high = evaluate
  input  logic         footer,   // gate of the footer transistor
  input  logic         start,    // inputs of the section valid
  input  defect_t      defect,
  output logic [W-1:0] eval,     // per gate output: evaluated this phase
  output logic         done      // section finished evaluating
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] eval_q;
  logic         done_q;

  // Precharge forces the outputs low whatever the evaluation process holds.
  assign eval = eval_q & {W{clk}};
  assign done = done_q & clk;

  always begin : evaluate
    logic [W-1:0] slow;
    @(posedge start);
    eval_q = '0;
    done_q = 1'b0;
    slow   = (defect.extra_ps != 0) ? defect.mask[W-1:0] : '0;
    #(NOM_PS);
    if (clk && footer) eval_q = eval_q | ~slow;
    if (slow != '0) begin
      #(int'(defect.extra_ps));
      if (clk && footer) eval_q = eval_q | slow;
    end
    if (clk) begin
      done_q = 1'b1;
      @(negedge clk);
    end
    // precharge
    eval_q = '0;
    done_q = 1'b0;
  end
endmodule
