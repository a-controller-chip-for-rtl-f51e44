// multi_high_detector: tells apart "no input high", "exactly one input high" and
// "two or more inputs high" for a group of N signals.
//
// The document builds this as a precharged wired-NOR line pulled down by one
// transistor per signal and read by two ratioed inverters with different trip
// points: one trips when any pull-down conducts, the other only when at least two
// do. Here the same function is written as logic: `any_hi` is the OR of the inputs,
// `multi_hi` is set when two or more inputs are high. Purely combinational; the
// default width of 16 signals is the document's.
module multi_high_detector #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] in,
  output logic         any_hi,    // at least one input high
  output logic         multi_hi   // more than one input high
);
  always_comb begin
    logic seen;
    seen     = 1'b0;
    multi_hi = 1'b0;
    for (int i = 0; i < N; i++) begin
      multi_hi = multi_hi | (seen & in[i]);
      seen     = seen | in[i];
    end
    any_hi = seen;
  end
endmodule
