// feynman_gate: all-optical reversible Feynman (controlled-NOT) gate.
//
//   (A, B) -> (P = A, Q = A xor B)
//
// Two MZI switches work in parallel on split copies of A and B:
//   MZI0: incoming A, control B  -> A.B  (bar), A.~B (cross)
//   MZI1: incoming B, control A  -> ~A.B (cross)
// Beam combiners then form P = A.B + A.~B = A and Q = A.~B + ~A.B. A and B
// each pass one beam splitter (fan-out). Optical cost 2, delay 1 unit, as
// published for this gate. Which MZI port receives which beam is this
// design's choice, derived from the output functions. Combinational.
module feynman_gate (
  input  logic a,   // control
  input  logic b,   // target
  output logic p,   // A
  output logic q    // A xor B
);

  logic ab, a_nb, na_b;
  logic unused_ba;

  mzi_switch u_mzi0 (.a(a), .b(b), .bar_port(ab),        .cross_port(a_nb));
  mzi_switch u_mzi1 (.a(b), .b(a), .bar_port(unused_ba), .cross_port(na_b));

  beam_combiner u_bc_p (.in0(ab),   .in1(a_nb), .out(p));
  beam_combiner u_bc_q (.in0(a_nb), .in1(na_b), .out(q));

endmodule
