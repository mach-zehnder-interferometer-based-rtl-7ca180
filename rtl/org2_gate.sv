// org2_gate: optical reversible gate II (ORG-II), a 3-in / 3-out reversible gate.
//
//   P = A.~B + B.C
//   Q = ~B.C + ~A.B
//   R = A.B  + ~B.C
//
// Structure (3 MZI switches in parallel, 3 beam combiners, 4 beam splitters):
//   MZI0: incoming A, control B -> A.B, A.~B
//   MZI1: incoming C, control B -> B.C, ~B.C
//   MZI2: incoming B, control A -> ~A.B
//   P = A.~B + B.C,  Q = ~B.C + ~A.B,  R = A.B + ~B.C
// The splitters fan out A once, B twice and ~B.C once. All switches work in
// parallel: delay 1 unit, optical cost 3, as published. Fed with the outputs
// of ORG-I it restores A and the carry-in and produces the sum (see
// rev_full_adder). The gate functions and counts are the published ones;
// the assignment of beams to MZI ports is derived from the functions.
// Combinational.
module org2_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic ab, a_nb, bc, nb_c, na_b, unused_ba;

  mzi_switch u_mzi0 (.a(a), .b(b), .bar_port(ab),        .cross_port(a_nb));
  mzi_switch u_mzi1 (.a(c), .b(b), .bar_port(bc),        .cross_port(nb_c));
  mzi_switch u_mzi2 (.a(b), .b(a), .bar_port(unused_ba), .cross_port(na_b));

  beam_combiner u_bc_p (.in0(a_nb), .in1(bc),   .out(p));
  beam_combiner u_bc_q (.in0(nb_c), .in1(na_b), .out(q));
  beam_combiner u_bc_r (.in0(ab),   .in1(nb_c), .out(r));

endmodule
