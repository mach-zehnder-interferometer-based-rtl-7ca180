// org1_gate: optical reversible gate I (ORG-I), a 3-in / 3-out reversible gate.
//
//   P = A.B + (A xor B).C          (majority of A, B, C: the carry)
//   Q = A xor B
//   R = A.~B + ~(A xor B).C
//
// Structure (3 MZI switches, 3 beam combiners, 4 beam splitters):
//   stage 1, in parallel:
//     MZI0: incoming A, control B -> A.B, A.~B
//     MZI1: incoming B, control A -> ~A.B
//     Q = A.~B + ~A.B
//   stage 2:
//     MZI2: incoming C, control Q -> C.Q, C.~Q
//     P = A.B + C.Q,  R = A.~B + C.~Q
// The splitters fan out A, B, Q and A.~B. Two switches work in parallel and
// the third waits for Q, so the delay is 2 units and the optical cost 3, as
// published. The gate functions and these counts are the published ones;
// the assignment of beams to MZI ports is derived from the functions.
// Combinational.
module org1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic ab, a_nb, na_b, unused_ba;
  logic cq, c_nq;

  mzi_switch u_mzi0 (.a(a), .b(b), .bar_port(ab),        .cross_port(a_nb));
  mzi_switch u_mzi1 (.a(b), .b(a), .bar_port(unused_ba), .cross_port(na_b));
  beam_combiner u_bc_q (.in0(a_nb), .in1(na_b), .out(q));

  mzi_switch u_mzi2 (.a(c), .b(q), .bar_port(cq), .cross_port(c_nq));
  beam_combiner u_bc_p (.in0(ab),   .in1(cq),   .out(p));
  beam_combiner u_bc_r (.in0(a_nb), .in1(c_nq), .out(r));

endmodule
