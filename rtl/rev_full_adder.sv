// rev_full_adder: one-bit reversible full adder made of ORG-I followed by
// ORG-II on the same three lines.
//
//   (A, B, Cin) -> (P = A, Sum = A xor B xor Cin, R = Cin)
//
// ORG-I turns (A, B, Cin) into (carry, A xor B, A.~B + ~(A xor B).Cin); ORG-II
// takes those three lines, in that order, and returns A, the sum and Cin.
// The carry out exists only between the two gates; the n-bit adder
// (rev_ripple_adder) taps it there. No ancilla input, no garbage output.
// Optical cost 6, delay 3 units. Combinational.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic p,     // A restored
  output logic sum,   // A xor B xor Cin
  output logic r      // Cin restored
);

  logic carry, x, t;

  org1_gate u_org1 (.a(a),     .b(b), .c(cin), .p(carry), .q(x),   .r(t));
  org2_gate u_org2 (.a(carry), .b(x), .c(t),   .p(p),     .q(sum), .r(r));

endmodule
