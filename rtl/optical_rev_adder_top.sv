// optical_rev_adder_top: top level of the MZI-based reversible adder library.
//
// It holds two circuits side by side, each with its own ports:
//   * u_adder: the N-bit reversible ripple-carry adder (rev_ripple_adder).
//     Inputs c0, a, b, z; outputs c0, a, s = a + b + c0 (low N bits) and
//     z ^ carry_out. Every input is recovered at an output or combined
//     reversibly, so the map from the 2N+2 inputs to the 2N+2 outputs is a
//     bijection.
//   * u_fa: the one-bit reversible full adder (rev_full_adder),
//     (A, B, Cin) -> (A, A ^ B ^ Cin, Cin).
// The default N = 4 is the size of the published worked example. Everything
// is combinational; there is no clock or reset.
module optical_rev_adder_top #(
  parameter int unsigned N = 4
) (
  input  logic         c0_in,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  input  logic         z_in,
  output logic         c0_out,
  output logic [N-1:0] a_out,
  output logic [N-1:0] s_out,
  output logic         z_out,
  input  logic         fa_a,
  input  logic         fa_b,
  input  logic         fa_cin,
  output logic         fa_p,
  output logic         fa_sum,
  output logic         fa_r
);

  rev_ripple_adder #(.N(N)) u_adder (
    .c0_in (c0_in), .a_in (a_in), .b_in (b_in), .z_in (z_in),
    .c0_out(c0_out), .a_out(a_out), .s_out(s_out), .z_out(z_out)
  );

  rev_full_adder u_fa (
    .a(fa_a), .b(fa_b), .cin(fa_cin),
    .p(fa_p), .sum(fa_sum), .r(fa_r)
  );

endmodule
