// rev_ripple_adder: N-bit reversible ripple-carry adder with carry in, built
// from ORG-I, ORG-II and one Feynman gate, with no ancilla inputs and no
// garbage outputs.
//
// The circuit works on 2N+2 lines, named after the cells of the construction:
//   A_-1 = c0 (carry in), A_i = a_i and B_i = b_i for 0 <= i < N, A_N = z.
// It leaves
//   A_-1 = c0, A_i = a_i, B_i = s_i = a_i ^ b_i ^ c_i, A_N = z ^ c_N
// so with z = 0 the last line carries the carry out.
//
// Step 1, i = 0 .. N-1: ORG-I on (C = A_{i-1}, A = A_i, B = B_i). Its P output
//   (the carry c_{i+1}) goes to A_i, Q (a_i ^ b_i) to B_i and R to A_{i-1}.
//   The carry thus ripples down the A lines.
// Step 1b: a Feynman gate with control A_{N-1} (= c_N) and target A_N.
// Step 2, i = N-1 .. 0: ORG-II on (A = A_i, B = B_i, C = A_{i-1}). It restores
//   a_i on A_i, puts s_i on B_i and restores c_i on A_{i-1}, which is the A
//   input of the next ORG-II up.
// Bits i of each pair of gates form the full adder of rev_full_adder, with
// the neighbouring gates slotted between them. Gate order, line names and
// the Feynman gate follow the published construction. In step 2 the ORG-II
// inputs are taken as A = A_i, B = B_i (as in the one-bit full adder), the
// only assignment that restores a_i.
//
// Purely combinational: outputs follow inputs with no clock. Cost in MZI
// switches is 6N+2 (6N+1 in the published count, which prices the carry
// copy at one switch); delay in MZI units is given by
// optical_pkg::published_adder_delay() and adder_gate_depth(), both 3N+1.
module rev_ripple_adder #(
  parameter int unsigned N = 4
) (
  input  logic         c0_in,   // A_-1
  input  logic [N-1:0] a_in,    // A_0 .. A_N-1
  input  logic [N-1:0] b_in,    // B_0 .. B_N-1
  input  logic         z_in,    // A_N
  output logic         c0_out,  // A_-1: c0
  output logic [N-1:0] a_out,   // A_i: a_i
  output logic [N-1:0] s_out,   // B_i: s_i
  output logic         z_out    // A_N: z ^ s_N
);

  // Figures of merit of this instance (see optical_pkg). They drive no logic;
  // they are there to be read from a testbench or a waveform viewer.
  localparam int unsigned MZI_COUNT       = optical_pkg::built_adder_mzi_count(N);
  localparam int unsigned PUBLISHED_COST  = optical_pkg::published_adder_cost(N);
  localparam int unsigned PUBLISHED_DELAY = optical_pkg::published_adder_delay(N);
  localparam int unsigned GATE_DEPTH      = optical_pkg::adder_gate_depth(N);

  if (N < 1 || N > 2048) begin : g_bad_n
    $error("rev_ripple_adder: N must be between 1 and 2048");
  end

  // Step 1 results: carry written to A_i, a^b written to B_i, and the
  // value ORG-I(i) leaves on A_{i-1}.
  logic [N-1:0] s1_carry;
  logic [N-1:0] s1_x;
  logic [N-1:0] s1_r;
  // Line A_{N-1} after the Feynman gate (unchanged: c_N).
  logic         fg_ctrl;
  // Step 2: value ORG-II(i) leaves on A_{i-1} (the restored carry c_i).
  logic [N-1:0] s2_r;

  for (genvar i = 0; i < N; i++) begin : g_step1
    logic cin;
    if (i == 0) begin : g_first
      assign cin = c0_in;
    end else begin : g_next
      assign cin = s1_carry[i-1];
    end
    org1_gate u_org1 (
      .a(a_in[i]), .b(b_in[i]), .c(cin),
      .p(s1_carry[i]), .q(s1_x[i]), .r(s1_r[i])
    );
  end

  feynman_gate u_fg (
    .a(s1_carry[N-1]), .b(z_in),
    .p(fg_ctrl),       .q(z_out)
  );

  for (genvar i = N - 1; i >= 0; i--) begin : g_step2
    logic line_a;
    if (i == N - 1) begin : g_last
      assign line_a = fg_ctrl;
    end else begin : g_prev
      assign line_a = s2_r[i+1];
    end
    org2_gate u_org2 (
      .a(line_a), .b(s1_x[i]), .c(s1_r[i]),
      .p(a_out[i]), .q(s_out[i]), .r(s2_r[i])
    );
  end

  assign c0_out = s2_r[0];

endmodule
