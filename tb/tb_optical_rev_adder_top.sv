// tb_optical_rev_adder_top: end-to-end test of the top level at its default
// size (N = 4, the published worked example).
//
// The ripple adder gets all 2^(2N+2) input vectors (c0, a, b, z); expected
// results come from integer addition. The full adder beside it gets all
// eight (A, B, Cin). Each behaviour the construction relies on is counted
// and must occur at least once:
//   ripple    - a carry entering at c0 travels through every bit position
//   carry_out - the carry out c_N is 1
//   z_flip    - z = 1 and a carry out, so the last line is cleared
//   cin_used  - the carry in changes the sum
//   restore   - a and c0 come back unchanged (every vector)
// The adder's outputs must also form a permutation of its inputs.
module tb_optical_rev_adder_top;
  localparam int N = 4;
  localparam int W = 2 * N + 2;

  logic         c0_in, z_in, c0_out, z_out;
  logic [N-1:0] a_in, b_in, a_out, s_out;
  logic         fa_a, fa_b, fa_cin, fa_p, fa_sum, fa_r;
  logic [(1<<W)-1:0] seen;
  int checks = 0, failures = 0;
  int n_ripple = 0, n_carry_out = 0, n_z_flip = 0, n_cin_used = 0, n_restore = 0;

  optical_rev_adder_top dut (
    .c0_in(c0_in), .a_in(a_in), .b_in(b_in), .z_in(z_in),
    .c0_out(c0_out), .a_out(a_out), .s_out(s_out), .z_out(z_out),
    .fa_a(fa_a), .fa_b(fa_b), .fa_cin(fa_cin),
    .fa_p(fa_p), .fa_sum(fa_sum), .fa_r(fa_r)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    fa_a = 0; fa_b = 0; fa_cin = 0;
    for (int v = 0; v < (1 << W); v++) begin
      logic [N:0]   total, total_no_cin;
      logic [W-1:0] outv;
      {z_in, b_in, a_in, c0_in} = W'(v);
      #1;
      total        = (N+1)'(a_in) + (N+1)'(b_in) + (N+1)'(c0_in);
      total_no_cin = (N+1)'(a_in) + (N+1)'(b_in);
      check(s_out === total[N-1:0], $sformatf("sum a=%h b=%h c0=%b", a_in, b_in, c0_in));
      check(z_out === (z_in ^ total[N]), $sformatf("z_out a=%h b=%h c0=%b z=%b", a_in, b_in, c0_in, z_in));
      check(a_out === a_in && c0_out === c0_in, "a and c0 restored");
      if (a_out === a_in && c0_out === c0_in) n_restore++;
      if (c0_in && (a_in ^ b_in) == '1) n_ripple++;
      if (total[N]) n_carry_out++;
      if (z_in && total[N] && !z_out) n_z_flip++;
      if (total[N-1:0] != total_no_cin[N-1:0] && s_out === total[N-1:0]) n_cin_used++;
      outv = {z_out, s_out, a_out, c0_out};
      check(!seen[outv], "output vector repeated");
      seen[outv] = 1'b1;
    end
    check(&seen, "adder outputs form a permutation");

    for (int v = 0; v < 8; v++) begin
      logic [1:0] t;
      {fa_a, fa_b, fa_cin} = 3'(v);
      #1;
      t = 2'(fa_a) + 2'(fa_b) + 2'(fa_cin);
      check(fa_p === fa_a && fa_sum === t[0] && fa_r === fa_cin,
            $sformatf("full adder abc=%b", 3'(v)));
    end

    $display("mechanisms: ripple=%0d carry_out=%0d z_flip=%0d cin_used=%0d restore=%0d",
             n_ripple, n_carry_out, n_z_flip, n_cin_used, n_restore);
    check(n_ripple > 0, "full-length carry ripple never happened");
    check(n_carry_out > 0, "carry out never happened");
    check(n_z_flip > 0, "z line never flipped");
    check(n_cin_used > 0, "carry in never changed the sum");
    check(n_restore > 0, "inputs never restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
