// tb_rev_ripple_adder: exhaustive check of the 4-bit reversible ripple-carry
// adder over all 2^(2N+2) = 1024 input vectors (c0, a, b, z).
//
// Expected outputs come from integer addition: s = low N bits of a + b + c0,
// z_out = z ^ carry out, and c0 and a unchanged. The lines between the two
// steps are checked too, against the values printed for the worked example:
// after step 1 line A_i holds the carry c_{i+1}, line B_i holds a_i ^ b_i and
// line A_{i-1} holds a_i.~b_i + ~(a_i ^ b_i).c_i; in step 2 each ORG-II hands
// the restored carry c_i up to the next gate. Every output vector must be
// hit exactly once (reversibility). The instance's cost and delay figures
// are compared with the published closed forms.
module tb_rev_ripple_adder;
  localparam int N = 4;
  localparam int W = 2 * N + 2;

  logic         c0_in, z_in, c0_out, z_out;
  logic [N-1:0] a_in, b_in, a_out, s_out;
  logic [(1<<W)-1:0] seen;
  int checks = 0, failures = 0;

  rev_ripple_adder #(.N(N)) dut (
    .c0_in(c0_in), .a_in(a_in), .b_in(b_in), .z_in(z_in),
    .c0_out(c0_out), .a_out(a_out), .s_out(s_out), .z_out(z_out)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: c0=%b a=%h b=%h z=%b", what, c0_in, a_in, b_in, z_in);
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
    for (int v = 0; v < (1 << W); v++) begin
      logic [N:0]   carry;   // carry[i] = c_i
      logic [N:0]   total;
      logic [W-1:0] outv;
      {z_in, b_in, a_in, c0_in} = W'(v);
      #1;
      total = (N+1)'(a_in) + (N+1)'(b_in) + (N+1)'(c0_in);
      carry[0] = c0_in;
      for (int i = 0; i < N; i++)
        carry[i+1] = (a_in[i] & b_in[i]) | (a_in[i] & carry[i]) | (b_in[i] & carry[i]);
      check(s_out === total[N-1:0], "sum");
      check(z_out === (z_in ^ total[N]), "z xor carry out");
      check(a_out === a_in, "a restored");
      check(c0_out === c0_in, "c0 restored");
      for (int i = 0; i < N; i++) begin
        logic x;
        x = a_in[i] ^ b_in[i];
        check(dut.s1_carry[i] === carry[i+1], "step 1 carry line");
        check(dut.s1_x[i] === x, "step 1 a^b line");
        check(dut.s1_r[i] === ((a_in[i] & ~b_in[i]) | (~x & carry[i])), "step 1 R line");
        check(dut.s2_r[i] === carry[i], "step 2 restored carry");
      end
      outv = {z_out, s_out, a_out, c0_out};
      check(!seen[outv], "output vector repeated");
      seen[outv] = 1'b1;
    end
    check(&seen, "every output vector reached");
    check(dut.MZI_COUNT == 6 * N + 2, "MZI count");
    check(dut.PUBLISHED_COST == 6 * N + 1, "published cost");
    check(dut.PUBLISHED_DELAY == 3 * N + 1, "published delay");
    check(dut.GATE_DEPTH == 3 * N + 1, "gate depth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
