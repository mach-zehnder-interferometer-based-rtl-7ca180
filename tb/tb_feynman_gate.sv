// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate.
// Expected outputs: P = A, Q = B inverted when A is lit. The four output
// pairs must also all differ (the gate is reversible).
module tb_feynman_gate;
  logic a, b, p, q;
  logic [3:0] seen;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      logic exp_q;
      {a, b} = 2'(v);
      #1;
      exp_q = a ? !b : b;
      checks++;
      if (p !== a || q !== exp_q) begin
        failures++;
        $display("FAIL a=%b b=%b: p=%b q=%b expected %b %b", a, b, p, q, a, exp_q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
