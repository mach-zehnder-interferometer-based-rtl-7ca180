// tb_rev_full_adder: exhaustive check of the one-bit reversible full adder.
// Expected values come from integer addition: sum is bit 0 of A + B + Cin,
// and A and Cin must come back unchanged on P and R. The internal carry
// between the two gates is checked against bit 1 of the same sum.
module tb_rev_full_adder;
  logic a, b, cin, p, sum, r;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .p(p), .sum(sum), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (p !== a || sum !== total[0] || r !== cin) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: p=%b sum=%b r=%b", a, b, cin, p, sum, r);
      end
      checks++;
      if (dut.carry !== total[1]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: internal carry=%b", a, b, cin, dut.carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
