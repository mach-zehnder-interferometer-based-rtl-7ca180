// tb_org2_gate: exhaustive check of ORG-II against its published truth table.
// The table rows (P, Q, R for A, B, C = 000 .. 111) are written out as
// constants. The eight output triples must also all differ (reversibility).
module tb_org2_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  // Index {A,B,C}: {P,Q,R}
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b011, 3'b010, 3'b110, 3'b100, 3'b111, 3'b001, 3'b101
  };

  org2_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TABLE[v]) begin
        failures++;
        $display("FAIL abc=%b: pqr=%b expected %b", {a, b, c}, {p, q, r}, TABLE[v]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
