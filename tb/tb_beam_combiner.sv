// tb_beam_combiner: checks that a combiner emits light when either input
// does. An instance without the exclusivity check takes all four input
// patterns; the default instance takes the three patterns the gates use
// (never both inputs lit), so its assertion must stay quiet.
module tb_beam_combiner;
  logic in0, in1, out_any, out_excl;
  int checks = 0, failures = 0;

  beam_combiner #(.CHECK_EXCLUSIVE(1'b0)) dut_any (.in0(in0), .in1(in1), .out(out_any));
  beam_combiner dut_excl (.in0(in0 & ~in1), .in1(in1), .out(out_excl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {in0, in1} = 2'(v);
      #1;
      checks++;
      if (out_any !== (v != 0)) begin
        failures++;
        $display("FAIL in=%b%b out=%b", in0, in1, out_any);
      end
      checks++;
      if (out_excl !== (v != 0)) begin
        failures++;
        $display("FAIL exclusive instance in=%b%b out=%b", in0, in1, out_excl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
