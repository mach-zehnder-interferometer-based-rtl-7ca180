// tb_mzi_switch: exhaustive check of the MZI switch model.
// All four (incoming, control) combinations are applied; the expected bar
// and cross outputs come from a table written out by hand: light leaves the
// bar port only when both beams are present, and the cross port only when
// the incoming beam is present without control.
module tb_mzi_switch;
  logic a, b, bar_port, cross_port;
  int checks = 0, failures = 0;

  // Index {a,b}: expected {bar, cross}.
  localparam logic [1:0] EXPECT [4] = '{2'b00, 2'b00, 2'b01, 2'b10};

  mzi_switch dut (.a(a), .b(b), .bar_port(bar_port), .cross_port(cross_port));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({bar_port, cross_port} !== EXPECT[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: bar=%b cross=%b expected %b", a, b,
                 bar_port, cross_port, EXPECT[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
