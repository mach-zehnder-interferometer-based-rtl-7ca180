// beam_combiner: merges two optical beams onto one waveguide.
//
// Light leaves the combiner when light enters at either input, so the
// logical model is an OR. In every gate of this library the two beams that
// meet at a combiner come from mutually exclusive terms (for example A.~B and
// ~A.B), so at most one is lit and the combiner behaves as an XOR as well.
// That rule is this library's own design choice; with CHECK_EXCLUSIVE set, an
// assertion reports any input pattern that breaks it. Combinational, no
// delay, no optical cost.
module beam_combiner #(
  parameter bit CHECK_EXCLUSIVE = 1'b1
) (
  input  logic in0,
  input  logic in1,
  output logic out
);

  always_comb out = in0 | in1;

  always_comb begin
    if (CHECK_EXCLUSIVE) begin
      assert final (!(in0 && in1))
        else $error("beam_combiner: both input beams lit");
    end
  end

endmodule
