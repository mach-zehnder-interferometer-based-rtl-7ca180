// adder_size_check: drives one rev_ripple_adder of width N with directed and
// random vectors and compares it with integer addition. Used by
// tb_adder_workloads to run every adder width of the published cost and
// delay tables. After `done` rises, `checks` and `failures` hold its counts.
// The directed vectors are: all zeros, all ones with carry in (a full-length
// carry ripple and a carry out), and a ^ b all ones with carry in (the carry
// ripples through every bit without being generated).
module adder_size_check #(
  parameter int unsigned N       = 8,
  parameter int unsigned VECTORS = 200
) (
  output int   checks,
  output int   failures,
  output logic done
);

  logic         c0_in, z_in, c0_out, z_out;
  logic [N-1:0] a_in, b_in, a_out, s_out;

  rev_ripple_adder #(.N(N)) dut (
    .c0_in(c0_in), .a_in(a_in), .b_in(b_in), .z_in(z_in),
    .c0_out(c0_out), .a_out(a_out), .s_out(s_out), .z_out(z_out)
  );

  task automatic apply_and_check();
    logic [N:0] total;
    #1;
    total = (N+1)'(a_in) + (N+1)'(b_in) + (N+1)'(c0_in);
    checks++;
    if (s_out !== total[N-1:0] || z_out !== (z_in ^ total[N]) ||
        a_out !== a_in || c0_out !== c0_in) begin
      failures++;
      if (failures < 5) $display("FAIL N=%0d c0=%b z=%b", N, c0_in, z_in);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    c0_in = 0; z_in = 0; a_in = '0; b_in = '0;
    apply_and_check();
    c0_in = 1; z_in = 0; a_in = '1; b_in = '1;
    apply_and_check();
    c0_in = 1; z_in = 1;
    for (int i = 0; i < int'(N); i++) a_in[i] = 1'($urandom);
    b_in = ~a_in;
    apply_and_check();
    for (int v = 0; v < int'(VECTORS); v++) begin
      for (int i = 0; i < int'(N); i += 32) begin
        logic [31:0] ra, rb;
        ra = $urandom; rb = $urandom;
        for (int j = 0; j < 32 && i + j < int'(N); j++) begin
          a_in[i + j] = ra[j];
          b_in[i + j] = rb[j];
        end
      end
      c0_in = 1'($urandom);
      z_in  = 1'($urandom);
      apply_and_check();
    end
    // Figures of merit of this width.
    checks++;
    if (dut.MZI_COUNT != 6 * N + 2 || dut.PUBLISHED_COST != 6 * N + 1 ||
        dut.PUBLISHED_DELAY != 3 * N + 1 || dut.GATE_DEPTH != 3 * N + 1) begin
      failures++;
      $display("FAIL N=%0d cost/delay figures", N);
    end
    done = 1'b1;
  end

endmodule
