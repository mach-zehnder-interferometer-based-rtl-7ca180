// tb_adder_workloads: runs the reversible ripple-carry adder at every width
// of the published cost and delay comparison (8 to 1024 bits). Each width
// gets directed and random additions (adder_size_check). The published
// optical cost and delay of the proposed adder at each width are written out
// below as numbers and compared with the closed forms in optical_pkg; the
// MZI count actually instantiated is one more than the published cost,
// because the carry-out Feynman gate is built from two switches.
module tb_adder_workloads;
  localparam int NS = 8;
  localparam int unsigned WIDTHS [NS] = '{8, 16, 32, 64, 128, 256, 512, 1024};
  localparam int unsigned COST   [NS] = '{49, 97, 193, 385, 769, 1537, 3073, 6145};
  localparam int unsigned DELAY  [NS] = '{25, 49, 97, 193, 385, 769, 1537, 3073};

  int   sub_checks   [NS];
  int   sub_failures [NS];
  logic sub_done     [NS];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NS; k++) begin : g_size
    adder_size_check #(.N(WIDTHS[k]), .VECTORS(100)) u_chk (
      .checks(sub_checks[k]), .failures(sub_failures[k]), .done(sub_done[k])
    );
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (optical_pkg::published_adder_cost(WIDTHS[k]) != COST[k]) begin
        failures++;
        $display("FAIL cost n=%0d: %0d vs %0d", WIDTHS[k],
                 optical_pkg::published_adder_cost(WIDTHS[k]), COST[k]);
      end
      checks++;
      if (optical_pkg::published_adder_delay(WIDTHS[k]) != DELAY[k] ||
          optical_pkg::adder_gate_depth(WIDTHS[k]) != DELAY[k]) begin
        failures++;
        $display("FAIL delay n=%0d", WIDTHS[k]);
      end
      checks++;
      if (optical_pkg::built_adder_mzi_count(WIDTHS[k]) != COST[k] + 1) begin
        failures++;
        $display("FAIL MZI count n=%0d", WIDTHS[k]);
      end
    end
    #1000;
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (!sub_done[k]) begin
        failures++;
        $display("FAIL width %0d did not finish", WIDTHS[k]);
      end
      checks   += sub_checks[k];
      failures += sub_failures[k];
      $display("width %0d: %0d checks, %0d failures", WIDTHS[k], sub_checks[k], sub_failures[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
