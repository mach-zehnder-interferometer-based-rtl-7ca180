// optical_pkg: shared cost and delay figures for the MZI-based reversible
// logic library.
//
// Every gate here is a logical model of an all-optical circuit. Presence of
// light is logic 1 and absence is logic 0. Two figures of merit are used for
// these circuits:
//   * optical cost: the number of Mach-Zehnder interferometer (MZI) switches;
//     beam splitters and beam combiners cost nothing.
//   * delay: counted in units of one MZI switching delay (Delta). Beam
//     splitters and combiners add no delay.
// The per-gate numbers follow the published figures for these gates
// (Feynman 2 / 1, ORG-I 3 / 2, ORG-II 3 / 1). The closed forms for the n-bit
// adder are the published ones: cost 6n+1 and delay 3n+1. The published cost
// counts the Feynman gate that copies the carry out as one MZI. The Feynman
// gate built in this library uses two, so built_adder_mzi_count() is 6n+2.
// adder_gate_depth() derives the delay from the gate network instead of the
// step totals: the longest path in gate delays when every gate fires as soon
// as its inputs are ready. The Feynman gate's pass-through output P = A is
// formed by its switches too, so the carry line waits for it and the result
// is also 3n+1.
package optical_pkg;

  // Cost (MZI switches) and delay (in Delta) of each primitive and gate.
  localparam int unsigned MZI_COST   = 1;
  localparam int unsigned MZI_DELAY  = 1;
  // Feynman: two switches in parallel.
  localparam int unsigned FG_COST    = 2 * MZI_COST;
  localparam int unsigned FG_DELAY   = 1 * MZI_DELAY;
  // ORG-I: two switches in parallel, then one.
  localparam int unsigned ORG1_COST  = 3 * MZI_COST;
  localparam int unsigned ORG1_DELAY = 2 * MZI_DELAY;
  // ORG-II: three switches in parallel.
  localparam int unsigned ORG2_COST  = 3 * MZI_COST;
  localparam int unsigned ORG2_DELAY = 1 * MZI_DELAY;

  // Cost of the carry-out copy as counted in the published cost total.
  localparam int unsigned FG_STEP_COST_PUBLISHED = 1;

  // Published optical cost of the n-bit adder: n ORG-I + carry copy + n ORG-II.
  function automatic int unsigned published_adder_cost(int unsigned n);
    return n * ORG1_COST + FG_STEP_COST_PUBLISHED + n * ORG2_COST;
  endfunction

  // Published delay: step 1 (n ORG-I in series, then the Feynman gate) plus
  // step 2 (n ORG-II in series).
  function automatic int unsigned published_adder_delay(int unsigned n);
    return n * ORG1_DELAY + FG_DELAY + n * ORG2_DELAY;
  endfunction

  // MZI switches actually instantiated by rev_ripple_adder.
  function automatic int unsigned built_adder_mzi_count(int unsigned n);
    return n * ORG1_COST + FG_COST + n * ORG2_COST;
  endfunction

  // As-soon-as-possible depth of the adder in Delta. Line index k = 0 is
  // A_-1, k = i+1 is A_i (0 <= i < n), k = n+1 is A_n; ready[] holds when
  // each A line is valid, bready[] the B lines. Gates are applied in the
  // order of the construction and each output is ready one gate delay after
  // the latest of its inputs. The work arrays hold adders of up to 2048 bits.
  function automatic int unsigned adder_gate_depth(int unsigned n);
    int unsigned ready  [0:2049];
    int unsigned bready [0:2047];
    int unsigned t, worst;
    for (int unsigned k = 0; k < n + 2; k++) ready[k] = 0;
    for (int unsigned k = 0; k < n; k++) bready[k] = 0;
    // Step 1: ORG-I on (A_{i-1}, A_i, B_i), i = 0 .. n-1.
    for (int unsigned i = 0; i < n; i++) begin
      t = ready[i];
      if (ready[i + 1] > t) t = ready[i + 1];
      if (bready[i] > t) t = bready[i];
      t += ORG1_DELAY;
      ready[i] = t; ready[i + 1] = t; bready[i] = t;
    end
    // Feynman gate on (A_{n-1}, A_n).
    t = (ready[n] > ready[n + 1]) ? ready[n] : ready[n + 1];
    t += FG_DELAY;
    ready[n] = t; ready[n + 1] = t;
    // Step 2: ORG-II on (A_{i-1}, A_i, B_i), i = n-1 .. 0.
    for (int i = int'(n) - 1; i >= 0; i--) begin
      t = ready[i];
      if (ready[i + 1] > t) t = ready[i + 1];
      if (bready[i] > t) t = bready[i];
      t += ORG2_DELAY;
      ready[i] = t; ready[i + 1] = t; bready[i] = t;
    end
    worst = 0;
    for (int unsigned k = 0; k < n + 2; k++) if (ready[k] > worst) worst = ready[k];
    for (int unsigned k = 0; k < n; k++) if (bready[k] > worst) worst = bready[k];
    return worst;
  endfunction

endpackage
