// carry_lookahead: lookahead carry generator for the bit-slice CPU.
//
// From the carry-in and the active-low generate/propagate of GROUPS slices it
// forms the carry into every slice above the first, each as a two-level
// sum of products (no ripple through the slices):
//   c[i] = G[i-1] | P[i-1]&G[i-2] | ... | P[i-1]&...&P[0]&cn
// It also gives the active-low group generate and propagate of all slices.
// c[0] is the carry-in passed through, so that slice i always takes c[i].
// Purely combinational. The design names a single lookahead chip for its six
// slices; the generic GROUPS parameter is this implementation's.
module carry_lookahead #(
  parameter int unsigned GROUPS = 6
) (
  input  logic              cn,
  input  logic [GROUPS-1:0] g_n,
  input  logic [GROUPS-1:0] p_n,
  output logic [GROUPS-1:0] c,      // c[0] = cn, c[i] = carry into slice i
  output logic              g_out_n,
  output logic              p_out_n
);

  logic [GROUPS-1:0] g, p;
  assign g = ~g_n;
  assign p = ~p_n;

  always_comb begin
    logic term;
    logic gg;
    c[0] = cn;
    for (int i = 1; i < int'(GROUPS); i++) begin
      c[i] = 1'b0;
      // product terms: G[j] propagated through P[j+1..i-1], and cn through all
      for (int j = -1; j < i; j++) begin
        term = (j < 0) ? cn : g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
    gg = 1'b0;
    for (int j = 0; j < int'(GROUPS); j++) begin
      term = g[j];
      for (int k = j + 1; k < int'(GROUPS); k++) term = term & p[k];
      gg = gg | term;
    end
    g_out_n = ~gg;
    p_out_n = ~(&p);
  end

endmodule
