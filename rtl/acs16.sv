// acs16: sixteen parallel add-compare-select units.
//
// Lane k computes out[k] = max(m0[k] + g0[k], m1[k] + g1[k]) for the Viterbi
// algorithm (logmap = 0) or the Jacobian logarithm max* (logmap = 1), which
// adds the table correction ln(1 + exp(-|difference|)).  dec[k] is 1 when the
// second candidate wins (the survivor bit of the Viterbi algorithm).
// Comparisons are modulo 2^16, see omp_pkg.  The same lanes serve forward
// recursion, backward recursion and path metric computation; the caller
// routes the predecessor or successor metrics to m0 / m1.  Sixteen lanes is
// the platform's degree of parallelism; the arithmetic is this design's.
// Purely combinational.
module acs16 import omp_pkg::*; (
  input  logic                  logmap,
  input  logic signed [SMW-1:0] m0 [PAR],
  input  logic signed [SMW-1:0] g0 [PAR],
  input  logic signed [SMW-1:0] m1 [PAR],
  input  logic signed [SMW-1:0] g1 [PAR],
  output logic signed [SMW-1:0] out [PAR],
  output logic [PAR-1:0]        dec
);
  always_comb begin
    for (int k = 0; k < PAR; k++) begin
      logic signed [SMW-1:0] a, b, d;
      a = m0[k] + g0[k];
      b = m1[k] + g1[k];
      d = a - b;
      dec[k] = d[SMW-1];
      out[k] = max_star(a, b, logmap);
    end
  end
endmodule
