// llr_unit: pipelined soft-output (LLR) computation of the Log-MAP algorithm.
//
// For one trellis step with N = 2^m <= 16 states it evaluates
//   L(u) = max*_{edges with u=1} (alpha(p) + gamma + beta(ns))
//        - max*_{edges with u=0} (alpha(p) + gamma + beta(ns))
// over all 2N edges (p = predecessor, ns = new state, see bmu), and the
// extrinsic value Le = L - la - y_sys (y_sys only when the code has a
// systematic output).  Each max* reduction is a five-level tree of valid /
// value pairs; the tree is cut by a register after the second level, and the
// result is registered, so the latency is 2 cycles and one step is accepted
// every cycle.  The platform pipelines the soft output to shorten the
// critical path; where the cut is placed is this design's choice.
module llr_unit import omp_pkg::*; (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [3:0]            mem_m,
  input  logic signed [SMW-1:0] alpha [PAR],
  input  logic signed [SMW-1:0] beta  [PAR],
  input  logic signed [SMW-1:0] gamma [PAR][2],
  input  logic                  ubit  [PAR][2],
  input  logic signed [SMW-1:0] la,
  input  logic signed [SMW-1:0] ysys,
  output logic                  out_valid,
  output logic signed [SMW-1:0] llr,
  output logic signed [SMW-1:0] ext
);
  typedef struct packed { logic v; logic signed [SMW-1:0] m; } vm_t;

  function automatic vm_t comb2(input vm_t a, input vm_t b);
    vm_t r;
    r.v = a.v | b.v;
    if (a.v && b.v) r.m = max_star(a.m, b.m, 1'b1);
    else if (a.v)   r.m = a.m;
    else            r.m = b.m;
    return r;
  endfunction

  vm_t lvl0 [2][32];
  vm_t lvl2 [2][8];
  vm_t st1_q [2][8];
  logic st1_v;
  logic signed [SMW-1:0] corr_q;   // la + ysys carried along the pipeline

  always_comb begin
    int n_st;
    n_st = 1 << mem_m;
    for (int uu = 0; uu < 2; uu++) begin
      vm_t l1 [16];
      for (int k = 0; k < PAR; k++)
        for (int x = 0; x < 2; x++) begin
          int p;
          p = (k >> 1) + x * (n_st >> 1);
          lvl0[uu][2*k+x].v = (k < n_st) && (ubit[k][x] == 1'(uu));
          lvl0[uu][2*k+x].m = alpha[p[3:0]] + gamma[k][x] + beta[k];
        end
      for (int i = 0; i < 16; i++) l1[i] = comb2(lvl0[uu][2*i], lvl0[uu][2*i+1]);
      for (int i = 0; i < 8; i++)  lvl2[uu][i] = comb2(l1[2*i], l1[2*i+1]);
    end
  end

  // second stage: last three tree levels
  vm_t root [2];
  always_comb begin
    for (int uu = 0; uu < 2; uu++) begin
      vm_t a [4];
      vm_t b [2];
      for (int i = 0; i < 4; i++) a[i] = comb2(st1_q[uu][2*i], st1_q[uu][2*i+1]);
      for (int i = 0; i < 2; i++) b[i] = comb2(a[2*i], a[2*i+1]);
      root[uu] = comb2(b[0], b[1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st1_v <= 1'b0; out_valid <= 1'b0; llr <= '0; ext <= '0; corr_q <= '0;
      for (int uu = 0; uu < 2; uu++) for (int i = 0; i < 8; i++) st1_q[uu][i] <= '0;
    end else begin
      st1_v  <= in_valid;
      corr_q <= la + ysys;
      st1_q  <= lvl2;
      out_valid <= st1_v;
      if (st1_v) begin
        llr <= root[1].m - root[0].m;
        ext <= root[1].m - root[0].m - corr_q;
      end
    end
  end
endmodule
