// bmu: branch metric unit for one group of 16 trellis states.
//
// The encoder is described by a state s of m = Kc-1 register bits (bit 0 =
// most recent), a feedback polynomial fb and up to four generator
// polynomials.  The bit shifted into the register is b = u ^ parity(fb & s);
// output i is c_i = parity(gen_i & {s, b}).  A feed-forward code has fb = 0.
// For the new state ns the two predecessors are p_x = (ns >> 1) | (x << (m-1)),
// x = 0, 1, and the branch bit is b = ns[0].
//
// For each of the 16 new states ns = 16*grp + k this unit gives, for both
// predecessors, the branch metric gamma = sum of the channel values y_i with
// c_i = 1 (i < ncv) plus the a-priori value la when the information bit u is
// 1, and the bit u itself.  Summing only the "1" terms differs from the
// symmetric +-y/2 form by a constant per trellis step, which cancels in both
// Viterbi and Log-MAP.  Arbitrary generator and single feedback polynomials
// with Kc = 3..9 and 1..4 channel values per bit follow the platform's
// requirements; the metric form is this design's choice.
// Purely combinational.
module bmu import omp_pkg::*; (
  input  code_cfg_t                     cfg,
  input  logic [3:0]                    mem_m,
  input  logic [3:0]                    grp,
  input  logic [NCV-1:0][CVW-1:0]       y,
  input  logic signed [SMW-1:0]         la,
  output logic signed [SMW-1:0]         gamma [PAR][2],
  output logic                          ubit  [PAR][2]
);
  always_comb begin
    for (int k = 0; k < PAR; k++) begin
      for (int x = 0; x < 2; x++) begin
        logic [MMAX-1:0] ns, p, msk;
        logic [MMAX:0]   reg_in;
        logic            b, u;
        logic signed [SMW-1:0] g;
        msk = MMAX'((9'd1 << mem_m) - 9'd1);
        ns  = MMAX'({grp, 4'(k)}) & msk;
        p   = ((ns >> 1) | MMAX'(x << (mem_m - 4'd1))) & msk;
        b   = ns[0];
        u   = b ^ (^(cfg.fb[MMAX:1] & p));
        reg_in = {p, b};
        g = u ? la : '0;
        for (int i = 0; i < NCV; i++)
          if (i < int'(cfg.ncv) && (^(cfg.gen[i] & reg_in)))
            g = g + sext_cv(y[i]);
        gamma[k][x] = g;
        ubit[k][x]  = u;
      end
    end
  end
endmodule
