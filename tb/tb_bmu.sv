// tb_bmu: checks the branch metric unit against an edge-by-edge model.
// For random codes (Kc = 3..9, 1..4 channel values, random feedback and
// generator polynomials), random channel values, a-priori value and state
// group, every trellis edge (p, u) of the model encoder that ends in the
// group is looked up in the unit's output (new state ns, x = top bit of p) and
// gamma and u are compared.
module tb_bmu;
  import omp_pkg::*;
  code_cfg_t cfg;
  logic [3:0] mem_m, grp;
  logic [NCV-1:0][CVW-1:0] y;
  logic signed [SMW-1:0] la;
  logic signed [SMW-1:0] gamma [PAR][2];
  logic ubit [PAR][2];
  bmu dut (.cfg, .mem_m, .grp, .y, .la, .gamma, .ubit);

  int checks = 0, failures = 0;
  function automatic int par(input int v); return $countones(v) & 1; endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      int m, ns_n, yi[4];
      m = $urandom_range(2, 8);
      ns_n = 1 << m;
      cfg = '0;
      cfg.k = 4'(m + 1);
      cfg.ncv = 3'($urandom_range(1, 4));
      cfg.fb = (it % 2) ? 9'($urandom_range(0, (1 << (m + 1)) - 1) & ~1) : 9'd0;
      for (int i = 0; i < 4; i++) cfg.gen[i] = 9'($urandom_range(1, (1 << (m + 1)) - 1));
      mem_m = 4'(m);
      grp = (m > 4) ? 4'($urandom_range(0, (ns_n / 16) - 1)) : 4'd0;
      for (int i = 0; i < 4; i++) begin yi[i] = $signed($urandom_range(0, 255)) - 128; y[i] = 8'(yi[i]); end
      la = 16'($signed($urandom_range(0, 200)) - 100);
      #1;
      for (int p = 0; p < ns_n; p++)
        for (int u = 0; u < 2; u++) begin
          int b, ns, g, k, x;
          b  = u ^ par((int'(cfg.fb) >> 1) & p);
          ns = ((p << 1) | b) & (ns_n - 1);
          g  = u ? int'(la) : 0;
          for (int i = 0; i < int'(cfg.ncv); i++)
            if (par(int'(cfg.gen[i]) & ((p << 1) | b))) g += yi[i];
          if ((ns >> 4) == int'(grp) || m <= 4) begin
            k = ns & 15;
            x = (p >> (m - 1)) & 1;
            checks++;
            if (int'(gamma[k][x]) != g || int'(ubit[k][x]) != u) begin
              failures++;
              if (failures < 10) $display("FAIL m=%0d p=%0d u=%0d: gamma %0d/%0d u %0d", m, p, u,
                                          gamma[k][x], g, ubit[k][x]);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
