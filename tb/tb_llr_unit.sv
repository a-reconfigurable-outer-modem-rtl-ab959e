// tb_llr_unit: random state metrics and branch metrics for 4, 8 and 16
// states; the LLR and extrinsic outputs are compared with a reference that
// reduces all edges with max* in plain sequential order (results may differ
// by the rounding of the correction table, tolerance +-3), and the
// two-cycle latency with back-to-back inputs is checked.
module tb_llr_unit;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [3:0] mem_m;
  logic signed [SMW-1:0] alpha [PAR], beta [PAR], gamma [PAR][2], la, ysys, llr, ext;
  logic ubit [PAR][2];
  llr_unit dut (.clk, .rst_n, .in_valid, .mem_m, .alpha, .beta, .gamma, .ubit, .la, .ysys,
                .out_valid, .llr, .ext);
  int checks = 0, failures = 0;

  function automatic int ms(input int a, input int b);
    int d; d = a > b ? a - b : b - a;
    return (a > b ? a : b) + ((d == 0) ? 3 : (d < 4) ? 2 : (d < 9) ? 1 : 0);
  endfunction

  int exp_llr [$], exp_ext [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: the result of the input of cycle c appears in cycle c+2
  int pend [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      int el, ee, c0;
      c0 = pend.pop_front(); el = exp_llr.pop_front(); ee = exp_ext.pop_front();
      checks++;
      if (cyc - c0 != 2 || (int'(llr) - el) > 3 || (el - int'(llr)) > 3 ||
          (int'(ext) - ee) > 3 || (ee - int'(ext)) > 3) begin
        failures++;
        $display("FAIL llr %0d/%0d ext %0d/%0d latency %0d", llr, el, ext, ee, cyc - c0);
      end
    end
  end

  initial begin
    in_valid = 0; mem_m = 3; la = 0; ysys = 0;
    for (int k = 0; k < PAR; k++) begin
      alpha[k] = 0; beta[k] = 0; gamma[k][0] = 0; gamma[k][1] = 0; ubit[k][0] = 0; ubit[k][1] = 0;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int m, N, lm[2]; bit ls[2];
      @(negedge clk);
      m = 2 + (n % 3); N = 1 << m;
      mem_m = 4'(m);
      in_valid = ($urandom_range(0, 3) != 0);
      la = 16'($signed($urandom_range(0, 40)) - 20);
      ysys = 16'($signed($urandom_range(0, 40)) - 20);
      for (int k = 0; k < PAR; k++) begin
        alpha[k] = 16'($signed($urandom_range(0, 60)) - 30);
        beta[k]  = 16'($signed($urandom_range(0, 60)) - 30);
        for (int x = 0; x < 2; x++) begin
          gamma[k][x] = 16'($signed($urandom_range(0, 40)) - 20);
          ubit[k][x]  = 1'($urandom_range(0, 1));
        end
        // each new state has one u=0 and one u=1 edge
        ubit[k][1] = ~ubit[k][0];
      end
      if (in_valid) begin
        ls[0] = 0; ls[1] = 0;
        for (int k = 0; k < N; k++)
          for (int x = 0; x < 2; x++) begin
            int v, u;
            u = int'(ubit[k][x]);
            v = int'(alpha[(k >> 1) + x * (N / 2)]) + int'(gamma[k][x]) + int'(beta[k]);
            if (!ls[u]) begin lm[u] = v; ls[u] = 1; end else lm[u] = ms(lm[u], v);
          end
        exp_llr.push_back(lm[1] - lm[0]);
        exp_ext.push_back(lm[1] - lm[0] - int'(la) - int'(ysys));
        pend.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (pend.size() != 0) begin failures++; $display("FAIL %0d results missing", pend.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
