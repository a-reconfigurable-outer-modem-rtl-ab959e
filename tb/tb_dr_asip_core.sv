// tb_dr_asip_core: self-checking test of the decoder core.
//
// The testbench models the CV and IO memories (one-cycle reads), encodes
// random information bits with its own convolutional encoder and checks:
//  * Viterbi decoding of feed-forward codes with Kc = 3 (4 states, one step
//    per cycle), Kc = 7 (64 states, load-store mode) and Kc = 9 (256 states,
//    16 groups of 4 cycles per step), and of the recursive UMTS component code,
//    with a few channel values of the wrong sign; decoded bits must equal the
//    information bits, and the cycle count must match the schedule
//    (one cycle per step, or 4 cycles per 16 states, plus 2 cycles per step of
//    trace back, plus a few cycles of start and finish), exactly;
//  * Log-MAP decoding of the UMTS component code against a reference
//    forward / backward recursion computed here (max* with the same
//    correction table), extrinsic values within +-3 (the order of the final
//    max* reduction differs), global index and latency of 2L + a few cycles;
//  * a Log-MAP window inside a block: alpha open, 16 acquisition steps after
//    the window, checked against the same reference and 2L + A cycles, once
//    with the forward and once with the backward recursion first.
module tb_dr_asip_core;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  code_cfg_t cfg;
  logic [3:0] mem_m;
  logic [4:0] n_groups;
  logic cmd_valid; cmd_t cmd; logic cmd_ready, done;
  logic cv_en; logic [ADDR_W-1:0] cv_addr; logic [31:0] cv_rdata;
  logic io_en, io_we, io_bank; logic [ADDR_W-1:0] io_addr; logic [IOW-1:0] io_wdata, io_r0, io_r1;
  logic ext_valid, ext_bank, ext_sel; logic [ADDR_W-1:0] ext_idx; logic signed [SMW-1:0] ext_val;

  dr_asip_core dut (.clk, .rst_n, .cfg, .mem_m, .n_groups, .cmd_valid, .cmd, .cmd_ready, .done,
    .cv_en, .cv_addr, .cv_rdata, .io_en, .io_we, .io_bank, .io_addr, .io_wdata,
    .io_rdata0(io_r0), .io_rdata1(io_r1), .ext_idle(1'b1), .ext_valid, .ext_idx, .ext_val,
    .ext_bank, .ext_sel);

  logic [31:0] cvm [1024];
  logic [15:0] iom [2][1024];
  always_ff @(posedge clk) begin
    if (cv_en) cv_rdata <= cvm[cv_addr];
    if (io_en) begin
      if (io_we) iom[io_bank][io_addr] <= io_wdata;
      else if (io_bank) io_r1 <= iom[1][io_addr];
      else io_r0 <= iom[0][io_addr];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference encoder
  int K, M, NS;
  function automatic int par(input int v);
    return $countones(v) & 1;
  endfunction
  function automatic int tb_step(input int s, input int u, output int c [4]);
    int b;
    b = u ^ par(int'(cfg.fb) >> 1 & s);
    for (int i = 0; i < 4; i++) c[i] = par(int'(cfg.gen[i]) & ((s << 1) | b));
    return ((s << 1) | b) & (NS - 1);
  endfunction

  task automatic set_code(input int k, input int ncv, input int fb, input int g0, input int g1,
                          input int g2, input int g3, input bit sys);
    cfg = '0;
    cfg.k = 4'(k); cfg.ncv = 3'(ncv); cfg.fb = 9'(fb);
    cfg.gen[0] = 9'(g0); cfg.gen[1] = 9'(g1); cfg.gen[2] = 9'(g2); cfg.gen[3] = 9'(g3);
    cfg.sys_en = sys; cfg.sys_idx = 0;
    K = k; M = k - 1; NS = 1 << M;
    mem_m = 4'(M);
    n_groups = (M <= 4) ? 5'd1 : 5'(1 << (M - 4));
  endtask

  int info [1024];
  int yv [1024][4];

  // encode L steps: random bits, last M steps terminate to state 0
  task automatic make_block(input int L, input int nerr);
    int s, c[4];
    s = 0;
    for (int t = 0; t < L; t++) begin
      int u;
      if (t < L - M) u = $urandom_range(0, 1);
      else u = par(int'(cfg.fb) >> 1 & s);   // drives b = 0
      info[t] = u;
      s = tb_step(s, u, c);
      for (int i = 0; i < 4; i++) yv[t][i] = c[i] ? $urandom_range(12, 24) : -$urandom_range(12, 24);
    end
    check(s == 0, "encoder terminated");
    for (int e = 0; e < nerr; e++) begin
      int t;
      t = $urandom_range(0, L - 1);
      yv[t][e % int'(cfg.ncv)] = -yv[t][e % int'(cfg.ncv)] / 4;
    end
    for (int t = 0; t < L; t++)
      cvm[t] = {8'(yv[t][3]), 8'(yv[t][2]), 8'(yv[t][1]), 8'(yv[t][0])};
  endtask

  task automatic run(input op_e op, input int L, input int base, input bit bank, output int cycles,
                     input int acq = 0, input bit open = 0);
    cmd = '0; cmd.op = op; cmd.len = ADDR_W'(L); cmd.base = ADDR_W'(base); cmd.bank = bank;
    cmd.acq = 6'(acq); cmd.a_open = open;
    @(negedge clk); cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic va_test(input int L, input int nerr, input int exp_cycles, input string name);
    int cyc, bad;
    make_block(L, nerr);
    run(OP_VA, L, 0, 0, cyc);
    bad = 0;
    for (int t = 0; t < L; t++) if (int'(iom[1][t / 16][t % 16]) != info[t]) bad++;
    check(bad == 0, $sformatf("%s: %0d wrong bits", name, bad));
    check(cyc == exp_cycles,
          $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cycles));
  endtask

  // ---- Log-MAP reference ----
  function automatic int ms(input int a, input int b);
    int d, m, c;
    d = a > b ? a - b : b - a;
    m = a > b ? a : b;
    c = (d == 0) ? 3 : (d < 4) ? 2 : (d < 9) ? 1 : 0;
    return m + c;
  endfunction

  int la_v [1024];
  int al [129][16], be [129][16];
  int ref_ext [64];

  // window of L steps, A acquisition steps after it, alpha open or from state 0
  task automatic map_ref(input int L, input int A, input bit open);
    for (int s = 0; s < NS; s++) begin al[0][s] = (s == 0 || open) ? 0 : -1024; be[L+A][s] = 0; end
    for (int t = 0; t < L; t++) begin
      bit seen [16];
      for (int s = 0; s < NS; s++) seen[s] = 0;
      for (int p = 0; p < NS; p++)
        for (int u = 0; u < 2; u++) begin
          int c[4], ns, g;
          ns = tb_step(p, u, c);
          g = u ? la_v[t] : 0;
          for (int i = 0; i < int'(cfg.ncv); i++) if (c[i]) g += yv[t][i];
          if (!seen[ns]) begin al[t+1][ns] = al[t][p] + g; seen[ns] = 1; end
          else al[t+1][ns] = ms(al[t+1][ns], al[t][p] + g);
        end
    end
    for (int t = L + A - 1; t >= 0; t--) begin
      int lm [2]; bit ls [2];
      ls[0] = 0; ls[1] = 0;
      for (int p = 0; p < NS; p++) begin
        bit sp; sp = 0;
        for (int u = 0; u < 2; u++) begin
          int c[4], ns, g, v;
          ns = tb_step(p, u, c);
          g = u ? la_v[t] : 0;
          for (int i = 0; i < int'(cfg.ncv); i++) if (c[i]) g += yv[t][i];
          v = be[t+1][ns] + g;
          if (!sp) begin be[t][p] = v; sp = 1; end else be[t][p] = ms(be[t][p], v);
          v = al[t][p] + g + be[t+1][ns];
          if (!ls[u]) begin lm[u] = v; ls[u] = 1; end else lm[u] = ms(lm[u], v);
        end
      end
      if (t < L) ref_ext[t] = lm[1] - lm[0] - la_v[t] - yv[t][0];
    end
  endtask

  int got_ext [64]; int got_n; int bad_idx;
  always @(posedge clk) if (ext_valid) begin
    if (int'(ext_idx) - 100 >= 0 && int'(ext_idx) - 100 < 64) got_ext[int'(ext_idx) - 100] = int'(ext_val);
    else bad_idx++;
    got_n++;
  end

  initial begin
    int cyc, L, worst;
    cmd_valid = 0; cmd = '0; got_n = 0; bad_idx = 0;
    set_code(3, 2, 0, 'b111, 'b101, 0, 0, 0);
    repeat (3) @(negedge clk); rst_n = 1;

    // Kc = 3, (7,5): one step per cycle, trace back 2 cycles per step
    L = 60; va_test(L, 3, L + 2 + 2 * L + 2, "VA Kc=3");
    // Kc = 5 rate 1/4 (16 states, all lanes)
    set_code(5, 4, 0, 'b10101, 'b11011, 'b11111, 'b10111, 0);
    L = 50; va_test(L, 4, L + 2 + 2 * L + 2, "VA Kc=5 r=1/4");
    // recursive UMTS component code
    set_code(4, 2, 'b1100, 'b1101, 'b1011, 0, 0, 1);
    L = 40; va_test(L, 2, L + 2 + 2 * L + 2, "VA RSC Kc=4");
    // Kc = 7 (171,133): load-store mode, 4 groups x 4 cycles per step
    set_code(7, 2, 0, 'b1001111, 'b1101101, 0, 0, 0);
    L = 40; va_test(L, 3, 4 + L * 4 * 4 + 2 * L + 2, "VA Kc=7");
    // Kc = 9 rate 1/3 (557,663,711 octal): 16 groups x 4 cycles per step
    set_code(9, 3, 0, 'o557, 'o663, 'o711, 0, 0);
    L = 24; va_test(L, 3, 16 + L * 16 * 4 + 2 * L + 2, "VA Kc=9");

    // Log-MAP, UMTS component code, one window of 48 steps
    set_code(4, 2, 'b1100, 'b1101, 'b1011, 0, 0, 1);
    L = 48;
    make_block(L, 0);
    for (int t = 0; t < L; t++) begin
      for (int i = 0; i < 2; i++) yv[t][i] += $signed($urandom_range(0, 16)) - 8;
      cvm[t] = {16'd0, 8'(yv[t][1]), 8'(yv[t][0])};
      la_v[t] = $signed($urandom_range(0, 20)) - 10;
      iom[1][t] = 16'(la_v[t]);
    end
    map_ref(L, 0, 0);
    got_n = 0;
    run(OP_MAP, L, 100, 1, cyc);
    check(got_n == L, $sformatf("MAP: %0d extrinsic values, expected %0d", got_n, L));
    check(bad_idx == 0, "MAP: extrinsic index range");
    worst = 0;
    for (int t = 0; t < L; t++) begin
      int d; d = got_ext[t] - ref_ext[t]; if (d < 0) d = -d;
      if (d > worst) worst = d;
      check(d <= 3, $sformatf("MAP t=%0d ext %0d ref %0d", t, got_ext[t], ref_ext[t]));
    end
    $display("MAP worst extrinsic deviation %0d", worst);
    check(cyc <= 2 * L + 8 && cyc >= 2 * L, $sformatf("MAP: %0d cycles for %0d steps", cyc, L));

    // windowing: a window of 32 steps that starts inside the block (alpha
    // open) with 16 acquisition steps after it; beta at the window end is
    // no longer all-equal, so the result differs from a plain window
    begin
      int A, n_diff;
      L = 32; A = 16;
      map_ref(L, A, 1);
      got_n = 0;
      run(OP_MAP, L, 100, 1, cyc, A, 1);
      check(got_n == L, $sformatf("MAP acq: %0d extrinsic values, expected %0d", got_n, L));
      worst = 0;
      for (int t = 0; t < L; t++) begin
        int d; d = got_ext[t] - ref_ext[t]; if (d < 0) d = -d;
        if (d > worst) worst = d;
        check(d <= 3, $sformatf("MAP acq t=%0d ext %0d ref %0d", t, got_ext[t], ref_ext[t]));
      end
      $display("MAP with acquisition: worst extrinsic deviation %0d, %0d cycles", worst, cyc);
      check(cyc <= 2 * L + A + 8 && cyc >= 2 * L + A,
            $sformatf("MAP acq: %0d cycles for %0d + %0d steps", cyc, L, A));
      // the same window without acquisition must give different values
      map_ref(L, 0, 1);
      n_diff = 0;
      for (int t = 0; t < L; t++) if (got_ext[t] - ref_ext[t] > 3 || ref_ext[t] - got_ext[t] > 3) n_diff++;
      check(n_diff > 0, "MAP acq: acquisition changes the window end");
      // the same window with the backward recursion first
      map_ref(L, A, 1);
      got_n = 0;
      run(OP_MAPB, L, 100, 1, cyc, A, 1);
      check(got_n == L, $sformatf("MAPB: %0d extrinsic values, expected %0d", got_n, L));
      worst = 0;
      for (int t = 0; t < L; t++) begin
        int d; d = got_ext[t] - ref_ext[t]; if (d < 0) d = -d;
        if (d > worst) worst = d;
        check(d <= 3, $sformatf("MAPB t=%0d ext %0d ref %0d", t, got_ext[t], ref_ext[t]));
      end
      $display("MAP backward first: worst extrinsic deviation %0d, %0d cycles", worst, cyc);
      check(cyc <= 2 * L + A + 8 && cyc >= 2 * L + A,
            $sformatf("MAPB: %0d cycles for %0d + %0d steps", cyc, L, A));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
