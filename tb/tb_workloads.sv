// tb_workloads: decoding workloads run on the full 4 x 4 platform with
// noisy channel values, checked on the decoded bits.
//  1. UMTS turbo code decoded by a cluster of nodes: component code 1 (natural
//     order) on the nodes of column 1, component code 2 (interleaved order)
//     on column 2.  Each node's extrinsic values go through its own IL/DIL
//     table straight into the IO memory of the node that owns that position
//     in the other order, so no host is involved between half-iterations.
//     The IO memory bank read as a-priori input and the bank written by the
//     other component alternate with the iteration (two-bank scheme).
//     a) 40-bit blocks (the smallest UMTS block): one node per component,
//        one window of 40 steps.
//     b) 128-bit blocks cut into two 64-step sub-blocks per component, one
//        node each, decoded in parallel: the first window runs 16 backward
//        acquisition steps over the start of the second (the node holds
//        those channel values too, a-priori values there are 0), the second
//        window starts alpha with all states equal.
//     c) one 512-bit block on all 16 nodes: eight 64-step windows per
//        component, the two components placed on a checkerboard.  Here the
//        interleaver flits crossing the two bisections of the mesh are
//        counted and the mean load per bisection channel is printed.
//     Component 1 runs the forward recursion first, component 2 the
//     backward recursion first.
//     After the last iteration every node sends its extrinsic bank to IO
//     interface 0 and the host forms the decision ysys + Le1 + Le2.
//  2. GSM full-rate speech channel code (Kc = 5, rate 1/2, 185 bits plus 4
//     tail bits), Viterbi on node (0,3) running at the same time; the hard
//     decisions return to IO interface 1 (before block c, which needs
//     the node).
// Channel: BPSK over additive white Gaussian noise (Box-Muller from
// $urandom), log-likelihood ratios 2y/sigma^2 quantised to 1/4 nat and
// saturated to 8 bits.  The interleaver is a pseudo-random permutation
// generated here; the UMTS interleaver construction itself is not modelled.
// Checked: every decoded bit of every block after the last iteration, that
// the noise did flip received bits (so that decoding had something to
// correct), that iterating did not add errors, and that the bisection load
// in c) stays below one flit per cycle.  Printed: bit errors after each turbo
// iteration; bisection traffic.  The a-priori values of the acquisition steps
// are left at 0 because each table entry names a single target.
module tb_workloads;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic desc_valid [2], desc_ready [2], wr_valid [2], wr_ready [2], rd_valid [2], rd_last [2], rd_ready [2];
  node_t desc_dst [2], rd_src [2];
  pclass_e desc_cls [2], rd_cls [2];
  logic [ADDR_W-1:0] desc_addr [2], desc_len [2];
  logic [31:0] wr_data [2], rd_data [2];
  logic [15:0] il_dropped [2];
  logic [MESH_X*MESH_Y-1:0] core_done;

  omp_top dut (.clk, .rst_n, .desc_valid, .desc_ready, .desc_dst, .desc_cls, .desc_addr, .desc_len,
               .wr_valid, .wr_data, .wr_ready, .rd_valid, .rd_data, .rd_last, .rd_src, .rd_cls,
               .rd_ready, .il_dropped, .core_done);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int L1 = 40, NBLK1 = 4, L2 = 128, NBLK2 = 2, L3 = 512, NIT = 5, LG = 189;
  localparam real SIGMA_T = 0.95, SIGMA_G = 0.6;

  // interleaver flits received per node, and a copy of what they wrote
  int n_il [16];
  int sh [16][2][128];
  // interleaver flits crossing the two bisections (both directions)
  bit meas = 0;
  int n_cut = 0, cyc_meas = 0;
  for (genvar y = 0; y < MESH_Y; y++) begin : g_cy
    for (genvar x = 0; x < MESH_X; x++) begin : g_cx
      always @(posedge clk) if (rst_n && dut.g_y[y].g_x[x].u_n.u_ni.rx_il) begin
        n_il[y*MESH_X+x]++;
        sh[y*MESH_X+x][dut.g_y[y].g_x[x].u_n.u_ni.rx_flit.data[26]]
          [dut.g_y[y].g_x[x].u_n.u_ni.rx_flit.data[22:16]] =
          int'(signed'(dut.g_y[y].g_x[x].u_n.u_ni.rx_flit.data[15:0]));
      end
      // router ports: 1 N, 2 E, 3 S, 4 W
      always @(posedge clk) if (rst_n && meas) begin
        if (x == 1 && dut.g_y[y].g_x[x].u_r.out_valid[2] && dut.g_y[y].g_x[x].u_r.out_flit[2].vc == VC_IL) n_cut++;
        if (x == 2 && dut.g_y[y].g_x[x].u_r.out_valid[4] && dut.g_y[y].g_x[x].u_r.out_flit[4].vc == VC_IL) n_cut++;
        if (y == 1 && dut.g_y[y].g_x[x].u_r.out_valid[3] && dut.g_y[y].g_x[x].u_r.out_flit[3].vc == VC_IL) n_cut++;
        if (y == 2 && dut.g_y[y].g_x[x].u_r.out_valid[1] && dut.g_y[y].g_x[x].u_r.out_flit[1].vc == VC_IL) n_cut++;
      end
    end
  end
  always @(posedge clk) if (meas) cyc_meas++;

  // ---------------- host side ----------------
  task automatic host_send(input int k, input node_t dst, input pclass_e c, input int addr,
                           input logic [31:0] w [$]);
    @(negedge clk);
    while (!desc_ready[k]) @(negedge clk);
    desc_valid[k] = 1; desc_dst[k] = dst; desc_cls[k] = c; desc_addr[k] = 10'(addr);
    desc_len[k] = 10'(w.size());
    @(negedge clk); desc_valid[k] = 0;
    foreach (w[i]) begin
      wr_valid[k] = 1; wr_data[k] = w[i];
      @(posedge clk); while (!wr_ready[k]) @(posedge clk);
      @(negedge clk); wr_valid[k] = 0;
    end
  endtask

  logic [31:0] rx_words [2][$];
  node_t rx_src [2][$];
  int rx_pkts [2];
  for (genvar k = 0; k < 2; k++) begin : g_h
    always @(posedge clk) if (rst_n && rd_valid[k] && rd_ready[k]) begin
      rx_words[k].push_back(rd_data[k]);
      if (rd_last[k]) begin rx_pkts[k]++; rx_src[k].push_back(rd_src[k]); end
    end
  end

  function automatic int par(input int v); return $countones(v) & 1; endfunction
  function automatic node_t nd(input int x, input int y, input bit io = 0);
    return '{io: io, y: 2'(y), x: 2'(x)};
  endfunction
  function automatic logic [31:0] cmdw(input op_e op, input int len, input int base, input bit bank,
                                       input bit ext_bank);
    cmd_t c;
    c = '0; c.op = op; c.len = 10'(len); c.base = 10'(base); c.bank = bank; c.ext_bank = ext_bank;
    return 32'(c);
  endfunction

  // ---------------- channel ----------------
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
    u2 = real'($urandom_range(0, 999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction
  // transmitted bit -> noisy 8-bit LLR in 1/4 nat
  function automatic logic [7:0] chan(input int bit_v, input real sigma);
    real y, l;
    int q;
    y = ((bit_v != 0) ? 1.0 : -1.0) + sigma * gauss();
    l = 4.0 * 2.0 * y / (sigma * sigma);
    q = int'(l);
    if (q > 127) q = 127;
    if (q < -127) q = -127;
    return 8'(q);
  endfunction

  localparam int LMAX = 512, ACQ = 16;

  // recursive systematic encoder of the UMTS component code: state bit 0 is
  // the newest register, feedback 1 + D^2 + D^3, parity 1 + D + D^3
  task automatic rsc(input int L, input int u [LMAX], output int p [LMAX]);
    int s; s = 0;
    for (int t = 0; t < L; t++) begin
      int b;
      b = u[t] ^ par('b110 & s);
      p[t] = par('b1011 & ((s << 1) | b));
      s = ((s << 1) | b) & 7;
    end
  endtask

  // ---------------- turbo decoding ----------------
  // component c (0: natural order, 1: interleaved order), sub-block k; a
  // block of L steps is cut into nsub windows of B = L / nsub steps.  Up to
  // two windows: node (1 + c, 1 + k).  Eight windows: all 16 nodes, the two
  // components on a checkerboard so that every node has partners in all
  // directions.
  int nsub_g = 1;
  function automatic node_t tnode(input int c, input int k);
    int y;
    if (nsub_g <= 2) return nd(1 + c, 1 + k);
    y = k / 2;
    return nd(2 * (k % 2) + ((y + c) % 2), y);
  endfunction
  function automatic int nid(input node_t n); return int'(n.y) * MESH_X + int'(n.x); endfunction
  function automatic int iomem(input int c, input int k, input int bank, input int a);
    return sh[nid(tnode(c, k))][bank][a];
  endfunction
  function automatic int il_rx(input int c, input int nsub);
    int n; n = 0;
    for (int k = 0; k < nsub; k++) n += n_il[nid(tnode(c, k))];
    return n;
  endfunction

  int raw_err_t [3], dec_err_t [3], it_err [3][NIT], nblk_t [3];

  task automatic turbo_block(input int blk, input int L, input int nsub);
    int u [LMAX], ui [LMAX], p [2][LMAX], pi [LMAX], pinv [LMAX], B, cfgi;
    logic [7:0] ys [LMAX], yp [2][LMAX];
    logic [31:0] zeros [$];
    B = L / nsub;
    nsub_g = nsub;
    cfgi = (nsub > 2) ? 2 : int'(nsub > 1);
    nblk_t[cfgi]++;
    // random permutation
    for (int i = 0; i < L; i++) pi[i] = i;
    for (int i = L - 1; i > 0; i--) begin
      int j, t; j = $urandom_range(0, i); t = pi[i]; pi[i] = pi[j]; pi[j] = t;
    end
    for (int j = 0; j < L; j++) pinv[pi[j]] = j;
    for (int i = 0; i < L; i++) u[i] = $urandom_range(0, 1);
    for (int j = 0; j < L; j++) ui[j] = u[pi[j]];
    rsc(L, u, p[0]);
    rsc(L, ui, p[1]);
    for (int i = 0; i < L; i++) begin
      ys[i] = chan(u[i], SIGMA_T);
      if ((signed'(ys[i]) > 0) != (u[i] == 1)) raw_err_t[cfgi]++;
      yp[0][i] = chan(p[0][i], SIGMA_T);
      yp[1][i] = chan(p[1][i], SIGMA_T);
    end
    zeros = {};
    for (int i = 0; i < B + ACQ; i++) zeros.push_back(0);
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < nsub; k++) begin
        logic [31:0] cv [$], tab [$];
        int n;
        // a window that is not the last one also holds ACQ steps after it
        n = (k < nsub - 1) ? B + ACQ : B;
        cv = {};
        for (int t = k * B; t < k * B + n; t++)
          cv.push_back({16'h0, yp[c][t], (c == 0) ? ys[t] : ys[pi[t]]});
        host_send(0, tnode(c, k), PC_CV, 0, cv);
        host_send(0, tnode(c, k), PC_IOMEM0, 0, zeros);
        host_send(0, tnode(c, k), PC_IOMEM1, 0, zeros);
        for (int bk = 0; bk < 2; bk++) for (int a = 0; a < 128; a++) sh[nid(tnode(c, k))][bk][a] = 0;
        // table of this window, indexed by the global step: component 0's
        // natural index i lands at interleaved index pinv[i] of component 1,
        // and back through pi; consecutive blocks alternate between the two
        // tables of each node
        tab = {};
        for (int t = k * B; t < k * B + B; t++) begin
          int j;
          j = (c == 0) ? pinv[t] : pi[t];
          tab.push_back({1'(blk % 2), 16'h0, tnode(1 - c, j / B), 10'(j % B)});
        end
        host_send(0, tnode(c, k), PC_ILTAB, k * B, tab);
      end
    meas = (nsub > 2);
    for (int it = 0; it < NIT; it++) begin
      int err;
      // component 0 reads bank it%2 and writes the other component's bank
      // it%2; component 1 reads that bank and writes bank (it+1)%2
      for (int c = 0; c < 2; c++) begin
        int n0;
        n0 = il_rx(1 - c, nsub);
        for (int k = 0; k < nsub; k++) begin
          cmd_t cm;
          // component 1 runs its recursions in the other order
          cm = cmd_t'(cmdw((c == 0) ? OP_MAP : OP_MAPB, B, k * B, 1'(it % 2), 1'((it + c) % 2)));
          cm.il_sel = 1'(blk % 2);
          cm.a_open = (k > 0);
          cm.acq = (k < nsub - 1) ? 6'(ACQ) : 6'd0;
          host_send(0, tnode(c, k), PC_CMD, 0, '{32'(cm)});
        end
        while (il_rx(1 - c, nsub) != n0 + L) @(posedge clk);
      end
      // progress report, read directly from the IO memories
      err = 0;
      for (int i = 0; i < L; i++) begin
        int tot;
        tot = int'(signed'(ys[i])) + int'(iomem(0, i / B, (it + 1) % 2, i % B)) +
              int'(iomem(1, pinv[i] / B, it % 2, pinv[i] % B));
        if ((tot > 0) != (u[i] == 1)) err++;
      end
      it_err[cfgi][it] += err;
    end
    meas = 0;
    // results through the network: every window's extrinsic bank to IO
    // interface 0, component 0 (bank NIT%2) then component 1
    begin
      int n0, w0;
      n0 = rx_pkts[0]; w0 = rx_words[0].size();
      for (int c = 0; c < 2; c++)
        for (int k = 0; k < nsub; k++) begin
          host_send(0, tnode(c, k), PC_CMD, 0,
                    '{cmdw(OP_SEND, B, int'(nd(0, 0, 1)), 1'((NIT + c) % 2), 0)});
          wait (rx_pkts[0] == n0 + c * nsub + k + 1);
          check(rx_src[0][n0 + c * nsub + k] == tnode(c, k), "turbo: result source");
        end
      check(rx_words[0].size() == w0 + 2 * L, "turbo: result lengths");
      for (int i = 0; i < L; i++) begin
        int tot;
        tot = int'(signed'(ys[i])) + int'(signed'(rx_words[0][w0 + i][15:0])) +
              int'(signed'(rx_words[0][w0 + L + pinv[i]][15:0]));
        check((tot > 0) == (u[i] == 1), $sformatf("turbo: block %0d bit %0d", blk, i));
        if ((tot > 0) != (u[i] == 1)) dec_err_t[cfgi]++;
      end
    end
  endtask

  // ---------------- GSM Viterbi ----------------
  int raw_err_g = 0;
  int ug [LG];
  task automatic gsm_start();
    logic [31:0] w [$];
    int s;
    s = 0; w = {};
    for (int t = 0; t < LG; t++) begin
      int c0, c1;
      logic [7:0] y0, y1;
      ug[t] = (t >= LG - 4) ? 0 : $urandom_range(0, 1);
      c0 = par('b11001 & ((s << 1) | ug[t]));
      c1 = par('b11011 & ((s << 1) | ug[t]));
      y0 = chan(c0, SIGMA_G); y1 = chan(c1, SIGMA_G);
      if ((signed'(y0) > 0) != (c0 == 1)) raw_err_g++;
      if ((signed'(y1) > 0) != (c1 == 1)) raw_err_g++;
      w.push_back({16'h0, y1, y0});
      s = ((s << 1) | ug[t]) & 15;
    end
    host_send(1, nd(0, 3), PC_CFG, 0, '{32'h25, 32'h0, 32'h19, 32'h1b, 0, 0, 0});
    host_send(1, nd(0, 3), PC_CFG, 15, '{32'h1});
    host_send(1, nd(0, 3), PC_CV, 0, w);
    host_send(1, nd(0, 3), PC_CMD, 0, '{cmdw(OP_VA, LG, 0, 0, 0),
                                        cmdw(OP_SEND, (LG + 15) / 16, int'(nd(3, 3, 1)), 1, 0)});
  endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      desc_valid[k] = 0; wr_valid[k] = 0; rd_ready[k] = 1; desc_dst[k] = '0; desc_cls[k] = PC_CV;
      desc_addr[k] = 0; desc_len[k] = 0; wr_data[k] = 0; rx_pkts[k] = 0;
    end
    for (int i = 0; i < 16; i++) n_il[i] = 0;
    for (int c = 0; c < 3; c++) begin
      raw_err_t[c] = 0; dec_err_t[c] = 0; nblk_t[c] = 0;
      for (int i = 0; i < NIT; i++) it_err[c][i] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // GSM from IO interface 1 in parallel with the turbo set-up
    fork gsm_start(); join_none
    // UMTS component code on the four turbo nodes (systematic output first)
    for (int c = 0; c < 2; c++)
      for (int k = 0; k < 2; k++) begin
        host_send(0, tnode(c, k), PC_CFG, 0, '{32'h24, 32'b1100, 32'b1101, 32'b1011, 0, 0, 32'h4});
        host_send(0, tnode(c, k), PC_CFG, 15, '{32'h1});
      end
    for (int b = 0; b < NBLK1; b++) turbo_block(b, L1, 1);
    for (int b = 0; b < NBLK2; b++) turbo_block(NBLK1 + b, L2, 2);

    wait (rx_pkts[1] == 1);
    check(rx_src[1][0] == nd(0, 3), "GSM: result source");
    check(rx_words[1].size() == (LG + 15) / 16, "GSM: result length");
    for (int t = 0; t < LG; t++)
      check(rx_words[1][t / 16][t % 16] == 1'(ug[t]), $sformatf("GSM: bit %0d", t));

    // the whole platform as one turbo cluster: 512-bit block, eight 64-step
    // windows per component
    for (int n = 0; n < 16; n++) begin
      host_send(0, nd(n % 4, n / 4), PC_CFG, 0, '{32'h24, 32'b1100, 32'b1101, 32'b1011, 0, 0, 32'h4});
      host_send(0, nd(n % 4, n / 4), PC_CFG, 15, '{32'h1});
    end
    turbo_block(NBLK1 + NBLK2, L3, 8);
    begin
      real load;
      load = real'(n_cut) / (real'(cyc_meas) * 16.0);
      $display("16-node cluster: %0d interleaver flits crossed the bisections in %0d cycles of interleaving",
               n_cut, cyc_meas);
      $display("  mean load per bisection channel %.3f flits/cycle (16 directed channels)", load);
      check(n_cut > 0 && load < 1.0, "16-node cluster: bisection load below one flit per cycle");
    end

    for (int c = 0; c < 3; c++) begin
      $display("UMTS turbo, %0d blocks of %0d bits in %0d window(s) per component, sigma %.2f: %0d raw systematic errors",
               nblk_t[c], (c == 2) ? L3 : (c != 0) ? L2 : L1, (c == 2) ? 8 : (c != 0) ? 2 : 1, SIGMA_T,
               raw_err_t[c]);
      for (int i = 0; i < NIT; i++)
        $display("  after iteration %0d: %0d bit errors", i + 1, it_err[c][i]);
      $display("  decoded from the result packets: %0d bit errors", dec_err_t[c]);
      check(raw_err_t[c] > 0, "turbo: channel noise flips systematic bits");
      check(it_err[c][NIT - 1] <= it_err[c][0], "turbo: iterations do not increase errors");
    end
    $display("GSM Kc=5, %0d bits, sigma %.2f: %0d raw code-bit errors", LG, SIGMA_G, raw_err_g);
    check(raw_err_g > 0, "GSM: channel noise flips code bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
