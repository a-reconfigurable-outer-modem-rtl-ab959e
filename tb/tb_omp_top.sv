// tb_omp_top: end-to-end test of the 4 x 4 platform at its full size.
// Three decoding tasks run at the same time on different nodes, all loaded
// through IO interface 0 (west of router (0,0)):
//  A. node (3,0): Viterbi, Kc = 9 rate 1/3 (256 states, load-store mode);
//     the result packet goes to IO interface 1 (east of router (3,3)), whose
//     host applies random back-pressure.
//  B. node (0,0): one Log-MAP half-iteration of the UMTS component code as
//     part of a three-node turbo cluster: the extrinsic values are
//     interleaved by the IL/DIL table to nodes (1,0) and (2,0), IO memory 1.
//     Task A's channel values are sent while B's interleaver flits use the
//     same east-bound links, so both virtual channels share them.
//  C. node (1,3): Viterbi, Kc = 3 (one trellis step per cycle); the result
//     returns to IO interface 0.
// Checked: decoded bits of A and C, every interleaved position of B written
// at its target with a sign that agrees with the transmitted bit.  Counted,
// and each must occur: configuration swaps, single-cycle and load-store
// Viterbi steps, trace-back steps, soft outputs, interleaver flits received
// by nodes, cycles in which an interleaver flit passes a link while a data
// packet holds that link's data channel, back-pressure at an IO interface,
// commands waiting for a busy core, and result packets at both interfaces.
module tb_omp_top;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_swap = 0, n_va1 = 0, n_vag = 0, n_tb = 0, n_llr = 0, n_ilrx = 0, n_vcmix = 0;
  int n_bp = 0, n_cmdwait = 0;
  for (genvar y = 0; y < MESH_Y; y++) begin : g_cy
    for (genvar x = 0; x < MESH_X; x++) begin : g_cx
      always @(posedge clk) if (rst_n) begin
        if (dut.g_y[y].g_x[x].u_n.u_cc.swap) n_swap++;
        if (dut.g_y[y].g_x[x].u_n.u_core.st == 4'd1 && dut.g_y[y].g_x[x].u_n.u_core.vld_q) n_va1++;
        if (dut.g_y[y].g_x[x].u_n.u_core.st == 4'd3 && dut.g_y[y].g_x[x].u_n.u_core.ph == 2'd3) n_vag++;
        if (dut.g_y[y].g_x[x].u_n.u_core.st == 4'd5) n_tb++;
        if (dut.g_y[y].g_x[x].u_n.u_core.llr_v) n_llr++;
        if (dut.g_y[y].g_x[x].u_n.u_ni.rx_il) n_ilrx++;
        if (dut.g_y[y].g_x[x].u_n.u_ni.pend_v && !dut.g_y[y].g_x[x].u_n.u_ni.core_ready) n_cmdwait++;
        for (int o = 1; o < 5; o++)
          if (dut.g_y[y].g_x[x].u_r.out_valid[o] && dut.g_y[y].g_x[x].u_r.out_flit[o].vc == 1'b0 &&
              dut.g_y[y].g_x[x].u_r.olock[o][1]) n_vcmix++;
      end
    end
  end
  always @(posedge clk) if (rst_n && !dut.g_io[1].u_io.rx_ready[1]) n_bp++;

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

  int info [3][256];
  task automatic encode(input int id, input int k, input int ncv, input int fb, input int g [4],
                        input int L, input bit term, output logic [31:0] words [$]);
    int s, m;
    m = k - 1; s = 0;
    words = {};
    for (int t = 0; t < L; t++) begin
      int u, b; logic [31:0] w;
      u = (term && t >= L - m) ? par((fb >> 1) & s) : $urandom_range(0, 1);
      info[id][t] = u;
      b = u ^ par((fb >> 1) & s);
      w = '0;
      for (int i = 0; i < ncv; i++)
        w[8*i +: 8] = 8'(par(g[i] & ((s << 1) | b)) ? $urandom_range(10, 30) : -$urandom_range(10, 30));
      words.push_back(w);
      s = ((s << 1) | b) & ((1 << m) - 1);
    end
  endtask

  function automatic logic [31:0] cmdw(input op_e op, input int len, input int base, input bit bank,
                                       input bit ext_bank);
    cmd_t c;
    c = '0; c.op = op; c.len = 10'(len); c.base = 10'(base); c.bank = bank; c.ext_bank = ext_bank;
    return 32'(c);
  endfunction

  initial begin
    logic [31:0] wa [$], wb [$], wc [$], tab [$], zeros [$];
    int ga [4], gb [4], gc [4];
    int LA, LB, LC, tgt_x [64], tgt_a [64];
    for (int k = 0; k < 2; k++) begin
      desc_valid[k] = 0; wr_valid[k] = 0; rd_ready[k] = 1; desc_dst[k] = '0; desc_cls[k] = PC_CV;
      desc_addr[k] = 0; desc_len[k] = 0; wr_data[k] = 0; rx_pkts[k] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    fork forever begin @(negedge clk); rd_ready[1] = ($urandom_range(0, 2) == 0); end join_none

    LA = 24; LB = 48; LC = 64;
    ga = '{'o557, 'o663, 'o711, 0};
    gb = '{'b1101, 'b1011, 0, 0};
    gc = '{'b111, 'b101, 0, 0};
    encode(0, 9, 3, 0, ga, LA, 1, wa);
    encode(1, 4, 2, 'b1100, gb, LB, 0, wb);
    encode(2, 3, 2, 0, gc, LC, 1, wc);

    // ---- B: Log-MAP on node (0,0), extrinsic values to nodes (1,0) and (2,0) ----
    host_send(0, nd(0, 0), PC_CFG, 0, '{32'h24, 32'b1100, 32'(gb[0]), 32'(gb[1]), 0, 0, 32'h4});
    host_send(0, nd(0, 0), PC_CFG, 15, '{32'h1});
    host_send(0, nd(0, 0), PC_CV, 0, wb);
    zeros = {};
    for (int t = 0; t < LB; t++) zeros.push_back(0);
    host_send(0, nd(0, 0), PC_IOMEM0, 0, zeros);
    tab = {};
    for (int t = 0; t < LB; t++) begin
      tgt_x[t] = 1 + (t % 2);
      tgt_a[t] = 300 + ((t * 7) % LB);
      tab.push_back(32'({nd(tgt_x[t], 0), 10'(tgt_a[t])}));
    end
    host_send(0, nd(0, 0), PC_ILTAB, 0, tab);
    // mark the target locations
    for (int x = 1; x <= 2; x++) begin
      logic [31:0] mk [$];
      mk = {};
      for (int t = 0; t < LB; t++) mk.push_back(32'h8000);
      host_send(0, nd(x, 0), PC_IOMEM1, 300, mk);
    end
    // ---- A: configure node (3,0) for Kc = 9 ----
    host_send(0, nd(3, 0), PC_CFG, 0, '{32'h39, 32'h0, 32'(ga[0]), 32'(ga[1]), 32'(ga[2]), 0, 0});
    host_send(0, nd(3, 0), PC_CFG, 15, '{32'h1});
    // start B, then stream A's channel values while B's interleaver flits flow
    host_send(0, nd(0, 0), PC_CMD, 0, '{cmdw(OP_MAP, LB, 0, 0, 1)});
    wait (dut.g_y[0].g_x[0].u_n.u_core.st == 4'd7);
    host_send(0, nd(3, 0), PC_CV, 0, wa);
    host_send(0, nd(3, 0), PC_CMD, 0, '{cmdw(OP_VA, LA, 0, 0, 0), cmdw(OP_SEND, (LA + 15) / 16, 5'(nd(3, 3, 1)), 1, 0)});
    // ---- C: Kc = 3 on node (1,3), result back to IO interface 0 ----
    host_send(0, nd(1, 3), PC_CFG, 0, '{32'h23, 32'h0, 32'(gc[0]), 32'(gc[1]), 0, 0, 0});
    host_send(0, nd(1, 3), PC_CFG, 15, '{32'h1});
    host_send(0, nd(1, 3), PC_CV, 0, wc);
    host_send(0, nd(1, 3), PC_CMD, 0, '{cmdw(OP_VA, LC, 0, 0, 0), cmdw(OP_SEND, LC / 16, 5'(nd(0, 0, 1)), 1, 0)});

    wait (rx_pkts[0] == 1 && rx_pkts[1] == 1);
    repeat (50) @(negedge clk);

    // A
    check(rx_src[1][0] == nd(3, 0), "A: result source");
    check(rx_words[1].size() == (LA + 15) / 16, "A: result length");
    for (int t = 0; t < LA; t++)
      check(rx_words[1][t / 16][t % 16] == 1'(info[0][t]), $sformatf("A: bit %0d", t));
    // C
    check(rx_src[0][0] == nd(1, 3), "C: result source");
    check(rx_words[0].size() == LC / 16, "C: result length");
    for (int t = 0; t < LC; t++)
      check(rx_words[0][t / 16][t % 16] == 1'(info[2][t]), $sformatf("C: bit %0d", t));
    // B
    begin
      int agree; agree = 0;
      for (int t = 0; t < LB; t++) begin
        logic [15:0] v;
        v = (tgt_x[t] == 1) ? dut.g_y[0].g_x[1].u_n.u_io1.mem[tgt_a[t]]
                            : dut.g_y[0].g_x[2].u_n.u_io1.mem[tgt_a[t]];
        check(v != 16'h8000, $sformatf("B: position %0d written", t));
        if ((signed'(v) > 0) == (info[1][t] == 1)) agree++;
      end
      $display("B: extrinsic sign agrees for %0d of %0d", agree, LB);
      check(agree >= LB - 2, "B: extrinsic signs");
    end

    $display("swaps %0d, single-cycle VA steps %0d, load-store groups %0d, trace-back steps %0d",
             n_swap, n_va1, n_vag, n_tb);
    $display("soft outputs %0d, IL flits received %0d, VC-shared link cycles %0d",
             n_llr, n_ilrx, n_vcmix);
    $display("IO back-pressure cycles %0d, command wait cycles %0d, results %0d/%0d",
             n_bp, n_cmdwait, rx_pkts[0], rx_pkts[1]);
    check(n_swap == 3, "configuration swaps");
    check(n_va1 == LC, "single-cycle Viterbi steps");
    check(n_vag == LA * 16, "load-store groups (16 per Kc=9 step)");
    check(n_tb == LA + LC, "trace-back steps");
    check(n_llr == LB, "soft outputs");
    check(n_ilrx == LB, "interleaver flits received");
    check(n_vcmix > 0, "virtual channels sharing a link");
    check(n_bp > 0, "back-pressure");
    check(n_cmdwait > 0, "command waiting for a busy core");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
