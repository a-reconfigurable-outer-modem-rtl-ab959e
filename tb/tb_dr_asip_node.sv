// tb_dr_asip_node: drives one node purely through its network link.
//  1. Loads a Kc = 7 code into the shadow configuration, swaps it in, loads
//     channel values of a terminated block, issues a Viterbi command and a
//     SEND command, and checks the returned result packet holds the
//     information bits.
//  2. Switches to the recursive UMTS component code, loads a-priori values
//     and an interleaver table, issues a Log-MAP command and checks that one
//     interleaver flit per step leaves the node, addressed by the table, with
//     the bank bit of the command and extrinsic values whose sign agrees with
//     the transmitted bit (noise-free channel values).
module tb_dr_asip_node;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic tx_valid, rx_valid, core_done;
  flit_t tx_flit, rx_flit;
  logic [1:0] tx_ready, rx_ready;
  dr_asip_node #(.X(2), .Y(1)) dut (.clk, .rst_n, .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit,
                                    .rx_ready, .core_done);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  flit_t txd [$], txi [$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready[tx_flit.vc]) begin
    if (tx_flit.vc) txd.push_back(tx_flit); else txi.push_back(tx_flit);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input flit_t f);
    @(negedge clk); rx_valid = 1; rx_flit = f;
    #1; while (!rx_ready[f.vc]) begin @(negedge clk); #1; end
    @(posedge clk); #1; rx_valid = 0;
  endtask
  task automatic pkt(input pclass_e c, input int addr, input logic [31:0] w [$]);
    flit_t f;
    f = '0; f.vc = 1; f.head = 1; f.data = {5'd0, c, 10'(w.size()), 5'd0, 8'd0}; put(f);
    f = '0; f.vc = 1; f.data = 32'(addr); put(f);
    foreach (w[i]) begin f = '0; f.vc = 1; f.data = w[i]; f.tail = (i == w.size() - 1); put(f); end
  endtask

  function automatic int par(input int v); return $countones(v) & 1; endfunction

  int info [256];
  logic [31:0] words [$];

  // encode with Kc, feedback fb, generators g (bit 0 = register input)
  task automatic encode(input int k, input int ncv, input int fb, input int g [4], input int L,
                        input bit term);
    int s, m;
    m = k - 1; s = 0;
    words = {};
    for (int t = 0; t < L; t++) begin
      int u, b; logic [31:0] w;
      u = (term && t >= L - m) ? par((fb >> 1) & s) : $urandom_range(0, 1);
      info[t] = u;
      b = u ^ par((fb >> 1) & s);
      w = '0;
      for (int i = 0; i < ncv; i++) w[8*i +: 8] = par(g[i] & ((s << 1) | b)) ? 8'sd20 : -8'sd20;
      words.push_back(w);
      s = ((s << 1) | b) & ((1 << m) - 1);
    end
  endtask

  initial begin
    int g [4];
    int L, nw;
    cmd_t c;
    logic [31:0] tabw [$], law [$];
    logic [14:0] tabv [64];
    rx_valid = 0; rx_flit = '0; tx_ready = 2'b11;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- 1. Viterbi, Kc = 7, rate 1/2 ----
    g = '{'b1001111, 'b1101101, 0, 0};
    L = 40;
    pkt(PC_CFG, 0, '{32'h27, 32'h0, 32'(g[0]), 32'(g[1]), 32'h0, 32'h0, 32'h0});
    check(dut.u_cc.work.k == 4, "shadow writes leave the working code");
    pkt(PC_CFG, 15, '{32'h1});
    repeat (2) @(negedge clk);
    check(dut.u_cc.work.k == 7, "code swapped in");
    encode(7, 2, 0, g, L, 1);
    pkt(PC_CV, 0, words);
    c = '0; c.op = OP_VA; c.len = 10'(L);
    pkt(PC_CMD, 0, '{32'(c)});
    nw = (L + 15) / 16;
    c = '0; c.op = OP_SEND; c.bank = 1; c.len = 10'(nw); c.base = 10'h10;
    pkt(PC_CMD, 0, '{32'(c)});
    wait (txd.size() == nw + 2);
    check(txd[0].data == {5'h10, PC_RESULT, 10'(nw), 5'b0_01_10, 8'd0}, "result header");
    for (int t = 0; t < L; t++)
      check(txd[2 + t / 16].data[t % 16] == 1'(info[t]), $sformatf("decoded bit %0d", t));
    check(txd[nw + 1].tail, "tail flit");

    // ---- 2. Log-MAP, UMTS component code ----
    g = '{'b1101, 'b1011, 0, 0};
    L = 32;
    pkt(PC_CFG, 0, '{32'h24, 32'b1100, 32'(g[0]), 32'(g[1]), 32'h0, 32'h0, 32'h4});
    pkt(PC_CFG, 15, '{32'h1});
    encode(4, 2, 'b1100, g, L, 0);
    pkt(PC_CV, 0, words);
    law = {};
    for (int t = 0; t < L; t++) law.push_back(32'(0));
    pkt(PC_IOMEM0, 0, law);
    tabw = {};
    for (int t = 0; t < L; t++) begin
      tabv[t] = {5'($urandom_range(0, 15)), 10'($urandom_range(0, 1023))};
      tabw.push_back(32'(tabv[t]));
    end
    pkt(PC_ILTAB, 200, tabw);
    c = '0; c.op = OP_MAP; c.bank = 0; c.ext_bank = 1; c.len = 10'(L); c.base = 10'd200;
    pkt(PC_CMD, 0, '{32'(c)});
    wait (core_done);
    repeat (10) @(negedge clk);
    check(txi.size() == L, $sformatf("%0d interleaver flits, expected %0d", txi.size(), L));
    begin
      int agree; agree = 0;
      foreach (txi[i]) begin
        int t; logic signed [15:0] v;
        t = L - 1 - i;   // backward recursion: last step first
        v = txi[i].data[15:0];
        check(txi[i].data[31:27] == tabv[t][14:10] && txi[i].data[25:16] == tabv[t][9:0] &&
              txi[i].data[26] == 1'b1 && txi[i].head && txi[i].tail, $sformatf("flit %0d target", i));
        if ((v > 0) == (info[t] == 1)) agree++;
      end
      $display("extrinsic sign agrees for %0d of %0d", agree, L);
      check(agree >= L - 2, "extrinsic signs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
