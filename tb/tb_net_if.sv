// tb_net_if: drives packets of every class into the network interface and
// checks the resulting memory, configuration, table and command writes;
// sends interleaver flits from the IL/DIL side while a SEND command streams
// an IO memory out, with random link back-pressure, and checks both flit
// streams and that a command is held until the core is ready.
module tb_net_if;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  node_t my_node;
  logic tx_valid, rx_valid, cv_en, io_en, io_we, io_bank, cfg_we, cfg_swap, tab_we, cmd_valid;
  logic core_ready, il_valid, il_ready;
  flit_t tx_flit, rx_flit, il_flit;
  logic [1:0] tx_ready, rx_ready;
  logic [ADDR_W-1:0] cv_addr, io_addr;
  logic [31:0] cv_wdata;
  logic [IOW-1:0] io_wdata, io_rdata0, io_rdata1;
  logic [3:0] cfg_addr; logic [15:0] cfg_wdata;
  logic [ADDR_W:0] tab_addr; logic [NODE_W+ADDR_W-1:0] tab_wdata;
  cmd_t cmd;
  net_if dut (.clk, .rst_n, .my_node, .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready,
    .cv_en, .cv_addr, .cv_wdata, .io_en, .io_we, .io_bank, .io_addr, .io_wdata, .io_rdata0, .io_rdata1,
    .cfg_we, .cfg_addr, .cfg_wdata, .cfg_swap, .tab_we, .tab_addr, .tab_wdata, .cmd_valid, .cmd,
    .core_ready, .il_valid, .il_flit, .il_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // event log of the memory-side outputs
  string ev [$];
  logic [15:0] iom [2][1024];
  always @(posedge clk) if (rst_n) begin
    if (cv_en) ev.push_back($sformatf("cv %0d %h", cv_addr, cv_wdata));
    if (io_en && io_we) ev.push_back($sformatf("io %0d %0d %h", io_bank, io_addr, io_wdata));
    if (io_en && !io_we) begin io_rdata0 <= iom[0][io_addr]; io_rdata1 <= iom[1][io_addr]; end
    if (cfg_we) ev.push_back($sformatf("cfg %0d %h", cfg_addr, cfg_wdata));
    if (cfg_swap) ev.push_back("swap");
    if (tab_we) ev.push_back($sformatf("tab %0d %h", tab_addr, tab_wdata));
    if (cmd_valid && core_ready) ev.push_back($sformatf("cmd %h", cmd));
  end

  flit_t txd [$], txi [$];
  always @(posedge clk) if (rst_n && tx_valid) begin
    check(tx_ready[tx_flit.vc], "flit sent without ready");
    if (tx_flit.vc) txd.push_back(tx_flit); else txi.push_back(tx_flit);
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    string exp [$];
    flit_t f;
    cmd_t c;
    my_node = '{io: 0, y: 2, x: 1};
    rx_valid = 0; rx_flit = '0; tx_ready = 2'b11; core_ready = 0; il_valid = 0; il_flit = '0;
    for (int i = 0; i < 1024; i++) begin iom[0][i] = 16'(i * 3); iom[1][i] = 16'(i * 7 + 1); end
    repeat (3) @(negedge clk); rst_n = 1;

    pkt(PC_CV, 5, '{32'h11, 32'h22, 32'h33});
    exp.push_back("cv 5 00000011"); exp.push_back("cv 6 00000022"); exp.push_back("cv 7 00000033");
    pkt(PC_IOMEM1, 40, '{32'h1234, 32'h5678});
    exp.push_back("io 1 40 1234"); exp.push_back("io 1 41 5678");
    f = '0; f.head = 1; f.tail = 1; f.data = {5'd6, 1'b0, 10'd77, 16'hbeef}; put(f);
    exp.push_back("io 0 77 beef");
    pkt(PC_CFG, 0, '{32'h37, 32'h0});
    exp.push_back("cfg 0 0037"); exp.push_back("cfg 1 0000");
    pkt(PC_CFG, 15, '{32'h1});
    exp.push_back("swap");
    pkt(PC_ILTAB, 3, '{32'h80001234, 32'h00000042});
    exp.push_back("tab 1027 1234"); exp.push_back("tab 4 0042");
    c = '0; c.op = OP_VA; c.len = 10'd20;
    pkt(PC_CMD, 0, '{32'(c)});
    repeat (5) @(negedge clk);
    check(cmd_valid, "command waits for the core");
    core_ready = 1;
    exp.push_back($sformatf("cmd %h", c));
    @(negedge clk); core_ready = 0;
    check(!cmd_valid, "command taken once");
    repeat (3) @(negedge clk);
    check(ev.size() == exp.size(), $sformatf("%0d events, expected %0d", ev.size(), exp.size()));
    foreach (exp[i]) check(i < ev.size() && ev[i] == exp[i],
                           $sformatf("event %0d '%s' expected '%s'", i, i < ev.size() ? ev[i] : "", exp[i]));

    // SEND of 5 words of IO memory 1 to node 0x13 while interleaver flits go out
    c = '0; c.op = OP_SEND; c.bank = 1; c.len = 10'd5; c.base = 10'h13;
    pkt(PC_CMD, 0, '{32'(c)});
    fork
      forever begin @(negedge clk); tx_ready = 2'($urandom_range(0, 3)); end
      begin
        for (int n = 0; n < 8; n++) begin
          @(negedge clk); il_valid = 1; il_flit = '0; il_flit.head = 1; il_flit.tail = 1;
          il_flit.data = 32'(n);
          @(posedge clk); while (!il_ready) @(posedge clk);
          @(negedge clk); il_valid = 0;
        end
      end
    join_none
    repeat (10) @(negedge clk);
    check(txd.size() == 0, "SEND waits for the core");
    core_ready = 1;
    repeat (60) @(negedge clk);
    check(txd.size() == 7, $sformatf("result packet flits %0d", txd.size()));
    if (txd.size() == 7) begin
      check(txd[0].head && txd[0].data == {5'h13, PC_RESULT, 10'd5, 5'(my_node), 8'd0}, "result header");
      for (int i = 0; i < 5; i++)
        check(txd[2+i].data == 32'(i * 7 + 1) && txd[2+i].tail == (i == 4), $sformatf("result word %0d", i));
    end
    check(txi.size() == 8, "interleaver flits");
    foreach (txi[i]) check(txi[i].data == 32'(i), "interleaver flit order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
