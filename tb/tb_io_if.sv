// tb_io_if: sends descriptor + data transfers of random length through the IO
// interface with random network back-pressure and checks the flits (two
// headers with target, class, length and address, payload, tail marker).
// Then feeds result packets and interleaver flits from the network side and
// checks the host sees source, class, payload words and 'last', and that
// interleaver flits are dropped and counted.
module tb_io_if;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic desc_valid, desc_ready, wr_valid, wr_ready, rd_valid, rd_last, rd_ready, tx_valid, rx_valid;
  node_t desc_dst, rd_src;
  pclass_e desc_cls, rd_cls;
  logic [ADDR_W-1:0] desc_addr, desc_len;
  logic [31:0] wr_data, rd_data;
  logic [15:0] il_dropped;
  flit_t tx_flit, rx_flit;
  logic [1:0] tx_ready, rx_ready;
  io_if dut (.clk, .rst_n, .desc_valid, .desc_ready, .desc_dst, .desc_cls, .desc_addr, .desc_len,
             .wr_valid, .wr_data, .wr_ready, .rd_valid, .rd_data, .rd_last, .rd_src, .rd_cls,
             .rd_ready, .il_dropped, .tx_valid, .tx_flit, .tx_ready, .rx_valid, .rx_flit, .rx_ready);
  int checks = 0, failures = 0;
  flit_t expf [$];
  logic [31:0] exprd [$];
  bit explast [$];

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid) begin
      flit_t e;
      e = expf.pop_front();
      check(tx_ready[1] && tx_flit == e, $sformatf("tx flit %h expected %h", tx_flit, e));
    end
    if (rd_valid && rd_ready) begin
      check(rd_data == exprd.pop_front() && rd_last == explast.pop_front() &&
            rd_src == node_t'(5'd9) && rd_cls == PC_RESULT, "host receive");
    end
  end

  initial begin
    desc_valid = 0; wr_valid = 0; rx_valid = 0; rd_ready = 1; tx_ready = 2'b11;
    desc_dst = '0; desc_cls = PC_CV; desc_addr = 0; desc_len = 0; wr_data = 0; rx_flit = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      forever begin @(negedge clk); tx_ready = {1'($urandom_range(0, 3) != 0), 1'($urandom)}; end
    join_none
    for (int p = 0; p < 20; p++) begin
      int len; flit_t f;
      len = $urandom_range(1, 12);
      @(negedge clk);
      while (!desc_ready) @(negedge clk);
      desc_valid = 1; desc_dst = node_t'($urandom); desc_cls = pclass_e'($urandom_range(0, 5));
      desc_addr = 10'($urandom); desc_len = 10'(len);
      f = '0; f.vc = 1; f.head = 1; f.data = {desc_dst, desc_cls, desc_len, 13'd0}; expf.push_back(f);
      f = '0; f.vc = 1; f.data = 32'(desc_addr); expf.push_back(f);
      @(negedge clk); desc_valid = 0;
      for (int w = 0; w < len; w++) begin
        wr_valid = 1; wr_data = $urandom;
        f = '0; f.vc = 1; f.tail = (w == len - 1); f.data = wr_data; expf.push_back(f);
        @(posedge clk); while (!wr_ready) @(posedge clk);
        @(negedge clk); wr_valid = 0;
      end
    end
    repeat (20) @(negedge clk);
    check(expf.size() == 0, "all flits sent");
    // receive side
    for (int p = 0; p < 10; p++) begin
      int len;
      len = $urandom_range(1, 6);
      @(negedge clk); rx_valid = 1; rx_flit = '0; rx_flit.vc = 1; rx_flit.head = 1;
      rx_flit.data = {5'd0, PC_RESULT, 10'(len), 5'd9, 8'd0};
      @(negedge clk); rx_flit.head = 0; rx_flit.data = 0;
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        rd_ready = $urandom_range(0, 1);
        rx_flit.data = $urandom; rx_flit.tail = (w == len - 1);
        exprd.push_back(rx_flit.data); explast.push_back(rx_flit.tail);
        #1; while (!rx_ready[1]) begin @(negedge clk); rd_ready = 1; #1; end
      end
      @(negedge clk); rx_flit = '0; rx_valid = 1; rx_flit.head = 1; rx_flit.tail = 1;  // IL flit
      @(negedge clk); rx_valid = 0; rd_ready = 1;
    end
    repeat (5) @(negedge clk);
    check(exprd.size() == 0, "all words received");
    check(il_dropped == 10, "interleaver flits dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
