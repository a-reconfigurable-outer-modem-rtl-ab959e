// tb_ildil: loads random interleave and deinterleave tables, feeds bursts of
// extrinsic values (one per cycle, as the core produces them) and drains the
// flits with random back-pressure.  Each flit must be a single-flit packet on
// the interleaver channel whose target node and address come from the table
// selected for that value, carrying the value and the bank bit, in the order
// the values went in.  'idle' must return when everything is sent.
module tb_ildil;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic tab_we, in_valid, in_bank, in_sel, out_valid, out_ready, idle;
  logic [ADDR_W:0] tab_addr;
  logic [NODE_W+ADDR_W-1:0] tab_wdata;
  logic [ADDR_W-1:0] in_idx;
  logic signed [SMW-1:0] in_val;
  flit_t out_flit;
  ildil dut (.clk, .rst_n, .tab_we, .tab_addr, .tab_wdata, .in_valid, .in_idx, .in_val, .in_bank,
             .in_sel, .out_valid, .out_flit, .out_ready, .idle);
  int checks = 0, failures = 0;
  logic [NODE_W+ADDR_W-1:0] tabm [2048];
  logic [31:0] expq [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [31:0] e;
    checks++;
    e = expq.pop_front();
    if (out_flit.data != e || out_flit.vc != VC_IL || !out_flit.head || !out_flit.tail) begin
      failures++; $display("FAIL flit %h expected %h", out_flit.data, e);
    end
  end

  initial begin
    tab_we = 0; in_valid = 0; out_ready = 0; tab_addr = 0; tab_wdata = 0;
    in_idx = 0; in_val = 0; in_bank = 0; in_sel = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); tab_we = 1; tab_addr = 11'(a); tab_wdata = 15'($urandom); tabm[a] = tab_wdata;
    end
    @(negedge clk); tab_we = 0;
    fork
      forever begin @(negedge clk); out_ready = ($urandom_range(0, 2) != 0); end
    join_none
    for (int burst = 0; burst < 20; burst++) begin
      for (int n = 0; n < 64; n++) begin
        logic [NODE_W+ADDR_W-1:0] t;
        @(negedge clk);
        in_valid = 1; in_idx = 10'($urandom); in_val = 16'($urandom); in_bank = 1'($urandom);
        in_sel = 1'($urandom);
        t = tabm[{in_sel, in_idx}];
        expq.push_back({t[14:10], in_bank, t[9:0], in_val});
      end
      @(negedge clk); in_valid = 0;
      wait (idle);
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL %0d flits missing", expq.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
