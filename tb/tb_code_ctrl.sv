// tb_code_ctrl: checks the working / shadow configuration pair: reset value,
// shadow writes leave the working set untouched, a swap makes the shadow set
// the working set in one cycle, and the derived memory and group count.
module tb_code_ctrl;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, swap;
  logic [3:0] wr_addr;
  logic [15:0] wr_data;
  code_cfg_t work, shadow;
  logic [3:0] mem_m;
  logic [4:0] n_groups;
  code_ctrl dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .swap, .work, .shadow, .mem_m, .n_groups);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input int a, input int d);
    @(negedge clk); wr_en = 1; wr_addr = 4'(a); wr_data = 16'(d);
    @(negedge clk); wr_en = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_cfg_t prev_work;
    wr_en = 0; swap = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(work.k == 4 && work.ncv == 2 && work.fb == 9'b1100 && work.gen[1] == 9'b1011,
          "reset configuration");
    check(mem_m == 3 && n_groups == 1, "derived values Kc=4");
    for (int k = 3; k <= 9; k++) begin
      prev_work = work;
      wr(0, (3 << 4) | k);
      wr(1, 0);
      wr(2, 'o557); wr(3, 'o663); wr(4, 'o711); wr(5, k); wr(6, 4'b0110);
      check(work == prev_work, "working set unchanged by shadow writes");
      check(shadow.k == 4'(k) && shadow.ncv == 3 && shadow.gen[0] == 9'o557 &&
            shadow.gen[2] == 9'o711 && shadow.gen[3] == 9'(k) && shadow.sys_en &&
            shadow.sys_idx == 2 && shadow.fb == 0, "shadow contents");
      @(negedge clk); swap = 1;
      @(posedge clk); #1;
      check(work == shadow, "swap in one cycle");
      @(negedge clk); swap = 0;
      check(mem_m == 4'(k - 1), "memory");
      check(n_groups == ((k <= 5) ? 1 : (1 << (k - 5))), $sformatf("groups for Kc=%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
