// tb_dp_ram: random traffic on both ports of the dual-ported RAM (32 x 1024,
// the channel value memory size) against a model: writes from either port,
// reads from either port with one-cycle latency, never both ports writing
// the same address.
module tb_dp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [9:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [1024];
  dp_ram #(.WIDTH(32), .DEPTH(1024)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                         .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb; bit ra, rb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 10'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    ra = 0; rb = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (ra) begin checks++; if (a_rdata != ea) begin failures++; $display("FAIL A"); end end
      if (rb) begin checks++; if (b_rdata != eb) begin failures++; $display("FAIL B"); end end
      a_en = $urandom_range(0, 1); a_we = $urandom_range(0, 1); a_addr = 10'($urandom_range(0, 63));
      b_en = $urandom_range(0, 1); b_we = $urandom_range(0, 1); b_addr = 10'($urandom_range(0, 63));
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
