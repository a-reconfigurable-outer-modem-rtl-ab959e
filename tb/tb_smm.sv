// tb_smm: writes random 16-metric words to the state metric memory, reads
// them back in random order and checks data, the one-cycle read latency and
// that the read data is held while the memory is not enabled.
module tb_smm;
  import omp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [5:0] addr;
  logic [PAR-1:0][SMW-1:0] wdata, rdata;
  logic [PAR-1:0][SMW-1:0] model [64];
  smm dut (.clk, .en, .we, .addr, .wdata, .rdata);
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = '0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 6'(a);
      for (int k = 0; k < PAR; k++) wdata[k] = 16'($urandom);
      model[a] = wdata;
    end
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(0, 63);
      @(negedge clk); en = 1; we = 0; addr = 6'(a);
      @(negedge clk); en = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL read %0d", a); end
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL hold %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
