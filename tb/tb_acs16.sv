// tb_acs16: checks the 16 add-compare-select lanes with random operands in
// Viterbi (max) and Log-MAP (max*) mode against a reference written here,
// including the decision bit; operands are kept far from the modulo-2^16
// wrap region except in a block of tests that crosses it on purpose.
module tb_acs16;
  import omp_pkg::*;
  logic logmap;
  logic signed [SMW-1:0] m0 [PAR], g0 [PAR], m1 [PAR], g1 [PAR], out [PAR];
  logic [PAR-1:0] dec;
  acs16 dut (.logmap, .m0, .g0, .m1, .g1, .out, .dec);
  int checks = 0, failures = 0;

  function automatic int tcorr(input int d);
    if (d < 1) return 3; if (d < 4) return 2; if (d < 9) return 1; return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      int base;
      logmap = it[0];
      base = (it >= 300) ? 32700 : 0;    // last tests wrap around +2^15
      for (int k = 0; k < PAR; k++) begin
        m0[k] = 16'(base + $signed($urandom_range(0, 2000)) - 1000);
        m1[k] = 16'(base + $signed($urandom_range(0, 2000)) - 1000);
        g0[k] = 16'($urandom_range(0, 30));
        g1[k] = (k % 4 == 0) ? m0[k] + g0[k] - m1[k] + 16'($urandom_range(0, 6)) - 16'd3
                             : 16'($urandom_range(0, 30));
      end
      #1;
      for (int k = 0; k < PAR; k++) begin
        int a, b, mx, e;
        bit d;
        a = int'(m0[k]) + int'(g0[k]);
        b = int'(m1[k]) + int'(g1[k]);
        // unwrap b relative to a
        while (b - a > 32767) b -= 65536;
        while (a - b > 32767) b += 65536;
        d  = (b > a);
        mx = d ? b : a;
        e  = logmap ? mx + tcorr(d ? b - a : a - b) : mx;
        checks++;
        if (out[k] != 16'(e) || dec[k] != d) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: out %0d exp %0d dec %0d exp %0d",
                                      k, out[k], 16'(e), dec[k], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
