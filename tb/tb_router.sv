// tb_router: random traffic through one router (position x=1, y=1).
// Each of the five inputs runs two independent streams, one per virtual
// channel: single-flit packets on the interleaver channel, packets of 3..6
// flits on the data channel, to random targets (including IO targets).
// Outputs apply random back-pressure per virtual channel.  Checked: every
// flit leaves through the port given by x-then-y routing, flits of one
// stream stay in order, a data-channel packet is never interleaved with
// another packet on the same output virtual channel, and all flits arrive.
// Also counted: cycles where both virtual channels use one output in the
// middle of a data packet, and stalls caused by a full queue.
module tb_router;
  import omp_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid [5], out_valid [5];
  flit_t in_flit [5], out_flit [5];
  logic [1:0] in_ready [5], out_ready [5];
  router #(.X(1), .Y(1)) dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit,
                              .out_ready);
  int checks = 0, failures = 0;
  localparam int NPK = 60;

  function automatic int xy(input node_t n);
    if (n.x > 1) return 2; if (n.x < 1) return 4;
    if (n.y > 1) return 3; if (n.y < 1) return 1;
    return n.io ? 2 : 0;
  endfunction

  // stream state per input and VC
  int pk_left [5][2];   // packets left to send
  int fl_left [5][2];   // flits left in current packet
  int seq     [5][2];   // next flit sequence number
  int port_of [5][2][int];  // expected port of flit seq
  int rx_seq  [5][2];   // next expected sequence at the output
  node_t cur_dst [5][2];
  int owner [5][2];     // output, vc -> source*2+vc+1 while a packet is open (0 = none)
  int total_tx = 0, total_rx = 0, vc_mix = 0, stalls = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive
  initial begin
    for (int i = 0; i < 5; i++) begin
      in_valid[i] = 0; in_flit[i] = '0; out_ready[i] = 2'b11;
      for (int v = 0; v < 2; v++) begin
        pk_left[i][v] = NPK; fl_left[i][v] = 0; seq[i][v] = 0; rx_seq[i][v] = 0; owner[i][v] = 0;
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    forever begin
      @(negedge clk);
      for (int o = 0; o < 5; o++) out_ready[o] = 2'($urandom_range(0, 3) | ($urandom_range(0, 1) ? 2'b11 : 2'b00));
      for (int i = 0; i < 5; i++) begin
        int v;
        in_valid[i] = 0;
        v = $urandom_range(0, 1);
        if (pk_left[i][v] == 0 && fl_left[i][v] == 0) v = 1 - v;
        if (pk_left[i][v] == 0 && fl_left[i][v] == 0) continue;
        if (!in_ready[i][v]) begin stalls++; continue; end
        if ($urandom_range(0, 4) == 0) continue;
        in_flit[i] = '0;
        in_flit[i].vc = 1'(v);
        if (fl_left[i][v] == 0) begin
          node_t d;
          d = node_t'($urandom_range(0, 31));
          cur_dst[i][v] = d;
          fl_left[i][v] = (v == 0) ? 1 : $urandom_range(3, 6);
          pk_left[i][v]--;
          in_flit[i].head = 1;
          in_flit[i].data[31:27] = d;
        end
        fl_left[i][v]--;
        in_flit[i].tail = (fl_left[i][v] == 0);
        in_flit[i].data[26:24] = 3'(i);
        in_flit[i].data[15:0] = 16'(seq[i][v]);
        port_of[i][v][seq[i][v]] = xy(cur_dst[i][v]);
        seq[i][v]++;
        in_valid[i] = 1;
        total_tx++;
      end
    end
  end

  // check
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o]) begin
      flit_t f; int s, v, q;
      f = out_flit[o]; s = int'(f.data[26:24]); v = int'(f.vc); q = int'(f.data[15:0]);
      total_rx++;
      checks++;
      if (!out_ready[o][v]) begin failures++; $display("FAIL sent without ready"); end
      if (port_of[s][v][q] != o || rx_seq[s][v] != q) begin
        failures++;
        $display("FAIL flit src %0d vc %0d seq %0d at port %0d (exp port %0d seq %0d)",
                 s, v, q, o, port_of[s][v][q], rx_seq[s][v]);
      end
      rx_seq[s][v] = q + 1;
      if (v == 1) begin
        if (f.head) begin
          if (owner[o][1] != 0) begin failures++; $display("FAIL packets interleaved"); end
          owner[o][1] = s + 1;
        end else if (owner[o][1] != s + 1) begin
          failures++; $display("FAIL body flit of a foreign packet");
        end
        if (f.tail) owner[o][1] = 0;
      end else if (owner[o][1] != 0) vc_mix++;
    end
  end

  initial begin
    int idle;
    @(posedge rst_n);
    idle = 0;
    while (idle < 50) begin
      @(posedge clk);
      idle = (total_rx == total_tx) ? idle + 1 : 0;
      for (int i = 0; i < 5; i++) for (int v = 0; v < 2; v++)
        if (pk_left[i][v] != 0 || fl_left[i][v] != 0) idle = 0;
    end
    checks++;
    if (total_rx != total_tx) begin failures++; $display("FAIL %0d of %0d flits", total_rx, total_tx); end
    $display("flits %0d, vc multiplexed cycles %0d, input stalls %0d", total_rx, vc_mix, stalls);
    checks++; if (vc_mix == 0) begin failures++; $display("FAIL no VC multiplexing seen"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
