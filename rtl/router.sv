// router: five-port mesh router with two virtual channels.
//
// Ports: 0 local (network interface), 1 north (y-1), 2 east (x+1),
// 3 south (y+1), 4 west (x-1).  Every input port has one queue per virtual
// channel (interleaver traffic and data traffic), so the two traffic classes
// are independent virtual networks; a crossbar multiplexes both virtual
// channels of all inputs onto each physical output channel.
// Routing is dimension order (first x, then y).  At the target router a flit
// leaves through the local port, or, if the io bit of its target is set,
// through the west port (router in column 0) or the east port (otherwise),
// where the IO interfaces sit on the mesh boundary.
// Switching: single-flit packets are routed one by one; a multi-flit packet
// locks its output virtual channel from head to tail (wormhole), so flits of
// two packets never mix within one virtual channel, while the other virtual
// channel may still use the same physical link in between.
// Each output grants one of the ten input queues per cycle, round robin.
// Flow control: valid plus one ready per virtual channel, ready = the
// downstream queue of that channel is not full.  A flit passes a router in
// one cycle after it is queued.  Two queues, the crossbar and the 2D mesh
// follow the platform description; queue depth, routing function, arbitration
// and flow control are this design's choices.
module router import omp_pkg::*; #(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid  [5],
  input  flit_t       in_flit   [5],
  output logic [1:0]  in_ready  [5],
  output logic        out_valid [5],
  output flit_t       out_flit  [5],
  input  logic [1:0]  out_ready [5]
);
  localparam int P_L = 0, P_N = 1, P_E = 2, P_S = 3, P_W = 4;

  flit_t       qh    [5][2];
  logic        qfull [5][2];
  logic        qemp  [5][2];
  logic        qpop  [5][2];
  logic [2:0]  cur   [5][2];   // output of the packet in progress at an input queue
  logic [2:0]  dest  [5][2];
  logic        olock [5][2];   // output virtual channel held by a packet
  logic [3:0]  rrp   [5];      // round-robin pointer per output
  logic [3:0]  gsel  [5];
  logic        gval  [5];

  function automatic logic [2:0] route(input logic [31:0] d);
    node_t n;
    n = node_t'(d[31:27]);
    if (int'(n.x) > X)      return 3'(P_E);
    else if (int'(n.x) < X) return 3'(P_W);
    else if (int'(n.y) > Y) return 3'(P_S);
    else if (int'(n.y) < Y) return 3'(P_N);
    else if (n.io)          return (X == 0) ? 3'(P_W) : 3'(P_E);
    else                    return 3'(P_L);
  endfunction

  for (genvar i = 0; i < 5; i++) begin : g_in
    for (genvar v = 0; v < 2; v++) begin : g_vc
      vc_fifo #(.WIDTH($bits(flit_t)), .DEPTH(DEPTH)) u_q (
        .clk(clk), .rst_n(rst_n),
        .push(in_valid[i] && in_flit[i].vc == 1'(v)), .din(in_flit[i]),
        .pop(qpop[i][v]), .head(qh[i][v]), .full(qfull[i][v]), .empty(qemp[i][v]));
      assign in_ready[i][v] = !qfull[i][v];
    end
  end

  always_comb begin
    for (int i = 0; i < 5; i++)
      for (int v = 0; v < 2; v++)
        dest[i][v] = qh[i][v].head ? route(qh[i][v].data) : cur[i][v];
  end

  // per output: request vector over the ten queues (index 2*i+v), round robin
  always_comb begin
    for (int o = 0; o < 5; o++) begin
      logic [9:0] req;
      gval[o] = 1'b0; gsel[o] = '0;
      for (int i = 0; i < 5; i++)
        for (int v = 0; v < 2; v++)
          req[2*i+v] = !qemp[i][v] && dest[i][v] == 3'(o) && out_ready[o][v] &&
                       (!qh[i][v].head || !olock[o][v]);
      for (int n = 0; n < 10; n++) begin
        int c;
        c = (int'(rrp[o]) + n) % 10;
        if (!gval[o] && req[c]) begin gval[o] = 1'b1; gsel[o] = 4'(c); end
      end
      out_valid[o] = gval[o];
      out_flit[o]  = qh[3'(gsel[o] >> 1)][gsel[o][0]];
    end
    for (int i = 0; i < 5; i++)
      for (int v = 0; v < 2; v++) begin
        qpop[i][v] = 1'b0;
        for (int o = 0; o < 5; o++)
          if (gval[o] && gsel[o] == 4'(2*i+v)) qpop[i][v] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < 5; o++) begin
        rrp[o] <= '0; olock[o][0] <= 1'b0; olock[o][1] <= 1'b0;
      end
      for (int i = 0; i < 5; i++) begin cur[i][0] <= '0; cur[i][1] <= '0; end
    end else begin
      for (int o = 0; o < 5; o++)
        if (gval[o]) begin
          rrp[o] <= (gsel[o] == 4'd9) ? 4'd0 : gsel[o] + 4'd1;
          if (out_flit[o].head && !out_flit[o].tail) begin
            olock[o][gsel[o][0]] <= 1'b1;
            cur[gsel[o][3:1]][gsel[o][0]] <= 3'(o);
          end
          if (out_flit[o].tail && !out_flit[o].head) olock[o][gsel[o][0]] <= 1'b0;
        end
    end
  end

  // a flit in a virtual channel queue belongs to that virtual channel
  for (genvar o = 0; o < 5; o++) begin : g_chk
    a_vc: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid[o] |-> out_ready[o][out_flit[o].vc])
      else $error("router: flit sent without room downstream");
  end
endmodule
