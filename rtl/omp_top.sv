// omp_top: the application-specific multiprocessor platform.
//
// A MESH_X x MESH_Y (4 x 4) two-dimensional mesh of routers, each with one
// dr-ASIP node on its local port.  Neighbouring routers are joined by a
// channel in each direction.  Two IO interfaces connect the environment to
// the network: IO interface 0 on the west port of router (0,0), IO interface 1
// on the east port of router (MESH_X-1, MESH_Y-1).  Decoding tasks are mapped
// at run time: any node or group of nodes can be loaded with a code, data and
// commands through the IO interfaces, and nodes of a group exchange extrinsic
// values as interleaver packets.  Unused boundary ports are tied off.
// The mesh of sixteen cores with a router per core and IO interfaces on
// boundary routers follows the platform description; the number and position
// of the IO interfaces are this design's choice.
// Ports: per IO interface, the host-side send and receive streams of io_if;
// core_done gives the completion pulse of every node's core (index y*MESH_X+x).
module omp_top import omp_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              desc_valid [2],
  output logic              desc_ready [2],
  input  node_t             desc_dst   [2],
  input  pclass_e           desc_cls   [2],
  input  logic [ADDR_W-1:0] desc_addr  [2],
  input  logic [ADDR_W-1:0] desc_len   [2],
  input  logic              wr_valid   [2],
  input  logic [31:0]       wr_data    [2],
  output logic              wr_ready   [2],
  output logic              rd_valid   [2],
  output logic [31:0]       rd_data    [2],
  output logic              rd_last    [2],
  output node_t             rd_src     [2],
  output pclass_e           rd_cls     [2],
  input  logic              rd_ready   [2],
  output logic [15:0]       il_dropped [2],
  output logic [MESH_X*MESH_Y-1:0] core_done
);
  localparam int NN = MESH_X * MESH_Y;
  // router port signals, index [node][port]
  logic       r_in_v  [NN][5];
  flit_t      r_in_f  [NN][5];
  logic [1:0] r_in_r  [NN][5];
  logic       r_out_v [NN][5];
  flit_t      r_out_f [NN][5];
  logic [1:0] r_out_r [NN][5];

  logic       io_tx_v [2], io_rx_v [2];
  flit_t      io_tx_f [2], io_rx_f [2];
  logic [1:0] io_tx_r [2], io_rx_r [2];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int ID = y * MESH_X + x;
      router #(.X(x), .Y(y)) u_r (
        .clk(clk), .rst_n(rst_n),
        .in_valid(r_in_v[ID]), .in_flit(r_in_f[ID]), .in_ready(r_in_r[ID]),
        .out_valid(r_out_v[ID]), .out_flit(r_out_f[ID]), .out_ready(r_out_r[ID]));

      dr_asip_node #(.X(x), .Y(y)) u_n (
        .clk(clk), .rst_n(rst_n),
        .tx_valid(r_in_v[ID][0]), .tx_flit(r_in_f[ID][0]), .tx_ready(r_in_r[ID][0]),
        .rx_valid(r_out_v[ID][0]), .rx_flit(r_out_f[ID][0]), .rx_ready(r_out_r[ID][0]),
        .core_done(core_done[ID]));

      // north (port 1) <- south output of (x, y-1)
      if (y > 0) begin : g_n
        assign r_in_v[ID][1] = r_out_v[ID-MESH_X][3];
        assign r_in_f[ID][1] = r_out_f[ID-MESH_X][3];
        assign r_out_r[ID][1] = r_in_r[ID-MESH_X][3];
      end else begin : g_nt
        assign r_in_v[ID][1] = 1'b0; assign r_in_f[ID][1] = '0; assign r_out_r[ID][1] = 2'b00;
      end
      // south (port 3) <- north output of (x, y+1)
      if (y < MESH_Y-1) begin : g_s
        assign r_in_v[ID][3] = r_out_v[ID+MESH_X][1];
        assign r_in_f[ID][3] = r_out_f[ID+MESH_X][1];
        assign r_out_r[ID][3] = r_in_r[ID+MESH_X][1];
      end else begin : g_st
        assign r_in_v[ID][3] = 1'b0; assign r_in_f[ID][3] = '0; assign r_out_r[ID][3] = 2'b00;
      end
      // east (port 2) <- west output of (x+1, y); IO interface 1 at the far corner
      if (x < MESH_X-1) begin : g_e
        assign r_in_v[ID][2] = r_out_v[ID+1][4];
        assign r_in_f[ID][2] = r_out_f[ID+1][4];
        assign r_out_r[ID][2] = r_in_r[ID+1][4];
      end else if (y == MESH_Y-1) begin : g_eio
        assign r_in_v[ID][2] = io_tx_v[1];
        assign r_in_f[ID][2] = io_tx_f[1];
        assign io_tx_r[1]    = r_in_r[ID][2];
        assign io_rx_v[1]    = r_out_v[ID][2];
        assign io_rx_f[1]    = r_out_f[ID][2];
        assign r_out_r[ID][2] = io_rx_r[1];
      end else begin : g_et
        assign r_in_v[ID][2] = 1'b0; assign r_in_f[ID][2] = '0; assign r_out_r[ID][2] = 2'b00;
      end
      // west (port 4) <- east output of (x-1, y); IO interface 0 at (0,0)
      if (x > 0) begin : g_w
        assign r_in_v[ID][4] = r_out_v[ID-1][2];
        assign r_in_f[ID][4] = r_out_f[ID-1][2];
        assign r_out_r[ID][4] = r_in_r[ID-1][2];
      end else if (y == 0) begin : g_wio
        assign r_in_v[ID][4] = io_tx_v[0];
        assign r_in_f[ID][4] = io_tx_f[0];
        assign io_tx_r[0]    = r_in_r[ID][4];
        assign io_rx_v[0]    = r_out_v[ID][4];
        assign io_rx_f[0]    = r_out_f[ID][4];
        assign r_out_r[ID][4] = io_rx_r[0];
      end else begin : g_wt
        assign r_in_v[ID][4] = 1'b0; assign r_in_f[ID][4] = '0; assign r_out_r[ID][4] = 2'b00;
      end
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_io
    io_if u_io (
      .clk(clk), .rst_n(rst_n),
      .desc_valid(desc_valid[k]), .desc_ready(desc_ready[k]), .desc_dst(desc_dst[k]),
      .desc_cls(desc_cls[k]), .desc_addr(desc_addr[k]), .desc_len(desc_len[k]),
      .wr_valid(wr_valid[k]), .wr_data(wr_data[k]), .wr_ready(wr_ready[k]),
      .rd_valid(rd_valid[k]), .rd_data(rd_data[k]), .rd_last(rd_last[k]), .rd_src(rd_src[k]),
      .rd_cls(rd_cls[k]), .rd_ready(rd_ready[k]), .il_dropped(il_dropped[k]),
      .tx_valid(io_tx_v[k]), .tx_flit(io_tx_f[k]), .tx_ready(io_tx_r[k]),
      .rx_valid(io_rx_v[k]), .rx_flit(io_rx_f[k]), .rx_ready(io_rx_r[k]));
  end
endmodule
