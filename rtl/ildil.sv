// ildil: interleaver / deinterleaver unit.
//
// Every extrinsic value the core produces carries the global index of its
// trellis step.  This unit maps that source index through a permutation table
// to the target of the value in the (de)interleaved order: the node that
// decodes that position next and the local address there.  It then forms the
// single-flit interleaver packet, which the network interface sends on the
// interleaver virtual channel.  Two tables (interleave / deinterleave, chosen
// per value by 'sel') of 2^ADDR_W entries each are loaded through the table
// write port.  Mapping source to target address in the node and leaving the
// distribution to the network follows the platform description; table
// organisation, queue depth and flit layout are this design's choices.
// Timing: values are queued (depth 64, one full window, so the core never
// waits); the head of the queue is looked up and presented as a registered
// flit one cycle later; out_valid / out_ready handshake.  'idle' is high when
// nothing is queued or pending.
module ildil import omp_pkg::*; #(
  parameter int QDEPTH = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // table write
  input  logic                  tab_we,
  input  logic [ADDR_W:0]       tab_addr,   // {sel, index}
  input  logic [NODE_W+ADDR_W-1:0] tab_wdata, // {node, address}
  // extrinsic values from the core
  input  logic                  in_valid,
  input  logic [ADDR_W-1:0]     in_idx,
  input  logic signed [SMW-1:0] in_val,
  input  logic                  in_bank,
  input  logic                  in_sel,
  // interleaver flits
  output logic                  out_valid,
  output flit_t                 out_flit,
  input  logic                  out_ready,
  output logic                  idle
);
  logic [NODE_W+ADDR_W-1:0] tab [2**(ADDR_W+1)];
  localparam int QW = 2 + ADDR_W + SMW;
  logic [QW-1:0] qhead;
  logic          qfull, qempty, pop;
  logic          hsel, hbank;
  logic [ADDR_W-1:0] hidx;
  logic [SMW-1:0]    hval;
  logic [NODE_W+ADDR_W-1:0] ent;

  vc_fifo #(.WIDTH(QW), .DEPTH(QDEPTH)) u_q (
    .clk(clk), .rst_n(rst_n), .push(in_valid), .din({in_sel, in_bank, in_idx, in_val}),
    .pop(pop), .head(qhead), .full(qfull), .empty(qempty));

  assign {hsel, hbank, hidx, hval} = qhead;
  assign pop = !qempty && (!out_valid || out_ready);
  assign idle = qempty && !out_valid;

  always_ff @(posedge clk)
    if (tab_we) tab[tab_addr] <= tab_wdata;

  assign ent = tab[{hsel, hidx}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_flit <= '0;
    end else if (!out_valid || out_ready) begin
      out_valid <= pop;
      if (pop) begin
        out_flit.vc   <= VC_IL;
        out_flit.head <= 1'b1;
        out_flit.tail <= 1'b1;
        out_flit.data <= {ent[NODE_W+ADDR_W-1:ADDR_W], hbank, ent[ADDR_W-1:0], hval};
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && qfull))
    else $error("ildil: extrinsic queue overflow");
endmodule
