// io_if: IO interface between the environment and a boundary router.
//
// It adapts a simple host-side transfer protocol to the network packet
// format.  To send, the host presents a descriptor (target node, packet
// class, local address, length) and then 'len' 32-bit words on a valid /
// ready stream; the interface emits the two header flits and one payload flit
// per word on the data virtual channel, marking the last as tail.  Packets
// that reach the interface are stripped of their headers: the host sees the
// source node and class of the packet and then its payload words with a
// 'last' marker.  Interleaver flits are not meant for the environment and are
// dropped (counted in 'il_dropped').
// The platform names IO interfaces on the boundary routers that adapt external
// protocols such as OCP or AXI to the network; the host protocol used here is
// this design's own, simpler stand-in for them.
// Timing: one flit per cycle in each direction when the far side is ready.
module io_if import omp_pkg::*; (
  input  logic              clk,
  input  logic              rst_n,
  // host: send
  input  logic              desc_valid,
  output logic              desc_ready,
  input  node_t             desc_dst,
  input  pclass_e           desc_cls,
  input  logic [ADDR_W-1:0] desc_addr,
  input  logic [ADDR_W-1:0] desc_len,
  input  logic              wr_valid,
  input  logic [31:0]       wr_data,
  output logic              wr_ready,
  // host: receive
  output logic              rd_valid,
  output logic [31:0]       rd_data,
  output logic              rd_last,
  output node_t             rd_src,
  output pclass_e           rd_cls,
  input  logic              rd_ready,
  output logic [15:0]       il_dropped,
  // network
  output logic              tx_valid,
  output flit_t             tx_flit,
  input  logic [1:0]        tx_ready,
  input  logic              rx_valid,
  input  flit_t             rx_flit,
  output logic [1:0]        rx_ready
);
  // ---- send ----
  typedef enum logic [1:0] {S_IDLE, S_H0, S_H1, S_PAY} s_e;
  s_e ss;
  node_t             dst_q;
  pclass_e           cls_q;
  logic [ADDR_W-1:0] addr_q, len_q, cnt;

  assign desc_ready = (ss == S_IDLE);
  assign wr_ready   = (ss == S_PAY) && tx_ready[VC_DATA];

  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = '0;
    tx_flit.vc = VC_DATA;
    case (ss)
      S_H0: begin
        tx_valid = 1'b1; tx_flit.head = 1'b1;
        tx_flit.data = {dst_q, cls_q, len_q, 5'd0, 8'd0};
      end
      S_H1: begin tx_valid = 1'b1; tx_flit.data = 32'(addr_q); end
      S_PAY: begin
        tx_valid = wr_valid; tx_flit.data = wr_data; tx_flit.tail = (cnt == len_q - 1'b1);
      end
      default: ;
    endcase
    if (!tx_ready[VC_DATA]) tx_valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss <= S_IDLE; dst_q <= '0; cls_q <= PC_CV; addr_q <= '0; len_q <= '0; cnt <= '0;
    end else case (ss)
      S_IDLE: if (desc_valid && desc_len != 0) begin
        dst_q <= desc_dst; cls_q <= desc_cls; addr_q <= desc_addr; len_q <= desc_len;
        cnt <= '0; ss <= S_H0;
      end
      S_H0: if (tx_valid) ss <= S_H1;
      S_H1: if (tx_valid) ss <= S_PAY;
      S_PAY: if (tx_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == len_q - 1'b1) ss <= S_IDLE;
      end
      default: ss <= S_IDLE;
    endcase
  end

  // ---- receive ----
  typedef enum logic [1:0] {R_H0, R_H1, R_PAY} r_e;
  r_e rs;
  logic [ADDR_W-1:0] rlen, rcnt;
  logic rx_dat;

  assign rx_ready[VC_IL]   = 1'b1;
  assign rx_ready[VC_DATA] = (rs != R_PAY) || rd_ready;
  assign rx_dat  = rx_valid && rx_flit.vc == VC_DATA && rx_ready[VC_DATA];
  assign rd_valid = rx_valid && rx_flit.vc == VC_DATA && rs == R_PAY;
  assign rd_data  = rx_flit.data;
  assign rd_last  = rx_flit.tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_H0; rlen <= '0; rcnt <= '0; rd_src <= '0; rd_cls <= PC_CV; il_dropped <= '0;
    end else begin
      if (rx_valid && rx_flit.vc == VC_IL) il_dropped <= il_dropped + 1'b1;
      if (rx_dat) case (rs)
        R_H0: begin
          rd_src <= node_t'(rx_flit.data[12:8]); rd_cls <= pclass_e'(rx_flit.data[26:23]);
          rlen <= rx_flit.data[22:13]; rs <= R_H1;
        end
        R_H1: begin rcnt <= '0; rs <= R_PAY; end
        R_PAY: begin
          rcnt <= rcnt + 1'b1;
          if (rx_flit.tail || rcnt == rlen - 1'b1) rs <= R_H0;
        end
        default: rs <= R_H0;
      endcase
    end
  end
endmodule
