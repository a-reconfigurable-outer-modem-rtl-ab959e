// net_if: network interface of a dr-ASIP node.
//
// Connects the node to the local port of its router and lets the network
// reach every node memory, as in the node architecture.
// Receive side:
//  * interleaver virtual channel: each single-flit packet writes its
//    extrinsic value into IO memory 'bank' at the carried address (always
//    accepted, one per cycle);
//  * data virtual channel: two header flits (target, class, length / local
//    address) followed by 'length' payload flits.  By class, the payload is
//    written to the CV memory, an IO memory (low 16 bits), the shadow code
//    configuration (address 15 = swap to the shadow set), the IL/DIL table, or
//    handed over as command words.  A command waits in a one-entry register;
//    while it is occupied further command flits are back-pressured.
// Send side: interleaver flits from the IL/DIL unit, and result packets for
// OP_SEND commands (header, header, 'len' words of an IO memory, one per
// flit).  A SEND is started only when the core is idle, so it follows the
// decoding command before it.  The two virtual channels share the link;
// when both have a flit and room downstream they alternate.
// The two packet types and their header contents follow the platform
// description; field layout and classes are this design's (see omp_pkg).
// Flow control on both links: valid plus one ready per virtual channel; a
// flit moves when valid and the ready of its channel are high.
module net_if import omp_pkg::*; (
  input  logic                  clk,
  input  logic                  rst_n,
  input  node_t                 my_node,
  // to router
  output logic                  tx_valid,
  output flit_t                 tx_flit,
  input  logic [1:0]            tx_ready,
  // from router
  input  logic                  rx_valid,
  input  flit_t                 rx_flit,
  output logic [1:0]            rx_ready,
  // CV memory port B (write only)
  output logic                  cv_en,
  output logic [ADDR_W-1:0]     cv_addr,
  output logic [31:0]           cv_wdata,
  // IO memories port B
  output logic                  io_en,
  output logic                  io_we,
  output logic                  io_bank,
  output logic [ADDR_W-1:0]     io_addr,
  output logic [IOW-1:0]        io_wdata,
  input  logic [IOW-1:0]        io_rdata0,
  input  logic [IOW-1:0]        io_rdata1,
  // shadow configuration
  output logic                  cfg_we,
  output logic [3:0]            cfg_addr,
  output logic [15:0]           cfg_wdata,
  output logic                  cfg_swap,
  // IL/DIL table
  output logic                  tab_we,
  output logic [ADDR_W:0]       tab_addr,
  output logic [NODE_W+ADDR_W-1:0] tab_wdata,
  // core commands
  output logic                  cmd_valid,
  output cmd_t                  cmd,
  input  logic                  core_ready,
  // interleaver flits from IL/DIL
  input  logic                  il_valid,
  input  flit_t                 il_flit,
  output logic                  il_ready
);
  // ---------------- receive ----------------
  typedef enum logic [1:0] {R_H0, R_H1, R_PAY} rst_e;
  rst_e            rs;
  pclass_e         cls;
  logic [ADDR_W-1:0] rlen, rcnt, raddr;
  logic            pend_v;
  cmd_t            pend;
  logic            rx_il, rx_dat;

  assign rx_ready[VC_IL]   = 1'b1;
  assign rx_ready[VC_DATA] = !(rs == R_PAY && cls == PC_CMD && pend_v);
  assign rx_il  = rx_valid && rx_flit.vc == VC_IL;
  assign rx_dat = rx_valid && rx_flit.vc == VC_DATA && rx_ready[VC_DATA];

  logic rx_pay;
  assign rx_pay = rx_dat && rs == R_PAY;

  always_comb begin
    cv_en = rx_pay && cls == PC_CV;
    cv_addr = raddr + rcnt;
    cv_wdata = rx_flit.data;
    cfg_we = rx_pay && cls == PC_CFG && (raddr + rcnt) != ADDR_W'(15);
    cfg_swap = rx_pay && cls == PC_CFG && (raddr + rcnt) == ADDR_W'(15);
    cfg_addr = 4'(raddr + rcnt);
    cfg_wdata = rx_flit.data[15:0];
    tab_we = rx_pay && cls == PC_ILTAB;
    tab_addr = (ADDR_W+1)'({rx_flit.data[31], raddr + rcnt});
    tab_wdata = rx_flit.data[NODE_W+ADDR_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_H0; cls <= PC_CV; rlen <= '0; rcnt <= '0; raddr <= '0;
    end else if (rx_dat) begin
      case (rs)
        R_H0: begin
          cls  <= pclass_e'(rx_flit.data[26:23]);
          rlen <= rx_flit.data[22:13];
          rs   <= R_H1;
        end
        R_H1: begin raddr <= rx_flit.data[ADDR_W-1:0]; rcnt <= '0; rs <= R_PAY; end
        R_PAY: begin
          rcnt <= rcnt + 1'b1;
          if (rx_flit.tail || rcnt == rlen - 1'b1) rs <= R_H0;
        end
        default: rs <= R_H0;
      endcase
    end
  end

  // ---------------- commands ----------------
  typedef enum logic [2:0] {T_IDLE, T_H0, T_H1, T_RD, T_WT, T_DAT} tst_e;
  tst_e              ts;
  cmd_t              scmd;
  logic [ADDR_W-1:0] scnt;
  logic [IOW-1:0]    sword;
  logic              send_go;

  assign cmd       = pend;
  assign cmd_valid = pend_v && pend.op != OP_SEND;
  assign send_go   = pend_v && pend.op == OP_SEND && ts == T_IDLE && core_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v <= 1'b0; pend <= '0;
    end else begin
      if ((cmd_valid && core_ready) || send_go) pend_v <= 1'b0;
      if (rx_pay && cls == PC_CMD) begin pend_v <= 1'b1; pend <= cmd_t'(rx_flit.data); end
    end
  end

  // ---------------- IO memory port B ----------------
  logic rx_io_wr;
  assign rx_io_wr = rx_il || (rx_pay && (cls == PC_IOMEM0 || cls == PC_IOMEM1));
  always_comb begin
    io_en = 1'b0; io_we = 1'b0; io_bank = 1'b0; io_addr = '0; io_wdata = '0;
    if (rx_il) begin
      io_en = 1'b1; io_we = 1'b1; io_bank = rx_flit.data[26];
      io_addr = rx_flit.data[25:16]; io_wdata = rx_flit.data[15:0];
    end else if (rx_io_wr) begin
      io_en = 1'b1; io_we = 1'b1; io_bank = (cls == PC_IOMEM1);
      io_addr = raddr + rcnt; io_wdata = rx_flit.data[15:0];
    end else if (ts == T_RD) begin
      io_en = 1'b1; io_bank = scmd.bank; io_addr = scnt;
    end
  end

  // ---------------- send ----------------
  logic  d_valid;
  flit_t d_flit;
  logic  d_go, i_go, rr;

  always_comb begin
    d_valid = (ts == T_H0 || ts == T_H1 || ts == T_DAT);
    d_flit.vc = VC_DATA;
    d_flit.head = (ts == T_H0);
    d_flit.tail = (ts == T_DAT && scnt == scmd.len - 1'b1);
    case (ts)
      T_H0:    d_flit.data = {scmd.base[NODE_W-1:0], PC_RESULT, scmd.len, my_node, 8'd0};
      T_H1:    d_flit.data = '0;
      default: d_flit.data = {16'd0, sword};
    endcase
  end

  always_comb begin
    logic dc, ic;
    dc = d_valid && tx_ready[VC_DATA];
    ic = il_valid && tx_ready[VC_IL];
    d_go = dc && (!ic || rr);
    i_go = ic && !d_go;
    tx_valid = d_go || i_go;
    tx_flit  = d_go ? d_flit : il_flit;
    il_ready = i_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; scmd <= '0; scnt <= '0; sword <= '0; rr <= 1'b0;
    end else begin
      if (d_go) rr <= 1'b0;
      else if (i_go) rr <= 1'b1;
      case (ts)
        T_IDLE: if (send_go && pend.len != 0) begin scmd <= pend; scnt <= '0; ts <= T_H0; end
        T_H0:   if (d_go) ts <= T_H1;
        T_H1:   if (d_go) ts <= T_RD;
        T_RD:   if (!rx_io_wr) ts <= T_WT;
        T_WT:   begin sword <= scmd.bank ? io_rdata1 : io_rdata0; ts <= T_DAT; end
        T_DAT:  if (d_go) begin
                  if (scnt == scmd.len - 1'b1) ts <= T_IDLE;
                  else begin scnt <= scnt + 1'b1; ts <= T_RD; end
                end
        default: ts <= T_IDLE;
      endcase
    end
  end
endmodule
