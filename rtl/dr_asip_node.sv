// dr_asip_node: one processing node of the platform.
//
// The decoder core, its channel-code control (working and shadow sets), the
// channel value memory, two IO memories, the interleaver / deinterleaver unit
// and the network interface, wired as in the node architecture: the core and
// the network interface both reach every memory (port A core, port B
// network); extrinsic values leave the core through the IL/DIL unit, which
// turns them into single-flit interleaver packets for the network interface.
// In turbo decoding one IO memory holds the a-priori values of the current
// half-iteration and is read by the core, while the other receives the new
// extrinsic values from the network for the next one; the command chooses
// the banks, so the roles swap from one half-iteration to the next.
// Interface: the local link of the router (valid, flit, ready per virtual
// channel in each direction).  Memory sizes: 1024 words each (CV: 32 bits,
// IO: 16 bits); the platform leaves these sizes to the application.
module dr_asip_node import omp_pkg::*; #(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       tx_valid,
  output flit_t      tx_flit,
  input  logic [1:0] tx_ready,
  input  logic       rx_valid,
  input  flit_t      rx_flit,
  output logic [1:0] rx_ready,
  output logic       core_done
);
  node_t my_node;
  assign my_node = '{io: 1'b0, y: YW'(Y), x: XW'(X)};

  code_cfg_t work, shadow;
  logic [3:0] mem_m;
  logic [4:0] n_groups;
  logic cfg_we, cfg_swap;
  logic [3:0] cfg_addr;
  logic [15:0] cfg_wdata;

  logic cmd_valid, cmd_ready;
  cmd_t cmd;

  logic cva_en, cvb_en;
  logic [ADDR_W-1:0] cva_addr, cvb_addr;
  logic [31:0] cva_rdata, cvb_wdata, cvb_rdata;

  logic ioa_en, ioa_we, ioa_bank, iob_en, iob_we, iob_bank;
  logic [ADDR_W-1:0] ioa_addr, iob_addr;
  logic [IOW-1:0] ioa_wdata, iob_wdata, ioa_r0, ioa_r1, iob_r0, iob_r1;

  logic ext_valid, ext_bank, ext_sel, ext_idle;
  logic [ADDR_W-1:0] ext_idx;
  logic signed [SMW-1:0] ext_val;
  logic tab_we;
  logic [ADDR_W:0] tab_addr;
  logic [NODE_W+ADDR_W-1:0] tab_wdata;
  logic il_valid, il_ready;
  flit_t il_flit;

  code_ctrl u_cc (.clk(clk), .rst_n(rst_n), .wr_en(cfg_we), .wr_addr(cfg_addr),
                  .wr_data(cfg_wdata), .swap(cfg_swap), .work(work), .shadow(shadow),
                  .mem_m(mem_m), .n_groups(n_groups));

  dr_asip_core u_core (
    .clk(clk), .rst_n(rst_n), .cfg(work), .mem_m(mem_m), .n_groups(n_groups),
    .cmd_valid(cmd_valid), .cmd(cmd), .cmd_ready(cmd_ready), .done(core_done),
    .cv_en(cva_en), .cv_addr(cva_addr), .cv_rdata(cva_rdata),
    .io_en(ioa_en), .io_we(ioa_we), .io_bank(ioa_bank), .io_addr(ioa_addr),
    .io_wdata(ioa_wdata), .io_rdata0(ioa_r0), .io_rdata1(ioa_r1),
    .ext_idle(ext_idle), .ext_valid(ext_valid), .ext_idx(ext_idx), .ext_val(ext_val),
    .ext_bank(ext_bank), .ext_sel(ext_sel));

  dp_ram #(.WIDTH(32), .DEPTH(1 << ADDR_W)) u_cv (
    .clk(clk),
    .a_en(cva_en), .a_we(1'b0), .a_addr(cva_addr), .a_wdata('0), .a_rdata(cva_rdata),
    .b_en(cvb_en), .b_we(1'b1), .b_addr(cvb_addr), .b_wdata(cvb_wdata), .b_rdata(cvb_rdata));

  dp_ram #(.WIDTH(IOW), .DEPTH(1 << ADDR_W)) u_io0 (
    .clk(clk),
    .a_en(ioa_en && !ioa_bank), .a_we(ioa_we), .a_addr(ioa_addr), .a_wdata(ioa_wdata), .a_rdata(ioa_r0),
    .b_en(iob_en && !iob_bank), .b_we(iob_we), .b_addr(iob_addr), .b_wdata(iob_wdata), .b_rdata(iob_r0));

  dp_ram #(.WIDTH(IOW), .DEPTH(1 << ADDR_W)) u_io1 (
    .clk(clk),
    .a_en(ioa_en && ioa_bank), .a_we(ioa_we), .a_addr(ioa_addr), .a_wdata(ioa_wdata), .a_rdata(ioa_r1),
    .b_en(iob_en && iob_bank), .b_we(iob_we), .b_addr(iob_addr), .b_wdata(iob_wdata), .b_rdata(iob_r1));

  ildil u_il (.clk(clk), .rst_n(rst_n), .tab_we(tab_we), .tab_addr(tab_addr),
              .tab_wdata(tab_wdata), .in_valid(ext_valid), .in_idx(ext_idx), .in_val(ext_val),
              .in_bank(ext_bank), .in_sel(ext_sel), .out_valid(il_valid), .out_flit(il_flit),
              .out_ready(il_ready), .idle(ext_idle));

  net_if u_ni (
    .clk(clk), .rst_n(rst_n), .my_node(my_node),
    .tx_valid(tx_valid), .tx_flit(tx_flit), .tx_ready(tx_ready),
    .rx_valid(rx_valid), .rx_flit(rx_flit), .rx_ready(rx_ready),
    .cv_en(cvb_en), .cv_addr(cvb_addr), .cv_wdata(cvb_wdata),
    .io_en(iob_en), .io_we(iob_we), .io_bank(iob_bank), .io_addr(iob_addr),
    .io_wdata(iob_wdata), .io_rdata0(iob_r0), .io_rdata1(iob_r1),
    .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_swap(cfg_swap),
    .tab_we(tab_we), .tab_addr(tab_addr), .tab_wdata(tab_wdata),
    .cmd_valid(cmd_valid), .cmd(cmd), .core_ready(cmd_ready),
    .il_valid(il_valid), .il_flit(il_flit), .il_ready(il_ready));
endmodule
