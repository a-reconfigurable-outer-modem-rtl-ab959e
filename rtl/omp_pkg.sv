// omp_pkg: types and constants shared by the outer-modem platform.
//
// The platform is a 2D mesh of decoder processors (dr-ASIP nodes) joined by a
// packet-switched network.  This package fixes the mesh size (4 x 4, sixteen
// cores, as in the platform's main configuration), the flit format of the two
// packet types, the channel-code configuration record and the arithmetic used
// by the trellis units (max for Viterbi, max* for Log-MAP).
//
// Flit: {vc, head, tail, data[31:0]}.  Virtual channel 0 carries single-flit
// interleaver packets, virtual channel 1 the variable-length data packets.
// The 32-bit flit payload width (four 8-bit channel values) and every field
// position below are this design's choices.
//
//   interleaver flit data : [31:27] target node, [26] IO-memory bank,
//                           [25:16] local address, [15:0] extrinsic value
//   data packet, flit 0   : [31:27] target node, [26:23] class,
//                           [22:13] payload length in flits, [12:8] source node
//   data packet, flit 1   : [9:0] local address
//   then 'length' payload flits.
//
// Node address: {io, y[1:0], x[1:0]}; io = 1 addresses the IO interface on
// the boundary router (x,y).
//
// Metric arithmetic: metrics are 16-bit two's complement and are compared
// modulo 2^16 (sign of the difference), so no normalisation is needed as long
// as the spread of the metrics in one trellis step stays below 2^15.
// Channel values and extrinsic values are log-likelihood ratios in units of
// 1/4 nat; positive means "bit = 1 more likely".  The Log-MAP correction
// term ln(1+exp(-|d|)) is a four-step table in the same units.
package omp_pkg;

  localparam int MESH_X = 4;
  localparam int MESH_Y = 4;
  localparam int XW     = 2;
  localparam int YW     = 2;
  localparam int NODE_W = 1 + YW + XW;

  localparam int CVW    = 8;    // channel value width
  localparam int NCV    = 4;    // channel values per information bit (max)
  localparam int SMW    = 16;   // state / path metric width
  localparam int PAR    = 16;   // state metrics computed in parallel
  localparam int MMAX   = 8;    // max memory of the code (Kc = 9)
  localparam int ADDR_W = 10;   // local CV / IO memory address width
  localparam int IOW    = 16;   // IO memory word width
  localparam int SMM_DEPTH = 64; // state metric memory words (window size 64)

  localparam logic signed [SMW-1:0] M_INIT = -16'sd1024; // metric of unreachable start states

  typedef enum logic { VC_IL = 1'b0, VC_DATA = 1'b1 } vc_e;

  typedef struct packed {
    logic        vc;
    logic        head;
    logic        tail;
    logic [31:0] data;
  } flit_t;

  typedef struct packed {
    logic          io;
    logic [YW-1:0] y;
    logic [XW-1:0] x;
  } node_t;

  typedef enum logic [3:0] {
    PC_CV     = 4'd0,  // write channel value memory
    PC_IOMEM0 = 4'd1,  // write IO memory 0
    PC_IOMEM1 = 4'd2,  // write IO memory 1
    PC_CFG    = 4'd3,  // write shadow code configuration (address 15: swap)
    PC_ILTAB  = 4'd4,  // write IL/DIL mapping table
    PC_CMD    = 4'd5,  // command word(s) for the node
    PC_RESULT = 4'd6   // results sent by a node
  } pclass_e;

  typedef enum logic [1:0] { OP_VA = 2'd0, OP_MAP = 2'd1, OP_SEND = 2'd2, OP_MAPB = 2'd3 } op_e;

  // Command word (payload of a PC_CMD packet)
  typedef struct packed {
    op_e          op;       // [31:30]
    logic         bank;     // [29] MAP: a-priori bank; SEND: bank to send
    logic         il_sel;   // [28] MAP: 0 = interleave table, 1 = deinterleave table
    logic         ext_bank; // [27] MAP: IO-memory bank written at the target
    logic         a_open;   // [26] MAP: alpha starts with all states equal
    logic [ADDR_W-1:0] len; // [25:16] trellis steps (VA, MAP) or words (SEND)
    logic [5:0]   acq;      // [15:10] MAP: backward acquisition steps after the window
    logic [ADDR_W-1:0] base;// [9:0] MAP: global index of step 0; SEND: [4:0] target node
  } cmd_t;

  // Channel code configuration (one set of the working / shadow pair)
  typedef struct packed {
    logic [3:0]      k;       // constraint length Kc, 3..9
    logic [2:0]      ncv;     // channel values per information bit, 1..4
    logic [8:0]      fb;      // feedback polynomial, bit j taps register j (bit 0 unused)
    logic [3:0][8:0] gen;     // generator polynomials, bit 0 taps the register input
    logic            sys_en;  // a channel value is systematic (subtracted for extrinsic)
    logic [1:0]      sys_idx; // which one
  } code_cfg_t;

  // Log-MAP correction ln(1+exp(-d)), d and result in 1/4 nat
  function automatic logic [SMW-1:0] corr(input logic [SMW-1:0] d);
    if (d == 0)      return 3;
    else if (d < 4)  return 2;
    else if (d < 9)  return 1;
    else             return 0;
  endfunction

  // max (lm = 0) or max* (lm = 1) with modulo comparison
  function automatic logic signed [SMW-1:0] max_star(input logic signed [SMW-1:0] a,
                                                     input logic signed [SMW-1:0] b,
                                                     input logic lm);
    logic signed [SMW-1:0] d, mx;
    logic [SMW-1:0] ad;
    d  = a - b;
    mx = d[SMW-1] ? b : a;
    ad = d[SMW-1] ? -d : d;
    return lm ? mx + $signed(corr(ad)) : mx;
  endfunction

  function automatic logic signed [SMW-1:0] sext_cv(input logic [CVW-1:0] v);
    return SMW'($signed(v));
  endfunction

endpackage
