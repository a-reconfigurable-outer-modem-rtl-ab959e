// dr_asip_core: trellis decoder core of one platform node.
//
// One datapath (branch metric unit, sixteen add-compare-select lanes,
// pipelined LLR unit) and the single-ported state metric memory are shared by
// every operation; the working channel-code configuration (code_ctrl) decides
// how many states, channel values and which polynomials are used, so the
// instructions (here: commands) never carry code parameters.
//
// Commands (omp_pkg::cmd_t, accepted when cmd_ready):
//  OP_VA  : Viterbi decoding of 'len' trellis steps from the channel value
//           memory, starting and ending in state 0.  Codes with up to 16
//           states compute one trellis step per cycle with the metrics in a
//           register.  Larger codes (Kc = 6..9) run in load-store mode: the
//           path metrics live in two banks of the state metric memory, and
//           each group of 16 new states takes 4 cycles (read the 8
//           predecessors "j", read the 8 predecessors "j + N/2", compute,
//           write back), so Kc = 9 takes 16 x 4 cycles per step.  Survivor
//           bits go to IO memory 0 (address t*G + group, G = groups per step).
//           The trace back then follows the survivors from state 0 backwards,
//           2 cycles per step, and writes the decoded bits to IO memory 1,
//           16 per word (bit t%16 of word t/16).
//  OP_MAP : Log-MAP decoding of one window of 'len' <= 64 steps for codes with
//           up to 16 states: forward recursion (alpha stored in the state
//           metric memory, one step per cycle), then backward recursion with
//           the soft output computed in parallel (one step per cycle).
//           A-priori values come from IO memory 'bank'; each extrinsic value
//           leaves on ext_* with its global index base + t, for the IL/DIL unit.
//           alpha starts in state 0, or with all states equal when
//           'a_open' is set (a window that does not begin the block).  With
//           'acq' = A > 0 the backward recursion first runs A acquisition
//           steps over steps len .. len+A-1 (which must be in the memories,
//           len + A <= 1024), starting with all states equal and producing
//           no output, so that beta at the window end is a good estimate.
//           Window length and acquisition length thus come with the command.
//  OP_MAPB: the same window with the recursions in the other order: the
//           backward recursion (with its acquisition) runs first and stores
//           beta in the state metric memory, then the forward recursion
//           computes the soft output in parallel, in ascending step order.
// Memory ports: one-cycle read latency on the CV memory, IO memory and SMM.
// What follows the platform description: 16 parallel metrics, the load-store
// mode with 4 cycles per 16-state step, soft output in parallel with the
// second recursion, single-ported SMM, programmable acquisition length for
// windowing, forward or backward recursion first.  The command set and the
// memory layout are this design's choices; the
// programmable sequencing of windows by an instruction stream is not modelled.
module dr_asip_core import omp_pkg::*; (
  input  logic                  clk,
  input  logic                  rst_n,
  input  code_cfg_t             cfg,
  input  logic [3:0]            mem_m,
  input  logic [4:0]            n_groups,
  // command
  input  logic                  cmd_valid,
  input  cmd_t                  cmd,
  output logic                  cmd_ready,
  output logic                  done,
  // channel value memory, port A
  output logic                  cv_en,
  output logic [ADDR_W-1:0]     cv_addr,
  input  logic [31:0]           cv_rdata,
  // IO memories, port A
  output logic                  io_en,
  output logic                  io_we,
  output logic                  io_bank,
  output logic [ADDR_W-1:0]     io_addr,
  output logic [IOW-1:0]        io_wdata,
  input  logic [IOW-1:0]        io_rdata0,
  input  logic [IOW-1:0]        io_rdata1,
  // extrinsic output towards the IL/DIL unit
  input  logic                  ext_idle,
  output logic                  ext_valid,
  output logic [ADDR_W-1:0]     ext_idx,
  output logic signed [SMW-1:0] ext_val,
  output logic                  ext_bank,
  output logic                  ext_sel
);
  typedef enum logic [3:0] {S_IDLE, S_VA1, S_VAI, S_VAG, S_TBR, S_TBW, S_MF, S_MB, S_DONE, S_BB, S_FF} st_e;
  st_e st;

  cmd_t                  cq;
  logic [ADDR_W:0]       iss;          // next step to issue
  logic                  vld_q;        // data of step t_q arrives this cycle
  logic [ADDR_W-1:0]     t_q;
  logic [ADDR_W-1:0]     t;            // VA load-store / trace back step
  logic [3:0]            g;            // group within a step
  logic [1:0]            ph;           // load-store phase
  logic                  bank;         // load-store: bank of the old metrics
  logic [MMAX-1:0]       s;            // trace back state
  logic [IOW-1:0]        acc;          // trace back output word
  logic [ADDR_W-1:0]     t_d1, t_d2;
  logic                  llr_busy;

  logic signed [SMW-1:0] sm [PAR];     // metrics of the current step (N <= 16)
  logic [PAR-1:0][SMW-1:0] wa, wb;     // load-store operands
  logic [31:0]           y_q;

  // shared datapath
  logic [NCV-1:0][CVW-1:0] y;
  logic signed [SMW-1:0] la;
  logic signed [SMW-1:0] gam [PAR][2];
  logic                  ub  [PAR][2];
  logic signed [SMW-1:0] m0 [PAR], m1 [PAR], g0 [PAR], g1 [PAR], aout [PAR];
  logic [PAR-1:0]        dec;
  logic [PAR-1:0][SMW-1:0] smm_w, smm_r;
  logic                  smm_en, smm_we;
  logic [5:0]            smm_a;
  logic                  llr_v;
  logic signed [SMW-1:0] llr_o, ext_o, ysys;

  int n_st;
  assign n_st = 1 << mem_m;

  logic map_st;
  assign map_st = (st == S_MF || st == S_MB || st == S_BB || st == S_FF);
  // soft output inputs: alpha from the SMM and beta in the register when the
  // forward recursion ran first, the other way round otherwise
  logic signed [SMW-1:0] llr_a [PAR], llr_b [PAR];
  always_comb
    for (int k = 0; k < PAR; k++) begin
      llr_a[k] = (st == S_FF) ? sm[k] : $signed(smm_r[k]);
      llr_b[k] = (st == S_FF) ? $signed(smm_r[k]) : sm[k];
    end

  assign y  = (st == S_VAG) ? y_q : cv_rdata;
  assign la = (map_st) ? $signed(cq.bank ? io_rdata1 : io_rdata0) : '0;
  assign ysys = cfg.sys_en ? sext_cv(y[cfg.sys_idx]) : '0;

  bmu u_bmu (.cfg(cfg), .mem_m(mem_m), .grp((st == S_VAG) ? g : 4'd0), .y(y), .la(la),
             .gamma(gam), .ubit(ub));

  always_comb begin
    for (int k = 0; k < PAR; k++) begin
      int lane, j;
      lane = 8 * int'(g[0]) + (k >> 1);
      j    = k - (n_st >> 1);
      m0[k] = sm[k >> 1];
      m1[k] = sm[((k >> 1) + (n_st >> 1)) & 15];
      g0[k] = gam[k][0];
      g1[k] = gam[k][1];
      if (st == S_VAG) begin
        m0[k] = $signed(wa[lane]);
        m1[k] = $signed(wb[lane]);
      end else if (st == S_MB || st == S_BB) begin
        if (k < (n_st >> 1)) begin
          m0[k] = sm[(2*k) & 15];   g0[k] = gam[(2*k) & 15][0];
          m1[k] = sm[(2*k+1) & 15]; g1[k] = gam[(2*k+1) & 15][0];
        end else begin
          m0[k] = sm[(2*j) & 15];   g0[k] = gam[(2*j) & 15][1];
          m1[k] = sm[(2*j+1) & 15]; g1[k] = gam[(2*j+1) & 15][1];
        end
      end
      smm_w[k]   = sm[k];
    end
  end

  acs16 u_acs (.logmap(map_st), .m0(m0), .g0(g0), .m1(m1), .g1(g1),
               .out(aout), .dec(dec));

  llr_unit u_llr (.clk(clk), .rst_n(rst_n), .in_valid((st == S_MB || st == S_FF) && vld_q && t_q < cq.len), .mem_m(mem_m),
                  .alpha(llr_a), .beta(llr_b), .gamma(gam), .ubit(ub), .la(la), .ysys(ysys),
                  .out_valid(llr_v), .llr(llr_o), .ext(ext_o));

  // state metric memory port
  always_comb begin
    smm_en = 1'b0; smm_we = 1'b0; smm_a = '0;
    case (st)
      S_VAI: begin smm_en = 1'b1; smm_we = 1'b1; smm_a = {2'b00, g}; end
      S_VAG: begin
        smm_en = (ph != 2'd2);
        smm_we = (ph == 2'd3);
        if (ph == 2'd0)      smm_a = {1'b0, bank, 1'b0, 3'(g >> 1)};
        else if (ph == 2'd1) smm_a = {1'b0, bank, 4'(n_groups >> 1) + 4'(g >> 1)};
        else                 smm_a = {1'b0, ~bank, g};
      end
      S_MF: begin smm_en = vld_q; smm_we = 1'b1; smm_a = t_q[5:0]; end
      S_MB: begin smm_en = (iss != 0) && (iss <= {1'b0, cq.len}); smm_a = 6'(iss - 1'b1); end
      S_BB: begin smm_en = vld_q && (t_q < cq.len); smm_we = 1'b1; smm_a = t_q[5:0]; end
      S_FF: begin smm_en = (iss < {1'b0, cq.len}); smm_a = iss[5:0]; end
      default: ;
    endcase
  end

  logic [PAR-1:0][SMW-1:0] smm_wd;
  always_comb begin
    smm_wd = smm_w;
    if (st == S_VAI)
      for (int k = 0; k < PAR; k++) smm_wd[k] = (g == 0 && k == 0) ? '0 : M_INIT;
    else if (st == S_VAG)
      for (int k = 0; k < PAR; k++) smm_wd[k] = aout[k];
  end

  smm u_smm (.clk(clk), .en(smm_en), .we(smm_we), .addr(smm_a), .wdata(smm_wd), .rdata(smm_r));

  // trace back step (combinational part)
  logic            tb_x, tb_u;
  logic [MMAX-1:0] tb_prev, st_mask;
  logic [IOW-1:0]  acc_n;
  always_comb begin
    st_mask = MMAX'((9'd1 << mem_m) - 9'd1);
    tb_x    = io_rdata0[s[3:0]];
    tb_prev = ((s >> 1) | MMAX'(tb_x << (mem_m - 4'd1))) & st_mask;
    tb_u    = s[0] ^ (^(cfg.fb[MMAX:1] & tb_prev));
    acc_n   = acc | (IOW'(tb_u) << t[3:0]);
  end

  // memory ports and sequencing
  logic [ADDR_W-1:0] surv_base;
  assign surv_base = (mem_m > 4) ? ADDR_W'(t << (mem_m - 4'd4)) : t;

  always_comb begin
    cv_en = 1'b0; cv_addr = '0;
    io_en = 1'b0; io_we = 1'b0; io_bank = 1'b0; io_addr = '0; io_wdata = '0;
    case (st)
      S_VA1: begin
        cv_en = (iss < {1'b0, cq.len}); cv_addr = iss[ADDR_W-1:0];
        io_en = vld_q; io_we = 1'b1; io_bank = 1'b0; io_addr = t_q;
        io_wdata = dec & IOW'((17'd1 << n_st) - 17'd1);
      end
      S_VAG: begin
        cv_en = (ph == 2'd0 && g == 0); cv_addr = t;
        io_en = (ph == 2'd3); io_we = 1'b1; io_bank = 1'b0; io_addr = surv_base + ADDR_W'(g);
        io_wdata = dec;
      end
      S_TBR: begin io_en = 1'b1; io_bank = 1'b0; io_addr = surv_base + ADDR_W'(s >> 4); end
      S_TBW: begin
        io_en = (t[3:0] == 4'd0); io_we = 1'b1; io_bank = 1'b1;
        io_addr = ADDR_W'(t >> 4); io_wdata = acc_n;
      end
      S_MF, S_MB, S_BB, S_FF: begin
        cv_en = (st == S_MF || st == S_FF) ? (iss < {1'b0, cq.len}) : (iss != 0);
        cv_addr = (st == S_MF || st == S_FF) ? iss[ADDR_W-1:0] : ADDR_W'(iss - 1'b1);
        io_en = cv_en; io_bank = cq.bank; io_addr = cv_addr;
      end
      default: ;
    endcase
  end

  assign cmd_ready = (st == S_IDLE) && ext_idle;
  assign ext_valid = llr_v;
  assign ext_idx   = cq.base + t_d2;
  assign ext_val   = ext_o;
  assign ext_bank  = cq.ext_bank;
  assign ext_sel   = cq.il_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cq <= '0; iss <= '0; vld_q <= 1'b0; t_q <= '0; t <= '0; g <= '0;
      ph <= '0; bank <= 1'b0; s <= '0; acc <= '0; t_d1 <= '0; t_d2 <= '0; done <= 1'b0;
      wa <= '0; wb <= '0; y_q <= '0; llr_busy <= 1'b0;
      for (int k = 0; k < PAR; k++) sm[k] <= '0;
    end else begin
      done <= 1'b0;
      t_d1 <= t_q; t_d2 <= t_d1;
      case (st)
        S_IDLE: if (cmd_valid && cmd_ready && cmd.op != OP_SEND) begin
          cq <= cmd; iss <= '0; vld_q <= 1'b0; t <= '0; g <= '0; ph <= '0; bank <= 1'b0;
          for (int k = 0; k < PAR; k++)
            sm[k] <= (k == 0 || (cmd.op == OP_MAP && cmd.a_open) || cmd.op == OP_MAPB) ? '0 : M_INIT;
          if (cmd.op == OP_MAPB) iss <= {1'b0, cmd.len} + (ADDR_W+1)'(cmd.acq);
          if (cmd.op == OP_MAP)       st <= S_MF;
          else if (cmd.op == OP_MAPB) st <= S_BB;
          else if (mem_m > 4)    st <= S_VAI;
          else                   st <= S_VA1;
        end
        S_VA1, S_MF: begin
          if (iss < {1'b0, cq.len}) begin
            iss <= iss + 1'b1; vld_q <= 1'b1; t_q <= iss[ADDR_W-1:0];
          end else vld_q <= 1'b0;
          if (vld_q)
            for (int k = 0; k < PAR; k++) sm[k] <= (k < n_st) ? aout[k] : M_INIT;
          if (!vld_q && iss == {1'b0, cq.len}) begin
            if (st == S_MF) begin
              st <= S_MB;
              iss <= {1'b0, cq.len} + (ADDR_W+1)'(cq.acq);
              for (int k = 0; k < PAR; k++) sm[k] <= '0;
            end else begin
              st <= S_TBR; t <= cq.len - 1'b1; s <= '0; acc <= '0;
            end
          end
        end
        S_VAI: begin
          if (g == 4'(n_groups - 1'b1)) begin g <= '0; st <= S_VAG; end
          else g <= g + 1'b1;
        end
        S_VAG: begin
          ph <= ph + 1'b1;
          if (ph == 2'd1) begin wa <= smm_r; if (g == 0) y_q <= cv_rdata; end
          if (ph == 2'd2) wb <= smm_r;
          if (ph == 2'd3) begin
            if (g == 4'(n_groups - 1'b1)) begin
              g <= '0; bank <= ~bank;
              if (t == cq.len - 1'b1) begin
                st <= S_TBR; s <= '0; acc <= '0;
              end else t <= t + 1'b1;
            end else g <= g + 1'b1;
          end
        end
        S_TBR: st <= S_TBW;
        S_TBW: begin
          s   <= tb_prev;
          acc <= (t[3:0] == 4'd0) ? '0 : acc_n;
          if (t == 0) st <= S_DONE;
          else begin t <= t - 1'b1; st <= S_TBR; end
        end
        S_MB: begin
          if (iss != 0) begin
            iss <= iss - 1'b1; vld_q <= 1'b1; t_q <= ADDR_W'(iss - 1'b1);
          end else vld_q <= 1'b0;
          if (vld_q)
            for (int k = 0; k < PAR; k++) sm[k] <= (k < n_st) ? aout[k] : M_INIT;
          llr_busy <= vld_q;
          if (iss == 0 && !vld_q && !llr_busy && !llr_v) st <= S_DONE;
        end
        // backward recursion first: beta of every window step into the SMM
        S_BB: begin
          if (iss != 0) begin
            iss <= iss - 1'b1; vld_q <= 1'b1; t_q <= ADDR_W'(iss - 1'b1);
          end else vld_q <= 1'b0;
          if (vld_q)
            for (int k = 0; k < PAR; k++) sm[k] <= (k < n_st) ? aout[k] : M_INIT;
          if (iss == 0 && !vld_q) begin
            st <= S_FF;
            for (int k = 0; k < PAR; k++) sm[k] <= (k == 0 || cq.a_open) ? '0 : M_INIT;
          end
        end
        // then the forward recursion with the soft output
        S_FF: begin
          if (iss < {1'b0, cq.len}) begin
            iss <= iss + 1'b1; vld_q <= 1'b1; t_q <= iss[ADDR_W-1:0];
          end else vld_q <= 1'b0;
          if (vld_q)
            for (int k = 0; k < PAR; k++) sm[k] <= (k < n_st) ? aout[k] : M_INIT;
          llr_busy <= vld_q;
          if (iss == {1'b0, cq.len} && !vld_q && !llr_busy && !llr_v) st <= S_DONE;
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
