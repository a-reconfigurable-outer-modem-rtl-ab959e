// code_ctrl: dynamically reconfigurable channel-code control.
//
// Holds two complete channel-code configurations: the working set, which
// drives the trellis datapath, and a shadow set, which the network interface
// may rewrite at any time.  A swap request copies the shadow set into the
// working set in a single clock cycle, so the node can change code (e.g. for
// a soft handover) without stopping to reload registers.  Two sets and the
// single-cycle switch follow the platform description; the register map
// below is this design's own.
//
// Register map of the shadow set (wr_addr):
//   0: {ncv[6:4], k[3:0]}   1: fb[8:0]   2..5: gen0..gen3[8:0]
//   6: {sys_en[2], sys_idx[1:0]}
// Besides the working set the block outputs derived values of the working
// code: memory m = k-1 and the number of 16-state groups per trellis step.
// Timing: a write appears in the shadow set the next cycle; 'swap' makes the
// shadow set the working set from the next cycle on.  Reset loads the
// UMTS turbo component code (Kc = 4, systematic output and parity
// 1 + D + D^3, feedback 1 + D^2 + D^3)
// into both sets.
module code_ctrl import omp_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic [3:0]  wr_addr,
  input  logic [15:0] wr_data,
  input  logic        swap,
  output code_cfg_t   work,
  output code_cfg_t   shadow,
  output logic [3:0]  mem_m,     // k - 1
  output logic [4:0]  n_groups   // max(1, 2^m / 16)
);
  function automatic code_cfg_t reset_cfg();
    code_cfg_t c;
    c = '0;
    c.k      = 4'd4;
    c.ncv    = 3'd2;
    c.fb     = 9'b0_0000_1100;   // b = u ^ r2 ^ r3         (1 + D^2 + D^3)
    c.gen[0] = 9'b0_0000_1101;   // b ^ r2 ^ r3 = u          (systematic output)
    c.gen[1] = 9'b0_0000_1011;   // b ^ r1 ^ r3              (1 + D + D^3)
    c.sys_en = 1'b1;
    c.sys_idx = 2'd0;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      work   <= reset_cfg();
      shadow <= reset_cfg();
    end else begin
      if (swap) work <= shadow;
      if (wr_en) begin
        case (wr_addr)
          4'd0: begin shadow.k <= wr_data[3:0]; shadow.ncv <= wr_data[6:4]; end
          4'd1: shadow.fb <= wr_data[8:0];
          4'd2: shadow.gen[0] <= wr_data[8:0];
          4'd3: shadow.gen[1] <= wr_data[8:0];
          4'd4: shadow.gen[2] <= wr_data[8:0];
          4'd5: shadow.gen[3] <= wr_data[8:0];
          4'd6: begin shadow.sys_idx <= wr_data[1:0]; shadow.sys_en <= wr_data[2]; end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    mem_m    = work.k - 4'd1;
    n_groups = (mem_m <= 4'd4) ? 5'd1 : 5'(1 << (mem_m - 4'd4));
  end
endmodule
