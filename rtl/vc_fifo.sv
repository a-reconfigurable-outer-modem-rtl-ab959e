// vc_fifo: small synchronous FIFO, one per virtual channel of a router input
// and for the extrinsic queue of the IL/DIL unit.
// push when !full, pop when !empty; head is the oldest entry (combinational
// read), full / empty are registered state.  Depth must be a power of two.
module vc_fifo #(
  parameter int WIDTH = 35,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] head,
  output logic             full,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;

  assign empty = (wp == rp);
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign head  = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (push && !full) wp <= wp + 1'b1;
      if (pop && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (push && !full) mem[wp[AW-1:0]] <= din;

  a_push: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("vc_fifo: push into full FIFO");
  a_pop: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("vc_fifo: pop from empty FIFO");
endmodule
