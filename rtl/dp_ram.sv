// dp_ram: true dual-ported synchronous RAM.
//
// Used for the channel value memory (32-bit words: four 8-bit channel values
// of one trellis step) and for the two IO memories (16-bit words: a-priori /
// extrinsic values, Viterbi survivors, hard decisions).  Port A belongs to the
// decoder core, port B to the network interface, so that both can reach every
// memory as the node architecture requires.  Sizes are parameters: the
// platform leaves them to the application; 1024 words is this design's
// default.  Timing: per port, en & we writes; en & !we gives the read word on
// rdata the next cycle, held while en is low.  Writing the same address from
// both ports in one cycle is not allowed.
module dp_ram #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  input  logic                     b_en,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [WIDTH-1:0]         b_wdata,
  output logic [WIDTH-1:0]         b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata <= mem[b_addr];
    end
  end

  always_ff @(posedge clk)
    assert (!(a_en && a_we && b_en && b_we && a_addr == b_addr))
      else $error("dp_ram: both ports write address %0d", a_addr);
endmodule
