// smm: state metric memory.
//
// Single-ported synchronous memory whose word holds sixteen 16-bit state
// metrics, so one whole step of a code with up to 16 states is stored or
// fetched per cycle.  In Log-MAP decoding it keeps the metrics of the first
// recursion of a window until the second recursion consumes them; for codes
// with more than 16 states it holds the intermediate path metrics of the
// load-store mode (two banks of up to 16 words).  Depth 64 corresponds to the
// maximum window size of 64 quoted for the platform; the single port and the
// 16-metric word follow the description, the read latency of one cycle is
// this design's choice.
// Timing: en & we writes wdata at addr; en & !we returns the word at addr on
// rdata in the next cycle; rdata holds its value while en is low.
module smm import omp_pkg::*; #(
  parameter int DEPTH = SMM_DEPTH
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  addr,
  input  logic [PAR-1:0][SMW-1:0]   wdata,
  output logic [PAR-1:0][SMW-1:0]   rdata
);
  logic [PAR-1:0][SMW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
