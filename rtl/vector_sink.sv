// vector_sink: the output memory of the systolic convolution.
//
// Every packet that reaches its node carries a finished sum in data[31:0];
// the sink stores the sums in arrival order at addresses 0, 1, 2, ... of a
// DEPTH-entry memory and counts them. rd_addr/rd_data read the memory
// (combinationally); clear restarts at address 0. That the results are
// written back to a memory node follows the document; the rest is this
// design's.
module vector_sink
  import noc_pkg::*;
#(
  parameter int DEPTH = 64,
  parameter int S_W   = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       rx_valid,
  input  logic [LINK_W-1:0]          rx_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output logic [S_W-1:0]             rd_data
);
  logic [S_W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (rx_valid && int'(count) < DEPTH) mem[count[$clog2(DEPTH)-1:0]] <= rx_data[S_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                count <= '0;
    else if (clear)                            count <= '0;
    else if (rx_valid && int'(count) < DEPTH)  count <= count + 1'b1;
  end

  assign rd_data = mem[rd_addr];
endmodule
