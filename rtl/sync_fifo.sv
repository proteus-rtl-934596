// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the virtual-channel buffer of a router input port (the document
// gives one flit per VC in its ring evaluation) and as the packet source
// queue of a packet handler. Storage is a register array with read and write
// pointers and an occupancy count. A write and a read may happen in the same
// cycle, also when the FIFO is full. There is no bypass: data written in a
// cycle is visible at rd_data from the next cycle, which is what makes the
// input buffer the registering point of the single-cycle router.
//
// Interface: wr_en/wr_data push, rd_en pops the entry shown on rd_data,
// empty/full/count report occupancy. Pushing when full (without a pop) or
// popping when empty is a protocol error and is caught by assertions.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == 0);
  assign full    = (int'(count) == DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (wr_en) begin
        mem[wp] <= wr_data;
        wp      <= next_ptr(wp);
      end
      if (rd_en) rp <= next_ptr(rp);
      if (wr_en && !rd_en)      count <= count + 1'b1;
      else if (!wr_en && rd_en) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
