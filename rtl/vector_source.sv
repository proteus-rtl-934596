// vector_source: the input memory of the systolic convolution.
//
// Holds DEPTH elements of vector A, written through wr_en/wr_addr/wr_data.
// After start it streams elements 0..len-1 in order, one packet each, to
// node DST: data[47:32] = the element, data[31:0] = 0 (the empty partial
// sum). A new packet is offered at most every INTERVAL cycles, which paces
// the stream to what the ring and the cores sustain; busy is high until the
// last packet was accepted. That the memory streams A follows the
// document; size, pacing and packet format are this design's.
module vector_source
  import noc_pkg::*;
#(
  parameter int DEPTH    = 64,
  parameter int A_W      = 16,
  parameter int DST      = 1,
  parameter int INTERVAL = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [A_W-1:0]           wr_data,
  input  logic                     start,
  input  logic [$clog2(DEPTH+1)-1:0] len,
  output logic                     busy,
  output logic                     tx_valid,
  input  logic                     tx_ready,
  output logic [NODE_W-1:0]        tx_dst,
  output logic [LINK_W-1:0]        tx_data
);
  logic [A_W-1:0] mem [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] idx, n;
  logic [$clog2(INTERVAL+1)-1:0] wait_cnt;

  always_ff @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  assign tx_valid = busy && (wait_cnt == 0);
  assign tx_dst   = NODE_W'(DST);
  assign tx_data  = LINK_W'({mem[idx[$clog2(DEPTH)-1:0]], 32'd0});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      idx      <= '0;
      n        <= '0;
      wait_cnt <= '0;
    end else if (start && !busy) begin
      busy     <= (len != 0);
      idx      <= '0;
      n        <= len;
      wait_cnt <= '0;
    end else if (busy) begin
      if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
      else if (tx_ready) begin
        idx      <= idx + 1'b1;
        wait_cnt <= ($clog2(INTERVAL+1))'(INTERVAL - 1);
        if (idx + 1'b1 == n) busy <= 1'b0;
      end
    end
  end
endmodule
