// crossbar: the 5x5 switch of the router.
//
// Each output port takes the flit of the input port the switch arbiter
// selected for it (sel), or an idle flit when nothing was granted. The
// switch arbiter guarantees that an input feeds at most one output.
// Purely combinational; in this design's hand-written form it is a
// multiplexer per output.
module crossbar
  import noc_pkg::*;
#(
  parameter int N = NPORTS
) (
  input  flit_t       in_flit  [N],
  input  logic        sel_valid[N],
  input  logic [2:0]  sel      [N],
  output flit_t       out_flit [N]
);
  always_comb
    for (int o = 0; o < N; o++) begin
      out_flit[o] = FLIT_IDLE;
      if (sel_valid[o] && int'(sel[o]) < N) begin
        out_flit[o]       = in_flit[sel[o]];
        out_flit[o].valid = in_flit[sel[o]].valid;
      end
    end
endmodule
