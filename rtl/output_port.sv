// output_port: drives one output link of the router.
//
// With OUT_REG = 0 the crossbar output goes straight onto the link, so a
// flit crosses the router in the cycle after it was written into the input
// buffer (single-cycle router). With OUT_REG = 1 the flit is held in a
// register for one cycle first (two-cycle router). Both options are the
// document's; the main configuration uses the single-cycle router.
module output_port
  import noc_pkg::*;
#(
  parameter bit OUT_REG = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  output flit_t out_flit
);
  if (OUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) out_flit <= FLIT_IDLE;
      else        out_flit <= in_flit;
  end else begin : g_comb
    assign out_flit = in_flit;
  end
endmodule
