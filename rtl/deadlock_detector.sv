// deadlock_detector: watches the VC buffers of one router for stalls.
//
// Every cycle, for every buffer, a counter counts the consecutive cycles
// in which the buffer holds a flit but none leaves; it restarts at zero when
// a flit leaves or the buffer is empty, and stops counting at its maximum.
// Once any counter reaches the programmable threshold the router is taken
// to be deadlocked: deadlock goes high and stays high until reset or clear.
// A threshold of zero switches detection off. The per-buffer stall counting
// and the user-set cycle threshold follow the document; the sticky flag and
// the clear input are this design's.
//
// Timing: deadlock rises at the clock edge on which a counter reaches the
// threshold, i.e. THRESH cycles after the stall began.
module deadlock_detector #(
  parameter int NBUF  = 20,   // buffers watched (ports x VCs)
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [CNT_W-1:0] threshold,
  input  logic [NBUF-1:0]  occupied,
  input  logic [NBUF-1:0]  moved,
  output logic             deadlock
);
  logic [CNT_W-1:0] cnt [NBUF];
  logic hit;

  always_comb begin
    hit = 1'b0;
    for (int b = 0; b < NBUF; b++)
      if (threshold != 0 && occupied[b] && !moved[b] && (CNT_W+1)'(cnt[b]) + 1'b1 >= (CNT_W+1)'(threshold))
        hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBUF; b++) cnt[b] <= '0;
      deadlock <= 1'b0;
    end else begin
      for (int b = 0; b < NBUF; b++)
        if (!occupied[b] || moved[b] || clear) cnt[b] <= '0;
        else if (cnt[b] != '1)                 cnt[b] <= cnt[b] + 1'b1;
      if (clear)    deadlock <= 1'b0;
      else if (hit) deadlock <= 1'b1;
    end
  end
endmodule
