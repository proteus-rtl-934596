// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// Used by the register interface to turn a latency sum and a packet count
// into an average. start loads dividend and divisor; done pulses W cycles
// later with quotient valid (and held until the next start). Division by
// zero gives a quotient of zero.
module seq_divider #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0]          rem, dsr, q;
  logic [$clog2(W+1)-1:0] n;
  logic [W+1:0]          trial;   // {sign, W+1 bits}

  assign trial = {1'b0, rem, q[W-1]} - {2'b0, dsr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; dsr <= '0; q <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem  <= '0;
        dsr  <= divisor;
        q    <= dividend;
        n    <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[W+1]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};  // top bit of rem is 0 here: rem < dsr
          q   <= {q[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == 1) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          quotient <= (dsr == 0) ? '0 : (trial[W+1] ? {q[W-2:0], 1'b0} : {q[W-2:0], 1'b1});
        end
      end
    end
  end
endmodule
