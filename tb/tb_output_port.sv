// tb_output_port: the single-cycle option must pass the flit in the same
// cycle, the two-cycle option must show it exactly one clock later, and
// reset must give an idle flit.
module tb_output_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  flit_t din, d0, d1, prev;

  output_port #(.OUT_REG(1'b0)) u0 (.clk, .rst_n, .in_flit(din), .out_flit(d0));
  output_port #(.OUT_REG(1'b1)) u1 (.clk, .rst_n, .in_flit(din), .out_flit(d1));

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    din = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    @(posedge clk); #1;
    checks++; if (d1 != FLIT_IDLE) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    prev = din;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      din = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
      #1;
      checks++; if (d0 != din) begin failures++; $display("FAIL comb %0d", i); end
      checks++; if (i > 0 && d1 != prev) begin failures++; $display("FAIL reg %0d", i); end
      @(posedge clk);
      prev = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
