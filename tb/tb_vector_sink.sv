// tb_vector_sink: sends random sums at random gaps, reads the memory back
// and compares with what was sent, in arrival order; checks the count, that
// the upper 16 bits of a packet are ignored, that clear restarts at address
// 0 and that packets past DEPTH are neither counted nor stored.
module tb_vector_sink;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 64;

  logic clear, rx_valid;
  logic [LINK_W-1:0] rx_data;
  logic [6:0] count;
  logic [5:0] rd_addr;
  logic [31:0] rd_data;

  vector_sink #(.DEPTH(D)) dut (.clk, .rst_n, .clear, .rx_valid, .rx_data, .count, .rd_addr, .rd_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  logic [31:0] sent [D];
  initial begin
    clear = 0; rx_valid = 0; rx_data = '0; rd_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(count == 0, "count after reset");
    for (int run = 0; run < 3; run++) begin
      int n;
      clear = 1; @(negedge clk); clear = 0;
      check(count == 0, "count after clear");
      n = (run == 0) ? D + 5 : $urandom_range(D, 1);
      for (int i = 0; i < n; i++) begin
        logic [31:0] v; v = $urandom;
        if (i < D) sent[i] = v;
        rx_valid = 1; rx_data = {16'($urandom), v}; @(negedge clk); rx_valid = 0;
        check(int'(count) == ((i + 1 < D) ? i + 1 : D), $sformatf("count %0d after %0d packets", count, i + 1));
        repeat ($urandom_range(2)) @(negedge clk);
      end
      for (int i = 0; i < ((n < D) ? n : D); i++) begin
        rd_addr = 6'(i); #1;
        check(rd_data == sent[i], $sformatf("entry %0d: %h != %h", i, rd_data, sent[i]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
