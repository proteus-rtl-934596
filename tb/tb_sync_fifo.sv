// tb_sync_fifo: random pushes and pops on a 4-entry FIFO, checked against a
// queue model: data order, empty/full/count, and simultaneous push+pop when
// full. Also checks the 1-entry configuration used for VC buffers.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       wr4, rd4, e4, f4, wr1, rd1, e1, f1;
  logic [7:0] wd4, rd_d4, wd1, rd_d1;
  logic [2:0] c4;
  logic [0:0] c1;

  sync_fifo #(.WIDTH(8), .DEPTH(4)) u4 (.clk, .rst_n, .wr_en(wr4), .wr_data(wd4), .rd_en(rd4),
                                        .rd_data(rd_d4), .empty(e4), .full(f4), .count(c4));
  sync_fifo #(.WIDTH(8), .DEPTH(1)) u1 (.clk, .rst_n, .wr_en(wr1), .wr_data(wd1), .rd_en(rd1),
                                        .rd_data(rd_d1), .empty(e1), .full(f1), .count(c1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] m4 [$], m1 [$];
  initial begin
    wr4 = 0; rd4 = 0; wd4 = 0; wr1 = 0; rd1 = 0; wd1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare outputs with the model
      checks++;
      if (e4 != (m4.size() == 0) || f4 != (m4.size() == 4) || int'(c4) != m4.size() ||
          (m4.size() > 0 && rd_d4 != m4[0])) begin
        failures++; $display("FAIL depth4 at %0d: size %0d count %0d", i, m4.size(), c4);
      end
      checks++;
      if (e1 != (m1.size() == 0) || f1 != (m1.size() == 1) ||
          (m1.size() > 0 && rd_d1 != m1[0])) begin
        failures++; $display("FAIL depth1 at %0d", i);
      end
      rd4 = (m4.size() > 0) && ($urandom_range(1) == 1);
      wr4 = ((m4.size() < 4) || rd4) && ($urandom_range(2) != 0);
      wd4 = 8'($urandom);
      rd1 = (m1.size() > 0) && ($urandom_range(1) == 1);
      wr1 = ((m1.size() < 1) || rd1) && ($urandom_range(1) == 1);
      wd1 = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd4) void'(m4.pop_front());
      if (wr4) m4.push_back(wd4);
      if (rd1) void'(m1.pop_front());
      if (wr1) m1.push_back(wd1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
