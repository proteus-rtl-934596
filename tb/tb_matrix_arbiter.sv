// tb_matrix_arbiter: random request patterns on a 4:1 and a 5:1 arbiter,
// checked against a least-recently-granted list kept here: the grant must
// go to the requester that was granted longest ago, be one-hot, and
// priorities must not move when update is low.
module tb_matrix_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] req4, gnt4;
  logic [4:0] req5, gnt5;
  logic       upd4, upd5;
  matrix_arbiter #(.N(4)) u4 (.clk, .rst_n, .req(req4), .update(upd4), .gnt(gnt4));
  matrix_arbiter #(.N(5)) u5 (.clk, .rst_n, .req(req5), .update(upd5), .gnt(gnt5));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // order[0] has the highest priority
  int ord4 [$], ord5 [$];

  function automatic int expect_gnt(input int ord [$], input logic [7:0] r);
    foreach (ord[i]) if (r[ord[i]]) return ord[i];
    return -1;
  endfunction

  task automatic demote(ref int ord [$], input int w);
    foreach (ord[i]) if (ord[i] == w) begin ord.delete(i); break; end
    ord.push_back(w);
  endtask

  int e4, e5, counts [5];
  initial begin
    ord4 = '{0, 1, 2, 3};
    ord5 = '{0, 1, 2, 3, 4};
    req4 = 0; req5 = 0; upd4 = 0; upd5 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req4 = 4'($urandom); req5 = 5'($urandom);
      if (i % 3 == 0) req5 = 5'b11111;
      upd4 = ($urandom_range(3) != 0); upd5 = 1'b1;
      #1;
      e4 = expect_gnt(ord4, 8'(req4));
      e5 = expect_gnt(ord5, 8'(req5));
      checks++;
      if ((e4 < 0 && gnt4 != 0) || (e4 >= 0 && gnt4 != 4'(1 << e4))) begin
        failures++; $display("FAIL n4 %0d: req %b gnt %b exp %0d", i, req4, gnt4, e4);
      end
      checks++;
      if ((e5 < 0 && gnt5 != 0) || (e5 >= 0 && gnt5 != 5'(1 << e5))) begin
        failures++; $display("FAIL n5 %0d: req %b gnt %b exp %0d", i, req5, gnt5, e5);
      end
      if (e5 >= 0 && req5 == 5'b11111) counts[e5]++;
      @(posedge clk);
      if (upd4 && e4 >= 0) demote(ord4, e4);
      if (upd5 && e5 >= 0) demote(ord5, e5);
    end
    // fairness under full load: every requester got its share
    foreach (counts[k]) begin
      checks++;
      if (counts[k] < 200) begin failures++; $display("FAIL fairness %0d: %0d", k, counts[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
