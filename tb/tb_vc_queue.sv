// tb_vc_queue: free-VC queue and credit counters with 4 VCs of 2 slots.
// After reset all four VCs are offered in order 0..3 with full credits;
// popping hands them out in order; consuming drains a VC's credits;
// returned credits refill them, and a vc_free credit puts the VC back at
// the tail of the queue, so VCs come back in the order they were freed.
// A random phase then checks against a model of queue and counters.
module tb_vc_queue;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic free_avail, pop, consume;
  logic [VC_W-1:0] free_vc, consume_vc;
  logic [3:0] credit_avail;
  credit_t cin;

  vc_queue #(.NUM_VCS(4), .BUF_DEPTH(2)) dut (
    .clk, .rst_n, .free_avail, .free_vc, .pop, .consume, .consume_vc,
    .credit_avail, .credit_in(cin)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  int q [$];
  int cred [4];
  bit busy [4];

  initial begin
    pop = 0; consume = 0; consume_vc = 0; cin = CREDIT_IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    q = '{0, 1, 2, 3};
    foreach (cred[v]) begin cred[v] = 2; busy[v] = 0; end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(free_avail == (q.size() > 0), "free_avail");
      if (q.size() > 0) check(int'(free_vc) == q[0], $sformatf("free_vc %0d exp %0d", free_vc, q[0]));
      for (int v = 0; v < 4; v++) check(credit_avail[v] == (cred[v] > 0), $sformatf("credit_avail %0d", v));
      // stimulus obeying the protocol
      pop = (q.size() > 0) && ($urandom_range(2) == 0);
      consume = 0; consume_vc = 0;
      if (pop) begin consume = 1; consume_vc = VC_W'(q[0]); end
      else begin
        int v;
        v = int'($urandom_range(3));
        if (busy[v] && cred[v] > 0 && $urandom_range(1) == 1) begin consume = 1; consume_vc = VC_W'(v); end
      end
      cin = CREDIT_IDLE;
      begin
        int v;
        v = int'($urandom_range(3));
        if (cred[v] < 2 && !(consume && int'(consume_vc) == v && cred[v] == 1 && 0)) begin
          if ($urandom_range(1) == 1) begin
            cin.valid = 1; cin.vc = VC_W'(v);
            // free the VC with its last outstanding credit, sometimes
            cin.vc_free = busy[v] && (cred[v] == 1) && !(consume && int'(consume_vc) == v)
                          && ($urandom_range(1) == 1);
          end
        end
      end
      @(posedge clk);
      #1;
      if (pop) begin busy[q[0]] = 1; void'(q.pop_front()); end
      if (consume) cred[consume_vc]--;
      if (cin.valid) begin
        cred[cin.vc]++;
        if (cin.vc_free) begin busy[cin.vc] = 0; q.push_back(int'(cin.vc)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
