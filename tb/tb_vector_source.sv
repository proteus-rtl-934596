// tb_vector_source: loads random elements, starts streams of several
// lengths against a random ready and checks that exactly len packets leave,
// in order, each {element, 32'b0} to the fixed destination, that offers are
// at least INTERVAL cycles apart, that an idle ready holds the offer, that
// busy falls with the last accepted packet and that len = 0 streams
// nothing.
module tb_vector_source;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int D = 64, IV = 2;

  logic wr_en, start, busy, tx_valid, tx_ready;
  logic [5:0] wr_addr;
  logic [15:0] wr_data;
  logic [6:0] len;
  logic [NODE_W-1:0] tx_dst;
  logic [LINK_W-1:0] tx_data;

  vector_source #(.DEPTH(D), .DST(5), .INTERVAL(IV)) dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .len, .busy,
    .tx_valid, .tx_ready, .tx_dst, .tx_data);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  logic [15:0] m [D];
  int idx, last_acc, cyc;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    check(tx_dst == 5, "destination");
    check(tx_data == {m[idx], 32'd0}, $sformatf("packet %0d: %h != %h", idx, tx_data, {m[idx], 32'd0}));
    if (idx > 0) check(cyc - last_acc >= IV, $sformatf("packets %0d cycles apart", cyc - last_acc));
    last_acc = cyc; idx++;
  end

  initial begin
    wr_en = 0; start = 0; len = 0; wr_addr = 0; wr_data = 0; tx_ready = 0; cyc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      m[i] = 16'($urandom); wr_en = 1; wr_addr = 6'(i); wr_data = m[i]; @(negedge clk);
    end
    wr_en = 0;
    foreach (m[i]) ;
    for (int run = 0; run < 6; run++) begin
      int l, t;
      l = (run == 0) ? 0 : (run == 1) ? D : (run == 2) ? 1 : $urandom_range(D, 2);
      idx = 0;
      len = 7'(l); start = 1; @(negedge clk); start = 0; len = 0;
      check(busy == (l != 0), $sformatf("busy after start, len %0d", l));
      if (l == 0) begin
        repeat (5) begin @(negedge clk); check(!tx_valid, "len 0 streams nothing"); end
        continue;
      end
      // ready held low: the offer must stay and not advance
      tx_ready = 0; repeat (4) @(negedge clk);
      check(tx_valid && tx_data == {m[0], 32'd0}, "offer held while not ready");
      t = 0;
      while (busy && t < 2000) begin
        tx_ready = (run == 1) ? 1 : ($urandom_range(2) != 0);
        @(negedge clk); t++;
      end
      tx_ready = 0;
      check(idx == l, $sformatf("run %0d: %0d packets, expected %0d", run, idx, l));
      if (run == 1) check(t >= IV * (l - 1) + 1 && t <= IV * (l - 1) + 2,
                          $sformatf("full-speed stream of %0d took %0d cycles", l, t));
      repeat (4) begin @(negedge clk); check(!tx_valid, "idle after the stream"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
