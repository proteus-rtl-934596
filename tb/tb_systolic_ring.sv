// tb_systolic_ring: the 18-node ring convolution end to end. Vector A of
// 64 random signed elements and 16 random coefficients B are loaded; after
// start the output memory must receive the 49 sums
// C_i = sum_{j=1..16} A_(i+j) B_j, i = 0..48, computed here, in order, and
// the cores must report 64 + 63 + ... + 49 = 904 multiply-accumulates (core
// j answers every packet but its first, core 1 every packet). A second run
// with other values after clear checks that the design restarts cleanly.
module tb_systolic_ring;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int K = 16, D = 64, AW = 20;

  logic signed [15:0] b_coef [K];
  logic a_wr_en, start, clear, busy;
  logic [5:0] a_wr_addr, res_addr;
  logic [15:0] a_wr_data;
  logic [6:0] len, res_count;
  logic [31:0] res_data, macs_total;
  logic awready, wready, bvalid, arready, rvalid, dl;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;

  systolic_ring dut (
    .clk, .rst_n, .b_coef, .a_wr_en, .a_wr_addr, .a_wr_data, .start, .len, .clear, .busy,
    .res_count, .res_addr, .res_data, .macs_total,
    .s_awaddr('0), .s_awvalid(1'b0), .s_awready(awready), .s_wdata('0), .s_wstrb('0),
    .s_wvalid(1'b0), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(1'b1),
    .s_araddr('0), .s_arvalid(1'b0), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(1'b1), .deadlock(dl)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  logic signed [15:0] a [D];
  int t0, t1;
  initial begin
    a_wr_en = 0; start = 0; clear = 0; len = 0; a_wr_addr = 0; a_wr_data = 0; res_addr = 0;
    foreach (b_coef[j]) b_coef[j] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      foreach (b_coef[j]) b_coef[j] = 16'($signed($urandom_range(255)) - 128);
      for (int i = 0; i < D; i++) begin
        a[i] = 16'($signed($urandom_range(2047)) - 1024);
        a_wr_en = 1; a_wr_addr = 6'(i); a_wr_data = a[i];
        @(negedge clk);
      end
      a_wr_en = 0;
      len = 7'(D); start = 1; @(negedge clk); start = 0;
      t0 = $time / 10;
      while (int'(res_count) < D - K + 1) @(negedge clk);
      t1 = $time / 10;
      repeat (50) @(negedge clk);
      check(int'(res_count) == D - K + 1, $sformatf("run %0d: %0d results", run, res_count));
      for (int i = 0; i <= D - K; i++) begin
        int c;
        c = 0;
        for (int j = 1; j <= K; j++) c += int'(a[i + j - 1]) * int'(b_coef[j-1]);
        res_addr = 6'(i);
        #1;
        check(res_data == 32'(c), $sformatf("run %0d: C_%0d = %0d, expected %0d", run, i, $signed(res_data), c));
      end
      @(negedge clk);
      // one element enters every INTERVAL = 2 cycles: the last sum leaves
      // about 2*len cycles after start plus the trip around the ring (211 here)
      check(t1 - t0 <= 2 * D + 6 * 18, $sformatf("run %0d took %0d cycles", run, t1 - t0));
      check(macs_total == 32'(K * (2 * D - K + 1) / 2), $sformatf("macs %0d", macs_total));
      check(!dl, "deadlock");
      $display("run %0d: %0d sums in %0d cycles", run, res_count, t1 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
