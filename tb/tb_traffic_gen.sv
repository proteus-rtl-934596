// tb_traffic_gen: generators for node 6 of 16 with pkt_ready always high.
// Checks: the injection decision follows the generator's LFSR (x^16+x^14+
// x^13+x^11+1) exactly, which also pins the measured rate to the programmed
// one; every pattern gives the destination worked out here (bit-complement
// 9, bit-reverse 6, shuffle 12, transpose 9, bit-rotation 3); uniform random
// never picks the own node and reaches every other one; data carry the
// node id, a rising sequence number and the flit index; a packet due while
// one is held (pkt_ready low) is counted as dropped; disabling discards the
// held packet.
module tb_traffic_gen;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int MF = 4;

  logic enable, pkt_valid, pkt_ready;
  logic [15:0] rate;
  pattern_e pattern;
  logic [2:0] pkt_len, len_o;
  logic [NODE_W-1:0] dst;
  logic [MF*LINK_W-1:0] data;
  logic [31:0] generated, dropped;

  traffic_gen #(.NODE_ID(6), .NUM_NODES(16), .MAX_FLITS(MF)) dut (
    .clk, .rst_n, .enable, .rate, .pattern, .pkt_len, .pkt_valid, .pkt_ready,
    .pkt_dst(dst), .pkt_len_o(len_o), .pkt_data(data), .generated, .dropped
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  // reference copy of the injection LFSR (same seed formula)
  logic [15:0] ref_lfsr;
  int fired, cycles_on, last_seq;
  int seen_dst [16];

  initial begin
    enable = 0; rate = 0; pattern = PAT_RANDOM; pkt_len = 3'd2; pkt_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_lfsr = 16'(6 * 7919 + 12345);
    last_seq = -1;
    for (int p = 0; p < 6; p++) begin
      int want;
      pattern = pattern_e'(p);
      rate = 16'd16384;   // 0.25 packets per cycle
      fired = 0; cycles_on = 0;
      foreach (seen_dst[k]) seen_dst[k] = 0;
      @(negedge clk); enable = 1;
      for (int i = 0; i < 4000; i++) begin
        bit exp_fire;
        exp_fire = (ref_lfsr < rate);
        @(posedge clk); #1;
        ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
        cycles_on++;
        checks++;
        if (pkt_valid != exp_fire) begin failures++; if (failures < 10) $display("FAIL injection decision at %0d", i); end
        if (pkt_valid) begin
          fired++;
          seen_dst[dst]++;
          case (p)
            1: want = 9; 2: want = 6; 3: want = 12; 4: want = 9; 5: want = 3;
            default: want = -1;
          endcase
          if (want >= 0) check(int'(dst) == want, $sformatf("pattern %0d dst %0d", p, dst));
          else check(int'(dst) != 6 && int'(dst) < 16, "random dst");
          check(len_o == 3'd2, "length");
          for (int k = 0; k < MF; k++)
            check(data[k*LINK_W +: 6] == 6'(k) && data[k*LINK_W + 38 +: 10] == 10'd6, "data fields");
          check(int'(data[6 +: 32]) == last_seq + 1, "sequence");
          last_seq = int'(data[6 +: 32]);
        end
      end
      @(negedge clk); enable = 0;
      check(fired > 850 && fired < 1150, $sformatf("pattern %0d rate: %0d packets in 4000 cycles", p, fired));
      if (p == 0)
        for (int k = 0; k < 16; k++) check((k == 6) == (seen_dst[k] == 0), $sformatf("random dst %0d seen %0d", k, seen_dst[k]));
    end
    check(dropped == 0, "dropped with ready high");
    // held packet: ready low, packets due meanwhile are dropped
    pkt_ready = 0; rate = 16'hFFFF; enable = 1;
    repeat (50) @(negedge clk);
    check(pkt_valid && dropped > 40, $sformatf("dropped %0d", dropped));
    enable = 0;
    @(negedge clk);
    check(!pkt_valid, "held packet not discarded on disable");
    check(generated == 32'(last_seq + 2), $sformatf("generated %0d", generated));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
