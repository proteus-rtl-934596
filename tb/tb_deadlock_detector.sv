// tb_deadlock_detector: three buffers. A buffer that holds a flit without
// moving for exactly threshold cycles must raise deadlock at that edge and
// not one cycle before; movement or emptiness restarts the count; the
// flag stays high until clear; threshold 0 never fires.
module tb_deadlock_detector;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear;
  logic [15:0] th;
  logic [2:0] occ, mov;
  logic dl;

  deadlock_detector #(.NBUF(3), .CNT_W(16)) dut (
    .clk, .rst_n, .clear, .threshold(th), .occupied(occ), .moved(mov), .deadlock(dl)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  initial begin
    clear = 0; th = 16'd10; occ = 0; mov = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // buffer 1 occupied and moving every cycle: never a deadlock
    @(negedge clk); occ = 3'b010; mov = 3'b010;
    repeat (30) @(negedge clk);
    check(dl == 0, "moving buffer flagged");
    // buffer 1 stalls: flag exactly after 10 stalled cycles
    mov = 3'b000;
    for (int i = 1; i <= 10; i++) begin
      @(negedge clk);
      check(dl == (i >= 10), $sformatf("after %0d stalled cycles dl=%0d", i, dl));
    end
    // stays set, even when the buffer moves again
    mov = 3'b010;
    repeat (5) @(negedge clk);
    check(dl == 1, "flag not sticky");
    clear = 1; @(negedge clk); clear = 0;
    check(dl == 0, "clear");
    // stall of 9 cycles interrupted by a move: no flag
    occ = 3'b100;
    for (int k = 0; k < 3; k++) begin
      mov = 3'b000; repeat (9) @(negedge clk);
      mov = 3'b100; @(negedge clk);
    end
    check(dl == 0, "interrupted stall flagged");
    // emptying restarts the count too
    mov = 0; occ = 3'b001; repeat (9) @(negedge clk);
    occ = 0; @(negedge clk);
    occ = 3'b001; repeat (9) @(negedge clk);
    check(dl == 0, "empty did not restart the count");
    @(negedge clk);
    check(dl == 1, "stall of 10 after restart not flagged");
    // threshold 0: off
    clear = 1; th = 0; @(negedge clk); clear = 0;
    repeat (100) @(negedge clk);
    check(dl == 0, "threshold 0 fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
