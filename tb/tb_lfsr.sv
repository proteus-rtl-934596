// tb_lfsr: the 16-bit LFSR against the polynomial x^16+x^14+x^13+x^11+1
// computed here bit by bit, its full period of 65535 states, hold when en
// is low, and the replacement of a zero seed; also the 8-bit variant's
// period of 255.
module tb_lfsr;
  logic clk = 0, rst_n = 0, en;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] v, vz;
  logic [7:0]  v8;

  lfsr #(.WIDTH(16), .SEED(32'hACE1)) u16 (.clk, .rst_n, .en, .value(v));
  lfsr #(.WIDTH(16), .SEED(32'h0))    uz  (.clk, .rst_n, .en, .value(vz));
  lfsr #(.WIDTH(8),  .SEED(32'h1))    u8  (.clk, .rst_n, .en, .value(v8));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] model, first;
  int period, period8;
  logic [7:0] first8;
  initial begin
    en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (v != 16'hACE1) begin failures++; $display("FAIL seed"); end
    checks++; if (vz != 16'h0001) begin failures++; $display("FAIL zero seed"); end
    @(negedge clk);
    checks++; if (v != 16'hACE1) begin failures++; $display("FAIL hold"); end
    model = v; first = v; first8 = v8;
    en = 1;
    period = 0; period8 = 0;
    for (int i = 1; i <= 65535; i++) begin
      @(negedge clk);
      model = {model[14:0], model[15] ^ model[13] ^ model[12] ^ model[10]};
      checks++;
      if (v != model) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d: %h vs %h", i, v, model);
      end
      if (v == first && period == 0) period = i;
      if (v8 == first8 && period8 == 0) period8 = i;
    end
    checks++; if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    checks++; if (period8 != 255) begin failures++; $display("FAIL period8 %0d", period8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
