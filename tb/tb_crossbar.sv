// tb_crossbar: random selections on the 5x5 crossbar; each output must
// carry exactly the flit of its selected input, or an idle flit when not
// selected.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t in_f [NPORTS], out_f [NPORTS];
  logic  sv [NPORTS];
  logic [2:0] sel [NPORTS];

  crossbar #(.N(NPORTS)) dut (.in_flit(in_f), .sel_valid(sv), .sel(sel), .out_flit(out_f));

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int perm [NPORTS];
      foreach (perm[k]) perm[k] = k;
      perm.shuffle();
      for (int p = 0; p < NPORTS; p++) begin
        in_f[p] = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        in_f[p].valid = 1'b1;
        sel[p] = 3'(perm[p]);
        sv[p]  = ($urandom_range(3) != 0);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (sv[o] ? (out_f[o] != in_f[perm[o]]) : (out_f[o] != FLIT_IDLE)) begin
          failures++; $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
