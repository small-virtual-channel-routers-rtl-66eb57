// tb_crossbar: random permutations (some inputs idle) are driven through
// the switch and each output is compared with the flit the testbench sent
// to it, or with an idle flit.
module tb_crossbar;
  import noc_pkg::*;
  localparam int P = NPORTS;
  flit_t in_flit [P], out_flit [P], exp_f [P];
  port_e in_port [P];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 3000; k++) begin
      int perm [P];
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      foreach (exp_f[o]) exp_f[o] = '0;
      for (int i = 0; i < P; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_flit[i].valid = $urandom_range(0, 3) != 0;
        in_port[i] = port_e'(perm[i]);
        if (in_flit[i].valid) exp_f[perm[i]] = in_flit[i];
      end
      #1;
      for (int o = 0; o < P; o++) begin
        checks++;
        if (out_flit[o] != exp_f[o]) begin failures++; $display("out %0d: %h exp %h", o, out_flit[o], exp_f[o]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
