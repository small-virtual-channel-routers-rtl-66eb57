// tb_output_unit: drives an output port as a router would (VC allocations
// of free VCs, flits granted only with a credit, tails that end packets)
// while a model downstream router returns credits after a random delay.
// A reference model of credits and VC state is compared with credit_ok and
// vc_free every cycle; the link output must equal the switch flit one
// cycle later.  Checks that credits run out, and that a VC only becomes
// free again once its tail is sent and all its credits are back.
module tb_output_unit;
  import noc_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  flit_t st_flit, link_out, prev_flit;
  credit_t credit_in;
  logic [NVC-1:0] va_take, vc_free, credit_ok;
  logic sa_take, sa_tail;
  logic [VCW-1:0] sa_vc;
  int checks = 0, failures = 0;
  int cred [NVC];
  bit alloc [NVC], drain [NVC];
  int sent [NVC];
  int owed [NVC];         // credits the downstream still holds
  int n_empty = 0, n_wait_free = 0;

  output_unit #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st_flit = '0; credit_in = '0; va_take = 0; sa_take = 0; sa_tail = 0; sa_vc = 0;
    for (int v = 0; v < NVC; v++) begin cred[v] = DEPTH; alloc[v] = 0; drain[v] = 0; sent[v] = 0; owed[v] = 0; end
    prev_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      // Compare state.
      checks++;
      if (link_out != prev_flit) begin failures++; $display("link %h exp %h", link_out, prev_flit); end
      for (int v = 0; v < NVC; v++) begin
        checks += 2;
        if (credit_ok[v] != (cred[v] != 0)) begin failures++; $display("credit_ok[%0d] cred=%0d", v, cred[v]); end
        if (vc_free[v] != !alloc[v]) begin failures++; $display("vc_free[%0d] alloc=%0d", v, alloc[v]); end
        if (cred[v] == 0) n_empty++;
        if (alloc[v] && drain[v]) n_wait_free++;
      end
      // New stimulus.
      va_take = 0;
      for (int v = 0; v < NVC; v++)
        if (!alloc[v] && $urandom_range(0, 3) == 0) va_take[v] = 1;
      sa_take = 0; sa_tail = 0; sa_vc = VCW'($urandom_range(0, NVC-1));
      if (alloc[sa_vc] && !drain[sa_vc] && cred[sa_vc] != 0 && $urandom_range(0, 1)) begin
        sa_take = 1;
        sa_tail = (sent[sa_vc] >= 3) && $urandom_range(0, 30) == 0;
      end
      st_flit = flit_t'({$urandom, $urandom});
      st_flit.valid = $urandom_range(0, 1);
      credit_in = '0;
      begin
        int cv;
        cv = $urandom_range(0, NVC-1);
        if (owed[cv] > 0 && $urandom_range(0, ((k / 2000) % 2) ? 1 : 40) == 0) begin
          credit_in.valid = 1; credit_in.vc = VCW'(cv);
        end
      end
      // Update reference for the coming edge.
      prev_flit = st_flit;
      for (int v = 0; v < NVC; v++) begin
        bit dec, inc;
        dec = sa_take && sa_vc == VCW'(v);
        inc = credit_in.valid && credit_in.vc == VCW'(v);
        if (drain[v] && cred[v] == DEPTH) begin alloc[v] = 0; drain[v] = 0; end
        if (va_take[v]) begin alloc[v] = 1; sent[v] = 0; end
        if (dec) begin sent[v]++; owed[v]++; if (sa_tail) drain[v] = 1; end
        if (inc) owed[v]--;
        cred[v] = cred[v] - int'(dec) + int'(inc);
      end
    end
    checks++;
    if (n_empty == 0 || n_wait_free == 0) begin failures++; $display("not reached: empty=%0d waitfree=%0d", n_empty, n_wait_free); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
