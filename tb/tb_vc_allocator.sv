// tb_vc_allocator: random test of the separable input-first VC allocator.
// Every cycle, random input VCs request random output ports with random
// allowed-VC masks against a random set of free output VCs.  Checked:
// each grant names a free, allowed VC of the requested port; no output VC
// is given twice; whenever some requester has a usable free VC at least
// one grant is made; a lone requester is always served; and a requester
// that keeps requesting a free VC is served within P*V cycles.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int P = NPORTS, V = NVC, NI = P * V;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] req, gnt;
  port_e req_port [NI];
  logic [V-1:0] req_mask [NI];
  logic [V-1:0] out_free [P];
  logic [VCW-1:0] gnt_vc [NI];
  int checks = 0, failures = 0;
  int wait_cnt [NI];

  vc_allocator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic usable(int i);
    return req[i] && ((out_free[req_port[i]] & req_mask[i]) != 0);
  endfunction

  task automatic check_cycle(bit lone);
    int taken [P*V];
    bit any_usable;
    any_usable = 0;
    foreach (taken[k]) taken[k] = 0;
    for (int i = 0; i < NI; i++) begin
      if (usable(i)) any_usable = 1;
      if (gnt[i]) begin
        checks++;
        if (!req[i] || !out_free[req_port[i]][gnt_vc[i]] || !req_mask[i][gnt_vc[i]]) begin
          failures++; $display("bad grant i=%0d vc=%0d", i, gnt_vc[i]);
        end
        taken[int'(req_port[i]) * V + int'(gnt_vc[i])]++;
      end
    end
    foreach (taken[k]) begin
      checks++;
      if (taken[k] > 1) begin failures++; $display("output VC %0d granted %0d times", k, taken[k]); end
    end
    checks++;
    if (any_usable && gnt == 0) begin failures++; $display("no grant although a VC was usable"); end
    if (lone) begin
      checks++;
      if (gnt != req) begin failures++; $display("lone requester not served"); end
    end
  endtask

  initial begin
    req = 0;
    foreach (req_port[i]) begin req_port[i] = P_LOCAL; req_mask[i] = '1; wait_cnt[i] = 0; end
    foreach (out_free[o]) out_free[o] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Lone requesters.
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      req = '0;
      req[$urandom_range(0, NI-1)] = 1'b1;
      foreach (req_port[i]) begin req_port[i] = port_e'($urandom_range(0, P-1)); req_mask[i] = '1; end
      foreach (out_free[o]) out_free[o] = '1;
      #1 check_cycle(1);
    end
    // Random traffic.
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      req = NI'($urandom);
      foreach (req_port[i]) begin
        req_port[i] = port_e'($urandom_range(0, P-1));
        req_mask[i] = ($urandom_range(0, 3) == 0) ? V'(1 << $urandom_range(0, V-1)) : '1;
      end
      foreach (out_free[o]) out_free[o] = V'($urandom);
      #1 check_cycle(0);
    end
    // Starvation: all input VCs always request port EAST, all free.
    req = '1;
    foreach (req_port[i]) begin req_port[i] = P_EAST; req_mask[i] = '1; wait_cnt[i] = 0; end
    foreach (out_free[o]) out_free[o] = '1;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      #1 check_cycle(0);
      for (int i = 0; i < NI; i++) begin
        wait_cnt[i] = gnt[i] ? 0 : wait_cnt[i] + 1;
        checks++;
        if (wait_cnt[i] > NI) begin failures++; $display("input VC %0d starved", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
