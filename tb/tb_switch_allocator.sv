// tb_switch_allocator: random test of the separable input-first switch
// allocator.  Checked every cycle: a granted input port had a request on
// the granted VC for the granted output port; no output port is granted to
// two inputs and out_busy says exactly which outputs were granted; if any
// VC requests, something is granted; a lone request is always granted; and
// under full contention every input port is served within P cycles.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int P = NPORTS, V = NVC;
  logic clk = 0, rst_n = 0;
  logic [V-1:0] req [P];
  port_e req_port [P][V];
  logic [P-1:0] gnt, out_busy;
  logic [VCW-1:0] gnt_vc [P];
  port_e gnt_port [P];
  int checks = 0, failures = 0;
  int wait_cnt [P];

  switch_allocator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle(bit lone);
    int used [P];
    logic [P-1:0] exp_busy;
    bit any_req;
    any_req = 0; exp_busy = '0;
    foreach (used[o]) used[o] = 0;
    for (int p = 0; p < P; p++) begin
      if (req[p] != 0) any_req = 1;
      if (gnt[p]) begin
        checks++;
        if (!req[p][gnt_vc[p]] || req_port[p][gnt_vc[p]] != gnt_port[p]) begin
          failures++; $display("bad grant p=%0d", p);
        end
        used[gnt_port[p]]++;
        exp_busy[gnt_port[p]] = 1'b1;
      end
    end
    foreach (used[o]) begin
      checks++;
      if (used[o] > 1) begin failures++; $display("output %0d granted twice", o); end
    end
    checks++;
    if (out_busy != exp_busy) begin failures++; $display("out_busy %b exp %b", out_busy, exp_busy); end
    checks++;
    if (any_req && gnt == 0) begin failures++; $display("no grant with requests"); end
    if (lone) begin
      checks++;
      if (gnt == 0) begin failures++; $display("lone request lost"); end
    end
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin req[p] = '0; wait_cnt[p] = 0; for (int v = 0; v < V; v++) req_port[p][v] = P_LOCAL; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      foreach (req[p]) req[p] = '0;
      req[$urandom_range(0, P-1)][$urandom_range(0, V-1)] = 1'b1;
      foreach (req_port[p, v]) req_port[p][v] = port_e'($urandom_range(0, P-1));
      #1 check_cycle(1);
    end
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      foreach (req[p]) req[p] = V'($urandom);
      foreach (req_port[p, v]) req_port[p][v] = port_e'($urandom_range(0, P-1));
      #1 check_cycle(0);
    end
    // Full contention for output WEST.
    for (int p = 0; p < P; p++) begin req[p] = '1; for (int v = 0; v < V; v++) req_port[p][v] = P_WEST; end
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      #1 check_cycle(0);
      for (int p = 0; p < P; p++) begin
        wait_cnt[p] = gnt[p] ? 0 : wait_cnt[p] + 1;
        checks++;
        if (wait_cnt[p] > P) begin failures++; $display("input %0d starved", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
