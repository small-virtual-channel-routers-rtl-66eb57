// tb_brs_noc: end-to-end test of the default network, a 4x4 mesh of BRS
// routers with 2 VCs of 16 flits per port, driven by a traffic source and
// sink at every node (noc_traffic).
//   1. Zero-load latency: single packets corner to corner and between
//      neighbours must take 5 cycles per router plus 3 for the body.
//   2. The four synthetic patterns of the evaluation (uniform random,
//      neighbour, transpose, bit complement) at a moderate and a saturating
//      injection rate, each followed by a drain: every packet must arrive
//      intact at its destination.  Accepted throughput and average latency
//      are printed.  Under transpose traffic exactly two routers may see
//      both ports of a shared block RAM busy.
// The mechanisms of the design are counted over all routers and must each
// happen: both ports of a shared block RAM written (all their switch
// requests squashed), one port written while both have requests (the
// written port masked), a head flit losing VC allocation, an output VC
// that has sent its tail but waits for the downstream buffer to empty.
module tb_brs_noc;
  import noc_pkg::*;
  localparam int KX = 4, KY = 4, N = KX * KY;
  logic clk = 0, rst_n = 0;
  flit_t inj_flit [N], ej_flit [N];
  credit_t inj_credit [N], ej_credit [N];
  int rate_pct = 0, pattern = 0;
  int sent, delivered, errors, gchecks, last_lat;
  longint lat_sum;
  int checks = 0, failures = 0;
  int cyc = 0;

  brs_noc u_dut (.clk, .rst_n, .inj_flit, .inj_credit, .ej_flit, .ej_credit);
  noc_traffic #(.KX(KX), .KY(KY)) u_gen (
    .clk, .rst_n, .inj_flit, .inj_credit, .ej_flit, .ej_credit,
    .rate_pct, .pattern, .sent, .delivered, .errors, .checks(gchecks), .lat_sum, .last_lat);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: stopped at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks + gchecks, failures + errors);
    $finish;
  end

  // Mechanism counters over every router.
  int n_both [N], n_one [N], n_va_lost [N], n_drain [N];
  for (genvar y = 0; y < KY; y++) begin : g_cy
    for (genvar x = 0; x < KX; x++) begin : g_cx
      localparam int n = y * KX + x;
      initial begin n_both[n] = 0; n_one[n] = 0; n_va_lost[n] = 0; n_drain[n] = 0; end
      always @(posedge clk) if (rst_n) begin
        if (u_dut.g_y[y].g_x[x].u_router.g_mem[1].g_pair.pr_wr_en == 2'b11 &&
            u_dut.g_y[y].g_x[x].u_router.g_mem[1].g_pair.pr_any != 2'b00) n_both[n]++;
        if (u_dut.g_y[y].g_x[x].u_router.g_mem[2].g_pair.pr_wr_en == 2'b11 &&
            u_dut.g_y[y].g_x[x].u_router.g_mem[2].g_pair.pr_any != 2'b00) n_both[n]++;
        if ((u_dut.g_y[y].g_x[x].u_router.g_mem[1].g_pair.pr_wr_en inside {2'b01, 2'b10}) &&
            u_dut.g_y[y].g_x[x].u_router.g_mem[1].g_pair.pr_any == 2'b11) n_one[n]++;
        if ((u_dut.g_y[y].g_x[x].u_router.g_mem[2].g_pair.pr_wr_en inside {2'b01, 2'b10}) &&
            u_dut.g_y[y].g_x[x].u_router.g_mem[2].g_pair.pr_any == 2'b11) n_one[n]++;
        if ((u_dut.g_y[y].g_x[x].u_router.va_req_f & ~u_dut.g_y[y].g_x[x].u_router.va_gnt_f) != 0)
          n_va_lost[n]++;
        if (u_dut.g_y[y].g_x[x].u_router.g_out[0].u_out.draining != 0 ||
            u_dut.g_y[y].g_x[x].u_router.g_out[1].u_out.draining != 0 ||
            u_dut.g_y[y].g_x[x].u_router.g_out[2].u_out.draining != 0 ||
            u_dut.g_y[y].g_x[x].u_router.g_out[3].u_out.draining != 0 ||
            u_dut.g_y[y].g_x[x].u_router.g_out[4].u_out.draining != 0) n_drain[n]++;
      end
    end
  end

  task automatic wait_drain(int limit);
    int k;
    k = 0;
    while (delivered != sent && k < limit) begin @(posedge clk); k++; end
    checks++;
    if (delivered != sent) begin failures++; $display("drain: delivered %0d of %0d", delivered, sent); end
  endtask

  task automatic zero_load(int src, int dst, int routers);
    int d0;
    d0 = delivered;
    u_gen.send_one(src, dst);
    repeat (200) @(posedge clk);
    checks += 2;
    if (delivered != d0 + 1) begin failures++; $display("single packet %0d->%0d lost", src, dst); end
    if (last_lat != 5 * routers + 3) begin
      failures++; $display("latency %0d->%0d: %0d cycles, expected %0d", src, dst, last_lat, 5 * routers + 3);
    end
  endtask

  task automatic run_pattern(int pat, int rate, int cycles);
    int s0, d0;
    longint l0;
    s0 = sent; d0 = delivered; l0 = lat_sum;
    pattern = pat; rate_pct = rate;
    repeat (cycles) @(posedge clk);
    rate_pct = 0;
    wait_drain(5000);
    $display("pattern %0d rate %0d%%: %0d packets, %.3f flits/node/cycle accepted, mean latency %.1f cycles",
             pat, rate, delivered - d0, 4.0 * (delivered - d0) / (N * cycles),
             real'(lat_sum - l0) / (delivered - d0 == 0 ? 1 : delivered - d0));
    checks++;
    if (delivered - d0 < N) begin failures++; $display("pattern %0d: too few packets", pat); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    zero_load(0, 15, 7);
    zero_load(5, 6, 2);
    zero_load(12, 3, 7);
    for (int pat = 0; pat < 4; pat++) begin
      int conf0 [N];
      int hit;
      foreach (conf0[n]) conf0[n] = n_both[n] + n_one[n];
      run_pattern(pat, 10, 2000);
      run_pattern(pat, 100, 2000);
      hit = 0;
      foreach (conf0[n]) if (n_both[n] + n_one[n] != conf0[n]) hit++;
      $display("pattern %0d: shared-RAM conflicts seen in %0d of %0d routers", pat, hit, N);
      // Transpose under XY routing: only two routers ever receive on both
      // ports of one shared RAM.
      if (pat == 2) begin
        checks++;
        if (hit != 2) begin failures++; $display("transpose: conflicts in %0d routers, expected 2", hit); end
      end
    end
    begin
      int tb_both, tb_one, tb_va, tb_dr;
      tb_both = 0; tb_one = 0; tb_va = 0; tb_dr = 0;
      for (int n = 0; n < N; n++) begin
        tb_both += n_both[n]; tb_one += n_one[n]; tb_va += n_va_lost[n]; tb_dr += n_drain[n];
      end
      $display("both-write squashes %0d, one-write maskings %0d, VA losses %0d, cycles with an output VC waiting to drain %0d",
               tb_both, tb_one, tb_va, tb_dr);
      checks += 4;
      if (tb_both == 0) begin failures++; $display("no both-write squash"); end
      if (tb_one == 0)  begin failures++; $display("no one-write masking"); end
      if (tb_va == 0)   begin failures++; $display("no VC allocation loss"); end
      if (tb_dr == 0)   begin failures++; $display("no output VC ever waited to drain"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + gchecks, failures + errors);
    $finish;
  end
endmodule
