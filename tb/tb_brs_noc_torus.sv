// tb_brs_noc_torus: the same end-to-end test on a 4x4 torus (wrap-around
// links, shortest-way XY routing, dateline VC classes).  Zero-load
// latencies follow the shorter wrapped paths.  Under neighbour traffic
// only the west, south and local inputs of a router receive flits, and
// those use three different block RAMs, so the shared-RAM stall cases
// must never occur in that phase.  Over the whole run every pattern must
// be delivered intact and VC allocation losses and draining output VCs
// must occur.
module tb_brs_noc_torus;
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

  brs_noc #(.TORUS(1'b1)) u_dut (.clk, .rst_n, .inj_flit, .inj_credit, .ej_flit, .ej_credit);
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

  function automatic int total(int which);
    int t;
    t = 0;
    for (int n = 0; n < N; n++) t += (which == 0) ? n_both[n] : n_one[n];
    return t;
  endfunction

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
    zero_load(0, 15, 3);
    zero_load(5, 6, 2);
    zero_load(0, 10, 5);
    begin
      int b0, o0;
      b0 = total(0); o0 = total(1);
      run_pattern(1, 100, 2000);
      checks++;
      if (total(0) != b0 || total(1) != o0) begin
        failures++; $display("neighbour traffic on the torus triggered shared-RAM stalls");
      end
    end
    for (int pat = 0; pat < 4; pat++)
      if (pat != 1) run_pattern(pat, 100, 2000);
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
