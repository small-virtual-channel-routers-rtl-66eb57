// tb_brs_router: one BRS router, node (1,1) of a 4x4 mesh, surrounded by
// testbench models of its four neighbours and its local node.  Each model
// sends 4-flit packets whose destinations are legal for that input under
// XY routing, obeying credits and the empty-VC-before-reuse rule, and
// sinks what the router sends, returning credits after a random delay.
// Checked: each packet leaves on the port XY routing names, on one VC, in
// order, with the lookahead tag the next router needs and the payload it
// entered with; every packet is delivered; an isolated head flit takes 5
// cycles from input link to output link and its packet streams out one
// flit per cycle.  Under load the shared block RAM cases (both ports of a
// pair written, one written with requests on both sides) must occur.
module tb_brs_router;
  import noc_pkg::*;
  localparam int DEPTH = 16, MX = 1, MY = 1, P = NPORTS;
  logic clk = 0, rst_n = 0;
  flit_t link_in [P], link_out [P];
  credit_t credit_out [P], credit_in [P];
  int checks = 0, failures = 0;

  brs_router dut (.clk, .rst_n, .my_x(coord_t'(MX)), .my_y(coord_t'(MY)),
                  .link_in, .credit_out, .link_out, .credit_in);
  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_e ref_route(int x, int y, int dx, int dy);
    if (dx > x) return P_EAST;
    if (dx < x) return P_WEST;
    if (dy > y) return P_NORTH;
    if (dy < y) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic logic [FLIT_W-1:0] body(int pid, int idx);
    return FLIT_W'((pid * 7 + idx * 131 + 5) ^ (idx << 14));
  endfunction

  // Packet table.
  int pk_dx [1024], pk_dy [1024];
  port_e pk_out [1024], pk_next [1024];
  bit pk_done [1024];
  int n_sent = 0, n_done = 0;

  // Upstream models.
  int up_cred [P][NVC];
  int up_left [P][NVC], up_pid [P][NVC];
  // Sinks.
  int sk_pid [P][NVC], sk_idx [P][NVC];
  int sk_owed [P][$];      // credits (vc) waiting to be returned
  int sk_delay [P];
  // Mechanism counters.
  int n_both = 0, n_one = 0;
  int inject_pct = 0;
  int cyc = 0;
  int lat_head_in = -1, lat_head_out = -1, lat_tail_out = -1;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_mem[2].g_pair.pr_wr_en == 2'b11 && dut.g_mem[2].g_pair.pr_any != 0) n_both++;
    if (dut.g_mem[1].g_pair.pr_wr_en == 2'b11 && dut.g_mem[1].g_pair.pr_any != 0) n_both++;
    if ((dut.g_mem[2].g_pair.pr_wr_en == 2'b01 || dut.g_mem[2].g_pair.pr_wr_en == 2'b10) &&
        dut.g_mem[2].g_pair.pr_any == 2'b11) n_one++;
    if ((dut.g_mem[1].g_pair.pr_wr_en == 2'b01 || dut.g_mem[1].g_pair.pr_wr_en == 2'b10) &&
        dut.g_mem[1].g_pair.pr_any == 2'b11) n_one++;
  end

  // Random legal destination for a packet entering on port p.
  task automatic pick_dest(int p, output int dx, output int dy);
    case (port_e'(p))
      P_WEST:  begin dx = $urandom_range(MX, 3); dy = $urandom_range(0, 3); end
      P_EAST:  begin dx = $urandom_range(0, MX); dy = $urandom_range(0, 3); end
      P_NORTH: begin dx = MX; dy = $urandom_range(0, MY); end
      P_SOUTH: begin dx = MX; dy = $urandom_range(MY, 3); end
      default: begin
        do begin dx = $urandom_range(0, 3); dy = $urandom_range(0, 3); end
        while (dx == MX && dy == MY);
      end
    endcase
  endtask

  task automatic start_packet(int p, int v, int dx, int dy);
    int pid, nx, ny;
    pid = n_sent % 1024;
    n_sent++;
    pk_dx[pid] = dx; pk_dy[pid] = dy; pk_done[pid] = 0;
    pk_out[pid] = ref_route(MX, MY, dx, dy);
    nx = MX + (pk_out[pid] == P_EAST) - (pk_out[pid] == P_WEST);
    ny = MY + (pk_out[pid] == P_NORTH) - (pk_out[pid] == P_SOUTH);
    pk_next[pid] = (pk_out[pid] == P_LOCAL) ? P_LOCAL : ref_route(nx, ny, dx, dy);
    up_pid[p][v] = pid; up_left[p][v] = 4;
  endtask

  // One cycle of all models: called at the negedge.
  task automatic step();
    cyc++;
    // Sinks: check arriving flits, schedule credits.
    for (int o = 0; o < P; o++) begin
      flit_t f;
      f = link_out[o];
      if (f.valid) begin
        int v, pid;
        v = int'(f.vc);
        if (f.head) begin
          pid = int'(f.data[FLIT_W-1:2*COORD_W]);
          checks++;
          if (sk_idx[o][v] != 0 || pk_out[pid] != port_e'(o) || pk_next[pid] != f.route ||
              f.data[2*COORD_W-1:0] != 8'((pk_dy[pid] << COORD_W) | pk_dx[pid]) || pk_done[pid]) begin
            failures++; $display("bad head on port %0d vc %0d pid %0d route %0d", o, v, pid, f.route);
          end
          sk_pid[o][v] = pid;
          if (lat_head_in >= 0 && lat_head_out < 0) lat_head_out = cyc;
        end else begin
          pid = sk_pid[o][v];
          checks++;
          if (f.data != body(pid, sk_idx[o][v])) begin
            failures++; $display("bad body port %0d vc %0d pid %0d idx %0d", o, v, pid, sk_idx[o][v]);
          end
        end
        checks++;
        if (f.tail != (sk_idx[o][v] == 3)) begin failures++; $display("tail mark wrong port %0d", o); end
        sk_idx[o][v]++;
        if (f.tail) begin
          sk_idx[o][v] = 0; pk_done[pid] = 1; n_done++;
          if (lat_head_out >= 0 && lat_tail_out < 0) lat_tail_out = cyc;
        end
        sk_owed[o].push_back(v);
      end
      credit_in[o] = '0;
      if (sk_owed[o].size() > 0) begin
        if (sk_delay[o] == 0) begin
          credit_in[o].valid = 1; credit_in[o].vc = VCW'(sk_owed[o].pop_front());
          sk_delay[o] = $urandom_range(0, 2);
        end else sk_delay[o]--;
      end
    end
    // Upstreams: credits back, then send.
    for (int p = 0; p < P; p++) begin
      int v;
      if (credit_out[p].valid) up_cred[p][credit_out[p].vc]++;
      link_in[p] = '0;
      // Finish a packet in progress before choosing a VC at random.
      v = (up_left[p][0] > 0) ? 0 : (up_left[p][1] > 0) ? 1 : $urandom_range(0, NVC-1);
      if (up_left[p][v] == 0 && up_cred[p][v] == DEPTH && $urandom_range(0, 99) < inject_pct) begin
        int dx, dy;
        pick_dest(p, dx, dy);
        start_packet(p, v, dx, dy);
      end
      if (up_left[p][v] > 0 && up_cred[p][v] > 0) begin
        int pid, idx;
        pid = up_pid[p][v]; idx = 4 - up_left[p][v];
        link_in[p].valid = 1; link_in[p].vc = VCW'(v);
        link_in[p].head = (idx == 0); link_in[p].tail = (idx == 3);
        link_in[p].route = pk_out[pid];
        link_in[p].data = (idx == 0) ? FLIT_W'((pid << (2*COORD_W)) | (pk_dy[pid] << COORD_W) | pk_dx[pid])
                                     : body(pid, idx);
        up_cred[p][v]--; up_left[p][v]--;
      end
    end
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin
      link_in[p] = '0; credit_in[p] = '0; sk_delay[p] = 0;
      for (int v = 0; v < NVC; v++) begin up_cred[p][v] = DEPTH; up_left[p][v] = 0; sk_idx[p][v] = 0; sk_pid[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Latency: one packet west -> east, nothing else.
    @(negedge clk);
    start_packet(P_WEST, 0, 3, MY);
    lat_head_in = cyc + 1;
    for (int k = 0; k < 40; k++) begin @(negedge clk); step(); end
    checks += 2;
    if (lat_head_out - lat_head_in != 5) begin failures++; $display("head latency %0d", lat_head_out - lat_head_in); end
    if (lat_tail_out - lat_head_out != 3) begin failures++; $display("packet took %0d cycles to stream", lat_tail_out - lat_head_out); end
    // Load.
    inject_pct = 60;
    for (int k = 0; k < 6000; k++) begin @(negedge clk); step(); end
    inject_pct = 0;
    for (int k = 0; k < 400; k++) begin @(negedge clk); step(); end
    checks++;
    if (n_done != n_sent) begin failures++; $display("delivered %0d of %0d packets", n_done, n_sent); end
    checks++;
    if (n_both == 0 || n_one == 0) begin failures++; $display("shared RAM cases: both=%0d one=%0d", n_both, n_one); end
    $display("packets %0d, both-write squashes %0d, one-write maskings %0d", n_sent, n_both, n_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
