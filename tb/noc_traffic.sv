// noc_traffic: testbench traffic source and sink for every node of a
// KX x KY BRS network (the packet generator of the evaluation setup).
//
// Each node injects 4-flit packets at rate_pct percent of cycles (a packet
// is started with that probability when the node is idle), picking as
// destination the node the chosen synthetic pattern names:
//   0 uniform random, 1 neighbour (x+1, y+1), 2 transpose (y, x),
//   3 bit complement (K-1-x, K-1-y)
// It sends a head flit only on a VC whose credits are all back and then
// streams the packet on that VC as credits allow.  The head payload holds
// the destination and a packet number, body payloads a function of the
// packet number, so every ejected flit can be checked: right node, right
// order within its VC, right payload, tail on the fourth flit.  Ejected
// flits are credited back immediately.  Counters report packets sent and
// delivered, errors and the sum of head-to-tail network latencies.
// send_one() injects a single packet for latency measurements.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int   KX    = 4,
  parameter int   KY    = 4,
  parameter int   DEPTH = BUF_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  output flit_t   inj_flit   [KX*KY],
  input  credit_t inj_credit [KX*KY],
  input  flit_t   ej_flit    [KX*KY],
  output credit_t ej_credit  [KX*KY],
  input  int      rate_pct,
  input  int      pattern,
  output int      sent,
  output int      delivered,
  output int      errors,
  output int      checks,
  output longint  lat_sum,
  output int      last_lat
);
  localparam int N = KX * KY;
  localparam int NPID = 1024;

  int cyc;
  int cred [N][NVC];
  int left [N][NVC], cur_pid [N][NVC];
  int pk_dst [NPID], pk_t0 [NPID];
  bit pk_live [NPID];
  int ej_pid [N][NVC], ej_idx [N][NVC];
  int next_pid;
  int manual_src, manual_dst;

  function automatic logic [FLIT_W-1:0] body(int pid, int idx);
    return FLIT_W'((pid * 13 + idx * 97 + 3) ^ (idx << 15));
  endfunction

  function automatic int pattern_dest(int n);
    int x, y;
    x = n % KX; y = n / KX;
    case (pattern)
      1: return ((y + 1) % KY) * KX + (x + 1) % KX;
      2: return x * KX + y;
      3: return (KY - 1 - y) * KX + (KX - 1 - x);
      default: return $urandom_range(0, N - 1);
    endcase
  endfunction

  task automatic send_one(int src, int dst);
    manual_src = src; manual_dst = dst;
  endtask

  task automatic start(int n, int v, int dst);
    int pid;
    pid = next_pid;
    next_pid = (next_pid + 1) % NPID;
    if (pk_live[pid]) begin errors++; $display("packet number %0d reused while in flight", pid); end
    pk_live[pid] = 1; pk_dst[pid] = dst; pk_t0[pid] = cyc;
    cur_pid[n][v] = pid; left[n][v] = 4;
    sent++;
  endtask

  initial begin
    cyc = 0; next_pid = 0; manual_src = -1; manual_dst = -1;
    sent = 0; delivered = 0; errors = 0; checks = 0; lat_sum = 0; last_lat = -1;
    foreach (pk_live[i]) pk_live[i] = 0;
    for (int n = 0; n < N; n++) begin
      inj_flit[n] = '0; ej_credit[n] = '0;
      for (int v = 0; v < NVC; v++) begin
        cred[n][v] = DEPTH; left[n][v] = 0; cur_pid[n][v] = 0; ej_pid[n][v] = 0; ej_idx[n][v] = 0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < N; n++) begin
      flit_t f;
      int v;
      // ---- sink ----
      f = ej_flit[n];
      ej_credit[n] = '0;
      if (f.valid) begin
        int pid, ev;
        ev = int'(f.vc);
        ej_credit[n].valid = 1; ej_credit[n].vc = f.vc;
        checks++;
        if (f.head) begin
          pid = int'(f.data[FLIT_W-1:2*COORD_W]);
          if (ej_idx[n][ev] != 0 || !pk_live[pid] || pk_dst[pid] != n ||
              int'(f.data[COORD_W-1:0]) != n % KX || int'(f.data[2*COORD_W-1:COORD_W]) != n / KX) begin
            errors++; $display("node %0d: bad head flit, packet %0d", n, pid);
          end
          ej_pid[n][ev] = pid;
        end else begin
          pid = ej_pid[n][ev];
          if (ej_idx[n][ev] == 0 || f.data != body(pid, ej_idx[n][ev])) begin
            errors++; $display("node %0d: bad body flit %0d of packet %0d", n, ej_idx[n][ev], pid);
          end
        end
        if (f.tail != (ej_idx[n][ev] == 3)) begin errors++; $display("node %0d: tail mark wrong", n); end
        ej_idx[n][ev]++;
        if (f.tail) begin
          ej_idx[n][ev] = 0;
          pk_live[pid] = 0;
          delivered++;
          last_lat = cyc - pk_t0[pid];
          lat_sum += longint'(last_lat);
        end
      end
      // ---- source ----
      if (inj_credit[n].valid) cred[n][inj_credit[n].vc]++;
      inj_flit[n] = '0;
      v = (left[n][0] > 0) ? 0 : (left[n][1] > 0) ? 1 : $urandom_range(0, NVC - 1);
      if (left[n][v] == 0 && cred[n][v] == DEPTH) begin
        if (manual_src == n) begin
          start(n, v, manual_dst);
          manual_src = -1;
        end else if ($urandom_range(0, 99) < rate_pct)
          start(n, v, pattern_dest(n));
      end
      if (left[n][v] > 0 && cred[n][v] > 0) begin
        int pid, idx, dst;
        pid = cur_pid[n][v]; idx = 4 - left[n][v]; dst = pk_dst[pid];
        inj_flit[n].valid = 1;
        inj_flit[n].vc    = VCW'(v);
        inj_flit[n].head  = (idx == 0);
        inj_flit[n].tail  = (idx == 3);
        inj_flit[n].route = P_LOCAL;
        inj_flit[n].data  = (idx == 0) ?
            FLIT_W'((pid << (2 * COORD_W)) | ((dst / KX) << COORD_W) | (dst % KX)) : body(pid, idx);
        cred[n][v]--; left[n][v]--;
      end
    end
  end

endmodule
