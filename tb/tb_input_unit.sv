// tb_input_unit: the west input port of router (1,1) in a 4x4 mesh.
// The testbench plays the upstream router (4-flit packets on both VCs,
// sent only with credits, a new packet on a VC only once all its credits
// are back) and the router around the unit (random VC and switch grants,
// random downstream credit availability).  Checked: every payload is
// written one cycle after it arrives, at consecutive slots of its VC; the
// VC requests allocation for the port its route tag names exactly two
// cycles after the head arrives; switch requests only appear with a
// flit, an output VC and a credit; granted reads walk the same slots in
// order with the right head/tail marks, output VC and lookahead route;
// each read returns one credit the next cycle.
module tb_input_unit;
  import noc_pkg::*;
  localparam int DEPTH = 16, LAW = VCW + 4;
  localparam coord_t MX = 1, MY = 1;
  logic clk = 0, rst_n = 0;
  coord_t my_x, my_y;
  flit_t link_in;
  credit_t credit_out;
  logic wr_en, rd_en, sa_gnt;
  logic [LAW-1:0] wr_addr, rd_addr;
  logic [FLIT_W-1:0] wr_data;
  logic [NVC-1:0] va_req, va_gnt, sa_req;
  port_e va_port [NVC], sa_port [NVC];
  logic [NVC-1:0] va_mask [NVC];
  logic [VCW-1:0] va_vc [NVC], sa_gnt_vc;
  logic [NVC-1:0] out_credit_ok [NPORTS];
  logic st_head, st_tail;
  logic [VCW-1:0] st_vc;
  port_e st_next;
  int checks = 0, failures = 0;

  input_unit #(.IN_PORT(P_WEST), .KX(4), .KY(4), .TORUS(1'b0), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Upstream side state.
  int up_cred [NVC];
  int up_left [NVC];          // flits of the current packet still to send
  int cyc = 0;
  // Expected contents per VC: data, head, tail, in order.
  logic [FLIT_W+1:0] q [NVC][$];
  int wslot [NVC], rslot [NVC];
  port_e exp_port [NVC], exp_next [NVC];
  logic [VCW-1:0] given_vc [NVC];
  bit granted [NVC];
  flit_t prev_in;
  int head_cyc [NVC];
  logic cred_exp; logic [VCW-1:0] cred_vc_exp;
  int n_pkts = 0, n_va = 0;

  function automatic port_e ref_route(int x, int y, int dx, int dy);
    if (dx > x) return P_EAST;
    if (dx < x) return P_WEST;
    if (dy > y) return P_NORTH;
    if (dy < y) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    my_x = MX; my_y = MY;
    link_in = '0; va_gnt = 0; sa_gnt = 0; sa_gnt_vc = 0; prev_in = '0; cred_exp = 0; cred_vc_exp = 0;
    for (int v = 0; v < NVC; v++) begin
      va_vc[v] = 0; up_cred[v] = DEPTH; up_left[v] = 0; wslot[v] = 0; rslot[v] = 0; granted[v] = 0;
      exp_port[v] = P_LOCAL; exp_next[v] = P_LOCAL; given_vc[v] = 0; head_cyc[v] = -1;
    end
    foreach (out_credit_ok[o]) out_credit_ok[o] = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12000; k++) begin
      @(negedge clk);
      cyc++;
      // ---- checks on what the unit shows now ----
      // write of the flit that arrived last cycle
      checks++;
      if (wr_en != prev_in.valid) begin failures++; $display("wr_en %0d exp %0d", wr_en, prev_in.valid); end
      if (prev_in.valid) begin
        int v; v = int'(prev_in.vc);
        checks++;
        if (wr_addr != {prev_in.vc, 4'(wslot[v])} || wr_data != prev_in.data) begin
          failures++; $display("write addr %h data %h", wr_addr, wr_data);
        end
        wslot[v] = (wslot[v] + 1) % DEPTH;
      end
      // credit for last cycle's read
      checks++;
      if (credit_out.valid != cred_exp || (cred_exp && credit_out.vc != cred_vc_exp)) begin
        failures++; $display("credit mismatch");
      end
      if (credit_out.valid) up_cred[credit_out.vc]++;
      for (int v = 0; v < NVC; v++) begin
        if (va_req[v]) begin
          checks += 2;
          if (va_port[v] != exp_port[v]) begin failures++; $display("va_port %0d exp %0d", va_port[v], exp_port[v]); end
          if (va_mask[v] != '1) begin failures++; $display("mesh va_mask %b", va_mask[v]); end
          if (head_cyc[v] >= 0) begin
            checks++;
            if (cyc - head_cyc[v] != 2) begin failures++; $display("VA request %0d cycles after head", cyc - head_cyc[v]); end
            head_cyc[v] = -1;
          end
        end
        if (sa_req[v]) begin
          checks++;
          if (!granted[v] || q[v].size() == 0 || !out_credit_ok[exp_port[v]][given_vc[v]] || sa_port[v] != exp_port[v]) begin
            failures++; $display("bad switch request vc %0d", v);
          end
        end
      end
      // ---- drive this cycle ----
      va_gnt = 0;
      for (int v = 0; v < NVC; v++)
        if (va_req[v] && $urandom_range(0, 2) == 0) begin
          va_gnt[v] = 1; va_vc[v] = VCW'($urandom_range(0, NVC-1));
          granted[v] = 1; given_vc[v] = va_vc[v]; n_va++;
        end
      foreach (out_credit_ok[o]) out_credit_ok[o] = ($urandom_range(0, 7) == 0) ? NVC'($urandom) : '1;
      sa_gnt = 0; cred_exp = 0;
      begin
        int v; v = $urandom_range(0, NVC-1);
        if (sa_req[v] && $urandom_range(0, 3) != 0) begin
          logic [FLIT_W+1:0] e;
          sa_gnt = 1; sa_gnt_vc = VCW'(v);
          #1;
          e = q[v].pop_front();
          checks++;
          if (rd_en != 1 || rd_addr != {VCW'(v), 4'(rslot[v])} || st_head != e[FLIT_W+1] ||
              st_tail != e[FLIT_W] || st_vc != given_vc[v] || st_next != exp_next[v]) begin
            failures++; $display("read vc %0d addr %h slot %0d head %0d tail %0d next %0d/%0d", v, rd_addr, rslot[v], st_head, st_tail, st_next, exp_next[v]);
          end
          rslot[v] = (rslot[v] + 1) % DEPTH;
          cred_exp = 1; cred_vc_exp = VCW'(v);
          if (e[FLIT_W]) granted[v] = 0;
        end
      end
      // upstream sends
      link_in = '0;
      begin
        int v; v = $urandom_range(0, NVC-1);
        if (up_left[v] == 0 && up_cred[v] == DEPTH && !granted[v] && q[v].size() == 0 &&
            $urandom_range(0, 3) == 0) begin
          int dx, dy;
          dx = $urandom_range(1, 3); dy = $urandom_range(0, 3);
          up_left[v] = 4;
          exp_port[v] = ref_route(MX, MY, dx, dy);
          begin
            int nx, ny;
            nx = MX + (exp_port[v] == P_EAST); ny = MY + (exp_port[v] == P_NORTH) - (exp_port[v] == P_SOUTH);
            exp_next[v] = (exp_port[v] == P_LOCAL) ? P_LOCAL : ref_route(nx, ny, dx, dy);
          end
          link_in.valid = 1; link_in.head = 1; link_in.tail = 0; link_in.vc = VCW'(v);
          link_in.route = exp_port[v];
          link_in.data = FLIT_W'((dy << COORD_W) | dx) | (FLIT_W'(n_pkts) << 8);
          head_cyc[v] = cyc;
          n_pkts++;
        end else if (up_left[v] > 0 && up_left[v] < 4 && up_cred[v] > 0 && $urandom_range(0, 1)) begin
          link_in.valid = 1; link_in.head = 0; link_in.tail = (up_left[v] == 1); link_in.vc = VCW'(v);
          link_in.route = P_LOCAL; link_in.data = FLIT_W'($urandom);
        end
        if (link_in.valid && link_in.head) begin
          // head counts as first of 4
        end
        if (link_in.valid) begin
          up_cred[v]--; up_left[v]--;
          q[v].push_back({link_in.head, link_in.tail, link_in.data});
        end
      end
      prev_in = link_in;
    end
    checks++;
    if (n_pkts < 50 || n_va < 50) begin failures++; $display("too little traffic: %0d packets", n_pkts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
