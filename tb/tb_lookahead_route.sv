// tb_lookahead_route: exhaustive check of lookahead XY routing on a 4x4
// mesh and a 4x4 torus.  For every router, every destination, every input
// port and both input VCs the expected output port here, output port at
// the next router and allowed downstream VCs are computed in the
// testbench from coordinate differences and compared with the module.
module tb_lookahead_route;
  import noc_pkg::*;
  localparam int K = 4;
  coord_t my_x, my_y;
  logic [FLIT_W-1:0] head_data;
  port_e tag;
  logic [VCW-1:0] in_vc;
  port_e out_m [5], next_m [5], out_t [5], next_t [5];
  logic [NVC-1:0] mask_m [5], mask_t [5];
  int checks = 0, failures = 0;

  for (genvar ip = 0; ip < 5; ip++) begin : g_dut
    lookahead_route #(.KX(K), .KY(K), .TORUS(1'b0), .IN_PORT(port_e'(ip))) u_mesh (
      .my_x, .my_y, .head_data, .tag, .in_vc,
      .out_port(out_m[ip]), .next_port(next_m[ip]), .vc_mask(mask_m[ip]));
    lookahead_route #(.KX(K), .KY(K), .TORUS(1'b1), .IN_PORT(port_e'(ip))) u_torus (
      .my_x, .my_y, .head_data, .tag, .in_vc,
      .out_port(out_t[ip]), .next_port(next_t[ip]), .vc_mask(mask_t[ip]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference XY route.  Torus: go the way with fewer hops, + on a tie.
  function automatic port_e ref_route(int x, int y, int dx, int dy, bit torus);
    int ex, ey;
    ex = dx - x; ey = dy - y;
    if (torus) begin
      if (ex < 0) ex += K;
      if (ey < 0) ey += K;
      if (ex != 0) return (ex <= K / 2) ? P_EAST : P_WEST;
      if (ey != 0) return (ey <= K / 2) ? P_NORTH : P_SOUTH;
      return P_LOCAL;
    end
    if (ex > 0) return P_EAST;
    if (ex < 0) return P_WEST;
    if (ey > 0) return P_NORTH;
    if (ey < 0) return P_SOUTH;
    return P_LOCAL;
  endfunction

  task automatic next_xy(int x, int y, port_e p, output int nx, output int ny);
    nx = x; ny = y;
    case (p)
      P_EAST:  nx = (x + 1) % K;
      P_WEST:  nx = (x + K - 1) % K;
      P_NORTH: ny = (y + 1) % K;
      P_SOUTH: ny = (y + K - 1) % K;
      default: ;
    endcase
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
    for (int x = 0; x < K; x++)
    for (int y = 0; y < K; y++)
    for (int dx = 0; dx < K; dx++)
    for (int dy = 0; dy < K; dy++)
    for (int v = 0; v < NVC; v++) begin
      port_e here;
      int nx, ny, wr;
      here = ref_route(x, y, dx, dy, t == 1);
      my_x = coord_t'(x); my_y = coord_t'(y);
      head_data = FLIT_W'((dy << COORD_W) | dx) | FLIT_W'($urandom) << (2 * COORD_W);
      tag = here; in_vc = VCW'(v);
      #1;
      for (int ip = 0; ip < 5; ip++) begin
        port_e exp_next, got_out, got_next;
        logic [NVC-1:0] exp_mask, got_mask;
        bit same_dim, wrap;
        next_xy(x, y, here, nx, ny);
        exp_next = (here == P_LOCAL) ? P_LOCAL : ref_route(nx, ny, dx, dy, t == 1);
        wrap = (here == P_EAST && x == K-1) || (here == P_WEST && x == 0) ||
               (here == P_NORTH && y == K-1) || (here == P_SOUTH && y == 0);
        same_dim = ((ip == 2 || ip == 4) && (here == P_EAST || here == P_WEST)) ||
                   ((ip == 1 || ip == 3) && (here == P_NORTH || here == P_SOUTH));
        if (t == 0 || here == P_LOCAL) exp_mask = '1;
        else exp_mask = (wrap || (same_dim && v == 1)) ? 2'b10 : 2'b01;
        got_out  = t ? out_t[ip]  : out_m[ip];
        got_next = t ? next_t[ip] : next_m[ip];
        got_mask = t ? mask_t[ip] : mask_m[ip];
        checks += 3;
        if (got_out != here || got_next != exp_next || got_mask != exp_mask) begin
          failures++;
          $display("t=%0d (%0d,%0d)->(%0d,%0d) ip=%0d vc=%0d: out %0d/%0d next %0d/%0d mask %b/%b",
                   t, x, y, dx, dy, ip, v, got_out, here, got_next, exp_next, got_mask, exp_mask);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
