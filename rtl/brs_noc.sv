// brs_noc: a KX x KY network of BRS routers (default 4x4 mesh; TORUS=1
// adds the wrap-around links and uses the torus routing of noc_pkg).
//
// Router (x,y) is node n = y*KX + x.  Its east output feeds the west input
// of (x+1,y) and its north output the south input of (x,y+1); credits run
// the opposite way on the same pairs.  On a mesh the outward-facing ports
// of edge routers get idle links (no flits, no credits), so nothing is
// ever routed to them under XY routing.  Each node's local port is brought
// out: inj_* is the injection channel into the router (flits in, credits
// out) and ej_* the ejection channel (flits out, credits in).  A node that
// injects must obey the credit and VC rules of a link: send a head flit
// only on a VC whose 16 credits are all back, and keep a packet on that
// VC.  The head flit payload holds the destination (noc_pkg).
module brs_noc
  import noc_pkg::*;
#(
  parameter int   KX    = 4,
  parameter int   KY    = 4,
  parameter logic TORUS = 1'b0,
  parameter int   DEPTH = BUF_DEPTH
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   inj_flit   [KX*KY],
  output credit_t inj_credit [KX*KY],
  output flit_t   ej_flit    [KX*KY],
  input  credit_t ej_credit  [KX*KY]
);
  localparam int N = KX * KY;

  flit_t   lin  [N][NPORTS];
  flit_t   lout [N][NPORTS];
  credit_t cin  [N][NPORTS];
  credit_t cout [N][NPORTS];

  function automatic port_e opposite(input port_e p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

  for (genvar y = 0; y < KY; y++) begin : g_y
    for (genvar x = 0; x < KX; x++) begin : g_x
      localparam int n = y * KX + x;

      for (genvar p = 1; p < NPORTS; p++) begin : g_link
        localparam int  NX  = (p == int'(P_EAST)) ? x + 1 : (p == int'(P_WEST)) ? x - 1 : x;
        localparam int  NY  = (p == int'(P_NORTH)) ? y + 1 : (p == int'(P_SOUTH)) ? y - 1 : y;
        localparam bit  IN_MESH = (NX >= 0) && (NX < KX) && (NY >= 0) && (NY < KY);
        localparam int  WX  = (NX + KX) % KX;
        localparam int  WY  = (NY + KY) % KY;
        localparam int  NB  = WY * KX + WX;
        if (IN_MESH || TORUS) begin : g_conn
          assign lin[n][p] = lout[NB][opposite(port_e'(p))];
          assign cin[n][p] = cout[NB][opposite(port_e'(p))];
        end else begin : g_edge
          assign lin[n][p] = '0;
          assign cin[n][p] = '0;
        end
      end

      assign lin[n][P_LOCAL] = inj_flit[n];
      assign cin[n][P_LOCAL] = ej_credit[n];
      assign inj_credit[n]   = cout[n][P_LOCAL];
      assign ej_flit[n]      = lout[n][P_LOCAL];

      brs_router #(.KX(KX), .KY(KY), .TORUS(TORUS), .DEPTH(DEPTH)) u_router (
        .clk, .rst_n,
        .my_x(coord_t'(x)), .my_y(coord_t'(y)),
        .link_in(lin[n]), .credit_out(cout[n]),
        .link_out(lout[n]), .credit_in(cin[n])
      );
    end
  end

endmodule
