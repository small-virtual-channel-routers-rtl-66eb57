// lookahead_route: route computation for a head flit entering a router.
//
// With lookahead routing a head flit arrives already tagged with the output
// port it takes at this router, so this router only computes the port the
// *next* router will use, in parallel with VC allocation, and attaches it
// to the flit when it leaves.  Routing is X-then-Y dimension ordered.
// Flits from the local port carry no tag (nothing upstream routed them),
// so for that input the port at this router is computed here too; this is
// this design's choice.  For a torus (TORUS=1) the module also gives the
// set of downstream VCs the packet may use: VC 1 once it has crossed the
// wrap-around link of the dimension it travels in, VC 0 otherwise (on a
// mesh every VC may be used).  Purely combinational.
module lookahead_route
  import noc_pkg::*;
#(
  parameter int   KX    = 4,
  parameter int   KY    = 4,
  parameter logic TORUS = 1'b0,
  parameter port_e IN_PORT = P_LOCAL
) (
  input  coord_t               my_x,
  input  coord_t               my_y,
  input  logic [FLIT_W-1:0]    head_data,  // payload of the head flit
  input  port_e                tag,        // route tag carried by the flit
  input  logic [VCW-1:0]       in_vc,      // VC the flit arrived on
  output port_e                out_port,   // output port at this router
  output port_e                next_port,  // output port at the next router
  output logic [NVC-1:0]       vc_mask     // downstream VCs allowed
);
  coord_t dx, dy, nx, ny;
  logic   wraps, same_dim, crossed;

  always_comb begin
    dx = dest_x(head_data);
    dy = dest_y(head_data);
    out_port = (IN_PORT == P_LOCAL) ? route_xy(my_x, my_y, dx, dy, TORUS, KX, KY) : tag;
    nx = step_x(my_x, out_port, KX);
    ny = step_y(my_y, out_port, KY);
    next_port = (out_port == P_LOCAL) ? P_LOCAL : route_xy(nx, ny, dx, dy, TORUS, KX, KY);

    // Dateline classes on a torus.
    wraps = ((out_port == P_EAST)  && (int'(my_x) == KX - 1)) ||
            ((out_port == P_WEST)  && (my_x == 0)) ||
            ((out_port == P_NORTH) && (int'(my_y) == KY - 1)) ||
            ((out_port == P_SOUTH) && (my_y == 0));
    same_dim = (is_x_port(IN_PORT) && is_x_port(out_port)) ||
               (is_y_port(IN_PORT) && is_y_port(out_port));
    crossed  = wraps || (same_dim && (in_vc != 0));
    if (!TORUS || out_port == P_LOCAL || NVC < 2)
      vc_mask = '1;
    else
      vc_mask = crossed ? NVC'(2) : NVC'(1);
  end

endmodule
