// noc_pkg: types, sizes and routing functions shared by every block of the
// block-RAM-sharing (BRS) virtual channel router and its network.
//
// A link carries one flit per cycle.  Only the 18-bit payload of a flit is
// kept in block RAM; the small header (head/tail marks, VC number and the
// lookahead route tag) travels beside it and is kept in logic inside the
// router.  Two VCs per port, 16-flit VC buffers and 18-bit flit data are the
// configuration the design is evaluated with.  The destination of a packet
// is carried in the payload of its head flit (DEST_X in the low COORD_W
// bits, DEST_Y in the next COORD_W bits); that encoding is this design's
// own choice.  Routing is dimension ordered, X first, with an optional torus
// variant that takes the shorter way round each ring and uses VC 1 after a
// packet has crossed the wrap-around link of its current dimension (the
// dateline), VC 0 before (this deadlock rule is this design's choice).
package noc_pkg;

  localparam int NPORTS    = 5;   // local + 4 mesh directions
  localparam int NVC       = 2;   // virtual channels per port
  localparam int VCW       = (NVC > 1) ? $clog2(NVC) : 1;
  localparam int FLIT_W    = 18;  // payload width = M9K true-dual-port width
  localparam int BUF_DEPTH = 16;  // flits per VC buffer
  localparam int COORD_W   = 4;   // bits per coordinate in the head payload
  localparam int BRAM_WORDS = 512; // M9K in 512 x 18 mode
  localparam int BRAM_AW   = 9;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards y+1
    P_EAST  = 3'd2,   // towards x+1
    P_SOUTH = 3'd3,   // towards y-1
    P_WEST  = 3'd4    // towards x-1
  } port_e;

  typedef logic [COORD_W-1:0] coord_t;

  // One link word.  'route' is the output port the receiving router must
  // use (lookahead routing); it is ignored on the local input.
  typedef struct packed {
    logic               valid;
    logic               head;
    logic               tail;
    logic [VCW-1:0]     vc;
    port_e              route;
    logic [FLIT_W-1:0]  data;
  } flit_t;

  // One credit: a slot of VC 'vc' of the receiving input port was freed.
  typedef struct packed {
    logic           valid;
    logic [VCW-1:0] vc;
  } credit_t;

  function automatic coord_t dest_x(input logic [FLIT_W-1:0] d);
    return d[COORD_W-1:0];
  endfunction

  function automatic coord_t dest_y(input logic [FLIT_W-1:0] d);
    return d[2*COORD_W-1:COORD_W];
  endfunction

  // Direction along one ring/line of size k from c to d: +1, -1 or 0.
  // Mesh: straight comparison.  Torus: shorter way, ties go the + way.
  function automatic logic [1:0] dim_dir(input coord_t c, input coord_t d,
                                         input logic torus, input int k);
    int diff;
    if (c == d) return 2'b00;
    if (!torus) return (d > c) ? 2'b01 : 2'b10;
    diff = (int'(d) - int'(c) + k) % k;
    return (2 * diff <= k) ? 2'b01 : 2'b10;
  endfunction

  // X-then-Y dimension ordered route at router (cx,cy) towards (dx,dy).
  function automatic port_e route_xy(input coord_t cx, input coord_t cy,
                                     input coord_t dx, input coord_t dy,
                                     input logic torus, input int kx, input int ky);
    logic [1:0] sx, sy;
    sx = dim_dir(cx, dx, torus, kx);
    sy = dim_dir(cy, dy, torus, ky);
    if (sx == 2'b01) return P_EAST;
    if (sx == 2'b10) return P_WEST;
    if (sy == 2'b01) return P_NORTH;
    if (sy == 2'b10) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // Coordinate of the neighbour reached through port p (wraps on a torus).
  function automatic coord_t step_x(input coord_t cx, input port_e p, input int kx);
    if (p == P_EAST) return (int'(cx) == kx - 1) ? coord_t'(0) : coord_t'(cx + 1'b1);
    if (p == P_WEST) return (cx == 0) ? coord_t'(kx - 1) : coord_t'(cx - 1'b1);
    return cx;
  endfunction

  function automatic coord_t step_y(input coord_t cy, input port_e p, input int ky);
    if (p == P_NORTH) return (int'(cy) == ky - 1) ? coord_t'(0) : coord_t'(cy + 1'b1);
    if (p == P_SOUTH) return (cy == 0) ? coord_t'(ky - 1) : coord_t'(cy - 1'b1);
    return cy;
  endfunction

  function automatic logic is_x_port(input port_e p);
    return (p == P_EAST) || (p == P_WEST);
  endfunction

  function automatic logic is_y_port(input port_e p);
    return (p == P_NORTH) || (p == P_SOUTH);
  endfunction

endpackage
