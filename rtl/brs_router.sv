// brs_router: five-port virtual channel router whose VC buffers share block
// RAMs between pairs of input ports (BRS, "Block RAM Split").
//
// Ports are local, north, east, south and west (noc_pkg::port_e).  By
// default east and west share one 512x18 block RAM, north and south share
// another, and the local port has a block RAM of its own; PARTNER[p] names
// the port that shares with p (PARTNER[p] == p: a private RAM), so other
// pairings can be chosen.  Only flit payloads live in the RAMs; headers,
// pointers and VC state are in logic (input_unit).
//
// Pipeline, for a head flit arriving on a link in cycle t:
//   t+1  input register, payload written to block RAM, lookahead route
//   t+2  VC allocation (separable input-first)
//   t+3  switch allocation; the winner's RAM read address is issued
//   t+4  RAM data + header through the crossbar into the output register
//   t+5  flit on the output link
// Body flits follow one per cycle when nothing stalls.  Because writes
// never wait, a shared RAM that is written by both of its ports in a cycle
// masks every switch request of those two ports, and one written by one
// port lets only one of them read, preferring the port not being written
// (bram_share_ctrl).  Credits flow back one cycle after a flit leaves its
// buffer.  The structure follows the design description; pipeline cycle
// boundaries are this design's reading of it.
module brs_router
  import noc_pkg::*;
#(
  parameter int   KX    = 4,
  parameter int   KY    = 4,
  parameter logic TORUS = 1'b0,
  parameter int   DEPTH = BUF_DEPTH,
  parameter int   PARTNER [NPORTS] = '{0, 3, 4, 1, 2}   // L, N<->S, E<->W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  coord_t  my_x,
  input  coord_t  my_y,
  input  flit_t   link_in    [NPORTS],
  output credit_t credit_out [NPORTS],
  output flit_t   link_out   [NPORTS],
  input  credit_t credit_in  [NPORTS]
);
  localparam int P   = NPORTS;
  localparam int LAW = VCW + $clog2(DEPTH);

  // input unit <-> memories
  logic              wr_en   [P];
  logic [LAW-1:0]    wr_addr [P];
  logic [FLIT_W-1:0] wr_data [P];
  logic              rd_en   [P];
  logic [LAW-1:0]    rd_addr [P];
  logic [FLIT_W-1:0] rd_data [P];
  logic              allow   [P];

  // allocation
  logic [NVC-1:0] va_req  [P];
  port_e          va_port [P][NVC];
  logic [NVC-1:0] va_mask [P][NVC];
  logic [NVC-1:0] va_gnt  [P];
  logic [VCW-1:0] va_vc   [P][NVC];
  logic [NVC-1:0] sa_req  [P];
  logic [NVC-1:0] sa_req_m[P];
  port_e          sa_port [P][NVC];
  logic [P-1:0]   sa_gnt;
  logic [VCW-1:0] sa_gnt_vc [P];
  port_e          sa_gnt_port [P];
  logic [P-1:0]   sa_out_busy;

  logic [NVC-1:0] out_free  [P];
  logic [NVC-1:0] credit_ok [P];
  logic [NVC-1:0] va_take   [P];

  // switch traversal stage
  logic           st_head [P], st_tail [P];
  logic [VCW-1:0] st_vc   [P];
  port_e          st_next [P];
  flit_t          st_q    [P];
  port_e          st_dst_q[P];
  flit_t          xb_in   [P];
  flit_t          xb_out  [P];
  logic           take_tail [P];
  logic [VCW-1:0] take_vc   [P];

  for (genvar p = 0; p < P; p++) begin : g_in
    input_unit #(.IN_PORT(port_e'(p)), .KX(KX), .KY(KY), .TORUS(TORUS), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .my_x, .my_y,
      .link_in(link_in[p]), .credit_out(credit_out[p]),
      .wr_en(wr_en[p]), .wr_addr(wr_addr[p]), .wr_data(wr_data[p]),
      .va_req(va_req[p]), .va_port(va_port[p]), .va_mask(va_mask[p]),
      .va_gnt(va_gnt[p]), .va_vc(va_vc[p]),
      .out_credit_ok(credit_ok),
      .sa_req(sa_req[p]), .sa_port(sa_port[p]),
      .sa_gnt(sa_gnt[p]), .sa_gnt_vc(sa_gnt_vc[p]),
      .rd_en(rd_en[p]), .rd_addr(rd_addr[p]),
      .st_head(st_head[p]), .st_tail(st_tail[p]), .st_vc(st_vc[p]), .st_next(st_next[p])
    );
    assign sa_req_m[p] = allow[p] ? sa_req[p] : '0;
  end

  // Block RAMs: one per pair of ports, or a private one.
  for (genvar p = 0; p < P; p++) begin : g_mem
    if (PARTNER[p] > p) begin : g_pair
      localparam int Q = PARTNER[p];
      logic [1:0]        pr_wr_en, pr_any, pr_allow, pr_rd_en;
      logic [LAW-1:0]    pr_wr_addr [2], pr_rd_addr [2];
      logic [FLIT_W-1:0] pr_wr_data [2], pr_rd_data [2];
      assign pr_wr_en   = {wr_en[Q], wr_en[p]};
      assign pr_wr_addr = '{wr_addr[p], wr_addr[Q]};
      assign pr_wr_data = '{wr_data[p], wr_data[Q]};
      assign pr_any     = {|sa_req[Q], |sa_req[p]};
      assign pr_rd_en   = {rd_en[Q], rd_en[p]};
      assign pr_rd_addr = '{rd_addr[p], rd_addr[Q]};
      bram_share_ctrl #(.LAW(LAW)) u_pair (
        .clk, .rst_n,
        .wr_en(pr_wr_en), .wr_addr(pr_wr_addr), .wr_data(pr_wr_data),
        .any_req(pr_any), .sa_allow(pr_allow),
        .rd_en(pr_rd_en), .rd_addr(pr_rd_addr), .rd_data(pr_rd_data)
      );
      assign allow[p]   = pr_allow[0];
      assign allow[Q]   = pr_allow[1];
      assign rd_data[p] = pr_rd_data[0];
      assign rd_data[Q] = pr_rd_data[1];
    end else if (PARTNER[p] == p) begin : g_priv
      // Private RAM: port A writes, port B reads; never a conflict.
      logic [FLIT_W-1:0] q_unused;
      bram_tdp #(.DW(FLIT_W), .WORDS(BRAM_WORDS)) u_ram (
        .clk,
        .en_a(wr_en[p]), .we_a(1'b1), .addr_a(BRAM_AW'(wr_addr[p])), .d_a(wr_data[p]), .q_a(q_unused),
        .en_b(rd_en[p]), .we_b(1'b0), .addr_b(BRAM_AW'(rd_addr[p])), .d_b('0), .q_b(rd_data[p])
      );
      assign allow[p] = 1'b1;
    end
  end

  // VC allocation over all P*NVC input VCs.
  logic [P*NVC-1:0] va_req_f, va_gnt_f;
  port_e            va_port_f [P*NVC];
  logic [NVC-1:0]   va_mask_f [P*NVC];
  logic [VCW-1:0]   va_vc_f   [P*NVC];

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int v = 0; v < NVC; v++) begin
        va_req_f[p*NVC+v]  = va_req[p][v];
        va_port_f[p*NVC+v] = va_port[p][v];
        va_mask_f[p*NVC+v] = va_mask[p][v];
      end
  end

  always_comb begin
    for (int p = 0; p < P; p++)
      for (int v = 0; v < NVC; v++) begin
        va_gnt[p][v] = va_gnt_f[p*NVC+v];
        va_vc[p][v]  = va_vc_f[p*NVC+v];
      end
  end

  always_comb begin
    for (int o = 0; o < P; o++) va_take[o] = '0;
    for (int i = 0; i < P*NVC; i++)
      if (va_gnt_f[i]) va_take[va_port_f[i]][va_vc_f[i]] = 1'b1;
  end

  vc_allocator #(.P(P), .V(NVC)) u_va (
    .clk, .rst_n,
    .req(va_req_f), .req_port(va_port_f), .req_mask(va_mask_f),
    .out_free(out_free), .gnt(va_gnt_f), .gnt_vc(va_vc_f)
  );

  switch_allocator #(.P(P), .V(NVC)) u_sa (
    .clk, .rst_n,
    .req(sa_req_m), .req_port(sa_port),
    .gnt(sa_gnt), .gnt_vc(sa_gnt_vc), .gnt_port(sa_gnt_port), .out_busy(sa_out_busy)
  );

  // Switch traversal register (header side; the payload comes from RAM).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < P; p++) begin
        st_q[p]     <= '0;
        st_dst_q[p] <= P_LOCAL;
      end
    end else begin
      for (int p = 0; p < P; p++) begin
        st_q[p].valid <= sa_gnt[p];
        st_q[p].head  <= st_head[p];
        st_q[p].tail  <= st_tail[p];
        st_q[p].vc    <= st_vc[p];
        st_q[p].route <= st_next[p];
        st_q[p].data  <= '0;
        st_dst_q[p]   <= sa_gnt_port[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      xb_in[p]      = st_q[p];
      xb_in[p].data = rd_data[p];
    end
  end

  crossbar #(.P(P)) u_xbar (.in_flit(xb_in), .in_port(st_dst_q), .out_flit(xb_out));

  // Which flit each output port took in switch allocation.
  always_comb begin
    for (int o = 0; o < P; o++) begin
      take_tail[o] = 1'b0;
      take_vc[o]   = '0;
      for (int p = 0; p < P; p++)
        if (sa_gnt[p] && int'(sa_gnt_port[p]) == o) begin
          take_tail[o] = st_tail[p];
          take_vc[o]   = st_vc[p];
        end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    output_unit #(.DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .st_flit(xb_out[o]), .link_out(link_out[o]), .credit_in(credit_in[o]),
      .va_take(va_take[o]),
      .sa_take(sa_out_busy[o]), .sa_vc(take_vc[o]), .sa_tail(take_tail[o]),
      .vc_free(out_free[o]), .credit_ok(credit_ok[o])
    );
  end

endmodule
