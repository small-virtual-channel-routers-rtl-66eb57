// input_unit: control side of one router input port.
//
// A flit arriving on the link is held one cycle in an input register; in
// the next cycle its payload is written to the block RAM at the tail slot
// of its VC (wr_en/wr_addr/wr_data go to the shared RAM).  Everything else
// about the flit stays in logic: per-slot head/tail marks, and for a head
// flit the output port at this router, the lookahead route for the next
// router and the downstream VCs it may use, all recorded once when the
// head is written (so they never have to be read back from the RAM).
//
// Each VC is IDLE, waiting for VC allocation (VA) or ACTIVE.  A VC in VA
// requests an output VC of its port; once granted it stays bound to that
// output VC until its tail flit leaves, so one VC buffer holds one packet
// at a time.  An ACTIVE VC with a flit and a downstream credit raises
// sa_req (the router may still mask it, see bram_share_ctrl).  On a switch
// grant the unit drives the RAM read address, hands the flit's header to
// the switch traversal stage (st_*), advances the read pointer and, in the
// next cycle, returns a credit upstream.
// Timing: link flit in cycle t, RAM write t+1, VA at t+2 for a head flit,
// switch allocation and RAM read from t+3.  The input register, lookahead
// routing, header-in-logic and VC handling follow the design description;
// the pointer-based buffer organisation is this design's choice.  Reset
// empties every VC.
module input_unit
  import noc_pkg::*;
#(
  parameter port_e IN_PORT = P_LOCAL,
  parameter int    KX      = 4,
  parameter int    KY      = 4,
  parameter logic  TORUS   = 1'b0,
  parameter int    DEPTH   = BUF_DEPTH,
  parameter int    LAW     = VCW + $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  coord_t             my_x,
  input  coord_t             my_y,
  // link side
  input  flit_t              link_in,
  output credit_t            credit_out,
  // block RAM write
  output logic               wr_en,
  output logic [LAW-1:0]     wr_addr,
  output logic [FLIT_W-1:0]  wr_data,
  // VC allocation
  output logic [NVC-1:0]     va_req,
  output port_e              va_port [NVC],
  output logic [NVC-1:0]     va_mask [NVC],
  input  logic [NVC-1:0]     va_gnt,
  input  logic [VCW-1:0]     va_vc   [NVC],
  // switch allocation
  input  logic [NVC-1:0]     out_credit_ok [NPORTS],
  output logic [NVC-1:0]     sa_req,
  output port_e              sa_port [NVC],
  input  logic               sa_gnt,
  input  logic [VCW-1:0]     sa_gnt_vc,
  // block RAM read and switch traversal header of the granted flit
  output logic               rd_en,
  output logic [LAW-1:0]     rd_addr,
  output logic               st_head,
  output logic               st_tail,
  output logic [VCW-1:0]     st_vc,
  output port_e              st_next
);
  localparam int DW = $clog2(DEPTH);

  typedef enum logic [1:0] {VC_IDLE, VC_VA, VC_ACTIVE} vc_state_e;

  flit_t          in_q;
  vc_state_e      state    [NVC];
  port_e          out_port [NVC];
  port_e          next_port[NVC];
  logic [NVC-1:0] vmask    [NVC];
  logic [VCW-1:0] out_vc   [NVC];
  logic [DW-1:0]  wptr     [NVC];
  logic [DW-1:0]  rptr     [NVC];
  logic [DW:0]    cnt      [NVC];
  logic [DEPTH-1:0] hd_bits [NVC];
  logic [DEPTH-1:0] tl_bits [NVC];

  port_e          rc_out, rc_next;
  logic [NVC-1:0] rc_mask;

  lookahead_route #(.KX(KX), .KY(KY), .TORUS(TORUS), .IN_PORT(IN_PORT)) u_rc (
    .my_x, .my_y,
    .head_data(in_q.data), .tag(in_q.route), .in_vc(in_q.vc),
    .out_port(rc_out), .next_port(rc_next), .vc_mask(rc_mask)
  );

  // Input register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_q <= '0;
    else        in_q <= link_in;
  end

  assign wr_en   = in_q.valid;
  assign wr_addr = {in_q.vc, wptr[in_q.vc]};
  assign wr_data = in_q.data;

  logic [NVC-1:0] wr, rd;   // this VC is written / read this cycle

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      wr[v]      = in_q.valid && (int'(in_q.vc) == v);
      rd[v]      = sa_gnt && (int'(sa_gnt_vc) == v);
      va_req[v]  = (state[v] == VC_VA);
      va_port[v] = out_port[v];
      va_mask[v] = vmask[v];
      sa_port[v] = out_port[v];
      sa_req[v]  = (state[v] == VC_ACTIVE) && (cnt[v] != 0) &&
                   out_credit_ok[out_port[v]][out_vc[v]];
    end
  end

  assign rd_en   = sa_gnt;
  assign rd_addr = {sa_gnt_vc, rptr[sa_gnt_vc]};
  assign st_head = hd_bits[sa_gnt_vc][rptr[sa_gnt_vc]];
  assign st_tail = tl_bits[sa_gnt_vc][rptr[sa_gnt_vc]];
  assign st_vc   = out_vc[sa_gnt_vc];
  assign st_next = next_port[sa_gnt_vc];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        state[v]     <= VC_IDLE;
        out_port[v]  <= P_LOCAL;
        next_port[v] <= P_LOCAL;
        vmask[v]     <= '1;
        out_vc[v]    <= '0;
        wptr[v]      <= '0;
        rptr[v]      <= '0;
        cnt[v]       <= '0;
        hd_bits[v]   <= '0;
        tl_bits[v]   <= '0;
      end
      credit_out <= '0;
    end else begin
      credit_out.valid <= sa_gnt;
      credit_out.vc    <= sa_gnt_vc;
      for (int v = 0; v < NVC; v++) begin
        if (wr[v]) begin
          wptr[v]                <= wptr[v] + 1'b1;
          hd_bits[v][wptr[v]]    <= in_q.head;
          tl_bits[v][wptr[v]]    <= in_q.tail;
        end
        if (rd[v]) rptr[v] <= rptr[v] + 1'b1;
        cnt[v] <= cnt[v] + (DW+1)'(wr[v]) - (DW+1)'(rd[v]);
        if (rd[v] && tl_bits[v][rptr[v]])
          state[v] <= VC_IDLE;
        if (state[v] == VC_VA && va_gnt[v]) begin
          state[v]  <= VC_ACTIVE;
          out_vc[v] <= va_vc[v];
        end
        if (wr[v] && in_q.head) begin
          state[v]     <= VC_VA;
          out_port[v]  <= rc_out;
          next_port[v] <= rc_next;
          vmask[v]     <= rc_mask;
        end
      end
    end
  end

  // The upstream credit count guarantees room for every arriving flit.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_q.valid |-> (cnt[in_q.vc] < (DW+1)'(DEPTH)));
  a_read_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    sa_gnt |-> (cnt[sa_gnt_vc] != 0 && state[sa_gnt_vc] == VC_ACTIVE));

endmodule
