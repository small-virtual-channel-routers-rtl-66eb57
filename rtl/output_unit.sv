// output_unit: one router output port.
//
// It keeps, for each VC of the downstream input port, a credit count (free
// slots in that downstream VC buffer) and whether the VC is allocated to a
// packet.  Credits start full (DEPTH) after reset, drop by one when a flit
// for that VC wins switch allocation and rise by one for each credit the
// downstream router returns.  A VC taken by VC allocation stays taken until
// its tail flit has been sent *and* every credit has come back, i.e. until
// the downstream buffer is empty, so a downstream VC never holds two
// packets.  The flit coming out of the switch is registered here and
// driven onto the link in the next cycle.
// vc_free and credit_ok are read by the allocators in the same cycle.
// The credit scheme and output register follow the design description; the
// empty-before-reuse rule matches the router the design builds on.
module output_unit
  import noc_pkg::*;
#(
  parameter int DEPTH = BUF_DEPTH
) (
  input  logic            clk,
  input  logic            rst_n,
  input  flit_t           st_flit,     // from the switch
  output flit_t           link_out,
  input  credit_t         credit_in,
  input  logic [NVC-1:0]  va_take,     // VC allocated this cycle
  input  logic            sa_take,     // a flit was granted this port
  input  logic [VCW-1:0]  sa_vc,
  input  logic            sa_tail,
  output logic [NVC-1:0]  vc_free,
  output logic [NVC-1:0]  credit_ok
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [CW-1:0] cred  [NVC];
  logic [NVC-1:0] alloc, draining;

  logic [NVC-1:0] dec, inc;  // credit taken / returned this cycle

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      dec[v]       = sa_take && (int'(sa_vc) == v);
      inc[v]       = credit_in.valid && (int'(credit_in.vc) == v);
      vc_free[v]   = !alloc[v];
      credit_ok[v] = (cred[v] != 0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_out <= '0;
      alloc    <= '0;
      draining <= '0;
      for (int v = 0; v < NVC; v++) cred[v] <= CW'(DEPTH);
    end else begin
      link_out <= st_flit;
      for (int v = 0; v < NVC; v++) begin
        cred[v] <= cred[v] - CW'(dec[v]) + CW'(inc[v]);
        if (va_take[v]) alloc[v] <= 1'b1;
        if (dec[v] && sa_tail) draining[v] <= 1'b1;
        if (draining[v] && cred[v] == CW'(DEPTH)) begin
          draining[v] <= 1'b0;
          alloc[v]    <= 1'b0;
        end
      end
    end
  end

  a_take_free: assert property (@(posedge clk) disable iff (!rst_n)
    (va_take & alloc) == '0);
  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    !(sa_take && cred[sa_vc] == 0));

endmodule
