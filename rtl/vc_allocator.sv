// vc_allocator: separable input-first virtual channel allocator.
//
// Each input VC that holds a head flit waiting for allocation requests the
// output port its lookahead route tag names.  Stage 1 (one round-robin
// arbiter per input VC) picks one of the free output VCs of that port that
// the VC may use (req_mask; all ones on a mesh, the dateline class on a
// torus).  Stage 2 (one round-robin arbiter per output VC) picks one input
// VC among those whose stage-1 choice was that output VC.  Both are
// combinational within one cycle; grants are registered by the input and
// output units.  Stage-1 pointers advance only for input VCs that won
// stage 2, stage-2 pointers whenever they grant.
// Input VCs are numbered i = port*NVC + vc.  The separable input-first
// organisation with round-robin arbiters follows the design description;
// the flattening and the pointer-update rule are this design's choices.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int P = NPORTS,
  parameter int V = NVC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P*V-1:0]       req,
  input  port_e                req_port [P*V],
  input  logic [V-1:0]         req_mask [P*V],
  input  logic [V-1:0]         out_free [P],
  output logic [P*V-1:0]       gnt,
  output logic [VCW-1:0]       gnt_vc   [P*V]
);
  localparam int NI = P * V;
  localparam int IW = (NI > 1) ? $clog2(NI) : 1;

  logic [V-1:0]   s1_req [NI];
  logic [V-1:0]   s1_gnt [NI];
  logic [VCW-1:0] s1_idx [NI];
  logic           s1_any [NI];

  logic [NI-1:0]  s2_req [P*V];
  logic [NI-1:0]  s2_gnt [P*V];
  logic [IW-1:0]  s2_idx [P*V];
  logic           s2_any [P*V];

  // Stage 1: per input VC, choose among usable free output VCs.
  for (genvar i = 0; i < NI; i++) begin : g_s1
    always_comb s1_req[i] = req[i] ? (out_free[req_port[i]] & req_mask[i]) : '0;
    rr_arbiter #(.N(V)) u_arb (
      .clk, .rst_n,
      .req(s1_req[i]), .advance(gnt[i]),
      .gnt(s1_gnt[i]), .gnt_idx(s1_idx[i]), .any(s1_any[i])
    );
  end

  // Stage 2: per output VC o = port*V + vc, choose one requesting input VC.
  for (genvar o = 0; o < P * V; o++) begin : g_s2
    always_comb begin
      for (int i = 0; i < NI; i++)
        s2_req[o][i] = s1_any[i] && (int'(req_port[i]) == o / V) && (int'(s1_idx[i]) == o % V);
    end
    rr_arbiter #(.N(NI)) u_arb (
      .clk, .rst_n,
      .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o]), .gnt_idx(s2_idx[o]), .any(s2_any[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      gnt[i]    = 1'b0;
      gnt_vc[i] = s1_idx[i];
      for (int o = 0; o < P * V; o++)
        if (s2_gnt[o][i]) gnt[i] = 1'b1;
    end
  end

endmodule
