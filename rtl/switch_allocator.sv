// switch_allocator: separable input-first switch allocator.
//
// Every input VC that may send a flit this cycle raises req[p][v] and names
// its output port.  Stage 1 (one round-robin arbiter per input port) keeps
// one VC per input port; stage 2 (one round-robin arbiter per output port)
// keeps one input port per output port.  Thus each output accepts at most
// one flit and each input port sends at most one flit per cycle, as the
// router requires.  All of it is combinational; the grant is used in the
// same cycle to address the block RAM read of the winning VC.  Stage-1
// pointers advance only when the input port won stage 2.  The allocator
// organisation follows the design description; the pointer rule is this
// design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int P = NPORTS,
  parameter int V = NVC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [V-1:0]    req      [P],
  input  port_e           req_port [P][V],
  output logic [P-1:0]    gnt,              // input port p sends a flit
  output logic [VCW-1:0]  gnt_vc   [P],     // ... from this VC
  output port_e           gnt_port [P],     // ... to this output port
  output logic [P-1:0]    out_busy          // output port o was granted
);
  localparam int PW = (P > 1) ? $clog2(P) : 1;

  logic [V-1:0]   s1_gnt [P];
  logic [VCW-1:0] s1_idx [P];
  logic           s1_any [P];
  port_e          s1_port [P];

  logic [P-1:0]   s2_req [P];
  logic [P-1:0]   s2_gnt [P];
  logic [PW-1:0]  s2_idx [P];
  logic           s2_any [P];

  for (genvar p = 0; p < P; p++) begin : g_s1
    rr_arbiter #(.N(V)) u_arb (
      .clk, .rst_n,
      .req(req[p]), .advance(gnt[p]),
      .gnt(s1_gnt[p]), .gnt_idx(s1_idx[p]), .any(s1_any[p])
    );
    assign s1_port[p] = req_port[p][s1_idx[p]];
  end

  for (genvar o = 0; o < P; o++) begin : g_s2
    always_comb
      for (int p = 0; p < P; p++)
        s2_req[o][p] = s1_any[p] && (int'(s1_port[p]) == o);
    rr_arbiter #(.N(P)) u_arb (
      .clk, .rst_n,
      .req(s2_req[o]), .advance(1'b1),
      .gnt(s2_gnt[o]), .gnt_idx(s2_idx[o]), .any(s2_any[o])
    );
    assign out_busy[o] = s2_any[o];
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      gnt[p]      = 1'b0;
      gnt_vc[p]   = s1_idx[p];
      gnt_port[p] = s1_port[p];
      for (int o = 0; o < P; o++)
        if (s2_gnt[o][p]) gnt[p] = 1'b1;
    end
  end

endmodule
