// rr_arbiter: round-robin arbiter, the building block of the separable
// input-first VC and switch allocators.
//
// Among the asserted bits of 'req' it grants the first one at or after the
// priority pointer, searching upward and wrapping.  The grant is purely
// combinational.  When 'advance' is high in a cycle with a grant, the
// pointer moves to the position just after the granted requester, so that
// requester gets the lowest priority next time.  The allocators raise
// 'advance' only when the grant was actually used, which keeps the two
// stages of a separable allocator fair.  Reset puts the pointer at 0.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         advance,
  output logic [N-1:0]                 gnt,
  output logic [(N>1?$clog2(N):1)-1:0] gnt_idx,
  output logic                         any
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;

  // Requester examined i-th, starting from the pointer.
  function automatic int rot(input int i);
    return (int'(ptr) + i) % N;
  endfunction

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    any     = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (!any && req[rot(i)]) begin
        any          = 1'b1;
        gnt[rot(i)]  = 1'b1;
        gnt_idx      = IW'(rot(i));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && any)
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : IW'(gnt_idx + 1'b1);
  end

endmodule
