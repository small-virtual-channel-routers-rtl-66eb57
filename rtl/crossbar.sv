// crossbar: the router switch.  Every output port o takes the flit of the
// input port whose switch traversal stage holds a flit for o.  The switch
// allocator guarantees at most one such input per output, so each output
// is an AND-OR multiplexer.  Combinational; the flit's own VC and route
// fields are already the ones for the next router.  The switch itself is
// part of the router described; its AND-OR form is this design's choice.
module crossbar
  import noc_pkg::*;
#(
  parameter int P = NPORTS
) (
  input  flit_t  in_flit [P],
  input  port_e  in_port [P],   // output port each input flit goes to
  output flit_t  out_flit [P]
);
  always_comb begin
    for (int o = 0; o < P; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < P; i++)
        if (in_flit[i].valid && int'(in_port[i]) == o)
          out_flit[o] = out_flit[o] | in_flit[i];
    end
  end
endmodule
