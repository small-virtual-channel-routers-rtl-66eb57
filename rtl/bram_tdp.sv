// bram_tdp: true dual-port block RAM, 512 words of 18 bits, modelled on an
// Altera M9K in its widest true-dual-port mode.
//
// Each port does one read or one write per cycle.  Address, write enable
// and data are sampled at the clock edge and the read word appears on q_*
// after that edge (registered read).  A port that writes in a cycle also
// returns the word it wrote (same-port read-during-write gives new data);
// a read on one port of the word the other port writes in the same cycle
// gives the old word, as the router configures its block RAMs.  Both ports
// writing one address in the same cycle is a caller error (asserted).
// The port count, size and read-during-write behaviour follow the block
// RAM the router targets; the registered-read model is this design's.
// The memory is not reset.
module bram_tdp #(
  parameter int DW    = 18,
  parameter int WORDS = 512,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [DW-1:0] d_a,
  output logic [DW-1:0] q_a,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] d_b,
  output logic [DW-1:0] q_b
);
  logic [DW-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) begin
        mem[addr_a] <= d_a;
        q_a         <= d_a;
      end else begin
        q_a         <= mem[addr_a];
      end
    end
    if (en_b) begin
      if (we_b) begin
        mem[addr_b] <= d_b;
        q_b         <= d_b;
      end else begin
        q_b         <= mem[addr_b];
      end
    end
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(en_a && we_a && en_b && we_b && addr_a == addr_b));

endmodule
