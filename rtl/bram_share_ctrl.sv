// bram_share_ctrl: one block RAM holding the VC buffer payloads of two
// router input ports (side 0 and side 1), and the rules that keep its two
// RAM ports from being oversubscribed.
//
// Each side writes at most one arriving flit and reads at most one flit
// that won switch allocation per cycle, i.e. up to four accesses for a RAM
// with two ports.  Writes always win, so credits stay exact and the
// upstream router never has to be told to resend:
//   * both sides write     -> every switch request of both sides is masked
//   * neither side writes  -> both sides may request; side 0 reads on RAM
//                             port A, side 1 on RAM port B
//   * one side writes      -> the side that is not writing may request; the
//                             writing side may request only if the other
//                             side has no request at all; the one read
//                             uses the RAM port the write leaves free.
// Side 0 always writes on port A and side 1 on port B.  The masks sa_allow
// depend only on the writes of this cycle and on any_req; the reads
// (rd_en, from the switch allocator grant) come later in the same cycle
// and must respect the masks (asserted).  Read data appears on rd_data one
// cycle after rd_en.  Word address = {side, VC, slot}.  The policy follows
// the design description; the address layout and port numbering are this
// design's choices.
module bram_share_ctrl
  import noc_pkg::*;
#(
  parameter int LAW   = VCW + $clog2(BUF_DEPTH),  // per-side address bits
  parameter int WORDS = BRAM_WORDS,
  parameter int DW    = FLIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [1:0]     wr_en,
  input  logic [LAW-1:0] wr_addr [2],
  input  logic [DW-1:0]  wr_data [2],
  input  logic [1:0]     any_req,
  output logic [1:0]     sa_allow,
  input  logic [1:0]     rd_en,
  input  logic [LAW-1:0] rd_addr [2],
  output logic [DW-1:0]  rd_data [2]
);
  localparam int AW = $clog2(WORDS);

  if (2 * (1 << LAW) > WORDS) begin : g_size_check
    $error("bram_share_ctrl: two sides of VC buffers do not fit in one block RAM");
  end

  logic          en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [DW-1:0] d_a, d_b, q_a, q_b;
  logic          rd0_on_b, rd1_on_a, rd0_on_b_q, rd1_on_a_q;

  function automatic logic [AW-1:0] word(input logic side, input logic [LAW-1:0] a);
    return AW'({side, a});
  endfunction

  // Write-priority request masking.
  always_comb begin
    unique case (wr_en)
      2'b11:   sa_allow = 2'b00;
      2'b01:   sa_allow = {1'b1, !any_req[1]};
      2'b10:   sa_allow = {!any_req[0], 1'b1};
      default: sa_allow = 2'b11;
    endcase
  end

  // RAM port assignment.
  always_comb begin
    rd0_on_b = rd_en[0] && wr_en[0];
    rd1_on_a = rd_en[1] && wr_en[1];

    en_a = 1'b0; we_a = 1'b0; addr_a = '0; d_a = wr_data[0];
    en_b = 1'b0; we_b = 1'b0; addr_b = '0; d_b = wr_data[1];
    if (wr_en[0]) begin
      en_a = 1'b1; we_a = 1'b1; addr_a = word(1'b0, wr_addr[0]);
    end else if (rd_en[0]) begin
      en_a = 1'b1; addr_a = word(1'b0, rd_addr[0]);
    end else if (rd1_on_a) begin
      en_a = 1'b1; addr_a = word(1'b1, rd_addr[1]);
    end
    if (wr_en[1]) begin
      en_b = 1'b1; we_b = 1'b1; addr_b = word(1'b1, wr_addr[1]);
    end else if (rd_en[1]) begin
      en_b = 1'b1; addr_b = word(1'b1, rd_addr[1]);
    end else if (rd0_on_b) begin
      en_b = 1'b1; addr_b = word(1'b0, rd_addr[0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd0_on_b_q <= 1'b0;
      rd1_on_a_q <= 1'b0;
    end else begin
      rd0_on_b_q <= rd0_on_b;
      rd1_on_a_q <= rd1_on_a;
    end
  end

  assign rd_data[0] = rd0_on_b_q ? q_b : q_a;
  assign rd_data[1] = rd1_on_a_q ? q_a : q_b;

  bram_tdp #(.DW(DW), .WORDS(WORDS)) u_ram (
    .clk,
    .en_a, .we_a, .addr_a, .d_a, .q_a,
    .en_b, .we_b, .addr_b, .d_b, .q_b
  );

  // At most two accesses: a read is only legal where it was allowed.
  a_read_allowed: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en & ~sa_allow) == 2'b00);
  a_one_read_when_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    ((wr_en == 2'b01) || (wr_en == 2'b10)) |-> !(rd_en == 2'b11));

endmodule
