// tb_bram_share_ctrl: checks the shared block RAM of a port pair.
// Random arrivals (writes) and random switch requests are applied; the
// request masks are compared with the write-priority rule, reads are then
// issued only where allowed (as the switch allocator would), and every
// read word is compared one cycle later with a reference copy of both
// sides' buffers.  Each masking case is counted and must occur.
module tb_bram_share_ctrl;
  import noc_pkg::*;
  localparam int LAW = 5, DW = FLIT_W;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_en, any_req, sa_allow, rd_en;
  logic [LAW-1:0] wr_addr [2], rd_addr [2];
  logic [DW-1:0] wr_data [2], rd_data [2];
  logic [DW-1:0] model [2][1<<LAW];
  logic [DW-1:0] exp_d [2];
  logic [1:0] exp_v;
  int checks = 0, failures = 0;
  int n_both = 0, n_none = 0, n_one_pref = 0, n_one_free = 0, n_reads2 = 0;

  bram_share_ctrl #(.LAW(LAW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; any_req = 0; rd_en = 0; exp_v = 0;
    for (int s = 0; s < 2; s++) begin wr_addr[s] = 0; rd_addr[s] = 0; wr_data[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill both sides.
    for (int a = 0; a < (1 << LAW); a++) begin
      @(negedge clk);
      wr_en = 2'b11;
      for (int s = 0; s < 2; s++) begin
        wr_addr[s] = LAW'(a); wr_data[s] = DW'($urandom); model[s][a] = wr_data[s];
      end
    end
    for (int k = 0; k < 20000; k++) begin
      logic [1:0] exp_allow;
      @(negedge clk);
      for (int s = 0; s < 2; s++)
        if (exp_v[s]) begin
          checks++;
          if (rd_data[s] != exp_d[s]) begin failures++; $display("side %0d read %h exp %h", s, rd_data[s], exp_d[s]); end
        end
      wr_en   = 2'($urandom);
      any_req = 2'($urandom);
      rd_en   = 0;
      for (int s = 0; s < 2; s++) begin
        wr_addr[s] = LAW'($urandom); wr_data[s] = DW'($urandom); rd_addr[s] = LAW'($urandom);
      end
      #1;
      // Reference mask: writes first, then the side that is not written.
      if (wr_en == 2'b11)      begin exp_allow = 2'b00; n_both++; end
      else if (wr_en == 2'b00) begin exp_allow = 2'b11; n_none++; end
      else begin
        int w; w = wr_en[1] ? 1 : 0;
        exp_allow[1-w] = 1'b1;
        exp_allow[w]   = !any_req[1-w];
        if (any_req[w] && any_req[1-w]) n_one_pref++;
        if (any_req[w] && !any_req[1-w]) n_one_free++;
      end
      checks++;
      if (sa_allow != exp_allow) begin
        failures++; $display("wr=%b req=%b allow=%b exp=%b", wr_en, any_req, sa_allow, exp_allow);
      end
      // Reads where a request was allowed (the allocator grants these).
      rd_en = any_req & exp_allow & 2'($urandom | 2'b01);
      if (rd_en == 2'b11) n_reads2++;
      for (int s = 0; s < 2; s++) begin
        exp_v[s] = rd_en[s];
        exp_d[s] = model[s][rd_addr[s]];
      end
      for (int s = 0; s < 2; s++) if (wr_en[s]) model[s][wr_addr[s]] = wr_data[s];
    end
    checks++;
    if (n_both == 0 || n_none == 0 || n_one_pref == 0 || n_one_free == 0 || n_reads2 == 0) begin
      failures++; $display("case not reached: %0d %0d %0d %0d %0d", n_both, n_none, n_one_pref, n_one_free, n_reads2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
