// tb_bram_tdp: checks the dual-port block RAM against a reference array:
// random reads and writes on both ports, registered read data one cycle
// later, new data on a same-port write, old data when one port reads the
// word the other port writes in the same cycle.
module tb_bram_tdp;
  localparam int DW = 18, WORDS = 512, AW = 9;
  logic clk = 0;
  logic en_a, we_a, en_b, we_b;
  logic [AW-1:0] addr_a, addr_b;
  logic [DW-1:0] d_a, d_b, q_a, q_b;
  logic [DW-1:0] model [WORDS];
  logic [DW-1:0] exp_a, exp_b;
  logic chk_a, chk_b;
  int checks = 0, failures = 0, xport_rw = 0;

  bram_tdp #(.DW(DW), .WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; we_a = 0; we_b = 0; addr_a = 0; addr_b = 0; d_a = 0; d_b = 0;
    chk_a = 0; chk_b = 0;
    // Fill the memory through both ports.
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = AW'(i);     d_a = DW'($urandom); model[i]   = d_a;
      en_b = 1; we_b = 1; addr_b = AW'(i + 1); d_b = DW'($urandom); model[i+1] = d_b;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      if (chk_a) begin checks++; if (q_a != exp_a) begin failures++; $display("A got %h exp %h", q_a, exp_a); end end
      if (chk_b) begin checks++; if (q_b != exp_b) begin failures++; $display("B got %h exp %h", q_b, exp_b); end end
      en_a = $urandom_range(0, 3) != 0; en_b = $urandom_range(0, 3) != 0;
      we_a = $urandom_range(0, 1);      we_b = $urandom_range(0, 1);
      addr_a = AW'($urandom_range(0, 15)); addr_b = AW'($urandom_range(0, 15));
      if (k % 7 == 0) addr_b = addr_a;
      if (we_a && we_b && en_a && en_b && addr_a == addr_b) we_b = 0;
      d_a = DW'($urandom); d_b = DW'($urandom);
      chk_a = en_a; chk_b = en_b;
      exp_a = we_a ? d_a : model[addr_a];
      exp_b = we_b ? d_b : model[addr_b];
      if (en_a && en_b && addr_a == addr_b && (we_a != we_b)) xport_rw++;
      if (en_a && we_a) model[addr_a] = d_a;
      if (en_b && we_b) model[addr_b] = d_b;
    end
    checks++;
    if (xport_rw == 0) begin failures++; $display("no xport_rw-port read-during-write exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
