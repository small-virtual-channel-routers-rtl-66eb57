// tb_rr_arbiter: self-checking test of the round-robin arbiter.  A
// reference model keeps its own priority pointer; random request vectors
// and random 'advance' strobes are applied and the grant, the index and
// 'any' are compared every cycle.  A fixed sequence first checks that a
// requester that was just served drops to lowest priority.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [2:0] gnt_idx;
  logic any, advance;
  int checks = 0, failures = 0;
  int ref_ptr;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int exp_idx;
    logic exp_any;
    exp_any = 0; exp_idx = 0;
    for (int i = 0; i < N; i++) begin
      int k;
      k = (ref_ptr + i) % N;
      if (!exp_any && req[k]) begin exp_any = 1; exp_idx = k; end
    end
    checks++;
    if (any !== exp_any || (exp_any && (gnt_idx != 3'(exp_idx) || gnt != N'(1 << exp_idx))) ||
        (!exp_any && gnt != 0)) begin
      failures++;
      $display("mismatch req=%b gnt=%b idx=%0d exp=%0d ptr=%0d", req, gnt, gnt_idx, exp_idx, ref_ptr);
    end
    if (advance && exp_any) ref_ptr = (exp_idx + 1) % N;
  endtask

  initial begin
    req = 0; advance = 0; ref_ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Everyone requests: grants must rotate 0,1,2,3,4,0.
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      req = '1; advance = 1;
      #1 checks++;
      if (gnt_idx != 3'(k % N)) begin failures++; $display("rotation step %0d got %0d", k, gnt_idx); end
      check_now();
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      req = N'($urandom);
      advance = $urandom_range(0, 3) != 0;
      #1 check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
