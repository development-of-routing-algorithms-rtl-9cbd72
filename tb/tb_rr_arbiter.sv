// tb_rr_arbiter: checks the round-robin order against a reference pointer.
//
// Random request patterns are applied; in every cycle the grant must be
// one-hot (or zero when nothing is requested), must go to a requester, and
// must go to the first requester after the one granted last. advance is
// sometimes held low, in which case the priority must not move.
module tb_rr_arbiter;
  localparam int unsigned N = 5;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] req;
  logic         advance;
  logic [N-1:0] grant;

  int checks = 0;
  int failures = 0;
  int last_ref;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int exp_idx;
    logic [N-1:0] exp_grant;
    req = '0;
    advance = 1'b0;
    last_ref = N - 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req = (i < 2000) ? N'($urandom) : N'({N{1'b1}});
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_grant = '0;
      exp_idx = -1;
      for (int k = 1; k <= N; k++) begin
        if (exp_idx < 0 && req[(last_ref + k) % N]) exp_idx = (last_ref + k) % N;
      end
      if (exp_idx >= 0) exp_grant[exp_idx] = 1'b1;
      check(grant == exp_grant, $sformatf("req %b grant %b expected %b", req, grant, exp_grant));
      @(posedge clk);
      if (exp_idx >= 0 && advance) last_ref = exp_idx;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
