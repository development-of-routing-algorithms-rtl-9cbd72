// tb_circ_noc_sizes: the network at every size of the evaluation table,
// C(9; 2, 3), C(16; 2, 3), C(25; 3, 4), C(36; 4, 5), C(49; 4, 5),
// C(64; 5, 6), C(81; 6, 7) and C(100; 7, 8), each built with its optimal D
// and run with random all-to-all traffic side by side (noc_size_run).
// Each must deliver all packets on shortest paths; the longest route seen
// must not exceed the tabulated diameter.
module tb_circ_noc_sizes;
  localparam int NS = 8;
  localparam int DIAM [NS] = '{2, 3, 3, 4, 5, 6, 6, 7};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [NS];
  int   c [NS];
  int   f [NS];
  int   dm [NS];

  always #5 clk = ~clk;

  noc_size_run #(.N(9))   u_n9   (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .diameter_seen(dm[0]));
  noc_size_run #(.N(16))  u_n16  (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .diameter_seen(dm[1]));
  noc_size_run #(.N(25))  u_n25  (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .diameter_seen(dm[2]));
  noc_size_run #(.N(36))  u_n36  (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .diameter_seen(dm[3]));
  noc_size_run #(.N(49))  u_n49  (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]), .diameter_seen(dm[4]));
  noc_size_run #(.N(64))  u_n64  (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]), .diameter_seen(dm[5]));
  noc_size_run #(.N(81))  u_n81  (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]), .diameter_seen(dm[6]));
  noc_size_run #(.N(100)) u_n100 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]), .diameter_seen(dm[7]));

  int checks = 0;
  int failures = 0;

  initial begin : watchdog
    repeat (300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NS; i++) wait (done[i]);
    for (int i = 0; i < NS; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (dm[i] > DIAM[i]) begin
        failures++;
        $display("FAIL: size %0d longest route %0d above diameter %0d", i, dm[i], DIAM[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
