// tb_circ_route_unit: exhaustive check of the next-hop unit.
//
// For every circulant size of the evaluation table (N = 9 ... 100, with the
// tabulated D) and every pair (current node, destination) the testbench
// requests a route and checks, against a breadth-first search of the graph
// done here:
//   - the local port is chosen exactly when the destination is reached;
//   - the chosen hop leads to a node one hop closer to the destination
//     (so the route is a shortest path);
//   - the reported remaining hop count equals the graph distance;
//   - the result arrives 1 cycle (local) or 2 + floor(l/D) cycles after the
//     request;
//   - the largest distance found equals the tabulated diameter.
module tb_circ_route_unit;
  import circ_noc_pkg::*;

  localparam int unsigned AW = 7;
  localparam int NSIZES = 8;
  localparam int SIZE_N [NSIZES] = '{9, 16, 25, 36, 49, 64, 81, 100};
  localparam int SIZE_D [NSIZES] = '{2, 2, 3, 4, 4, 5, 6, 7};
  localparam int SIZE_DIAM [NSIZES] = '{2, 3, 3, 4, 5, 6, 6, 7};

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] cfg_node_id;
  logic [AW:0]   cfg_n_nodes;
  logic [AW-1:0] cfg_gen_d;
  logic          req_valid;
  logic          req_ready;
  logic [AW-1:0] req_dst;
  logic          res_valid;
  port_e         res_port;
  logic [AW-1:0] res_dist;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  circ_route_unit #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
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

  // distance from node 0 to every node, by breadth-first search
  int dist0 [128];
  task automatic bfs(input int n, input int d);
    int queue [128];
    int head, tail, u, v;
    int steps [4];
    steps = '{d, n - d, d + 1, n - d - 1};
    for (int i = 0; i < n; i++) dist0[i] = -1;
    dist0[0] = 0;
    queue[0] = 0; head = 0; tail = 1;
    while (head < tail) begin
      u = queue[head]; head++;
      foreach (steps[k]) begin
        v = (u + steps[k]) % n;
        if (dist0[v] < 0) begin
          dist0[v] = dist0[u] + 1;
          queue[tail] = v; tail++;
        end
      end
    end
  endtask

  function automatic int hop_of(port_e p, int n, int d);
    case (p)
      PORT_S1_CW:  return d;
      PORT_S1_CCW: return n - d;
      PORT_S2_CW:  return d + 1;
      PORT_S2_CCW: return n - d - 1;
      default:     return 0;
    endcase
  endfunction

  initial begin
    int n, d, off, len, nxt, exp_lat, maxd;
    longint t0;
    req_valid = 1'b0;
    req_dst = '0;
    cfg_node_id = '0;
    cfg_n_nodes = '0;
    cfg_gen_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NSIZES; s++) begin
      n = SIZE_N[s];
      d = SIZE_D[s];
      check(optimal_gen_d(n) == d, $sformatf("optimal_gen_d(%0d)", n));
      bfs(n, d);
      maxd = 0;
      for (int cur = 0; cur < n; cur++) begin
        for (int dst = 0; dst < n; dst++) begin
          @(negedge clk);
          cfg_n_nodes = (AW+1)'(n);
          cfg_gen_d   = AW'(d);
          cfg_node_id = AW'(cur);
          req_dst     = AW'(dst);
          req_valid   = 1'b1;
          check(req_ready, "unit ready when idle");
          @(posedge clk);
          t0 = cycle;
          @(negedge clk);
          req_valid = 1'b0;
          while (!res_valid) @(negedge clk);
          off = (dst - cur + n) % n;
          len = (2 * off > n) ? n - off : off;
          exp_lat = (off == 0) ? 1 : 2 + len / d;
          check(cycle - t0 == longint'(exp_lat),
                $sformatf("N=%0d %0d->%0d latency %0d expected %0d", n, cur, dst, cycle - t0, exp_lat));
          check(int'(res_dist) == dist0[off],
                $sformatf("N=%0d %0d->%0d dist %0d expected %0d", n, cur, dst, res_dist, dist0[off]));
          if (off == 0) begin
            check(res_port == PORT_LOCAL, $sformatf("N=%0d %0d->%0d not local", n, cur, dst));
          end else begin
            check(res_port != PORT_LOCAL, $sformatf("N=%0d %0d->%0d local too early", n, cur, dst));
            nxt = (cur + hop_of(res_port, n, d)) % n;
            check(dist0[(dst - nxt + n) % n] == dist0[off] - 1,
                  $sformatf("N=%0d %0d->%0d port %s not on a shortest path", n, cur, dst, res_port.name()));
          end
          if (dist0[off] > maxd) maxd = dist0[off];
        end
      end
      check(maxd == SIZE_DIAM[s], $sformatf("N=%0d diameter %0d expected %0d", n, maxd, SIZE_DIAM[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
