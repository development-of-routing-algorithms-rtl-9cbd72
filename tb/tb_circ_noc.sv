// tb_circ_noc: end-to-end test of the circulant network.
//
// Phase 1 sends lone packets between random node pairs and follows each one
// over the links: every hop must leave a router exactly 4 + floor(l/D)
// cycles after the flit entered it (l = remaining ring distance; buffer,
// route computation, switch), and the core must see it 3 cycles after it
// entered the last router.
// Phase 2 lets every core inject packets to random destinations at once,
// with cores refusing flits at random, so that outputs are contended and
// cores stall the network (the injection rate is kept low at N = 100: see
// the deadlock note in the documentation).
// Phase 3 stops core 0 while node D sends it a burst, so that router 0's
// buffer fills and the link into it stalls.
// In both phases each ejected packet must be one that was sent, to this
// node, and not seen before; at the end all must have arrived, and the total
// number of link traversals must equal the sum of the shortest-path
// distances (breadth-first search done here), i.e. every packet took a
// shortest path. Every mechanism of the design is counted and must occur:
// each of the four link types, local delivery, the four kinds of routing
// decision (whole D+1 hops, mixed D/D+1 hops, single hop, extra hop),
// counter-clockwise routing, output contention, link back-pressure and
// ejection stalls.
module tb_circ_noc;
  import circ_noc_pkg::*;

  localparam int unsigned N          = 25;
  localparam int unsigned D          = optimal_gen_d(N);
  localparam int unsigned PAYLOAD_W  = 16;
  localparam int unsigned FIFO_DEPTH = 4;     // the network's default
  localparam int unsigned AW         = addr_width(N);
  localparam int unsigned FW         = PAYLOAD_W + 2 * AW;
  localparam int unsigned LONE_PKTS  = 60;
  localparam int unsigned PKTS_PER_NODE = 40;
  localparam int unsigned INJ_PCT    = (N > 50) ? 5 : 40;   // injection probability, percent
  localparam int unsigned EJ_PCT     = (N > 50) ? 90 : 50;  // core ready probability, percent

  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    logic [AW-1:0]        src;
    logic [AW-1:0]        dst;
  } flit_t;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          inj_valid [N];
  logic          inj_ready [N];
  logic [FW-1:0] inj_flit  [N];
  logic          ej_valid  [N];
  logic          ej_ready  [N];
  logic [FW-1:0] ej_flit   [N];

  circ_noc #(.N_NODES(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference: graph distances from node 0
  int dist0 [N];
  initial begin : bfs
    int queue [N];
    int head, tail, u, v;
    int steps [4];
    steps = '{D, N - D, D + 1, N - D - 1};
    foreach (dist0[i]) dist0[i] = -1;
    dist0[0] = 0;
    queue[0] = 0; head = 0; tail = 1;
    while (head < tail) begin
      u = queue[head]; head++;
      foreach (steps[k]) begin
        v = (u + steps[k]) % N;
        if (dist0[v] < 0) begin
          dist0[v] = dist0[u] + 1;
          queue[tail] = v; tail++;
        end
      end
    end
  end

  function automatic int step_of(int p);
    case (p)
      1: return D;
      2: return N - D;
      3: return D + 1;
      4: return N - D - 1;
      default: return 0;
    endcase
  endfunction

  // ---------------- scoreboard
  flit_t  sent [int];        // by payload (unique sequence number)
  int     n_sent = 0, n_recv = 0;
  int expected_links = 0, link_traversals = 0;

  // mechanism counters
  int cnt_port [NUM_PORTS];
  int cnt_whole = 0, cnt_mixed = 0, cnt_single = 0, cnt_extra = 0, cnt_ccw = 0;
  int cnt_contention = 0, cnt_backpressure = 0, cnt_eject_stall = 0;

  // lone-packet tracking (phase 1)
  bit     lone_active = 0;
  int     lone_node;
  int     lone_t;

  // link monitors: classify every hop by the decision that produced it
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      for (int p = 1; p < NUM_PORTS; p++) begin
        if (dut.r_out_valid[n][p]) begin
          flit_t f;
          int off, len, n2, r2;
          bit ccw;
          f = dut.r_out_flit[n][p];
          if (!dut.r_out_ready[n][p]) cnt_backpressure++;
          else begin
            link_traversals++;
            cnt_port[p]++;
            off = (int'(f.dst) - n + N) % N;
            ccw = (2 * off > N);
            len = ccw ? N - off : off;
            n2 = len / (D + 1);
            r2 = len % (D + 1);
            if (ccw) cnt_ccw++;
            check(ccw == (p == 2 || p == 4), $sformatf("node %0d dst %0d wrong direction port %0d", n, f.dst, p));
            if (r2 == 0) begin
              cnt_whole++;
              check(p >= 3, $sformatf("node %0d dst %0d: multiple of D+1 not sent on D+1", n, f.dst));
            end else if (n2 + r2 >= D) cnt_mixed++;
            else if (p <= 2) cnt_extra++;
            else cnt_single++;
            if (lone_active) begin
              check(n == lone_node, $sformatf("lone packet at node %0d expected %0d", n, lone_node));
              check(cycle - lone_t == 4 + len / int'(D),
                    $sformatf("hop from %0d took %0d cycles, expected %0d", n, cycle - lone_t, 4 + len / D));
              lone_node = (n + step_of(p)) % N;
              lone_t = cycle;
            end
          end
        end
      end
    end
  end

  // output contention: two or more inputs of a router want the same output
  int contention_at [N];
  for (genvar g = 0; g < N; g++) begin : g_cont
    initial contention_at[g] = 0;
    always @(posedge clk) if (rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if ($countones(dut.g_node[g].u_router.req_m[o]) > 1) contention_at[g]++;
      end
    end
  end

  // ejection monitor
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (ej_valid[n] && !ej_ready[n]) cnt_eject_stall++;
      if (ej_valid[n] && ej_ready[n]) begin
        flit_t f;
        int key;
        f = ej_flit[n];
        key = int'(f.payload);
        n_recv++;
        cnt_port[0]++;
        check(int'(f.dst) == n, $sformatf("packet for %0d ejected at %0d", f.dst, n));
        check(sent.exists(key), $sformatf("unknown or duplicate packet %0d at %0d", key, n));
        if (sent.exists(key)) begin
          check(sent[key] == f, $sformatf("packet %0d corrupted", key));
          sent.delete(key);
        end
        if (lone_active) begin
          check(n == lone_node, $sformatf("lone packet ejected at %0d expected %0d", n, lone_node));
          check(cycle - lone_t == 3, $sformatf("ejection took %0d cycles, expected 3", cycle - lone_t));
          lone_active = 0;
        end
      end
    end
  end

  int seq = 0;
  function automatic flit_t make_flit(int src, int dst);
    flit_t f;
    f.src = AW'(src);
    f.dst = AW'(dst);
    f.payload = PAYLOAD_W'(seq);
    sent[seq] = f;
    seq++;
    n_sent++;
    expected_links += dist0[(dst - src + N) % N];
    return f;
  endfunction

  // per-node injectors for phase 2
  bit phase2 = 0;
  int remaining [N];
  for (genvar g = 0; g < N; g++) begin : g_inj
    initial begin
      flit_t f;
      wait (phase2);
      while (remaining[g] > 0) begin
        @(negedge clk);
        if ($urandom_range(0, 99) < INJ_PCT) begin
          f = make_flit(g, $urandom_range(0, N - 1));
          inj_flit[g]  = f;
          inj_valid[g] = 1'b1;
          @(posedge clk);
          while (!inj_ready[g]) @(posedge clk);
          @(negedge clk);
          inj_valid[g] = 1'b0;
          remaining[g]--;
        end
      end
    end
  end

  initial begin
    int src, dst;
    int t_start;
    foreach (inj_valid[i]) begin
      inj_valid[i] = 1'b0;
      inj_flit[i] = '0;
      ej_ready[i] = 1'b1;
      remaining[i] = PKTS_PER_NODE;
    end
    foreach (cnt_port[i]) cnt_port[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- phase 1: lone packets, latency per hop
    for (int k = 0; k < LONE_PKTS; k++) begin
      src = $urandom_range(0, N - 1);
      dst = (k == 0) ? src : $urandom_range(0, N - 1);
      @(negedge clk);
      inj_flit[src]  = make_flit(src, dst);
      inj_valid[src] = 1'b1;
      @(posedge clk);
      lone_active = 1;
      lone_node = src;
      lone_t = cycle;       // cycle in which the flit enters the router
      @(negedge clk);
      inj_valid[src] = 1'b0;
      t_start = cycle;
      while (lone_active && cycle - t_start < 1000) @(posedge clk);
      check(!lone_active, $sformatf("lone packet %0d->%0d not delivered", src, dst));
      lone_active = 0;
    end

    // ---- phase 2: all nodes inject, cores stall at random
    phase2 = 1;
    fork
      begin
        while (n_sent < LONE_PKTS + N * PKTS_PER_NODE || sent.size() != 0) begin
          @(negedge clk);
          foreach (ej_ready[i]) ej_ready[i] = ($urandom_range(0, 99) < EJ_PCT);
        end
      end
    join
    foreach (ej_ready[i]) ej_ready[i] = 1'b1;
    repeat (5) @(posedge clk);

    // ---- phase 3: core 0 stops accepting while node D sends it a burst, so
    // the buffers of router 0 fill and the +/-D link stalls
    @(negedge clk);
    ej_ready[0] = 1'b0;
    for (int k = 0; k < 2 * FIFO_DEPTH; k++) begin
      @(negedge clk);
      inj_flit[D]  = make_flit(D, 0);
      inj_valid[D] = 1'b1;
      @(posedge clk);
      while (!inj_ready[D]) @(posedge clk);
    end
    @(negedge clk);
    inj_valid[D] = 1'b0;
    repeat (20) @(posedge clk);
    @(negedge clk);
    ej_ready[0] = 1'b1;
    t_start = cycle;
    while (sent.size() != 0 && cycle - t_start < 1000) @(posedge clk);
    repeat (5) @(posedge clk);

    check(n_recv == n_sent, $sformatf("received %0d of %0d", n_recv, n_sent));
    check(link_traversals == expected_links,
          $sformatf("link traversals %0d, shortest paths need %0d", link_traversals, expected_links));
    foreach (contention_at[i]) cnt_contention += contention_at[i];
    $display("packets %0d, link traversals %0d", n_recv, link_traversals);
    $display("ports local=%0d +D=%0d -D=%0d +D+1=%0d -D-1=%0d", cnt_port[0], cnt_port[1], cnt_port[2], cnt_port[3], cnt_port[4]);
    $display("decisions whole=%0d mixed=%0d single=%0d extra=%0d ccw=%0d", cnt_whole, cnt_mixed, cnt_single, cnt_extra, cnt_ccw);
    $display("contention=%0d backpressure=%0d eject_stall=%0d", cnt_contention, cnt_backpressure, cnt_eject_stall);
    foreach (cnt_port[i]) check(cnt_port[i] > 0, $sformatf("port %0d never used", i));
    check(cnt_whole > 0, "no whole-D+1 decision");
    check(cnt_mixed > 0, "no mixed decision");
    check(cnt_single > 0, "no single-hop decision");
    check(cnt_extra > 0, "no extra-hop decision");
    check(cnt_ccw > 0, "no counter-clockwise hop");
    check(cnt_contention > 0, "no output contention");
    check(cnt_backpressure > 0, "no link back-pressure");
    check(cnt_eject_stall > 0, "no ejection stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
