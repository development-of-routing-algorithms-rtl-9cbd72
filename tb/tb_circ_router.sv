// tb_circ_router: one router of C(100; 7, 8), seen as node 37.
//
// Phase 1 sends single flits, one at a time, through random input ports and
// checks the output port and the transit time (4 + floor(l/D) clock edges,
// 3 for a flit addressed to this node). Phase 2 drives all five inputs at
// once with random destinations while the five outputs are ready only at
// random, so that outputs are contended and stalled. Every flit must leave
// exactly once, unchanged, on the local port if it is addressed to this
// node and otherwise on a port that leads one hop closer to its destination
// (breadth-first search of the graph done here).
module tb_circ_router;
  import circ_noc_pkg::*;

  localparam int unsigned N   = 100;
  localparam int unsigned D   = 7;
  localparam int unsigned ME  = 37;
  localparam int unsigned AW  = 7;
  localparam int unsigned PAYLOAD_W = 16;
  localparam int unsigned FW  = PAYLOAD_W + 2 * AW;
  localparam int unsigned P   = NUM_PORTS;

  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    logic [AW-1:0]        src;
    logic [AW-1:0]        dst;
  } flit_t;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [AW-1:0] cfg_node_id;
  logic [AW:0]   cfg_n_nodes;
  logic [AW-1:0] cfg_gen_d;
  logic          in_valid  [P];
  logic          in_ready  [P];
  logic [FW-1:0] in_flit   [P];
  logic          out_valid [P];
  logic          out_ready [P];
  logic [FW-1:0] out_flit  [P];

  circ_router #(.AW(AW), .PAYLOAD_W(PAYLOAD_W)) dut (.*);

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
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  flit_t pending [int];
  int seq = 0;
  int n_out [P];
  int n_stall = 0, n_contention = 0;
  bit lone = 0;
  int lone_t, lone_exp;

  // output monitor
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) begin
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int key, nxt;
        f = out_flit[o];
        key = int'(f.payload);
        n_out[o]++;
        check(pending.exists(key), $sformatf("unknown or repeated flit %0d", key));
        if (pending.exists(key)) begin
          check(pending[key] == f, $sformatf("flit %0d corrupted", key));
          pending.delete(key);
        end
        if (o == 0) begin
          check(int'(f.dst) == ME, $sformatf("flit for %0d sent to local port", f.dst));
        end else begin
          nxt = (ME + step_of(o)) % N;
          check(int'(f.dst) != ME, "flit for this node sent to a link");
          check(dist0[(int'(f.dst) - nxt + N) % N] == dist0[(int'(f.dst) - ME + N) % N] - 1,
                $sformatf("flit for %0d sent on port %0d, not a shortest path", f.dst, o));
        end
        if (lone) begin
          check(cycle - lone_t == lone_exp,
                $sformatf("transit %0d cycles, expected %0d", cycle - lone_t, lone_exp));
          lone = 0;
        end
      end
    end
    for (int o = 0; o < P; o++) begin
      if ($countones(dut.req_m[o]) > 1) n_contention++;
    end
  end

  function automatic flit_t make_flit(int dst);
    flit_t f;
    f.dst = AW'(dst);
    f.src = AW'($urandom_range(0, N - 1));
    f.payload = PAYLOAD_W'(seq);
    pending[seq] = f;
    seq++;
    return f;
  endfunction

  bit phase2 = 0;
  for (genvar g = 0; g < P; g++) begin : g_drv
    initial begin
      wait (phase2);
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        in_flit[g]  = make_flit((k % 10 == 0) ? ME : $urandom_range(0, N - 1));
        in_valid[g] = 1'b1;
        @(posedge clk);
        while (!in_ready[g]) @(posedge clk);
        @(negedge clk);
        in_valid[g] = 1'b0;
      end
    end
  end

  initial begin
    int port, dst, off, len, t0;
    cfg_node_id = AW'(ME);
    cfg_n_nodes = (AW+1)'(N);
    cfg_gen_d = AW'(D);
    foreach (in_valid[i]) begin
      in_valid[i] = 1'b0;
      in_flit[i] = '0;
      out_ready[i] = 1'b1;
      n_out[i] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // phase 1: lone flits, transit time
    for (int k = 0; k < 200; k++) begin
      port = $urandom_range(0, P - 1);
      dst = (k % 8 == 0) ? ME : $urandom_range(0, N - 1);
      off = (dst - int'(ME) + N) % N;
      len = (2 * off > N) ? N - off : off;
      @(negedge clk);
      in_flit[port]  = make_flit(dst);
      in_valid[port] = 1'b1;
      @(posedge clk);
      lone = 1;
      lone_t = cycle;
      lone_exp = (off == 0) ? 3 : 4 + len / int'(D);
      @(negedge clk);
      in_valid[port] = 1'b0;
      t0 = cycle;
      while (lone && cycle - t0 < 100) @(posedge clk);
      check(!lone, "lone flit never left");
      lone = 0;
    end

    // phase 2: all inputs busy, outputs ready at random
    phase2 = 1;
    t0 = cycle;
    while ((seq < 200 + 5 * 200 || pending.size() != 0) && cycle - t0 < 100_000) begin
      @(negedge clk);
      foreach (out_ready[i]) out_ready[i] = ($urandom_range(0, 99) < 60);
    end
    check(pending.size() == 0, $sformatf("%0d flits never left", pending.size()));
    foreach (n_out[i]) check(n_out[i] > 0, $sformatf("output %0d never used", i));
    check(n_stall > 0, "no output stall");
    check(n_contention > 0, "no output contention");
    $display("outputs %0d %0d %0d %0d %0d, stalls %0d, contention %0d",
             n_out[0], n_out[1], n_out[2], n_out[3], n_out[4], n_stall, n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
