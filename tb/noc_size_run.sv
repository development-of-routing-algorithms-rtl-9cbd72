// noc_size_run: traffic run on one circulant network of size N, used by
// tb_circ_noc_sizes to cover every network size of the evaluation table.
//
// It builds circ_noc with N_NODES = N (D from the optimal-generator rule),
// lets every node send PKTS packets to random destinations at a light load,
// and checks that every packet arrives once, unchanged, at its destination,
// and that the number of link traversals equals the sum of the shortest-path
// distances found by breadth-first search. done rises when all packets have
// arrived or after a time limit; checks/failures count the outcomes.
module noc_size_run
  import circ_noc_pkg::*;
#(
  parameter int unsigned N    = 9,
  parameter int unsigned PKTS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   diameter_seen
);
  localparam int unsigned D         = optimal_gen_d(N);
  localparam int unsigned PAYLOAD_W = 16;
  localparam int unsigned AW        = addr_width(N);
  localparam int unsigned FW        = PAYLOAD_W + 2 * AW;

  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    logic [AW-1:0]        src;
    logic [AW-1:0]        dst;
  } flit_t;

  logic          inj_valid [N];
  logic          inj_ready [N];
  logic [FW-1:0] inj_flit  [N];
  logic          ej_valid  [N];
  logic          ej_ready  [N];
  logic [FW-1:0] ej_flit   [N];

  circ_noc #(.N_NODES(N)) dut (.*);

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

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d: %s", N, what);
    end
  endtask

  flit_t sent [int];
  int seq = 0, n_recv = 0;
  int expected_links = 0, link_traversals = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      for (int p = 1; p < NUM_PORTS; p++) begin
        if (dut.r_out_valid[n][p] && dut.r_out_ready[n][p]) link_traversals++;
      end
      if (ej_valid[n] && ej_ready[n]) begin
        flit_t f;
        int key;
        f = ej_flit[n];
        key = int'(f.payload);
        n_recv++;
        check(int'(f.dst) == n, $sformatf("packet for %0d ejected at %0d", f.dst, n));
        check(sent.exists(key), $sformatf("unknown or duplicate packet %0d", key));
        if (sent.exists(key)) begin
          check(sent[key] == f, $sformatf("packet %0d corrupted", key));
          sent.delete(key);
        end
      end
    end
  end

  function automatic flit_t make_flit(int src, int dst);
    flit_t f;
    f.src = AW'(src);
    f.dst = AW'(dst);
    f.payload = PAYLOAD_W'(seq);
    sent[seq] = f;
    seq++;
    expected_links += dist0[(dst - src + N) % N];
    if (dist0[(dst - src + N) % N] > diameter_seen) diameter_seen = dist0[(dst - src + N) % N];
    return f;
  endfunction

  for (genvar g = 0; g < N; g++) begin : g_inj
    initial begin
      inj_valid[g] = 1'b0;
      inj_flit[g]  = '0;
      ej_ready[g]  = 1'b1;
      wait (rst_n);
      for (int k = 0; k < int'(PKTS); k++) begin
        @(negedge clk);
        while ($urandom_range(0, 99) >= 8) @(negedge clk);
        inj_flit[g]  = make_flit(g, $urandom_range(0, N - 1));
        inj_valid[g] = 1'b1;
        @(posedge clk);
        while (!inj_ready[g]) @(posedge clk);
        @(negedge clk);
        inj_valid[g] = 1'b0;
      end
    end
  end

  initial begin
    int t;
    done = 1'b0;
    checks = 0;
    failures = 0;
    diameter_seen = 0;
    wait (rst_n);
    t = 0;
    while ((seq < int'(N * PKTS) || sent.size() != 0) && t < 100_000) begin
      @(posedge clk);
      t++;
    end
    repeat (3) @(posedge clk);
    check(n_recv == int'(N * PKTS), $sformatf("received %0d of %0d", n_recv, N * PKTS));
    check(link_traversals == expected_links,
          $sformatf("link traversals %0d, shortest paths need %0d", link_traversals, expected_links));
    $display("N=%0d D=%0d: %0d packets, %0d link traversals, longest route %0d hops",
             N, D, n_recv, link_traversals, diameter_seen);
    done = 1'b1;
  end
endmodule
