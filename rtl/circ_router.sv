// circ_router: five-port router of the circulant network C(N; D, D+1).
//
// Ports 1-4 are the circulant links (+D, -D, +(D+1), -(D+1)); port 0 is the
// local port of the attached core (see port_e in circ_noc_pkg). Packets are
// single flits {payload, src, dst}; only dst steers the router.
//
// Datapath: each input port has a flit_fifo. When a flit reaches the head of
// its buffer, that port's circ_route_unit computes the output port from the
// router's stored configuration (own number, N, D) and the flit's
// destination. The flit then requests that output; one rr_arbiter per output
// chooses among the requesting inputs, the crossbar forwards the winner, and
// the flit leaves its buffer in the cycle the output's ready is high.
// A flit that finds its output busy or not ready waits in its buffer (the
// stall propagates backwards as a full buffer).
//
// Configuration: cfg_* are sampled into the router's own registers during
// every clock edge with rst_n low, and held afterwards; they are the only
// routing state a router keeps, besides the per-port selected output.
// (rst_n therefore acts synchronously on these registers and asynchronously
// on the control state, which the lint tool notes; this is intended.)
//
// Timing: with no competing traffic, a flit written into an input buffer at
// clock edge t leaves the router at edge t + 4 + floor(l/D), where l is the
// remaining ring distance (one cycle in the buffer, 2 + floor(l/D) in the
// route unit, one to request the output); a flit for this node leaves on
// port 0 at edge t + 3. Outputs are combinational from the buffer heads; every input
// ready is the registered "not full" of a buffer, so routers can be linked
// directly without combinational loops.
//
// The routing unit implements the published algorithm; buffering, arbitration,
// single-flit packets and the flit fields other than dst are this design's
// own choices.
module circ_router
  import circ_noc_pkg::*;
#(
  parameter int unsigned AW         = 7,   // node address width, ceil(log2 N)
  parameter int unsigned PAYLOAD_W  = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned FW        = PAYLOAD_W + 2 * AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] cfg_node_id,
  input  logic [AW:0]   cfg_n_nodes,
  input  logic [AW-1:0] cfg_gen_d,
  input  logic          in_valid  [NUM_PORTS],
  output logic          in_ready  [NUM_PORTS],
  input  logic [FW-1:0] in_flit   [NUM_PORTS],
  output logic          out_valid [NUM_PORTS],
  input  logic          out_ready [NUM_PORTS],
  output logic [FW-1:0] out_flit  [NUM_PORTS]
);

  typedef struct packed {
    logic [PAYLOAD_W-1:0] payload;
    logic [AW-1:0]        src;
    logic [AW-1:0]        dst;
  } flit_t;

  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_READY} route_state_e;

  // stored configuration
  logic [AW-1:0] node_id_q;
  logic [AW:0]   n_nodes_q;
  logic [AW-1:0] gen_d_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      node_id_q <= cfg_node_id;
      n_nodes_q <= cfg_n_nodes;
      gen_d_q   <= cfg_gen_d;
    end
  end

  logic          head_valid [NUM_PORTS];
  flit_t         head       [NUM_PORTS];
  logic          pop        [NUM_PORTS];
  route_state_e  rstate     [NUM_PORTS];
  port_e         sel        [NUM_PORTS];
  logic          ru_req_valid [NUM_PORTS];
  logic          ru_req_ready [NUM_PORTS];
  logic          ru_res_valid [NUM_PORTS];
  port_e         ru_res_port  [NUM_PORTS];
  logic [AW-1:0] ru_res_dist  [NUM_PORTS];
  logic [NUM_PORTS-1:0] req_m   [NUM_PORTS];   // [output][input]
  logic [NUM_PORTS-1:0] grant_m [NUM_PORTS];   // [output][input]

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    flit_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_flit[i]),
      .out_valid(head_valid[i]),
      .out_ready(pop[i]),
      .out_data (head[i])
    );

    assign ru_req_valid[i] = head_valid[i] && (rstate[i] == R_IDLE);

    circ_route_unit #(.AW(AW)) u_route (
      .clk, .rst_n,
      .cfg_node_id(node_id_q),
      .cfg_n_nodes(n_nodes_q),
      .cfg_gen_d  (gen_d_q),
      .req_valid  (ru_req_valid[i]),
      .req_ready  (ru_req_ready[i]),
      .req_dst    (head[i].dst),
      .res_valid  (ru_res_valid[i]),
      .res_port   (ru_res_port[i]),
      .res_dist   (ru_res_dist[i])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rstate[i] <= R_IDLE;
        sel[i]    <= PORT_LOCAL;
      end else begin
        unique case (rstate[i])
          R_IDLE:  if (ru_req_valid[i] && ru_req_ready[i]) rstate[i] <= R_WAIT;
          R_WAIT:  if (ru_res_valid[i]) begin
                     rstate[i] <= R_READY;
                     sel[i]    <= ru_res_port[i];
                   end
          R_READY: if (pop[i]) rstate[i] <= R_IDLE;
          default: rstate[i] <= R_IDLE;
        endcase
      end
    end

    always_comb begin
      pop[i] = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (grant_m[o][i] && out_ready[o]) pop[i] = 1'b1;
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        req_m[o][i] = (rstate[i] == R_READY) && (sel[i] == port_e'(o));
      end
    end

    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n,
      .req    (req_m[o]),
      .advance(out_ready[o]),
      .grant  (grant_m[o])
    );

    // crossbar
    always_comb begin
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (grant_m[o][i]) begin
          out_valid[o] = 1'b1;
          out_flit[o]  = head[i];
        end
      end
    end

    // at most one input is switched to an output in a cycle
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_m[o]));
  end

  // only a flit addressed to this node is routed to the local port
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    a_local_only_here: assert property (@(posedge clk) disable iff (!rst_n)
      (ru_res_valid[i] && ru_res_port[i] == PORT_LOCAL) |-> (head[i].dst == node_id_q));
  end

endmodule
