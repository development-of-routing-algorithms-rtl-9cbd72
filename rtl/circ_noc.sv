// circ_noc: network-on-chip on the optimal two-dimensional circulant
// C(N; D, D+1).
//
// N_NODES routers are placed on a ring. Router i drives four links, to
// routers i+D, i-D, i+D+1 and i-D-1 (mod N), and receives the matching four;
// the fifth port of every router is the local port of the core at that node,
// brought out of the network as the inj_* (core to network) and ej_*
// (network to core) arrays. With D chosen by D = ceil(sqrt(N/2) - 1) the
// graph has the smallest diameter of its kind (7 hops for N = 100).
//
// Routing is distributed: every router computes only the next hop of a packet
// from its own number, N, D and the packet's destination (circ_route_unit),
// and every packet follows a shortest path.
//
// A link from output port k of router i goes to input port k of the router
// at i + step(k): ports 1/2 are +D/-D and ports 3/4 are +(D+1)/-(D+1).
// All handshakes are valid/ready; a flit moves when both are high. A packet
// is one flit {payload, src, dst}, AW = ceil(log2 N) bits per address.
// The network size, topology and routing follow the published design; the
// router micro-architecture, buffer depth and flit format are this design's.
module circ_noc
  import circ_noc_pkg::*;
#(
  parameter int unsigned N_NODES    = 100,
  parameter int unsigned GEN_D      = optimal_gen_d(N_NODES),
  parameter int unsigned PAYLOAD_W  = 16,
  parameter int unsigned FIFO_DEPTH = 4,
  localparam int unsigned AW        = addr_width(N_NODES),
  localparam int unsigned FW        = PAYLOAD_W + 2 * AW
) (
  input  logic          clk,
  input  logic          rst_n,
  // core to network
  input  logic          inj_valid [N_NODES],
  output logic          inj_ready [N_NODES],
  input  logic [FW-1:0] inj_flit  [N_NODES],
  // network to core
  output logic          ej_valid  [N_NODES],
  input  logic          ej_ready  [N_NODES],
  output logic [FW-1:0] ej_flit   [N_NODES]
);

  // link step of each network port, as a non-negative offset mod N
  function automatic int unsigned port_step(input int unsigned p);
    case (p)
      1:       return GEN_D;
      2:       return N_NODES - GEN_D;
      3:       return GEN_D + 1;
      4:       return N_NODES - GEN_D - 1;
      default: return 0;
    endcase
  endfunction

  logic          r_in_valid  [N_NODES][NUM_PORTS];
  logic          r_in_ready  [N_NODES][NUM_PORTS];
  logic [FW-1:0] r_in_flit   [N_NODES][NUM_PORTS];
  logic          r_out_valid [N_NODES][NUM_PORTS];
  logic          r_out_ready [N_NODES][NUM_PORTS];
  logic [FW-1:0] r_out_flit  [N_NODES][NUM_PORTS];

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    circ_router #(
      .AW(AW), .PAYLOAD_W(PAYLOAD_W), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_router (
      .clk, .rst_n,
      .cfg_node_id(AW'(n)),
      .cfg_n_nodes((AW+1)'(N_NODES)),
      .cfg_gen_d  (AW'(GEN_D)),
      .in_valid   (r_in_valid[n]),
      .in_ready   (r_in_ready[n]),
      .in_flit    (r_in_flit[n]),
      .out_valid  (r_out_valid[n]),
      .out_ready  (r_out_ready[n]),
      .out_flit   (r_out_flit[n])
    );

    // local port
    assign r_in_valid[n][0]  = inj_valid[n];
    assign r_in_flit[n][0]   = inj_flit[n];
    assign inj_ready[n]      = r_in_ready[n][0];
    assign ej_valid[n]       = r_out_valid[n][0];
    assign ej_flit[n]        = r_out_flit[n][0];
    assign r_out_ready[n][0] = ej_ready[n];

    // circulant links: output port p of this router feeds input port p of
    // router n + step(p)
    for (genvar p = 1; p < NUM_PORTS; p++) begin : g_link
      localparam int unsigned DST = (n + port_step(p)) % N_NODES;
      assign r_in_valid[DST][p]  = r_out_valid[n][p];
      assign r_in_flit[DST][p]   = r_out_flit[n][p];
      assign r_out_ready[n][p]   = r_in_ready[DST][p];
    end
  end

endmodule
