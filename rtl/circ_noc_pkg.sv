// circ_noc_pkg: types and constants shared by the circulant network-on-chip.
//
// The network is the two-dimensional circulant C(N; D, D+1): node i is linked
// to nodes i+D, i-D, i+(D+1) and i-(D+1) (mod N). Each router therefore has
// four network ports, one per generator and direction, plus a local port for
// the attached core. The generator D follows the optimality rule
// D = ceil(sqrt(N/2) - 1), computed here with integer arithmetic as the
// smallest D with 2*(D+1)^2 >= N.
//
// A packet is a single flit. The destination field is ceil(log2 N) bits wide,
// as in the packet-load formula P = ceil(log2 N). The source and payload
// fields, and the single-flit packet format itself, are choices of this design.
package circ_noc_pkg;

  // Port numbering shared by the router, the routing unit and the network.
  // Input port k of a router receives flits that travelled over a link of
  // type k (for example, input PORT_S1_CW receives from node i-D).
  typedef enum logic [2:0] {
    PORT_LOCAL  = 3'd0,
    PORT_S1_CW  = 3'd1,  // hop +D   (small generator, clockwise)
    PORT_S1_CCW = 3'd2,  // hop -D   (small generator, counter-clockwise)
    PORT_S2_CW  = 3'd3,  // hop +D+1 (large generator, clockwise)
    PORT_S2_CCW = 3'd4   // hop -D-1 (large generator, counter-clockwise)
  } port_e;

  localparam int unsigned NUM_PORTS = 5;

  // Optimal small generator for an N-node circulant C(N; D, D+1).
  function automatic int unsigned optimal_gen_d(input int unsigned n);
    int unsigned d;
    d = 1;
    while (2 * (d + 1) * (d + 1) < n) d++;
    return d;
  endfunction

  // Node address width, at least one bit.
  function automatic int unsigned addr_width(input int unsigned n);
    return (n > 2) ? $clog2(n) : 1;
  endfunction

endpackage
