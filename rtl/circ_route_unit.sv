// circ_route_unit: next-hop computation for the optimal circulant C(N; D, D+1).
//
// Given the number of the current router, the network size N, the small
// generator D and the destination taken from a head flit, the unit selects the
// output port of the next hop: the local port, or one of the generators D and
// D+1 in the clockwise or counter-clockwise direction. Only the next hop is
// computed, never the whole path; every router on the way repeats the
// computation for its own number.
//
// Algorithm (follows the routing method for C(N; D, D+1) circulants):
//   1. offset = (dst - cur) mod N. Zero means the packet has arrived. If the
//      offset exceeds N/2 the packet goes counter-clockwise over N - offset,
//      otherwise clockwise over the offset; call this length l.
//   2. l is divided by both generators: n1 = l / D, r1 = l % D and
//      n2 = l / (D+1), r2 = l % (D+1).
//   3. r2 == 0: l is a whole number of D+1 hops, take D+1.
//      n2 + r2 >= D: l is covered by n2+1 hops mixing both generators; take D
//      first (each D hop raises the remainder modulo D+1 by one) until the
//      remainder modulo D+1 is zero, then D+1.
//      Otherwise two plans remain and their hop counts are compared:
//        A: n1 hops of D, then r1 "single" hops (+1 = +(D+1) -D), which
//           combine to 2*r1 - n1 hops; the first hop is +(D+1);
//        B: one extra D hop beyond the destination, then single hops back,
//           which combine to (n2+1)*(2D+1) - 2*l = 2*D + 1 - n2 - 2*r2
//           hops; the first hop is +D.
//      The cheaper plan wins; a tie goes to D+1.
//   The chosen hop always lowers the hop count of the remaining path by one,
//   so every router in turn picks a hop on a shortest path of this form.
//   The divisions are done by repeated subtraction, so the unit is a small
//   state machine, as the method intends; the exact plan hop counts (rather
//   than the per-generator estimates of the method's step list) and the tie
//   rule are this design's reading of it.
//
// Interface: req_valid/req_ready handshake carrying req_dst. The result is a
// one-cycle pulse on res_valid with res_port (the 2-bit generator/direction
// selection, or local) and res_dist, the number of hops still needed.
// Timing: a request accepted in cycle t gives res_valid in cycle t+1 when
// dst equals the router's own number, else in cycle t + 2 + floor(l/D).
// The unit accepts a new request in the cycle after res_valid.
module circ_route_unit
  import circ_noc_pkg::*;
#(
  parameter int unsigned AW = 7            // node address width, ceil(log2 N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // router configuration (held in the router's registers)
  input  logic [AW-1:0] cfg_node_id,       // number of this router
  input  logic [AW:0]   cfg_n_nodes,       // N
  input  logic [AW-1:0] cfg_gen_d,         // D, the small generator
  // request
  input  logic          req_valid,
  output logic          req_ready,
  input  logic [AW-1:0] req_dst,
  // result
  output logic          res_valid,
  output port_e         res_port,
  output logic [AW-1:0] res_dist
);

  typedef enum logic [0:0] {S_IDLE, S_DIVIDE} state_e;

  localparam int unsigned CW = 2 * AW + 4;   // width of signed hop counts

  state_e        state;
  logic          dir_ccw;
  logic [AW-1:0] r1, n1, r2, n2;

  // ---- step 1: offset, direction and length (combinational, used in IDLE)
  logic [AW:0] offset, len_next;
  logic        ccw_next;
  always_comb begin
    if (req_dst >= cfg_node_id) offset = {1'b0, req_dst} - {1'b0, cfg_node_id};
    else                        offset = {1'b0, req_dst} + cfg_n_nodes - {1'b0, cfg_node_id};
    ccw_next = ({offset, 1'b0} > {1'b0, cfg_n_nodes});
    len_next = ccw_next ? (cfg_n_nodes - offset) : offset;
  end

  // ---- step 2: one subtraction step of both divisions
  logic [AW:0] d1, d2;
  logic        sub1, sub2;
  always_comb begin
    d1   = {1'b0, cfg_gen_d};
    d2   = {1'b0, cfg_gen_d} + 1'b1;
    sub1 = ({1'b0, r1} >= d1);
    sub2 = ({1'b0, r2} >= d2);
  end

  // ---- step 3: generator choice, valid once both divisions are finished
  logic              pick_s1;
  logic [AW-1:0]     dist_next;
  logic signed [CW-1:0] cost_a, cost_b;
  always_comb begin
    cost_a = 2 * $signed({{(CW-AW){1'b0}}, r1}) - $signed({{(CW-AW){1'b0}}, n1});
    // (n2+1)(2D+1) - 2l, rewritten with l = n2(D+1) + r2 so that no
    // multiplier is needed
    cost_b = 2 * $signed({{(CW-AW){1'b0}}, cfg_gen_d}) + 1
             - $signed({{(CW-AW){1'b0}}, n2}) - 2 * $signed({{(CW-AW){1'b0}}, r2});
    if (r2 == '0) begin
      pick_s1   = 1'b0;
      dist_next = n2;
    end else if ({1'b0, n2} + {1'b0, r2} >= d1) begin
      pick_s1   = 1'b1;
      dist_next = n2 + 1'b1;
    end else if (cost_b < cost_a) begin
      pick_s1   = 1'b1;
      dist_next = cost_b[AW-1:0];
    end else begin
      pick_s1   = 1'b0;
      dist_next = cost_a[AW-1:0];
    end
  end

  assign req_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dir_ccw   <= 1'b0;
      r1        <= '0;
      n1        <= '0;
      r2        <= '0;
      n2        <= '0;
      res_valid <= 1'b0;
      res_port  <= PORT_LOCAL;
      res_dist  <= '0;
    end else begin
      res_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          if (offset == '0) begin
            res_valid <= 1'b1;
            res_port  <= PORT_LOCAL;
            res_dist  <= '0;
          end else begin
            state   <= S_DIVIDE;
            dir_ccw <= ccw_next;
            r1      <= len_next[AW-1:0];
            r2      <= len_next[AW-1:0];
            n1      <= '0;
            n2      <= '0;
          end
        end
        S_DIVIDE: begin
          if (sub1) begin
            r1 <= r1 - cfg_gen_d;
            n1 <= n1 + 1'b1;
          end
          if (sub2) begin
            r2 <= r2 - d2[AW-1:0];
            n2 <= n2 + 1'b1;
          end
          if (!sub1 && !sub2) begin
            state     <= S_IDLE;
            res_valid <= 1'b1;
            res_dist  <= dist_next;
            unique case ({pick_s1, dir_ccw})
              2'b10:   res_port <= PORT_S1_CW;
              2'b11:   res_port <= PORT_S1_CCW;
              2'b00:   res_port <= PORT_S2_CW;
              default: res_port <= PORT_S2_CCW;
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
