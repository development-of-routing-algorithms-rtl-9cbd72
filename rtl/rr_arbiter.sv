// rr_arbiter: round-robin arbiter for one router output port.
//
// Grants at most one of N requesters per cycle. The search starts just after
// the requester granted last, so every requester that keeps requesting is
// served within N grants. grant is combinational from req; the priority
// pointer moves only in cycles where advance is high (the granted transfer
// took place). The arbitration policy is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;       // index granted most recently
  logic [IW-1:0] winner;
  logic          found;

  always_comb begin
    int unsigned idx;
    grant  = '0;
    winner = last;
    found  = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        found  = 1'b1;
        winner = IW'(idx);
      end
    end
    if (found) grant[winner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N - 1);
    else if (found && advance) last <= winner;
  end

endmodule
