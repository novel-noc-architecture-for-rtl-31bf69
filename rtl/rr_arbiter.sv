// rr_arbiter: round-robin arbiter for one router output.
//
// N requesters compete for one output. The requester at or after the
// priority pointer, in circular order, wins; after every cycle in which a
// grant is given the pointer moves to the requester just after the winner,
// so each waiting requester is served within N grants. The source names
// arbiters among the router's parts but not their policy: round robin is
// this design's choice. grant (one-hot) and grant_idx are combinational
// from req and the pointer; the pointer updates on the rising edge of clk
// and resets (asynchronous, active high) to requester 0.
module rr_arbiter #(
  parameter int unsigned N     = 4,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     req,
  output logic [N-1:0]     grant,
  output logic [IDX_W-1:0] grant_idx,
  output logic             grant_valid
);

  logic [IDX_W-1:0] ptr;

  always_comb begin
    grant       = '0;
    grant_idx   = '0;
    grant_valid = 1'b0;
    // Scan N requesters starting at the pointer; the first hit wins.
    for (int k = N - 1; k >= 0; k--) begin
      logic [IDX_W-1:0] idx;
      idx = IDX_W'((int'(ptr) + k) % N);
      if (req[idx]) begin
        grant_idx   = IDX_W'(idx);
        grant_valid = 1'b1;
      end
    end
    if (grant_valid) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ptr <= '0;
    end else if (grant_valid) begin
      ptr <= (grant_idx == IDX_W'(N - 1)) ? '0 : grant_idx + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));
  assert property (@(posedge clk) disable iff (rst) grant_valid |-> req[grant_idx]);

endmodule
