// Round-robin arbiter with hold.
//
// N requesters; `gnt` is one-hot (or zero when nobody requests). The search
// starts one place after the last granted requester, so each requester waits at
// most N-1 grants. While `hold` is high the current grant is kept whatever the
// requests do; the owner of a bus uses it to keep the grant for a whole
// transaction. A new grant is taken on the cycle `req` is seen with `hold` low
// and is registered, so it shows one cycle after the request. The document asks
// for an arbiter on every PCI bus and one inside the memory controller; the
// round-robin policy is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         hold,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;
  logic          found;

  always_comb begin
    pick     = '0;
    pick_idx = last;
    found    = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        found        = 1'b1;
        pick[idx]    = 1'b1;
        pick_idx     = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt  <= '0;
      last <= IW'(N - 1);
    end else if (!hold) begin
      gnt <= pick;
      if (found) last <= pick_idx;
    end
  end

endmodule
