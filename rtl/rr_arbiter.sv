// rr_arbiter: round-robin arbiter.
//
// grant is one-hot and picks the first requester after the one granted last,
// wrapping around, so every steady requester is served within N grants. The
// pointer moves only when the caller reports that the grant was used
// (advance), so a stalled output keeps its choice. grant is combinational
// from req; the pointer updates on the clock edge.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] last;
  logic [IDX_W-1:0] win;
  logic             found;

  always_comb begin
    grant = '0;
    win   = last;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (32'(last) + k) % N;
      if (!found && req[idx]) begin
        found = 1'b1;
        win   = IDX_W'(idx);
      end
    end
    if (found) grant[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               last <= IDX_W'(N - 1);
    else if (advance && found) last <= win;
  end

endmodule
