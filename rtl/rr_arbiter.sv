// rr_arbiter: round-robin arbiter with a rotating priority pointer.
//
// The request just after the last granted one has the highest priority, so a
// requester that keeps asking is served at most N-1 grants after the others.
// Requesters that are not asking are skipped, which is how inactive or stalled
// warps are passed over. grant is combinational from req and the pointer; the
// pointer moves to the granted index on a clock edge where `advance` is high.
// Reset puts the pointer at N-1, so index 0 has priority first.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx,
  output logic         any
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!any && req[idx]) begin
        any            = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last <= IW'(N - 1);
    else if (advance && any) last <= grant_idx;
  end
endmodule
