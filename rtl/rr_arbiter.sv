// rr_arbiter: work-conserving round-robin arbiter.
//
// `grant` is one-hot and combinational: the first requester at or after
// the priority pointer wins, so a request is never left waiting while the
// resource is free (work conserving) and every requester is served within
// N grants (no starvation). `advance` (the winner was accepted) moves the
// pointer to the position after the winner.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [(N>1 ? $clog2(N) : 1)-1:0] grant_idx,
  output logic         any
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr_q;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int k = 0; k < N; k++) begin
      automatic int unsigned i = (int'(ptr_q) + k) % N;
      if (!any && req[i]) begin
        any       = 1'b1;
        grant[i]  = 1'b1;
        grant_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else if (advance && any)
      ptr_q <= (int'(grant_idx) == N-1) ? '0 : grant_idx + IW'(1);
  end
endmodule
