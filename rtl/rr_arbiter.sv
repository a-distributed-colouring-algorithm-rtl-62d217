// rr_arbiter: round-robin choice among N requesters, for the Address
// Arbitration Unit.
//
// The AAU must pick one of several transfer addresses that may arrive from
// the stages at any time and in any order. The algorithm does not depend on
// which one is picked first, only that the choice is mutually exclusive and
// that no request waits forever. This arbiter gives the grant to the first
// requester at or after a rotating pointer; when the grant is used
// ('advance'), the pointer moves to the position just after the winner, so
// every steady requester is served within N grants. A fair rotating choice
// is this design's stand-in for the tree of two-way arbiters of the
// asynchronous original.
//
// Interface: req (one bit per requester), grant (one-hot or zero, combinational
// from req and the pointer), grant_idx (index of the granted bit),
// advance (the grant was used this cycle).
// Timing: grant is combinational; the pointer updates on the clock edge.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      // candidate position ptr+i, wrapped into 0..N-1
      int unsigned p;
      p = (int'(ptr) + i) % N;
      if (!any && req[p]) begin
        any          = 1'b1;
        grant[p]     = 1'b1;
        grant_idx    = IW'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && any)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

endmodule
