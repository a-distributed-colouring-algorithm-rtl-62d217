// aau: Address Arbitration Unit of the colour pipeline.
//
// All instruction addresses reach memory through this unit: sequential
// addresses from the program counter and transfer (branch, jump, exception
// target) addresses from any of the N stages. The unit keeps its own copy of
// the colour state vector, col_arb.
//
// A transfer address from stage S_k is let through only if every
// higher-priority bit c_j (j > k) of its vector equals col_arb; its vector
// then becomes col_arb. If any of those bits differs, a deeper stage has
// already redirected the stream and its target has gone to memory, so the
// address is dropped. Bits c_j for j <= k are not compared: a deeper
// hazard overrides shallower ones regardless of the order they arrived in.
// A sequential address is let through only if its vector equals col_arb
// (it belongs to the current stream); otherwise it is dropped. In this
// clocked realisation the PC is reloaded on the same edge a transfer is let
// through, so that case does not arise; the check is kept as specified.
//
// Issue register: an address let through is placed in a one-entry register
// that memory reads. A transfer is decided, and taken from its stage, without
// waiting for memory; a transfer let through replaces an address still
// waiting in the register, which can only belong to a stream it overrides.
// Without this, a stage waiting to hand over its transfer, memory waiting for
// the pipeline and the AAU waiting for memory would deadlock. The register,
// the replacement and the arbitration order are this design's choices.
//
// Arbitration: pending transfer addresses are served before the sequential
// address; among several a round-robin arbiter chooses, one per cycle.
//
// Interface: nt_valid/nt_ready/nt[k-1] from stage S_k; pc_valid/pc_ready/pc
// from the PC; mem_valid/mem_ready/mem_addr to memory; npc_valid/npc to the
// PC (every address let through); col_arb; one-cycle event pulses.
// Timing: decisions are combinational; the issue register and col_arb load on
// the edge that takes the transfer or PC address; memory sees it from the
// next cycle.
module aau
  import colour_pkg::*;
#(
  parameter int unsigned N = N_STAGES
) (
  input  logic           clk,
  input  logic           rst_n,
  // transfer addresses from the stages, index k-1 = stage S_k
  input  logic   [N-1:0] nt_valid,
  output logic   [N-1:0] nt_ready,
  input  iaddr_t [N-1:0] nt,
  // sequential address from the PC
  input  logic           pc_valid,
  output logic           pc_ready,
  input  iaddr_t         pc,
  // to memory
  output logic           mem_valid,
  input  logic           mem_ready,
  output iaddr_t         mem_addr,
  // back to the PC
  output logic           npc_valid,
  output iaddr_t         npc,
  // state and events
  output col_t           col_arb,
  output logic   [N-1:0] ev_accept,   // transfer from S_k let through
  output logic   [N-1:0] ev_reject,   // transfer from S_k dropped (lower priority)
  output logic           ev_pc_drop   // sequential address of a stale colour dropped
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  grant;
  logic [IW-1:0] gidx;
  logic          any_nt, nt_ok, load;
  iaddr_t        sel, load_addr;
  col_t          col_q;
  logic          out_v;
  iaddr_t        out_q;

  // the arbiter's grant is always used: a transfer never waits for memory
  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .req      (nt_valid),
    .advance  (any_nt),
    .grant    (grant),
    .grant_idx(gidx),
    .any      (any_nt)
  );

  assign col_arb   = col_q;
  assign mem_valid = out_v;
  assign mem_addr  = out_q;

  always_comb begin
    sel        = nt[gidx];
    nt_ok      = ((sel.col ^ col_q) & higher_mask(int'(gidx) + 1)) == '0;
    nt_ready   = grant;
    pc_ready   = 1'b0;
    load       = 1'b0;
    load_addr  = sel;
    ev_accept  = '0;
    ev_reject  = '0;
    ev_pc_drop = 1'b0;
    if (any_nt) begin
      if (nt_ok) begin
        load      = 1'b1;
        ev_accept = grant;
      end else begin
        ev_reject = grant;
      end
    end else if (pc_valid) begin
      if (pc.col == col_q) begin
        // a sequential address waits for room in the issue register
        if (!out_v || mem_ready) begin
          load      = 1'b1;
          load_addr = pc;
          pc_ready  = 1'b1;
        end
      end else begin
        pc_ready   = 1'b1;
        ev_pc_drop = 1'b1;
      end
    end
  end

  assign npc_valid = load;
  assign npc       = load_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '0;
      out_v <= 1'b0;
      out_q <= '0;
    end else begin
      if (out_v && mem_ready) out_v <= 1'b0;
      if (load) begin
        out_v <= 1'b1;
        out_q <= load_addr;
      end
      if (|ev_accept) col_q <= sel.col;
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(nt_ready) && ((nt_ready & ~nt_valid) == '0));
  a_mem_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_v && !mem_ready && !(|ev_accept) |=> out_v && $stable(out_q));

endmodule
