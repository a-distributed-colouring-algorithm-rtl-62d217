// colour_stage: one pipeline stage S_K of the colour-vector pipeline.
//
// The stage keeps its own copy of the colour state vector (col) but only ever
// toggles its own bit c_K. For each instruction it takes in, it compares the
// instruction's vector with col:
//   * if any higher-priority bit c_j (j > K) differs, the instruction is the
//     first of a stream redirected deeper in the pipeline: it is accepted;
//   * otherwise, if its own bit c_K differs, the instruction was prefetched
//     behind a control hazard this stage has already taken: it is rejected
//     (dropped);
//   * otherwise it is accepted.
// An accepted instruction's vector becomes the stage's vector. Bits below K
// play no part in the decision. If the accepted instruction is a control
// transfer for this stage (OP == K), the stage toggles c_K and sends the
// target address, tagged with the new vector, to the Address Arbitration
// Unit; the transfer instruction itself goes no further. Any other accepted
// instruction is passed on to the next stage. This is the generic form of the
// per-stage checks of the four-stage evaluation model: S1 has no lower bits,
// S_N no higher bits, the middle stages use both.
//
// Targets are 16-bit fields of the word, so nt.addr[31:16] is always zero.
//
// Interface: valid/ready channels. in_* comes from the previous stage (or the
// instruction memory), out_* goes to the next stage, nt_* (new transfer
// address) goes to the AAU. 'stall' holds the stage back from taking a new
// instruction; it stands in for the data-dependent delay of an asynchronous
// stage and is this design's test hook, not part of the algorithm.
//
// Timing: one register per channel. An instruction taken at a clock edge is
// offered on out_* or nt_* from the next cycle. in_ready depends
// combinationally on stall and out_ready but not on nt_ready, so no loop forms
// through the AAU and memory. The stage takes nothing while its transfer
// address waits for the AAU. The clocked, handshaked realisation is this
// design's choice; the colour rules follow the algorithm.
module colour_stage
  import colour_pkg::*;
#(
  parameter int unsigned K = 1   // stage number, 1 .. N_STAGES
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   stall,
  // instruction in
  input  logic   in_valid,
  output logic   in_ready,
  input  ins_t   in_ins,
  // instruction out
  output logic   out_valid,
  input  logic   out_ready,
  output ins_t   out_ins,
  // transfer address to the AAU
  output logic   nt_valid,
  input  logic   nt_ready,
  output iaddr_t nt,
  // state and events (one-cycle pulses, on the edge that takes the instruction)
  output col_t   col,
  output logic   ev_reject,   // instruction dropped: own colour bit differs
  output logic   ev_adopt,    // deeper-stage redirection seen: new stream adopted
  output logic   ev_hazard    // control hazard taken here, transfer address issued
);

  localparam col_t HIGH = higher_mask(K);

  col_t col_q;
  logic in_fire, accept, higher_diff, own_diff, is_transfer;
  col_t new_col;

  assign col = col_q;

  assign in_ready = !stall && !nt_valid && (!out_valid || out_ready);
  assign in_fire  = in_valid && in_ready;

  always_comb begin
    higher_diff = |((in_ins.col ^ col_q) & HIGH);
    own_diff    = in_ins.col[K-1] ^ col_q[K-1];
    accept      = higher_diff || !own_diff;
    is_transfer = (ins_op(in_ins.word) == op_t'(K));
    new_col     = in_ins.col;
    if (is_transfer) new_col[K-1] = ~in_ins.col[K-1];
  end

  assign ev_reject = in_fire && !accept;
  assign ev_adopt  = in_fire && higher_diff;
  assign ev_hazard = in_fire && accept && is_transfer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      out_valid <= 1'b0;
      out_ins   <= '0;
      nt_valid  <= 1'b0;
      nt        <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (nt_valid && nt_ready)   nt_valid  <= 1'b0;
      if (in_fire && accept) begin
        col_q <= new_col;
        if (is_transfer) begin
          nt_valid <= 1'b1;
          nt       <= '{addr: ins_target(in_ins.word), col: new_col};
        end else begin
          out_valid <= 1'b1;
          out_ins   <= in_ins;
        end
      end
    end
  end

  // Channel rules: an offered item stays put until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_ins));
  a_nt_stable: assert property (@(posedge clk) disable iff (!rst_n)
    nt_valid && !nt_ready |=> nt_valid && $stable(nt));

endmodule
