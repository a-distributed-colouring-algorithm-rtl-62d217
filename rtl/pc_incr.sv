// pc_incr: the sequential program counter ("PC +") of the colour pipeline.
//
// Every address the Address Arbitration Unit sends to memory is also sent
// back here (npc). The unit then offers the next sequential address,
// npc + 4, tagged with the same colour vector, to the AAU as its next
// candidate address. After reset it offers RESET_PC with the all-zero vector.
// Once the AAU has taken an offered address (pc_ready) the offer is
// withdrawn until the next npc arrives; npc in the same cycle wins.
//
// Interface: npc_valid/npc in (no back-pressure, one address per cycle at
// most), pc_valid/pc_ready/pc out. Timing: pc reflects npc from the next
// clock cycle. Word step and reset address are this design's choice (MIPS
// words of 4 bytes, start at 0).
module pc_incr
  import colour_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   npc_valid,
  input  iaddr_t npc,
  output logic   pc_valid,
  input  logic   pc_ready,
  output iaddr_t pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_valid <= 1'b1;
      pc       <= '{addr: RESET_PC, col: '0};
    end else if (npc_valid) begin
      pc_valid <= 1'b1;
      pc       <= '{addr: npc.addr + PC_STEP, col: npc.col};
    end else if (pc_ready) begin
      pc_valid <= 1'b0;
    end
  end

endmodule
