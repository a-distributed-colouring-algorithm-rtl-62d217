// colour_pipeline_top: a pipeline whose stages can each redirect control
// flow, kept consistent by distributed colour state vectors.
//
// Structure (stage S1 is next to memory, S_N is the deepest):
//
//   pc_incr --pc--> aau --addr+vector--> imem --ins+vector--> S1 -> S2 -> ... -> S_N -> out
//      ^             |  ^                                     |     |            |
//      +-----npc-----+  +------- transfer addresses ----------+-----+------------+
//
// Fetching runs ahead of execution: the AAU keeps issuing sequential
// addresses as long as memory accepts them, so an unknown number of
// instructions is in flight when a stage takes a control hazard. Every
// address and the instruction it fetches carry a colour vector with one bit
// per stage. A stage that takes a hazard toggles its own bit and sends the
// target to the AAU; instructions behind it that still carry the old bit
// are dropped at that stage. Deeper stages have priority: the AAU drops a
// transfer whose higher-priority bits disagree with its own vector, and a
// stage accepts any instruction whose higher-priority bits disagree with its
// vector, because that marks a stream redirected further down. Only the
// instructions of the architecturally correct path leave stage S_N, in
// program order, whatever the order in which the hazards happen.
//
// Interface: load_* writes the program (word index) and may be used while
// rst_n is low; stall[k-1] holds back stage S_k (stands in for the varying
// delay of an asynchronous stage); out_* is the retired instruction stream.
// The remaining outputs expose the colour vectors and one-cycle event pulses
// for observation; aau_pc_drop stays 0 in this clocked realisation (see aau). The clocked valid/ready realisation of the originally
// asynchronous channels is this design's choice; the colour rules, the AAU
// and the structure follow the scheme.
module colour_pipeline_top
  import colour_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // program load
  input  logic                         load_en,
  input  logic [$clog2(MEM_WORDS)-1:0] load_addr,
  input  word_t                        load_data,
  // per-stage hold
  input  logic [N_STAGES-1:0]          stall,
  // retired instructions from the deepest stage
  output logic                         out_valid,
  input  logic                         out_ready,
  output ins_t                         out_ins,
  // observation
  output col_t                         stage_col [N_STAGES],
  output col_t                         aau_col,
  output logic [N_STAGES-1:0]          stage_reject,
  output logic [N_STAGES-1:0]          stage_adopt,
  output logic [N_STAGES-1:0]          stage_hazard,
  output logic [N_STAGES-1:0]          aau_accept,
  output logic [N_STAGES-1:0]          aau_reject,
  output logic                         aau_pc_drop
);

  // Instruction channel c[k] feeds stage S_(k+1); c[0] comes from memory,
  // c[N_STAGES] leaves the pipeline.
  logic                  ch_valid [N_STAGES+1];
  logic                  ch_ready [N_STAGES+1];
  ins_t                  ch_ins   [N_STAGES+1];

  logic   [N_STAGES-1:0] nt_valid, nt_ready;
  iaddr_t [N_STAGES-1:0] nt;

  logic   pc_valid, pc_ready, mem_valid, mem_ready, npc_valid;
  iaddr_t pc, mem_addr, npc;

  pc_incr u_pc (
    .clk, .rst_n,
    .npc_valid, .npc,
    .pc_valid, .pc_ready, .pc
  );

  aau #(.N(N_STAGES)) u_aau (
    .clk, .rst_n,
    .nt_valid, .nt_ready, .nt,
    .pc_valid, .pc_ready, .pc,
    .mem_valid, .mem_ready, .mem_addr,
    .npc_valid, .npc,
    .col_arb   (aau_col),
    .ev_accept (aau_accept),
    .ev_reject (aau_reject),
    .ev_pc_drop(aau_pc_drop)
  );

  imem #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .rst_n,
    .load_en, .load_addr, .load_data,
    .req_valid(mem_valid),
    .req_ready(mem_ready),
    .req      (mem_addr),
    .rsp_valid(ch_valid[0]),
    .rsp_ready(ch_ready[0]),
    .rsp      (ch_ins[0])
  );

  for (genvar k = 1; k <= N_STAGES; k++) begin : g_stage
    colour_stage #(.K(k)) u_stage (
      .clk, .rst_n,
      .stall    (stall[k-1]),
      .in_valid (ch_valid[k-1]),
      .in_ready (ch_ready[k-1]),
      .in_ins   (ch_ins[k-1]),
      .out_valid(ch_valid[k]),
      .out_ready(ch_ready[k]),
      .out_ins  (ch_ins[k]),
      .nt_valid (nt_valid[k-1]),
      .nt_ready (nt_ready[k-1]),
      .nt       (nt[k-1]),
      .col      (stage_col[k-1]),
      .ev_reject(stage_reject[k-1]),
      .ev_adopt (stage_adopt[k-1]),
      .ev_hazard(stage_hazard[k-1])
    );
  end

  assign out_valid          = ch_valid[N_STAGES];
  assign ch_ready[N_STAGES] = out_ready;
  assign out_ins            = ch_ins[N_STAGES];

endmodule
