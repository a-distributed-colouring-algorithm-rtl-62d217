// imem: instruction memory of the colour pipeline.
//
// Takes an instruction address with its colour vector and returns the word
// stored there, together with the address and the same colour vector, so
// that the instruction carries the colour of the stream that fetched it.
// Addresses are byte addresses; the word index is addr[AW+1:2], upper bits
// are ignored (the memory wraps around). A write port loads the program.
//
// Interface: req_valid/req_ready/req in, rsp_valid/rsp_ready/rsp out, one
// response register, so at most one fetched instruction waits here.
// req_ready = !rsp_valid || rsp_ready. Timing: a request taken at a clock
// edge is answered from the next cycle. Depth, latency and the load port are
// this design's choices; the algorithm only needs fetches returned in the
// order they were issued.
module imem
  import colour_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // program load port
  input  logic                     load_en,
  input  logic [$clog2(WORDS)-1:0] load_addr,   // word index
  input  word_t                    load_data,
  // fetch request
  input  logic                     req_valid,
  output logic                     req_ready,
  input  iaddr_t                   req,
  // fetched instruction
  output logic                     rsp_valid,
  input  logic                     rsp_ready,
  output ins_t                     rsp
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign req_ready = !rsp_valid || rsp_ready;

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        rsp_valid <= 1'b1;
        rsp       <= '{word: mem[req.addr[AW+1:2]], addr: req.addr, col: req.col};
      end
    end
  end

  a_rsp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp));

endmodule
