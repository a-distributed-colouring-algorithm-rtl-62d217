// colour_pkg: types and constants shared by the colour-vector pipeline.
//
// The pipeline keeps a colour state vector c = (c1, ..., cN), one bit per
// pipeline stage, where c_k is owned by stage S_k and a deeper stage (larger
// k) has the higher priority. Here c_k is bit k-1 of col_t, so the printed
// vector "(c1,c2,c3,c4) = 0100" is col_t value 4'b0010.
//
// Every instruction address travelling to memory carries a colour vector, and
// the fetched instruction carries the same vector down the pipeline.
//
// Instruction word format (this design's own choice; the algorithm only needs
// to know at which stage, if any, an instruction redirects control flow and
// to which address):
//   word[31:28]  OP  : 0 = ordinary instruction, k = 1..N_STAGES = control
//                      transfer (branch, jump, exception) that takes effect in
//                      stage S_k
//   word[15:0]   TGT : absolute byte address of the transfer target
//   other bits   free payload
// Addresses are byte addresses; sequential flow advances by 4 (one 32-bit
// MIPS-style word).
package colour_pkg;

  // Number of pipeline stages, and therefore of colour bits (four-stage
  // evaluation pipeline).
  localparam int unsigned N_STAGES = 4;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned OP_MSB   = 31;
  localparam int unsigned OP_LSB   = 28;
  localparam int unsigned TGT_W    = 16;
  localparam logic [ADDR_W-1:0] PC_STEP  = ADDR_W'(4);
  localparam logic [ADDR_W-1:0] RESET_PC = '0;

  typedef logic [N_STAGES-1:0] col_t;   // colour state vector, bit k-1 = c_k
  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [DATA_W-1:0]   word_t;
  typedef logic [OP_MSB-OP_LSB:0] op_t;

  // An instruction address with its colour vector: what the AAU sends to
  // memory and what a stage sends to the AAU as a transfer address.
  typedef struct packed {
    addr_t addr;
    col_t  col;
  } iaddr_t;

  // A fetched instruction: the word, the address it came from and the
  // colour vector piggybacked on it.
  typedef struct packed {
    word_t word;
    addr_t addr;
    col_t  col;
  } ins_t;

  function automatic op_t ins_op(word_t w);
    return w[OP_MSB:OP_LSB];
  endfunction

  function automatic addr_t ins_target(word_t w);
    return addr_t'(w[TGT_W-1:0]);
  endfunction

  // Mask of the colour bits with priority above stage S_k (bits c_j, j > k).
  function automatic col_t higher_mask(int unsigned k);
    col_t m;
    for (int unsigned j = 0; j < N_STAGES; j++) m[j] = (j + 1 > k);
    return m;
  endfunction

endpackage
