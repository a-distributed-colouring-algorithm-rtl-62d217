// tb_colour_pipeline_top: end-to-end test of the colour-vector pipeline at
// its default size (four stages, 256-word memory).
//
// Reference: an instruction-level model runs the program sequentially from
// address 0: an ordinary word retires and the PC advances by 4; a transfer
// word (OP = 1..4) retires nothing and the PC jumps to its target. Whatever
// the timing, the words leaving stage S4 must be exactly this sequence,
// with the addresses they were fetched from.
//
// Part 1 replays the two orderings of the two-hazard example: a transfer
// CH1 taken in S4 followed directly by a transfer CH2 taken in S2.
//   Ordering A: S4 is held until CH2 has redirected the stream in S2, so the
//   AAU vector (c1 c2 c3 c4) must go 0000 -> 0100 -> 0001.
//   Ordering B: S1 is held until CH1's target has been let through by the
//   AAU, so the vector goes 0000 -> 0001 and CH2's target, carrying 0100,
//   must be dropped by the AAU.
// In ordering A the sequential instructions behind CH2 must be dropped at S2
// and instructions of CH2's stream at S4.
// After either ordering every stage must end with the vector 0001.
// Part 2 runs random programs with random stage holds and random output
// back-pressure, and counts how often each mechanism occurred: instructions
// dropped in a stage, hazards taken in each stage, streams adopted from a
// deeper stage, transfers let through and dropped by the AAU, an address
// waiting in the AAU's issue register replaced by a transfer, back-pressure.
// A mechanism that never occurred counts as a failure.
module tb_colour_pipeline_top;
  import colour_pkg::*;

  localparam int WORDS    = 256;
  localparam int N        = N_STAGES;
  localparam int PROGRAMS = 40;
  localparam int RETIRE   = 400;   // instructions checked per random program

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load_en;
  logic [7:0]   load_addr;
  word_t        load_data;
  logic [N-1:0] stall;
  logic         out_valid, out_ready;
  ins_t         out_ins;
  col_t         stage_col [N];
  col_t         aau_col;
  logic [N-1:0] stage_reject, stage_adopt, stage_hazard, aau_accept, aau_reject;
  logic         aau_pc_drop;

  colour_pipeline_top dut (
    .clk, .rst_n, .load_en, .load_addr, .load_data, .stall,
    .out_valid, .out_ready, .out_ins,
    .stage_col, .aau_col, .stage_reject, .stage_adopt, .stage_hazard,
    .aau_accept, .aau_reject, .aau_pc_drop
  );

  int checks = 0, failures = 0;
  word_t prog [WORDS];
  ins_t  exp_q [$];
  col_t  aau_trace [$];

  // mechanism counters
  int c_reject = 0, c_adopt = 0, c_aau_acc = 0, c_aau_rej = 0, c_bp = 0, c_stall = 0;
  int c_hazard [N];
  int c_order_a = 0, c_order_b = 0;
  int c_rej_s2 = 0, c_rej_s4 = 0, c_replace = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  // printed vector (c1 c2 c3 c4) -> col_t
  function automatic col_t vec(input logic [3:0] printed);
    return {printed[0], printed[1], printed[2], printed[3]};
  endfunction

  function automatic word_t w_ord(input int tag);
    return {4'h0, 28'(tag)};
  endfunction

  function automatic word_t w_xfer(input int stage, input int target);
    return {4'(stage), 12'h5a5, 16'(target)};
  endfunction

  // Sequential reference: expected retired stream. Returns 0 if the
  // program cannot retire n instructions (a loop of transfers only).
  function automatic bit build_expected(input int n);
    addr_t pc;
    pc = '0;
    exp_q.delete();
    for (int step = 0; step < 50 * n && exp_q.size() < n; step++) begin
      word_t w;
      w = prog[int'(pc[9:2])];
      if (w[31:28] >= 4'd1 && w[31:28] <= 4'(N)) pc = addr_t'(w[15:0]);
      else begin
        exp_q.push_back('{word: w, addr: pc, col: '0});
        pc = pc + 32'd4;
      end
    end
    return exp_q.size() == n;
  endfunction

  task automatic load_and_reset();
    rst_n = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 8'(i); load_data = prog[i];
    end
    @(negedge clk);
    load_en = 0;
    rst_n = 1'b1;
  endtask

  // Collect n retired instructions and compare with exp_q.
  // mode 0: random holds and back-pressure; 1: ordering A; 2: ordering B.
  task automatic run(input int n, input int mode);
    int got, cyc;
    got = 0;
    cyc = 0;
    while (got < n && cyc < 200 * n) begin
      @(negedge clk);
      cyc++;
      if (mode == 0) begin
        for (int k = 0; k < N; k++) stall[k] = ($urandom_range(0, 3) == 0);
        out_ready = ($urandom_range(0, 4) != 0);
      end else if (mode == 1) begin
        // hold S4 while CH1 waits in front of it and S2 has not redirected
        stall = '0;
        stall[3] = dut.ch_valid[3] && dut.ch_ins[3].word[31:28] == 4'd4 && c_order_a == 0;
        out_ready = 1;
      end else begin
        // hold S1 while CH2 waits in front of it and S4's target is not through
        stall = '0;
        stall[0] = dut.ch_valid[0] && dut.ch_ins[0].word[31:28] == 4'd2 && c_order_b == 0;
        out_ready = 1;
      end
      #1;
      if (stall != '0) c_stall++;
      if (out_valid && !out_ready) c_bp++;
      if (out_valid && out_ready) begin
        ins_t e;
        e = exp_q.pop_front();
        check(out_ins.word == e.word && out_ins.addr == e.addr, "retired instruction in program order");
        if (out_ins.word != e.word || out_ins.addr != e.addr)
          if (failures < 20) $display("  got %h@%h expected %h@%h", out_ins.word, out_ins.addr, e.word, e.addr);
        got++;
      end
      c_reject += $countones(stage_reject);
      c_adopt  += $countones(stage_adopt);
      c_aau_rej += $countones(aau_reject);
      c_aau_acc += $countones(aau_accept);
      for (int k = 0; k < N; k++) if (stage_hazard[k]) c_hazard[k]++;
      if (stage_reject[1]) c_rej_s2++;
      if (stage_reject[3]) c_rej_s4++;
      // a transfer let through while the AAU's issue register still waits for memory
      if (aau_accept != '0 && dut.mem_valid && !dut.mem_ready) c_replace++;
      if (mode == 1 && stage_hazard[1]) c_order_a++;
      if (mode == 2 && aau_accept[3]) c_order_b++;
      @(posedge clk);
      #1;
      if (aau_trace.size() == 0 || aau_trace[$] != aau_col) aau_trace.push_back(aau_col);
    end
    check(got == n, "all expected instructions retired");
  endtask

  task automatic fig5_program();
    for (int i = 0; i < WORDS; i++) prog[i] = w_ord(i);
    prog[0]        = w_ord(1);            // I1
    prog[1]        = w_xfer(4, 'h80);     // CH1, taken in S4, target I_j
    prog[2]        = w_xfer(2, 'h40);     // CH2, taken in S2, target I_k
  endtask

  initial begin
    load_en = 0; load_addr = '0; load_data = '0; stall = '0; out_ready = 0;
    for (int k = 0; k < N; k++) c_hazard[k] = 0;

    // ---- Part 1, ordering A: CH2 redirects in S2 before CH1 reaches S4
    fig5_program();
    void'(build_expected(40));
    aau_trace.delete();
    load_and_reset();
    aau_trace.push_back(aau_col);
    begin
      int acc2, rej2;
      acc2 = c_aau_acc; rej2 = c_aau_rej;
      c_rej_s2 = 0; c_rej_s4 = 0;
      run(40, 1);
      check(c_rej_s2 > 0, "ordering A: sequential instructions behind CH2 dropped at S2");
      check(c_rej_s4 > 0, "ordering A: CH2's stream dropped at S4 after CH1");
      check(c_order_a == 1, "ordering A: hazard in S2 before S4");
      check(aau_trace.size() == 3 && aau_trace[0] == vec(4'b0000) &&
            aau_trace[1] == vec(4'b0100) && aau_trace[2] == vec(4'b0001),
            "ordering A: AAU vector 0000 -> 0100 -> 0001");
      check(c_aau_acc - acc2 == 2 && c_aau_rej == rej2, "ordering A: both transfers let through");
    end
    for (int k = 0; k < N; k++) check(stage_col[k] == vec(4'b0001), "ordering A: stage vectors end at 0001");

    // ---- Part 1, ordering B: CH1's target passes the AAU before CH2 redirects
    void'(build_expected(40));
    aau_trace.delete();
    load_and_reset();
    aau_trace.push_back(aau_col);
    begin
      int acc2, rej2, haz2;
      acc2 = c_aau_acc; rej2 = c_aau_rej; haz2 = c_hazard[1];
      run(40, 2);
      check(c_order_b == 1, "ordering B: S4 target through first");
      check(c_hazard[1] - haz2 == 1, "ordering B: CH2 still taken in S2");
      check(aau_trace.size() == 2 && aau_trace[0] == vec(4'b0000) && aau_trace[1] == vec(4'b0001),
            "ordering B: AAU vector 0000 -> 0001");
      check(c_aau_acc - acc2 == 1 && c_aau_rej - rej2 == 1, "ordering B: S2 transfer dropped by AAU");
    end
    for (int k = 0; k < N; k++) check(stage_col[k] == vec(4'b0001), "ordering B: stage vectors end at 0001");

    // ---- Part 2: random programs
    for (int p = 0; p < PROGRAMS; p++) begin
      do begin
        for (int i = 0; i < WORDS; i++) begin
          int r;
          r = $urandom_range(0, 99);
          if (r < 70) prog[i] = w_ord($urandom_range(0, 'hfffffff));
          else prog[i] = w_xfer(1 + (r % N), 4 * $urandom_range(0, WORDS - 1));
        end
      end while (!build_expected(RETIRE));
      load_and_reset();
      run(RETIRE, 0);
    end

    $display("mechanisms: stage drops=%0d adopted=%0d hazards S1..S4=%0d/%0d/%0d/%0d aau through=%0d aau dropped=%0d replaced=%0d backpressure=%0d held=%0d orderA=%0d orderB=%0d",
             c_reject, c_adopt, c_hazard[0], c_hazard[1], c_hazard[2], c_hazard[3],
             c_aau_acc, c_aau_rej, c_replace, c_bp, c_stall, c_order_a, c_order_b);
    check(c_reject > 0, "mechanism: instruction dropped in a stage");
    check(c_adopt > 0, "mechanism: stream adopted from a deeper stage");
    for (int k = 0; k < N; k++) check(c_hazard[k] > 0, "mechanism: hazard taken in each stage");
    check(c_aau_acc > 0, "mechanism: transfer let through by the AAU");
    check(c_aau_rej > 0, "mechanism: lower-priority transfer dropped by the AAU");
    check(c_replace > 0, "mechanism: waiting address in the AAU replaced by a transfer");
    check(c_bp > 0 && c_stall > 0, "mechanism: back-pressure and stage holds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
