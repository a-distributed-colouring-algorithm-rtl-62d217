// tb_imem: self-checking test of imem with its default 256 words.
//
// Loads every word with a value computed from its index, then issues random
// fetches (random addresses, including ones above the memory size that wrap,
// and random colour vectors) under random response back-pressure. A queue of
// expected responses checks word, address and colour vector of each
// response, in issue order, and that a request taken in one cycle is
// answered in the next.
module tb_imem;
  import colour_pkg::*;

  localparam int WORDS = 256;
  localparam int CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         load_en;
  logic [7:0]   load_addr;
  word_t        load_data;
  logic         req_valid, req_ready, rsp_valid, rsp_ready;
  iaddr_t       req;
  ins_t         rsp;

  imem #(.WORDS(WORDS)) dut (.clk, .rst_n, .load_en, .load_addr, .load_data,
                             .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp);

  int checks = 0, failures = 0, served = 0;
  ins_t exp_q [$];

  function automatic word_t word_at(int i);
    return word_t'(i) * 32'h9e37_79b1 ^ 32'h1234_5678;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    load_en = 0; load_addr = '0; load_data = '0; req_valid = 0; req = '0; rsp_ready = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 8'(i); load_data = word_at(i);
    end
    @(negedge clk);
    load_en = 0;
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic rfire, qfire;
      @(negedge clk);
      req_valid = ($urandom_range(0, 3) != 0);
      req.addr  = {$urandom} & 32'h0000_0ffc;
      req.col   = col_t'($urandom);
      rsp_ready = ($urandom_range(0, 2) != 0);
      #1;
      check(req_ready == (!rsp_valid || rsp_ready), "req_ready");
      rfire = rsp_valid && rsp_ready;
      qfire = req_valid && req_ready;
      if (rfire) begin
        check(exp_q.size() > 0, "response expected");
        if (exp_q.size() > 0) begin
          ins_t e;
          e = exp_q.pop_front();
          check(rsp == e, "response word/address/colour");
          served++;
        end
      end
      if (qfire)
        exp_q.push_back('{word: word_at(int'(req.addr[9:2])), addr: req.addr, col: req.col});
      @(posedge clk);
      #1;
      check(rsp_valid == (exp_q.size() == 1), "one response held after a taken request");
    end
    check(served > 1000, "enough fetches served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + WORDS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
