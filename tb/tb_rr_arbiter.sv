// tb_rr_arbiter: self-checking test of rr_arbiter with N = 4.
//
// Random request patterns and random 'advance'. A reference pointer model
// predicts the grant (first requester at or after the pointer, wrapping) and
// the pointer update (just after the winner when the grant is used). Also
// checks fairness: a requester that keeps requesting is granted within N
// used grants.
module tb_rr_arbiter;

  localparam int N = 4;
  localparam int CYCLES = 5000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, grant;
  logic         advance, any;
  logic [1:0]   gidx;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .grant, .grant_idx(gidx), .any);

  int checks = 0, failures = 0;
  int ptr = 0;
  int waits [N];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    req = '0; advance = 0;
    for (int i = 0; i < N; i++) waits[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int exp_idx;
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      #1;
      exp_idx = -1;
      for (int i = 0; i < N; i++)
        if (exp_idx < 0 && req[(ptr + i) % N]) exp_idx = (ptr + i) % N;
      check(any == (req != 0), "any");
      if (exp_idx < 0) check(grant == '0, "no grant without request");
      else begin
        check(grant == N'(1 << exp_idx), "grant one-hot at expected position");
        check(int'(gidx) == exp_idx, "grant_idx");
      end
      @(posedge clk);
      if (advance && exp_idx >= 0) begin
        for (int i = 0; i < N; i++)
          if (req[i] && i != exp_idx) waits[i]++; else waits[i] = 0;
        ptr = (exp_idx + 1) % N;
      end
      for (int i = 0; i < N; i++) if (!req[i]) waits[i] = 0;
      for (int i = 0; i < N; i++) check(waits[i] < N, "fairness");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
