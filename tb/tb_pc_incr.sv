// tb_pc_incr: self-checking test of pc_incr.
//
// Checks the reset offer (address 0, all-zero colour vector), that each npc
// makes the unit offer npc + 4 with npc's colour vector from the next cycle,
// that a taken offer is withdrawn, and that npc wins over pc_ready in the
// same cycle.
module tb_pc_incr;
  import colour_pkg::*;

  localparam int CYCLES = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   npc_valid, pc_valid, pc_ready;
  iaddr_t npc, pc;

  pc_incr dut (.clk, .rst_n, .npc_valid, .npc, .pc_valid, .pc_ready, .pc);

  int checks = 0, failures = 0;
  logic   m_v;
  iaddr_t m_pc;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    npc_valid = 0; npc = '0; pc_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(pc_valid && pc.addr == 32'h0 && pc.col == 4'b0000, "reset offer");
    m_v = 1; m_pc = '{addr: 32'h0, col: '0};
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      npc_valid = ($urandom_range(0, 2) == 0);
      npc.addr  = {$urandom} & 32'hffff_fffc;
      npc.col   = col_t'($urandom);
      pc_ready  = ($urandom_range(0, 1) == 0);
      @(posedge clk);
      if (npc_valid) begin
        m_v = 1; m_pc = '{addr: npc.addr + 32'd4, col: npc.col};
      end else if (pc_ready) m_v = 0;
      #1;
      check(pc_valid == m_v, "pc_valid");
      if (m_v) check(pc == m_pc, "pc = npc + 4 with npc colour");
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
