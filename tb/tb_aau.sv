// tb_aau: self-checking test of the Address Arbitration Unit (four stages).
//
// Random transfer addresses appear on the four stage channels and stay until
// taken, as a stage holds them; the PC channel offers addresses whose colour
// is mostly the AAU's own vector and sometimes a stale one; memory readiness
// is random. A reference copy of the AAU vector and of its issue register,
// and the validity conditions written out per stage
//   S1: c2, c3, c4 equal   S2: c3, c4 equal   S3: c4 equal   S4: always
// predict every cycle: which transfer is let through or dropped, when a
// sequential address is taken or dropped, what memory is offered, the npc
// echo, the event pulses and the vector update. It also checks that a
// pending transfer is taken within N cycles (no transfer waits for memory).
module tb_aau;
  import colour_pkg::*;

  localparam int N = 4;
  localparam int CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   [N-1:0] nt_valid, nt_ready, ev_accept, ev_reject;
  iaddr_t [N-1:0] nt;
  logic   pc_valid, pc_ready, mem_valid, mem_ready, npc_valid, ev_pc_drop;
  iaddr_t pc, mem_addr, npc;
  col_t   col_arb;

  aau #(.N(N)) dut (.clk, .rst_n, .nt_valid, .nt_ready, .nt, .pc_valid, .pc_ready, .pc,
                    .mem_valid, .mem_ready, .mem_addr, .npc_valid, .npc, .col_arb,
                    .ev_accept, .ev_reject, .ev_pc_drop);

  int checks = 0, failures = 0;
  int taken;
  int n_acc = 0, n_rej = 0, n_pc = 0, n_drop = 0, n_repl = 0;
  int wait_cnt [N];
  col_t   m_col;
  logic   m_v;
  iaddr_t m_q;

  function automatic logic ref_ok(int k, col_t a, col_t m);
    case (k)
      1: return a[1] == m[1] && a[2] == m[2] && a[3] == m[3];
      2: return a[2] == m[2] && a[3] == m[3];
      3: return a[3] == m[3];
      default: return 1'b1;
    endcase
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    nt_valid = '0; nt = '0; pc_valid = 0; pc = '0; mem_ready = 0;
    m_col = '0; m_v = 0; m_q = '0;
    for (int i = 0; i < N; i++) wait_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    taken = -1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic   ld;
      iaddr_t ld_a;
      @(negedge clk);
      // a channel is released only after the edge that took it
      if (taken >= 0) nt_valid[taken] = 0;
      for (int i = 0; i < N; i++)
        if (!nt_valid[i] && $urandom_range(0, 5) == 0) begin
          nt_valid[i] = 1;
          nt[i].addr = {$urandom} & 32'hffff_fffc;
          // near the AAU's vector, with the stage's own bit toggled
          nt[i].col = m_col ^ col_t'(1 << i) ^
                      (($urandom_range(0, 2) == 0) ? col_t'($urandom) : '0);
        end
      pc_valid = ($urandom_range(0, 4) != 0);
      pc.addr = {$urandom} & 32'hffff_fffc;
      pc.col = ($urandom_range(0, 5) == 0) ? col_t'($urandom) : m_col;
      mem_ready = ($urandom_range(0, 3) != 0);
      #1;
      check(col_arb == m_col, "AAU colour vector");
      check(mem_valid == m_v && (!m_v || mem_addr == m_q), "issue register offered to memory");
      check($onehot0(nt_ready) && ((nt_ready & ~nt_valid) == '0), "nt_ready one-hot on a valid channel");
      check((nt_valid == '0) == (nt_ready == '0), "a pending transfer is always taken");
      taken = -1;
      for (int i = 0; i < N; i++) if (nt_ready[i]) taken = i;
      ld = 0; ld_a = '0;
      if (taken >= 0) begin
        check(!pc_ready, "PC waits while transfers are pending");
        if (ref_ok(taken + 1, nt[taken].col, m_col)) begin
          check(ev_accept == N'(1 << taken) && ev_reject == '0, "accept event");
          ld = 1; ld_a = nt[taken];
          if (m_v && !mem_ready) n_repl++;
          n_acc++;
          m_col = nt[taken].col;
        end else begin
          check(ev_reject == N'(1 << taken) && ev_accept == '0, "reject event");
          n_rej++;
        end
      end else if (pc_valid) begin
        if (pc.col == m_col) begin
          check(!ev_pc_drop && pc_ready == (!m_v || mem_ready), "sequential address taken when there is room");
          if (pc_ready) begin
            ld = 1; ld_a = pc; n_pc++;
          end
        end else begin
          check(pc_ready && ev_pc_drop, "stale sequential address dropped");
          n_drop++;
        end
      end else begin
        check(!pc_ready && !ev_pc_drop && ev_accept == '0 && ev_reject == '0, "idle");
      end
      check(npc_valid == ld && (!ld || npc == ld_a), "npc echo of every address let through");
      for (int i = 0; i < N; i++) begin
        if (nt_valid[i] && !nt_ready[i]) wait_cnt[i]++; else wait_cnt[i] = 0;
        check(wait_cnt[i] < N, "transfer served within N cycles");
      end
      if (m_v && mem_ready) m_v = 0;
      if (ld) begin
        m_v = 1; m_q = ld_a;
      end
      @(posedge clk);
    end
    $display("accepted=%0d rejected=%0d replaced=%0d pc_issued=%0d pc_dropped=%0d", n_acc, n_rej, n_repl, n_pc, n_drop);
    check(n_acc > 100 && n_rej > 100 && n_repl > 10 && n_pc > 100 && n_drop > 10, "coverage");
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
