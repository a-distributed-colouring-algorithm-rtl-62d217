// tb_colour_stage: self-checking test of colour_stage for all four stage
// positions of the four-stage pipeline (K = 1..4) side by side.
//
// Each instance gets random instructions (random colour vectors, random
// operation codes, some of them transfers for that stage) with random
// stall, out_ready and nt_ready. A reference model per instance decides
// acceptance with the per-stage conditions written out bit by bit:
//   S1: vector equal, or c2, c3 or c4 differs
//   S2: equal, or c3 or c4 differs, or (c1 differs and c2 equal)
//   S3: equal, or c4 differs, or ((c1 or c2 differs) and c3 equal)
//   S4: equal, or c4 equal
// and predicts in_ready, the event pulses, the forwarded instruction, the
// transfer address (target with the stage's bit toggled) and the stage
// vector every cycle.
module tb_colour_stage;
  import colour_pkg::*;

  localparam int NS = 4;
  localparam int CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   stall [NS];
  logic   in_valid [NS], in_ready [NS], out_valid [NS], out_ready [NS];
  logic   nt_valid [NS], nt_ready [NS];
  ins_t   in_ins [NS], out_ins [NS];
  iaddr_t nt [NS];
  col_t   col [NS];
  logic   ev_reject [NS], ev_adopt [NS], ev_hazard [NS];

  for (genvar g = 0; g < NS; g++) begin : g_dut
    colour_stage #(.K(g + 1)) dut (
      .clk, .rst_n,
      .stall(stall[g]),
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_ins(in_ins[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_ins(out_ins[g]),
      .nt_valid(nt_valid[g]), .nt_ready(nt_ready[g]), .nt(nt[g]),
      .col(col[g]),
      .ev_reject(ev_reject[g]), .ev_adopt(ev_adopt[g]), .ev_hazard(ev_hazard[g])
    );
  end

  int checks = 0, failures = 0;
  int n_acc = 0, n_rej = 0, n_haz = 0, n_adopt = 0;

  // reference state
  col_t   m_col [NS];
  logic   m_out_v [NS], m_nt_v [NS];
  ins_t   m_out [NS];
  iaddr_t m_nt [NS];
  logic   fire [NS];

  function automatic logic ref_accept(int k, col_t ic, col_t sc);
    logic [4:1] d;
    d = {ic[3] ^ sc[3], ic[2] ^ sc[2], ic[1] ^ sc[1], ic[0] ^ sc[0]};
    case (k)
      1: return (ic == sc) || d[2] || d[3] || d[4];
      2: return (ic == sc) || d[3] || d[4] || (d[1] && !d[2]);
      3: return (ic == sc) || d[4] || ((d[1] || d[2]) && !d[3]);
      default: return (ic == sc) || !d[4];
    endcase
  endfunction

  task automatic check(input logic ok, input string what, input int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t S%0d: %s", $time, k, what);
    end
  endtask

  initial begin
    for (int g = 0; g < NS; g++) begin
      stall[g] = 0; in_valid[g] = 0; in_ins[g] = '0; out_ready[g] = 0; nt_ready[g] = 0;
      m_col[g] = '0; m_out_v[g] = 0; m_nt_v[g] = 0; m_out[g] = '0; m_nt[g] = '0; fire[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      for (int g = 0; g < NS; g++) begin
        int k;
        k = g + 1;
        // model update for what was taken at the last edge
        if (m_out_v[g] && out_ready[g]) m_out_v[g] = 0;
        if (m_nt_v[g] && nt_ready[g]) m_nt_v[g] = 0;
        if (fire[g]) begin
          if (ref_accept(k, in_ins[g].col, m_col[g])) begin
            col_t nc;
            nc = in_ins[g].col;
            if (in_ins[g].word[31:28] == 4'(k)) begin
              nc[k-1] = ~nc[k-1];
              m_nt_v[g] = 1;
              m_nt[g] = '{addr: {16'h0, in_ins[g].word[15:0]}, col: nc};
            end else begin
              m_out_v[g] = 1;
              m_out[g] = in_ins[g];
            end
            m_col[g] = nc;
          end
        end
        // registered state
        check(col[g] == m_col[g], "stage vector", k);
        check(out_valid[g] == m_out_v[g], "out_valid", k);
        if (m_out_v[g]) check(out_ins[g] == m_out[g], "out_ins", k);
        check(nt_valid[g] == m_nt_v[g], "nt_valid", k);
        if (m_nt_v[g]) check(nt[g] == m_nt[g], "transfer address", k);
        // new stimulus
        stall[g]     = ($urandom_range(0, 7) == 0);
        out_ready[g] = ($urandom_range(0, 3) != 0);
        nt_ready[g]  = ($urandom_range(0, 2) != 0);
        in_valid[g]  = ($urandom_range(0, 3) != 0);
        in_ins[g].word = $urandom;
        in_ins[g].word[31:28] = 4'($urandom_range(0, 6));
        in_ins[g].addr = $urandom;
        // mostly the stage's own vector, with a few bits flipped
        in_ins[g].col = m_col[g] ^ (($urandom_range(0, 1) == 0) ? col_t'($urandom) : '0);
      end
      #1;
      for (int g = 0; g < NS; g++) begin
        logic exp_ready, acc;
        int k;
        k = g + 1;
        exp_ready = !stall[g] && !m_nt_v[g] && (!m_out_v[g] || out_ready[g]);
        check(in_ready[g] == exp_ready, "in_ready", k);
        fire[g] = in_valid[g] && exp_ready;
        acc = ref_accept(k, in_ins[g].col, m_col[g]);
        check(ev_reject[g] == (fire[g] && !acc), "ev_reject", k);
        check(ev_hazard[g] == (fire[g] && acc && in_ins[g].word[31:28] == 4'(k)), "ev_hazard", k);
        check(ev_adopt[g] == (fire[g] && (((in_ins[g].col ^ m_col[g]) >> k) != '0)), "ev_adopt", k);
        if (fire[g]) begin
          if (acc) n_acc++; else n_rej++;
          if (ev_hazard[g]) n_haz++;
          if (ev_adopt[g]) n_adopt++;
        end
      end
    end
    $display("accepted=%0d rejected=%0d hazards=%0d adopted=%0d", n_acc, n_rej, n_haz, n_adopt);
    check(n_rej > 100 && n_haz > 100 && n_adopt > 100, "coverage of reject/hazard/adopt", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
