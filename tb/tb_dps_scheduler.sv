// tb_dps_scheduler: drives the select-free scheduler with the testbench acting
// as dispatcher and as the register-read scoreboard.
//
// Phases: deep-mode chain of speculative (early) dependences, deep-mode chain
// of non-speculative dependences, deep-mode random traffic, and the same
// three in shallow mode. For every correctly issued instruction the
// testbench checks the spacing from each producer's correct issue: at least
// 1 cycle for a speculative source in deep mode, at least 2 for a
// non-speculative source in deep mode, at least 1 in shallow mode. In chain
// phases the spacing must be exactly that (back-to-back issue). Also checked:
// no more than ISSUE_W grants per cycle, every instruction issues correctly
// exactly once, and collisions and pileups occur in deep random traffic.
module tb_dps_scheduler;
  import dps_pkg::*;
  localparam int N = 16, W = 4, IW = 2, NPHYS = 512, ROB_N = 128;
  localparam int PW = $clog2(NPHYS), EW = $clog2(N), RW = $clog2(ROB_N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dps_mode_e mode;
  logic [W-1:0] ins_valid;
  alu_op_e   ins_op [W];
  logic [PW-1:0] ins_psrc1 [W], ins_psrc2 [W], ins_pdst [W];
  logic      ins_early1 [W], ins_early2 [W];
  logic [RW-1:0] ins_rob [W];
  logic [EW:0] free_cnt;
  logic      empty;
  logic [IW-1:0] iss_valid, fb_valid, fb_ok;
  logic [EW-1:0] iss_entry [IW], fb_entry [IW];
  alu_op_e   iss_op [IW];
  logic [PW-1:0] iss_psrc1 [IW], iss_psrc2 [IW], iss_pdst [IW];
  logic [RW-1:0] iss_rob [IW];
  logic [31:0] collisions, pileups, spec_wakeups;

  dps_scheduler #(.N(N), .WIDTH(W), .ISSUE_W(IW), .NPHYS(NPHYS), .ROB_N(ROB_N)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycle, s); end
  endtask

  // per tag bookkeeping (tags are never reused in this test)
  logic          ready [NPHYS];     // correctly issued
  int            iss_t [NPHYS];     // cycle of the correct grant
  logic [PW-1:0] src1 [NPHYS], src2 [NPHYS];
  logic          e1 [NPHYS], e2 [NPHYS];
  int            chain [NPHYS];     // 0 random, 1 spec chain, 2 non-spec chain
  int            n_ok = 0, n_ins = 0;
  logic [PW-1:0] next_tag;

  // register-read stage model: last cycle's grants
  logic [IW-1:0] rr_v;
  logic [EW-1:0] rr_e [IW];
  logic [PW-1:0] rr_d [IW];
  int            rr_t;

  always_comb for (int k = 0; k < IW; k++) begin
    fb_valid[k] = rr_v[k];
    fb_entry[k] = rr_e[k];
    fb_ok[k]    = ready[src1[rr_d[k]]] && ready[src2[rr_d[k]]];
  end

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    check($countones(iss_valid) <= IW, "issue width");
    for (int k = 0; k < IW; k++) if (rr_v[k] && fb_ok[k]) begin
      logic [PW-1:0] d;
      int g1, g2;
      d = rr_d[k];
      check(!ready[d], "issued twice");
      ready[d] = 1'b1;
      iss_t[d] = rr_t;
      n_ok++;
      g1 = (mode == MODE_DEEP) ? (e1[d] ? 1 : 2) : 1;
      g2 = (mode == MODE_DEEP) ? (e2[d] ? 1 : 2) : 1;
      if (src1[d] >= 32) check(rr_t - iss_t[src1[d]] >= g1, $sformatf("tag %0d issued %0d after src1", d, rr_t - iss_t[src1[d]]));
      if (src2[d] >= 32) check(rr_t - iss_t[src2[d]] >= g2, "spacing from src2");
      if (chain[d] != 0 && chain[src1[d]] == chain[d])
        check(rr_t - iss_t[src1[d]] == g1, $sformatf("chain tag %0d spacing %0d expected %0d", d, rr_t - iss_t[src1[d]], g1));
    end
    rr_v <= iss_valid;
    for (int k = 0; k < IW; k++) begin rr_e[k] <= iss_entry[k]; rr_d[k] <= iss_pdst[k]; end
    rr_t <= cycle;
  end

  task automatic run_phase(input dps_mode_e m, input int kind, input int count);
    logic [PW-1:0] last;
    mode = m;
    last = 0;
    for (int i = 0; i < count;) begin
      @(negedge clk);
      ins_valid = '0;
      if (free_cnt >= W) begin
        for (int k = 0; k < W && i < count; k++) begin
          logic [PW-1:0] t;
          ins_valid[k] = (kind == 0) ? ($urandom_range(0, 3) != 0) : (k == 0);
          if (!ins_valid[k]) continue;
          t = next_tag; next_tag++;
          i++;
          ins_pdst[k] = t;
          if (kind == 0) begin
            // sources among the last few tags, or an old ready register
            src1[t] = (t > 40 && $urandom_range(0, 3) != 0) ? PW'(t - $urandom_range(1, 6)) : PW'($urandom_range(0, 31));
            src2[t] = (t > 40 && $urandom_range(0, 2) == 0) ? PW'(t - $urandom_range(1, 6)) : PW'($urandom_range(0, 31));
            e1[t] = $urandom_range(0, 1);
            e2[t] = $urandom_range(0, 1);
          end else begin
            src1[t] = (last != 0) ? last : PW'(1);
            src2[t] = PW'(2);
            e1[t] = (kind == 1);
            e2[t] = 1'b0;
          end
          chain[t] = kind;
          last = t;
          ins_psrc1[k] = src1[t]; ins_psrc2[k] = src2[t];
          ins_early1[k] = e1[t];  ins_early2[k] = e2[t];
          ins_op[k] = OP_ADD; ins_rob[k] = '0;
          ready[t] = 1'b0;
          n_ins++;
        end
      end
    end
    @(negedge clk);
    ins_valid = '0;
    wait (empty && rr_v == '0);
    repeat (2) @(negedge clk);
    check(n_ok == n_ins, $sformatf("all issued (%0d of %0d)", n_ok, n_ins));
  endtask

  initial begin
    mode = MODE_DEEP; ins_valid = '0;
    for (int k = 0; k < W; k++) begin
      ins_op[k] = OP_ADD; ins_psrc1[k] = 0; ins_psrc2[k] = 0; ins_pdst[k] = 0;
      ins_early1[k] = 0; ins_early2[k] = 0; ins_rob[k] = 0;
    end
    for (int t = 0; t < NPHYS; t++) begin ready[t] = (t < 32); iss_t[t] = 0; chain[t] = 0; end
    next_tag = 32;
    rr_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_phase(MODE_DEEP, 1, 30);
    run_phase(MODE_DEEP, 2, 30);
    run_phase(MODE_DEEP, 0, 150);
    check(collisions > 0, "collisions in deep mode");
    check(pileups > 0, "pileups in deep mode");
    run_phase(MODE_SHALLOW, 1, 30);
    run_phase(MODE_SHALLOW, 2, 30);
    run_phase(MODE_SHALLOW, 0, 150);
    $display("collisions=%0d pileups=%0d spec=%0d", collisions, pileups, spec_wakeups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog n_ok=%0d n_ins=%0d empty=%0d free=%0d mode=%0d", n_ok, n_ins, empty, free_cnt, mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
