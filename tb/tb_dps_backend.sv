// tb_dps_backend: end-to-end test of the DPS back-end at its default size.
//
// A program is generated up front together with a sequential reference
// execution. It runs in phases, each requesting a clock frequency and hence a
// pipeline mode:
//   deep     dependent ADD chain   (expect one result per cycle: half-word bypass)
//   deep     dependent SLT chain   (expect one result every two cycles)
//   deep     random mix
//   shallow  dependent ADD chain   (one per cycle)
//   shallow  dependent SLT chain   (one per cycle)
//   shallow  random mix
//   deep     random mix
// Every retired instruction is checked in program order: its logical
// destination and the value written to its physical register must match the
// reference. For chain phases the spacing of write-backs of consecutive chain
// members is checked. The test also requires that each mechanism occurred:
// mode switches in both directions, dispatch drained for a switch, rename
// hazard corrections, scheduler collisions and pileups, speculative wakeups,
// half-word and full-word bypasses. Alongside, a random stream of load/store
// addresses goes through the address unit; the cache index must appear one
// cycle after issue and the full address two cycles after in deep mode, one
// in shallow mode.
module tb_dps_backend;
  import dps_pkg::*;

  localparam int WIDTH = 8;
  localparam int NPHYS = 160;
  localparam int PW    = $clog2(NPHYS);
  localparam int NPH   = 7;
  localparam int MAXI  = 8192;

  logic clk = 0, rst_n = 0;
  logic go = 1'b0;
  always #5 clk = ~clk;

  logic            dps_en;
  logic [3:0]      f_req, f_out;
  logic [10:0]     v_mv;
  dps_mode_e       mode;
  logic            init_we;
  logic [4:0]      init_addr;
  logic [31:0]     init_data;
  logic [WIDTH-1:0] in_valid;
  alu_op_e         in_op    [WIDTH];
  logic [4:0]      in_lsrc1 [WIDTH], in_lsrc2 [WIDTH], in_ldst [WIDTH];
  logic            in_ready;
  logic [WIDTH-1:0] wb_valid;
  logic [PW-1:0]   wb_pdst  [WIDTH];
  logic [31:0]     wb_data  [WIDTH];
  logic [WIDTH-1:0] ret_valid;
  logic [4:0]      ret_ldst [WIDTH];
  logic [PW-1:0]   ret_pdst [WIDTH];
  logic            empty;
  logic [15:0]     mode_switches, rename_hazards;
  logic [31:0]     collisions, pileups, spec_wakeups, half_bypasses, full_bypasses, retired;

  logic            ag_valid, dc_m1_valid, dc_m2_valid;
  logic [7:0]      ag_tag, dc_m1_tag, dc_m2_tag;
  logic [31:0]     ag_base, ag_offset, dc_m2_addr;
  logic [15:0]     dc_m1_index;

  dps_backend dut (.*);

  // ---------------- program and reference
  alu_op_e     p_op  [MAXI];
  logic [4:0]  p_s1  [MAXI], p_s2 [MAXI], p_d [MAXI];
  logic [31:0] p_exp [MAXI];
  int          p_ph  [MAXI];     // phase of each instruction
  int          p_ci  [MAXI];     // position in a chain, -1 if not a chain
  int          ph_len  [NPH] = '{64, 64, 1600, 64, 64, 1600, 1200};
  int          ph_freq [NPH] = '{10, 10, 10, 4, 4, 4, 8};
  int          ph_kind [NPH] = '{1, 2, 0, 1, 2, 0, 0};   // 0 random, 1 ADD chain, 2 SLT chain
  dps_mode_e   ph_mode [NPH] = '{MODE_DEEP, MODE_DEEP, MODE_DEEP, MODE_SHALLOW,
                                 MODE_SHALLOW, MODE_SHALLOW, MODE_DEEP};
  int          ph_gap  [NPH];
  logic [31:0] arch [32];
  int          n_instr;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  logic [31:0] init_val [32];
  initial begin
    int n;
    n = 0;
    for (int r = 0; r < 32; r++) begin
      init_val[r] = $urandom();
      arch[r]     = init_val[r];
    end
    for (int ph = 0; ph < NPH; ph++) begin
      ph_gap[ph] = (ph_kind[ph] == 2 && ph_mode[ph] == MODE_DEEP) ? 2 : 1;
      for (int i = 0; i < ph_len[ph]; i++) begin
        if (ph_kind[ph] == 0) begin
          p_op[n] = alu_op_e'($urandom_range(0, 7));
          p_s1[n] = 5'($urandom_range(0, 11));
          p_s2[n] = 5'($urandom_range(0, 11));
          p_d[n]  = 5'($urandom_range(0, 11));
          p_ci[n] = -1;
        end else begin
          p_op[n] = (ph_kind[ph] == 1) ? OP_ADD : OP_SLT;
          p_s1[n] = 5'd20;
          p_s2[n] = 5'(21 + (i % 4));
          p_d[n]  = 5'd20;
          p_ci[n] = i;
        end
        p_ph[n]  = ph;
        p_exp[n] = alu_ref(p_op[n], arch[p_s1[n]], arch[p_s2[n]]);
        arch[p_d[n]] = p_exp[n];
        n++;
      end
    end
    n_instr = n;
  end

  // ---------------- driver
  int ptr = 0;
  int cur_ph;
  always_comb begin
    cur_ph = (ptr < n_instr) ? p_ph[ptr] : NPH - 1;
    f_req  = 4'(ph_freq[cur_ph]);
    for (int k = 0; k < WIDTH; k++) begin
      int idx;
      idx = ptr + k;
      in_valid[k] = go && (idx < n_instr) && p_ph[idx] == cur_ph;
      in_op[k]    = (idx < n_instr) ? p_op[idx] : OP_ADD;
      in_lsrc1[k] = (idx < n_instr) ? p_s1[idx] : 5'd0;
      in_lsrc2[k] = (idx < n_instr) ? p_s2[idx] : 5'd0;
      in_ldst[k]  = (idx < n_instr) ? p_d[idx]  : 5'd0;
    end
  end

  // ---------------- monitor
  logic [31:0] pval [NPHYS];
  int          pwbt [NPHYS];
  int          rptr = 0;
  int          last_wbt = 0;
  int          drained = 0, to_shallow = 0, to_deep = 0, chain_checked = 0;
  dps_mode_e   prev_mode = MODE_DEEP;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (in_ready && |in_valid) ptr <= ptr + $countones(in_valid);
    if (!in_ready && |in_valid && mode != ph_mode[cur_ph]) drained++;
    if (mode != prev_mode) begin
      if (mode == MODE_SHALLOW) to_shallow++; else to_deep++;
    end
    prev_mode <= mode;
    // supply voltage: 1000 MHz deep and 500 MHz shallow both need 1.19 V
    if (f_out == 4'd10 || (mode == MODE_SHALLOW && f_out == 4'd5)) check(v_mv == 11'd1190, "supply at the top level");
    if (mode == MODE_SHALLOW && f_out == 4'd4) check(v_mv == 11'd1070, "supply for 400 MHz shallow");
    if (mode == MODE_DEEP && f_out == 4'd8) check(v_mv == 11'd1070, "supply for 800 MHz deep");
    // retirement in program order
    for (int k = 0; k < WIDTH; k++) if (ret_valid[k]) begin
      int i;
      i = rptr + k;
      check(i < n_instr, "retired more than dispatched");
      if (i < n_instr) begin
        check(ret_ldst[k] == p_d[i], $sformatf("instr %0d dest r%0d, expected r%0d", i, ret_ldst[k], p_d[i]));
        check(pval[ret_pdst[k]] == p_exp[i],
              $sformatf("instr %0d (%s) value %h, expected %h", i, p_op[i].name(), pval[ret_pdst[k]], p_exp[i]));
        check(mode == ph_mode[p_ph[i]], $sformatf("instr %0d retired in the wrong mode", i));
        if (p_ci[i] >= 4) begin
          check(pwbt[ret_pdst[k]] - last_wbt == ph_gap[p_ph[i]],
                $sformatf("chain instr %0d written back %0d cycles after its producer, expected %0d",
                          i, pwbt[ret_pdst[k]] - last_wbt, ph_gap[p_ph[i]]));
          chain_checked++;
        end
        if (p_ci[i] >= 0) last_wbt = pwbt[ret_pdst[k]];
      end
    end
    rptr <= rptr + $countones(ret_valid);
    // write-back record (after retirement reads: an instruction retires at
    // least one cycle after its write-back)
    if (init_we) pval[init_addr] <= init_data;
    for (int k = 0; k < WIDTH; k++) if (wb_valid[k]) begin
      pval[wb_pdst[k]] <= wb_data[k];
      pwbt[wb_pdst[k]] <= cycle;
    end
  end

  // reset, then preload the architectural registers (physical register r
  // holds logical register r after reset)
  initial begin
    dps_en    = 1'b1;
    init_we   = 1'b0;
    init_addr = '0;
    init_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      init_we   = 1'b1;
      init_addr = 5'(r);
      init_data = init_val[r];
    end
    @(negedge clk);
    init_we = 1'b0;
    go      = 1'b1;
  end

  // ---------------- address unit stream
  logic [31:0] ag_exp [4];
  logic [7:0]  ag_etag [4];
  logic        ag_ev [4] = '{default: 1'b0};
  int          ag_last_switch = 0, ag_checked = 0;
  always @(negedge clk) begin
    ag_valid  <= rst_n && ($urandom_range(0, 3) != 0);
    ag_tag    <= 8'($urandom());
    ag_base   <= $urandom();
    ag_offset <= ($urandom_range(0, 1) == 1) ? 32'($signed(16'($urandom()))) : $urandom();
  end
  always @(posedge clk) if (rst_n) begin
    int lat;
    if (mode != prev_mode) ag_last_switch = cycle;
    lat = (mode == MODE_DEEP) ? 2 : 1;
    if (cycle - ag_last_switch > 3) begin
      check(dc_m1_valid == ag_ev[1], "address unit index valid");
      if (ag_ev[1]) check(dc_m1_index == ag_exp[1][15:0] && dc_m1_tag == ag_etag[1], "cache index");
      check(dc_m2_valid == ag_ev[lat], "address unit address valid");
      if (ag_ev[lat]) begin
        check(dc_m2_addr == ag_exp[lat] && dc_m2_tag == ag_etag[lat],
              $sformatf("address %h, expected %h", dc_m2_addr, ag_exp[lat]));
        ag_checked++;
      end
    end
    for (int j = 3; j > 1; j--) begin
      ag_exp[j] = ag_exp[j-1]; ag_etag[j] = ag_etag[j-1]; ag_ev[j] = ag_ev[j-1];
    end
    ag_exp[1] = ag_base + ag_offset; ag_etag[1] = ag_tag; ag_ev[1] = ag_valid;
  end

  // ---------------- end and watchdog
  initial begin
    wait (rst_n && rptr >= n_instr && n_instr > 0);
    repeat (5) @(posedge clk);
    check(rptr == n_instr, "retired count");
    check(retired == 32'(n_instr), "retired counter");
    check(mode_switches >= 2, "mode switches");
    check(to_shallow >= 1 && to_deep >= 1, "switches in both directions");
    check(drained > 0, "dispatch drained for a switch");
    check(rename_hazards > 0, "rename hazard correction");
    check(collisions > 0, "scheduler collisions");
    check(pileups > 0, "scheduler pileups");
    check(spec_wakeups > 0, "speculative wakeups");
    check(half_bypasses > 0, "half-word bypasses");
    check(full_bypasses > 0, "full-word bypasses");
    check(chain_checked > 200, "chain timing measured");
    check(ag_checked > 500, "addresses generated");
    $display("instrs=%0d cycles=%0d switches=%0d drain_cycles=%0d hazards=%0d collisions=%0d pileups=%0d spec=%0d half=%0d full=%0d",
             n_instr, cycle, mode_switches, drained, rename_hazards, collisions, pileups,
             spec_wakeups, half_bypasses, full_bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
