// tb_dps_rename: renames random groups drawn from few logical registers (so
// that intra-group dependencies and cross-group hazards are frequent) in deep
// and shallow mode. A sequential reference map, updated in program order from
// the renamed output, predicts every source name, early bit and previous
// destination. Also checked: fresh destinations are never in use, the output
// latency (same cycle in shallow mode, next cycle in deep mode), and that
// hazard corrections happened in deep mode.
module tb_dps_rename;
  import dps_pkg::*;
  localparam int W = 4, NPHYS = 64, PW = $clog2(NPHYS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dps_mode_e   mode;
  logic        stall, in_ready, busy;
  logic [W-1:0] in_valid, fr_valid, out_valid;
  alu_op_e     in_op [W], out_op [W];
  logic [4:0]  in_lsrc1 [W], in_lsrc2 [W], in_ldst [W], out_ldst [W];
  logic [PW-1:0] fr_preg [W], out_psrc1 [W], out_psrc2 [W], out_pdst [W], out_old_pdst [W];
  logic        out_early1 [W], out_early2 [W];
  logic [15:0] hazard_count;
  int checks = 0, failures = 0;

  dps_rename #(.WIDTH(W), .NPHYS(NPHYS)) dut (.*);

  logic [PW-1:0] ref_map [32];
  logic          ref_early [32];
  logic [NPHYS-1:0] in_use;
  // freed registers wait in a queue before returning (models retirement)
  logic [PW-1:0] fq [$];
  int sent_cycle [$];
  int cycle = 0;

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycle, s); end
  endtask

  logic [4:0] hs1 [$], hs2 [$];   // logical sources of accepted slots
  int         n_groups = 0, n_renamed = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    if (in_ready && |in_valid) begin sent_cycle.push_back(cycle); n_groups++; end
    for (int k = 0; k < W; k++) if (in_ready && in_valid[k]) begin
      hs1.push_back(in_lsrc1[k]); hs2.push_back(in_lsrc2[k]);
    end
    if (|out_valid) begin
      int sc;
      sc = sent_cycle.pop_front();
      check(cycle - sc == ((mode == MODE_DEEP) ? 1 : 0), $sformatf("rename latency %0d mode %0d", cycle - sc, mode));
    end
    for (int k = 0; k < W; k++) if (out_valid[k]) begin
      logic [4:0] s1, s2;
      n_renamed++;
      s1 = hs1.pop_front();
      s2 = hs2.pop_front();
      check(out_psrc1[k] == ref_map[s1], $sformatf("slot %0d psrc1", k));
      check(out_psrc2[k] == ref_map[s2], $sformatf("slot %0d psrc2", k));
      check(out_early1[k] == ref_early[s1], "early1");
      check(out_early2[k] == ref_early[s2], "early2");
      check(out_old_pdst[k] == ref_map[out_ldst[k]], "old pdst");
      check(!in_use[out_pdst[k]], "fresh register already in use");
      in_use[out_pdst[k]] = 1'b1;
      ref_map[out_ldst[k]]   = out_pdst[k];
      ref_early[out_ldst[k]] = op_early(out_op[k]);
      fq.push_back(out_old_pdst[k]);
    end
  end

  initial begin
    mode = MODE_DEEP; stall = 0; in_valid = '0; fr_valid = '0;
    for (int k = 0; k < W; k++) begin
      in_op[k] = OP_ADD; in_lsrc1[k] = 0; in_lsrc2[k] = 0; in_ldst[k] = 0; fr_preg[k] = 0;
    end
    for (int r = 0; r < 32; r++) begin ref_map[r] = PW'(r); ref_early[r] = 0; end
    in_use = '0;
    for (int r = 0; r < 32; r++) in_use[r] = 1'b1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      mode = (phase % 2 == 0) ? MODE_DEEP : MODE_SHALLOW;
      for (int t = 0; t < 400; t++) begin
        @(negedge clk);
        stall = ($urandom_range(0, 7) == 0);
        for (int k = 0; k < W; k++) begin
          in_valid[k] = ($urandom_range(0, 4) != 0);
          in_op[k]    = alu_op_e'($urandom_range(0, 7));
          in_lsrc1[k] = 5'($urandom_range(0, 5));
          in_lsrc2[k] = 5'($urandom_range(0, 5));
          in_ldst[k]  = 5'($urandom_range(0, 5));
        end
        // return up to W registers that were freed long enough ago
        fr_valid = '0;
        for (int k = 0; k < W; k++)
          if (fq.size() > 12) begin
            fr_valid[k] = 1'b1;
            fr_preg[k]  = fq.pop_front();
            in_use[fr_preg[k]] = 1'b0;
          end
      end
      // drain before the mode changes
      @(negedge clk);
      in_valid = '0; fr_valid = '0;
      repeat (3) @(negedge clk);
      if (phase == 0) check(hazard_count > 0, "hazard corrections in deep mode");
    end
    check(sent_cycle.size() == 0, "every accepted group came out");
    check(hs1.size() == 0, "every accepted instruction was renamed");
    check(n_groups > 800, $sformatf("groups accepted: %0d", n_groups));
    check(n_renamed > 2400, $sformatf("instructions renamed: %0d", n_renamed));
    $display("hazards=%0d", hazard_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
