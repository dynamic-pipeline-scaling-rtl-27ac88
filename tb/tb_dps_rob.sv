// tb_dps_rob: random allocation groups, out-of-order completion and in-order
// retirement. Checks that retirement follows allocation order, carries each
// instruction's destination and previous register, never retires an
// incomplete instruction, retires no earlier than the cycle after completion,
// never more than WIDTH per cycle, and that the free count and empty flag
// track occupancy.
module tb_dps_rob;
  localparam int D = 16, W = 4, L = 3, NPHYS = 64, PW = $clog2(NPHYS), RW = $clog2(D);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] alloc_valid, ret_valid;
  logic [4:0]   alloc_ldst [W], ret_ldst [W];
  logic [PW-1:0] alloc_pdst [W], alloc_old [W], ret_pdst [W], ret_old [W];
  logic [RW-1:0] alloc_idx [W];
  logic [RW:0]  free_cnt;
  logic         empty;
  logic [L-1:0] cmp_valid;
  logic [RW-1:0] cmp_idx [L];
  logic [31:0]  retired;

  dps_rob #(.DEPTH(D), .WIDTH(W), .LANES(L), .NPHYS(NPHYS), .LW(5)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycle, s); end
  endtask

  // in-flight instructions in program order
  int          q_id [$];
  logic [RW-1:0] q_idx [$];
  logic [4:0]  q_ldst [$];
  logic [PW-1:0] q_pdst [$], q_old [$];
  int          done_t [D];        // cycle of completion, -1 if pending
  int          pending [$];       // ROB indexes not yet completed
  int          next_id = 0, n_ret = 0;

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    check(32'(free_cnt) == D - q_id.size(), "free count");
    check(empty == (q_id.size() == 0), "empty flag");
    for (int k = 0; k < W; k++) if (ret_valid[k]) begin
      check(q_id.size() > 0, "retire from an empty buffer");
      if (q_id.size() > 0) begin
        logic [RW-1:0] i;
        i = q_idx.pop_front();
        void'(q_id.pop_front());
        check(ret_ldst[k] == q_ldst.pop_front(), "retired ldst");
        check(ret_pdst[k] == q_pdst.pop_front(), "retired pdst");
        check(ret_old[k] == q_old.pop_front(), "retired old pdst");
        check(done_t[i] >= 0 && done_t[i] < cycle, "retired before completion");
        n_ret++;
      end
    end
    // completion
    for (int l = 0; l < L; l++) if (cmp_valid[l]) done_t[cmp_idx[l]] = cycle;
    // allocation
    for (int k = 0; k < W; k++) if (alloc_valid[k]) begin
      q_id.push_back(next_id++); q_idx.push_back(alloc_idx[k]);
      q_ldst.push_back(alloc_ldst[k]); q_pdst.push_back(alloc_pdst[k]); q_old.push_back(alloc_old[k]);
      done_t[alloc_idx[k]] = -1;
      pending.push_back(alloc_idx[k]);
    end
  end

  initial begin
    alloc_valid = '0; cmp_valid = '0;
    for (int k = 0; k < W; k++) begin alloc_ldst[k] = 0; alloc_pdst[k] = 0; alloc_old[k] = 0; end
    for (int l = 0; l < L; l++) cmp_idx[l] = 0;
    for (int i = 0; i < D; i++) done_t[i] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      alloc_valid = '0;
      if (t < 1900 && free_cnt >= W && $urandom_range(0, 2) != 0)
        for (int k = 0; k < W; k++) begin
          alloc_valid[k] = $urandom_range(0, 1);
          alloc_ldst[k]  = 5'($urandom());
          alloc_pdst[k]  = PW'($urandom());
          alloc_old[k]   = PW'($urandom());
        end
      cmp_valid = '0;
      pending.shuffle();
      for (int l = 0; l < L; l++)
        if (pending.size() > 0 && $urandom_range(0, 1) == 1) begin
          cmp_valid[l] = 1'b1;
          cmp_idx[l]   = RW'(pending.pop_front());
        end
    end
    check(n_ret == next_id, $sformatf("retired %0d of %0d", n_ret, next_id));
    check(retired == 32'(n_ret), "retire counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
