// tb_dps_exec: random dependent ALU traffic through the execute stage in deep
// and shallow mode.
//
// The testbench plays scheduler and register file. Each cycle it presents up
// to LANES instructions whose sources are recent results (one to four cycles
// old, to exercise every bypass) or older registers. It respects the issue
// rule the scheduler guarantees: a consumer may follow its producer by one
// cycle in deep mode only if the producer makes its low half-word early
// (add, sub, logic, left shift). Register-file values are modelled as the
// real register read delivers them (deep: contents at the start of the cycle;
// shallow: with same-cycle write-through), so results still in flight must
// come from the bypasses. Every write-back is checked for value, destination
// and latency (3 cycles deep, 2 shallow); both bypass kinds must occur.
module tb_dps_exec;
  import dps_pkg::*;
  localparam int L = 2, NPHYS = 128, ROB_N = 16;
  localparam int PW = $clog2(NPHYS), RW = $clog2(ROB_N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dps_mode_e mode;
  logic [L-1:0] in_valid, wb_valid;
  alu_op_e in_op [L];
  logic [PW-1:0] in_psrc1 [L], in_psrc2 [L], in_pdst [L], wb_pdst [L];
  logic [RW-1:0] in_rob [L], wb_rob [L];
  logic [31:0] in_v1 [L], in_v2 [L], wb_data [L];
  logic busy;
  logic [31:0] half_bypasses, full_bypasses;

  dps_exec #(.LANES(L), .NPHYS(NPHYS), .ROB_N(ROB_N)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycle, s); end
  endtask

  logic [31:0] val [NPHYS];     // architectural value of each tag
  logic [31:0] rf  [NPHYS];     // register file contents
  int          pc  [NPHYS];     // cycle the tag's producer was presented
  logic        pe  [NPHYS];     // producer makes its low half early
  int          exp_t [L][$];
  logic [PW-1:0] exp_d [L][$];
  logic [31:0] exp_v [L][$];
  int next_tag = 32;

  function automatic logic [31:0] rfread(logic [PW-1:0] s);
    if (mode == MODE_SHALLOW)
      for (int l = 0; l < L; l++) if (wb_valid[l] && wb_pdst[l] == s) return wb_data[l];
    return rf[s];
  endfunction

  function automatic logic legal(logic [PW-1:0] s);
    int d;
    d = cycle - pc[s];
    if (d < 1) return 1'b0;
    if (mode == MODE_DEEP && d == 1 && !pe[s]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [PW-1:0] pick_src();
    for (int tries = 0; tries < 6; tries++) begin
      int back;
      logic [PW-1:0] s;
      back = $urandom_range(1, 8);
      s = PW'(32 + ((next_tag - 32 - back + 2*(NPHYS-32)) % (NPHYS - 32)));
      if (next_tag - back >= 32 && legal(s)) return s;
    end
    return PW'($urandom_range(0, 31));
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    for (int l = 0; l < L; l++) begin
      if (wb_valid[l]) begin
        check(exp_t[l].size() > 0, "unexpected write-back");
        if (exp_t[l].size() > 0) begin
          int t; logic [PW-1:0] d; logic [31:0] v;
          t = exp_t[l].pop_front(); d = exp_d[l].pop_front(); v = exp_v[l].pop_front();
          check(cycle - t == ((mode == MODE_DEEP) ? 3 : 2), $sformatf("latency %0d", cycle - t));
          check(wb_pdst[l] == d, "write-back destination");
          check(wb_data[l] == v, $sformatf("lane %0d tag %0d value %h expected %h", l, d, wb_data[l], v));
        end
        rf[wb_pdst[l]] = wb_data[l];
      end
    end
    for (int l = 0; l < L; l++) if (in_valid[l]) begin
      exp_t[l].push_back(cycle); exp_d[l].push_back(in_pdst[l]);
      exp_v[l].push_back(val[in_pdst[l]]);
    end
  end

  task automatic run(input dps_mode_e m, input int cycles);
    mode = m;
    repeat (cycles) begin
      @(negedge clk);
      for (int l = 0; l < L; l++) begin
        logic [PW-1:0] d;
        in_valid[l] = ($urandom_range(0, 5) != 0);
        in_op[l]    = alu_op_e'($urandom_range(0, 7));
        in_psrc1[l] = pick_src();
        in_psrc2[l] = ($urandom_range(0, 1) == 0) ? pick_src() : PW'($urandom_range(0, 31));
        in_v1[l]    = rfread(in_psrc1[l]);
        in_v2[l]    = rfread(in_psrc2[l]);
        in_rob[l]   = RW'(l);
        d = PW'(32 + ((next_tag - 32) % (NPHYS - 32)));
        in_pdst[l]  = d;
      end
      // values and bookkeeping after all lanes picked their sources
      for (int l = 0; l < L; l++) if (in_valid[l]) begin
        val[in_pdst[l]] = alu_ref(in_op[l], val[in_psrc1[l]], val[in_psrc2[l]]);
        pc[in_pdst[l]]  = cycle;
        pe[in_pdst[l]]  = op_early(in_op[l]);
        next_tag++;
        if (l + 1 < L) in_pdst[l+1] = PW'(32 + ((next_tag - 32) % (NPHYS - 32)));
      end
    end
    @(negedge clk);
    in_valid = '0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    mode = MODE_DEEP; in_valid = '0;
    for (int l = 0; l < L; l++) begin
      in_op[l] = OP_ADD; in_psrc1[l] = 0; in_psrc2[l] = 0; in_pdst[l] = 0;
      in_rob[l] = 0; in_v1[l] = 0; in_v2[l] = 0;
    end
    for (int t = 0; t < NPHYS; t++) begin
      val[t] = $urandom(); rf[t] = val[t]; pc[t] = -100; pe[t] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_DEEP, 600);
    check(half_bypasses > 0, "half-word bypasses in deep mode");
    run(MODE_SHALLOW, 600);
    run(MODE_DEEP, 300);
    check(full_bypasses > 0, "full-word bypasses");
    for (int l = 0; l < L; l++) check(exp_t[l].size() == 0, "all results written back");
    $display("half=%0d full=%0d", half_bypasses, full_bypasses);
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
