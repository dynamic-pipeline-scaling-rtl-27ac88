// dps_backend: an out-of-order integer back-end whose pipeline depth is
// switched at run time (dynamic pipeline scaling).
//
// At low clock frequencies two adjacent pipeline stages fit in one clock
// period, so every other pipeline latch can be made transparent. This halves
// the pipeline depth, which shortens dependence stalls and so removes wasted
// switching activity. Deep mode (high frequency) and shallow mode (at most
// half the peak frequency) run the same logic; only the configurable latches
// and a few bypass and control paths change.
//
// Stages, shallow / deep:
//   ID  / ID1 ID2   rename (dps_rename), insert into issue queue and ROB
//   IS  / W  S      select-free issue (dps_scheduler)
//   RR  / RR1 RR2   register read (dps_regfile) and pileup check (dps_scoreboard)
//   EX  / EX1 EX2   split ALU lanes with half-word bypass (dps_exec)
//   WB              write-back register, register file write, ROB completion
//   RE              in-order retirement (dps_rob), frees physical registers
// Fetch and decode are outside this block: decoded groups of up to WIDTH
// instructions arrive on in_* with in_ready as the handshake (a group is
// taken in a cycle where in_ready is high). Loads, stores, branches and
// multi-cycle units are not part of this back-end. The load/store address
// unit (dps_agen) sits beside it and follows the same mode: its split adder
// hands the cache index to the data cache one stage before the full address
// (ports dc_*, where a data cache would connect).
//
// dps_mode_ctrl picks the mode from the requested frequency f_req (100 MHz
// units). A mode change stops dispatch, waits until the back-end is empty and
// then flips every configurable latch at once.
//
// Dispatch is stopped (in_ready low) while draining, when the free list lacks
// WIDTH registers, or when the issue queue or ROB has fewer than 2*WIDTH free
// entries (room for the group in the second rename stage and the new one).
// The stage list follows the original design; this flow control and the treatment
// of WB and RE as single stages in both modes are this design's choices.
module dps_backend
  import dps_pkg::*;
#(
  parameter int unsigned WIDTH   = 8,    // fetch/dispatch/retire width
  parameter int unsigned ISSUE_W = 8,    // issue width = ALU lanes
  parameter int unsigned IQ_N    = 32,   // wakeup-array entries
  parameter int unsigned ROB_N   = 128,  // reorder-buffer entries
  parameter int unsigned NPHYS   = 160,  // physical registers
  parameter int unsigned F_MAX   = 10,   // peak frequency, 100 MHz units
  localparam int unsigned PW = $clog2(NPHYS),
  localparam int unsigned LW = $clog2(NLREG),
  localparam int unsigned RW = $clog2(ROB_N),
  localparam int unsigned EW = $clog2(IQ_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // frequency request and DPS enable
  input  logic               dps_en,
  input  logic [3:0]         f_req,
  output dps_mode_e          mode,
  output logic [3:0]         f_out,
  output logic [10:0]        v_mv,    // supply voltage for f_out in this mode
  // architectural register preload, used before the first dispatch (the
  // physical register with the same index holds each logical register then)
  input  logic               init_we,
  input  logic [LW-1:0]      init_addr,
  input  logic [XLEN-1:0]    init_data,
  // decoded instruction group
  input  logic [WIDTH-1:0]   in_valid,
  input  alu_op_e            in_op    [WIDTH],
  input  logic [LW-1:0]      in_lsrc1 [WIDTH],
  input  logic [LW-1:0]      in_lsrc2 [WIDTH],
  input  logic [LW-1:0]      in_ldst  [WIDTH],
  output logic               in_ready,
  // write-back
  output logic [ISSUE_W-1:0] wb_valid,
  output logic [PW-1:0]      wb_pdst  [ISSUE_W],
  output logic [XLEN-1:0]    wb_data  [ISSUE_W],
  // retirement
  output logic [WIDTH-1:0]   ret_valid,
  output logic [LW-1:0]      ret_ldst [WIDTH],
  output logic [PW-1:0]      ret_pdst [WIDTH],
  output logic               empty,
  // load/store address generation, toward the data cache
  input  logic               ag_valid,
  input  logic [7:0]         ag_tag,
  input  logic [XLEN-1:0]    ag_base,
  input  logic [XLEN-1:0]    ag_offset,
  output logic               dc_m1_valid,
  output logic [7:0]         dc_m1_tag,
  output logic [HLEN-1:0]    dc_m1_index,
  output logic               dc_m2_valid,
  output logic [7:0]         dc_m2_tag,
  output logic [XLEN-1:0]    dc_m2_addr,
  // event counters
  output logic [15:0]        mode_switches,
  output logic [15:0]        rename_hazards,
  output logic [31:0]        collisions,
  output logic [31:0]        pileups,
  output logic [31:0]        spec_wakeups,
  output logic [31:0]        half_bypasses,
  output logic [31:0]        full_bypasses,
  output logic [31:0]        retired
);
  logic deep, drain, stall;
  assign deep = (mode == MODE_DEEP);

  // ---------------- rename
  logic [WIDTH-1:0] rn_valid;
  alu_op_e          rn_op    [WIDTH];
  logic [LW-1:0]    rn_ldst  [WIDTH];
  logic [PW-1:0]    rn_psrc1 [WIDTH], rn_psrc2 [WIDTH], rn_pdst [WIDTH], rn_old [WIDTH];
  logic             rn_e1    [WIDTH], rn_e2 [WIDTH];
  logic             rn_busy;
  logic [WIDTH-1:0] ret_v;
  logic [PW-1:0]    ret_old  [WIDTH];
  logic [EW:0]      iq_free;
  logic [RW:0]      rob_free;
  logic             iq_empty, rob_empty, ex_busy;

  assign stall = drain || (32'(iq_free) < 2*WIDTH) || (32'(rob_free) < 2*WIDTH);

  dps_rename #(.WIDTH(WIDTH), .NPHYS(NPHYS)) u_rename (
    .clk, .rst_n, .mode, .stall,
    .in_valid, .in_op, .in_lsrc1, .in_lsrc2, .in_ldst, .in_ready,
    .fr_valid(ret_v), .fr_preg(ret_old),
    .out_valid(rn_valid), .out_op(rn_op), .out_ldst(rn_ldst),
    .out_psrc1(rn_psrc1), .out_psrc2(rn_psrc2), .out_early1(rn_e1), .out_early2(rn_e2),
    .out_pdst(rn_pdst), .out_old_pdst(rn_old), .busy(rn_busy), .hazard_count(rename_hazards)
  );

  // ---------------- reorder buffer
  logic [RW-1:0]      rob_idx [WIDTH];
  logic [ISSUE_W-1:0] ex_wbv;
  logic [RW-1:0]      ex_wbrob [ISSUE_W];

  dps_rob #(.DEPTH(ROB_N), .WIDTH(WIDTH), .LANES(ISSUE_W), .NPHYS(NPHYS), .LW(LW)) u_rob (
    .clk, .rst_n,
    .alloc_valid(rn_valid), .alloc_ldst(rn_ldst), .alloc_pdst(rn_pdst), .alloc_old(rn_old),
    .alloc_idx(rob_idx), .free_cnt(rob_free), .empty(rob_empty),
    .cmp_valid(ex_wbv), .cmp_idx(ex_wbrob),
    .ret_valid(ret_v), .ret_ldst, .ret_pdst, .ret_old, .retired
  );
  assign ret_valid = ret_v;

  // ---------------- issue
  logic [ISSUE_W-1:0] is_valid;
  logic [EW-1:0]      is_entry [ISSUE_W];
  alu_op_e            is_op    [ISSUE_W];
  logic [PW-1:0]      is_psrc1 [ISSUE_W], is_psrc2 [ISSUE_W], is_pdst [ISSUE_W];
  logic [RW-1:0]      is_rob   [ISSUE_W];
  logic [ISSUE_W-1:0] sb_ok;

  typedef struct packed {
    logic          v;
    logic [EW-1:0] entry;
    alu_op_e       op;
    logic [PW-1:0] psrc1, psrc2, pdst;
    logic [RW-1:0] rob;
  } rr1_t;

  typedef struct packed {
    logic            v;
    alu_op_e         op;
    logic [PW-1:0]   psrc1, psrc2, pdst;
    logic [RW-1:0]   rob;
    logic [XLEN-1:0] v1, v2;
  } rr2_t;

  rr1_t rr1 [ISSUE_W];
  rr2_t rr2_d [ISSUE_W];
  rr2_t rr2_q [ISSUE_W];
  logic [ISSUE_W-1:0] rr1_v;
  logic [EW-1:0]      rr1_entry [ISSUE_W];
  logic [PW-1:0]      rr1_s1 [ISSUE_W], rr1_s2 [ISSUE_W], rr1_d [ISSUE_W];

  dps_scheduler #(.N(IQ_N), .WIDTH(WIDTH), .ISSUE_W(ISSUE_W), .NPHYS(NPHYS), .ROB_N(ROB_N)) u_sched (
    .clk, .rst_n, .mode,
    .ins_valid(rn_valid), .ins_op(rn_op), .ins_psrc1(rn_psrc1), .ins_psrc2(rn_psrc2),
    .ins_early1(rn_e1), .ins_early2(rn_e2), .ins_pdst(rn_pdst), .ins_rob(rob_idx),
    .free_cnt(iq_free), .empty(iq_empty),
    .iss_valid(is_valid), .iss_entry(is_entry), .iss_op(is_op),
    .iss_psrc1(is_psrc1), .iss_psrc2(is_psrc2), .iss_pdst(is_pdst), .iss_rob(is_rob),
    .fb_valid(rr1_v), .fb_entry(rr1_entry), .fb_ok(sb_ok),
    .collisions, .pileups, .spec_wakeups
  );

  // ---------------- register read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < ISSUE_W; k++) rr1[k] <= '0;
    end else begin
      for (int k = 0; k < ISSUE_W; k++)
        rr1[k] <= '{v: is_valid[k], entry: is_entry[k], op: is_op[k], psrc1: is_psrc1[k],
                   psrc2: is_psrc2[k], pdst: is_pdst[k], rob: is_rob[k]};
    end
  end

  always_comb
    for (int k = 0; k < ISSUE_W; k++) begin
      rr1_v[k]     = rr1[k].v;
      rr1_entry[k] = rr1[k].entry;
      rr1_s1[k]    = rr1[k].psrc1;
      rr1_s2[k]    = rr1[k].psrc2;
      rr1_d[k]     = rr1[k].pdst;
    end

  dps_scoreboard #(.WIDTH(WIDTH), .ISSUE_W(ISSUE_W), .NPHYS(NPHYS)) u_sb (
    .clk, .rst_n,
    .alloc_valid(rn_valid), .alloc_preg(rn_pdst),
    .chk_valid(rr1_v), .chk_src1(rr1_s1), .chk_src2(rr1_s2), .chk_dst(rr1_d),
    .chk_ok(sb_ok)
  );

  logic [PW-1:0]   rf_raddr [2*ISSUE_W];
  logic [XLEN-1:0] rf_rdata [2*ISSUE_W];
  logic [PW-1:0]   ex_wbpdst [ISSUE_W];
  logic [XLEN-1:0] ex_wbdata [ISSUE_W];
  logic [ISSUE_W:0] rf_we;
  logic [PW-1:0]   rf_waddr [ISSUE_W+1];
  logic [XLEN-1:0] rf_wdata [ISSUE_W+1];

  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      rf_we[k]    = ex_wbv[k];
      rf_waddr[k] = ex_wbpdst[k];
      rf_wdata[k] = ex_wbdata[k];
    end
    rf_we[ISSUE_W]    = init_we;
    rf_waddr[ISSUE_W] = PW'(init_addr);
    rf_wdata[ISSUE_W] = init_data;
  end

  always_comb
    for (int k = 0; k < ISSUE_W; k++) begin
      rf_raddr[2*k]   = rr1[k].psrc1;
      rf_raddr[2*k+1] = rr1[k].psrc2;
    end

  dps_regfile #(.NPHYS(NPHYS), .XW(XLEN), .RPORTS(2*ISSUE_W), .WPORTS(ISSUE_W+1)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // pileups are dropped here; their scheduler entries request again
  always_comb
    for (int k = 0; k < ISSUE_W; k++)
      rr2_d[k] = '{v: rr1[k].v && sb_ok[k], op: rr1[k].op, psrc1: rr1[k].psrc1,
                   psrc2: rr1[k].psrc2, pdst: rr1[k].pdst, rob: rr1[k].rob,
                   v1: rf_rdata[2*k], v2: rf_rdata[2*k+1]};

  for (genvar k = 0; k < ISSUE_W; k++) begin : g_rr
    dps_cfg_latch #(.W($bits(rr2_t))) u_rr_lat (
      .clk, .rst_n, .transparent(!deep), .en(1'b1), .d(rr2_d[k]), .q(rr2_q[k]), .stored()
    );
  end

  // ---------------- execute
  logic [ISSUE_W-1:0] ex_v;
  alu_op_e            ex_op [ISSUE_W];
  logic [PW-1:0]      ex_s1 [ISSUE_W], ex_s2 [ISSUE_W], ex_d [ISSUE_W];
  logic [RW-1:0]      ex_rob [ISSUE_W];
  logic [XLEN-1:0]    ex_v1 [ISSUE_W], ex_v2 [ISSUE_W];

  always_comb
    for (int k = 0; k < ISSUE_W; k++) begin
      ex_v[k]   = rr2_q[k].v;
      ex_op[k]  = rr2_q[k].op;
      ex_s1[k]  = rr2_q[k].psrc1;
      ex_s2[k]  = rr2_q[k].psrc2;
      ex_d[k]   = rr2_q[k].pdst;
      ex_rob[k] = rr2_q[k].rob;
      ex_v1[k]  = rr2_q[k].v1;
      ex_v2[k]  = rr2_q[k].v2;
    end

  dps_exec #(.LANES(ISSUE_W), .NPHYS(NPHYS), .ROB_N(ROB_N)) u_exec (
    .clk, .rst_n, .mode,
    .in_valid(ex_v), .in_op(ex_op), .in_psrc1(ex_s1), .in_psrc2(ex_s2), .in_pdst(ex_d),
    .in_rob(ex_rob), .in_v1(ex_v1), .in_v2(ex_v2),
    .wb_valid(ex_wbv), .wb_pdst(ex_wbpdst), .wb_rob(ex_wbrob), .wb_data(ex_wbdata),
    .busy(ex_busy), .half_bypasses, .full_bypasses
  );

  assign wb_valid = ex_wbv;
  assign wb_pdst  = ex_wbpdst;
  assign wb_data  = ex_wbdata;

  // ---------------- mode control
  assign empty = rob_empty && iq_empty && !rn_busy && !ex_busy;

  dps_agen #(.TAGW(8)) u_agen (
    .clk, .rst_n, .mode,
    .in_valid(ag_valid), .in_tag(ag_tag), .in_base(ag_base), .in_offset(ag_offset),
    .m1_valid(dc_m1_valid), .m1_tag(dc_m1_tag), .m1_index(dc_m1_index),
    .m2_valid(dc_m2_valid), .m2_tag(dc_m2_tag), .m2_addr(dc_m2_addr)
  );

  dps_mode_ctrl #(.F_MAX(F_MAX), .FW(4)) u_mode (
    .clk, .rst_n, .dps_en, .f_req, .pipe_empty(empty),
    .mode, .drain, .f_out, .switches(mode_switches),
    .v_level(), .v_mv
  );
endmodule
