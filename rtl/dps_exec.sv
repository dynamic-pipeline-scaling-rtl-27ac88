// dps_exec: execute stage with half-word bypassing (deep mode) and
// single-cycle operation (shallow mode).
//
// LANES identical ALU lanes. Each lane is split at bit 16 as in the original design's
// two-stage adder: EX1 computes the low half-word and the carry, EX2 the high
// half-word (and, for right shift and set-less-than, the whole word). A
// configurable latch separates EX1 from EX2; it is transparent in shallow
// mode, where the lane computes the whole word in one cycle.
//
// Operand selection happens at the input flops of EX1, by comparing each
// source's physical register with the destinations in flight, youngest first:
//   1. half-word bypass (deep mode only): the producer is in EX1 now. Its
//      low half-word (end of EX1) enters the consumer's EX1; its high half
//      reaches the consumer one cycle later, through a second mux in front of
//      the EX1/EX2 latch that takes the producer's EX2 output. Only producers
//      that make their low half early (op_early) may be bypassed this way;
//      the scheduler guarantees it and an assertion checks it.
//   2. full-word bypass from EX2 (in shallow mode: from the single EX stage);
//   3. full-word bypass from the write-back register;
//   4. the value read from the register file.
// In shallow mode path 1 is disabled, as in the original design's single-stage
// adder, and the EX2 output is the end of the single stage.
//
// The split, the bypass paths and their enabling follow the original design. The
// operation set, the write-back register stage and tag-compare selection of
// bypasses are this design's choices.
//
// Timing: an instruction presented on in_* in cycle c (its last register read
// cycle) is on wb_* in cycle c+3 in deep mode and c+2 in shallow mode.
module dps_exec
  import dps_pkg::*;
#(
  parameter int unsigned LANES = 8,
  parameter int unsigned NPHYS = 160,
  parameter int unsigned ROB_N = 128,
  localparam int unsigned PW = $clog2(NPHYS),
  localparam int unsigned RW = $clog2(ROB_N),
  localparam int unsigned LNW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dps_mode_e         mode,
  input  logic [LANES-1:0]  in_valid,
  input  alu_op_e           in_op    [LANES],
  input  logic [PW-1:0]     in_psrc1 [LANES],
  input  logic [PW-1:0]     in_psrc2 [LANES],
  input  logic [PW-1:0]     in_pdst  [LANES],
  input  logic [RW-1:0]     in_rob   [LANES],
  input  logic [XLEN-1:0]   in_v1    [LANES],
  input  logic [XLEN-1:0]   in_v2    [LANES],
  output logic [LANES-1:0]  wb_valid,
  output logic [PW-1:0]     wb_pdst  [LANES],
  output logic [RW-1:0]     wb_rob   [LANES],
  output logic [XLEN-1:0]   wb_data  [LANES],
  output logic              busy,
  output logic [31:0]       half_bypasses,
  output logic [31:0]       full_bypasses
);
  // EX1 input flops
  typedef struct packed {
    logic            v;
    alu_op_e         op;
    logic [PW-1:0]   pdst;
    logic [RW-1:0]   rob;
    logic [HLEN-1:0] a_lo, b_lo;
    logic [HLEN-1:0] a_hi, b_hi;
    logic            a_hb, b_hb;     // high half comes through the half-word bypass
    logic [LNW-1:0]  a_hl, b_hl;     // lane of that producer
  } ex1_t;

  // EX1/EX2 configurable latch contents
  typedef struct packed {
    logic            v;
    alu_op_e         op;
    logic [PW-1:0]   pdst;
    logic [RW-1:0]   rob;
    logic [XLEN-1:0] a, b;
    logic            cin;
    logic [HLEN-1:0] lo;
  } ex2_t;

  ex1_t            e1     [LANES];
  ex1_t            e1_d   [LANES];
  ex2_t            m_d    [LANES];
  ex2_t            m_q    [LANES];   // EX2 view (transparent in shallow mode)
  ex2_t            m_r    [LANES];   // EX1/EX2 register content
  logic [HLEN:0]   lo_res [LANES];   // {carry, low half} at the end of EX1
  logic [XLEN-1:0] ex2_res[LANES];   // full result at the end of EX2
  logic [XLEN-1:0] ex2_reg_res[LANES]; // same, computed from the register (deep)
  logic [LANES-1:0] wbv;
  logic            deep;
  int unsigned     n_half, n_full;

  assign deep = (mode == MODE_DEEP);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // EX1: low half-word
    assign lo_res[l] = alu_lo(e1[l].op, e1[l].a_lo, e1[l].b_lo);

    // second-stage muxes: high half from the register read or the half-word
    // bypass of the producer now in EX2
    always_comb begin
      logic [HLEN-1:0] ah, bh;
      ah = e1[l].a_hb ? ex2_reg_res[e1[l].a_hl][XLEN-1:HLEN] : e1[l].a_hi;
      bh = e1[l].b_hb ? ex2_reg_res[e1[l].b_hl][XLEN-1:HLEN] : e1[l].b_hi;
      m_d[l] = '{v: e1[l].v, op: e1[l].op, pdst: e1[l].pdst, rob: e1[l].rob,
                 a: {ah, e1[l].a_lo}, b: {bh, e1[l].b_lo},
                 cin: lo_res[l][HLEN], lo: lo_res[l][HLEN-1:0]};
    end

    dps_cfg_latch #(.W($bits(ex2_t))) u_mid (
      .clk, .rst_n, .transparent(!deep), .en(1'b1),
      .d(m_d[l]), .q(m_q[l]), .stored(m_r[l])
    );

    // EX2: high half-word / full word
    assign ex2_res[l]     = alu_full(m_q[l].op, m_q[l].a, m_q[l].b, m_q[l].cin, m_q[l].lo);
    assign ex2_reg_res[l] = alu_full(m_r[l].op, m_r[l].a, m_r[l].b, m_r[l].cin, m_r[l].lo);
  end

  // operand selection for one source of an instruction entering EX1
  typedef struct packed {
    logic [XLEN-1:0] val;
    logic            hb;
    logic [LNW-1:0]  hl;
    logic            half, full;
  } opsel_t;

  function automatic opsel_t pick(logic [PW-1:0] src, logic [XLEN-1:0] rf);
    opsel_t r;
    logic   found;
    r = '{val: rf, hb: 1'b0, hl: '0, half: 1'b0, full: 1'b0};
    found = 1'b0;
    for (int l = 0; l < LANES; l++)
      if (!found && deep && e1[l].v && e1[l].pdst == src) begin
        r.val  = {16'd0, lo_res[l][HLEN-1:0]};
        r.hb   = 1'b1;
        r.hl   = LNW'(l);
        r.half = 1'b1;
        found  = 1'b1;
      end
    for (int l = 0; l < LANES; l++)
      if (!found && m_q[l].v && m_q[l].pdst == src) begin
        r.val  = ex2_res[l];
        r.full = 1'b1;
        found  = 1'b1;
      end
    for (int l = 0; l < LANES; l++)
      if (!found && wbv[l] && wb_pdst[l] == src) begin
        r.val  = wb_data[l];
        r.full = 1'b1;
        found  = 1'b1;
      end
    return r;
  endfunction

  always_comb begin
    n_half = 0;
    n_full = 0;
    for (int l = 0; l < LANES; l++) begin
      opsel_t s1, s2;
      s1 = pick(in_psrc1[l], in_v1[l]);
      s2 = pick(in_psrc2[l], in_v2[l]);
      e1_d[l] = '{v: in_valid[l], op: in_op[l], pdst: in_pdst[l], rob: in_rob[l],
                  a_lo: s1.val[HLEN-1:0], b_lo: s2.val[HLEN-1:0],
                  a_hi: s1.val[XLEN-1:HLEN], b_hi: s2.val[XLEN-1:HLEN],
                  a_hb: s1.hb, b_hb: s2.hb, a_hl: s1.hl, b_hl: s2.hl};
      if (in_valid[l]) begin
        n_half += 32'(s1.half) + 32'(s2.half);
        n_full += 32'(s1.full) + 32'(s2.full);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        e1[l]      <= '0;
        wb_pdst[l] <= '0;
        wb_rob[l]  <= '0;
        wb_data[l] <= '0;
      end
      wbv           <= '0;
      half_bypasses <= '0;
      full_bypasses <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        e1[l]      <= e1_d[l];
        wbv[l]     <= m_q[l].v;
        wb_pdst[l] <= m_q[l].pdst;
        wb_rob[l]  <= m_q[l].rob;
        wb_data[l] <= ex2_res[l];
      end
      half_bypasses <= half_bypasses + n_half;
      full_bypasses <= full_bypasses + n_full;
    end
  end

  assign wb_valid = wbv;

  always_comb begin
    busy = |wbv;
    for (int l = 0; l < LANES; l++) busy |= e1[l].v | m_r[l].v;
  end

`ifndef SYNTHESIS
  // A half-word bypass is only legal from a producer that makes its low half
  // early.
  always_ff @(posedge clk) if (rst_n && deep) begin
    for (int c = 0; c < LANES; c++)
      for (int l = 0; l < LANES; l++)
        if (in_valid[c] && e1[l].v &&
            (e1[l].pdst == in_psrc1[c] || e1[l].pdst == in_psrc2[c]))
          assert (op_early(e1[l].op)) else $error("half-word bypass from a late producer");
  end
`endif
endmodule
