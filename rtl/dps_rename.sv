// dps_rename: register rename stage with one-cycle (shallow) and two-cycle
// (deep) operation.
//
// Each cycle up to WIDTH instructions are renamed. Source operands read the
// rename map table; each destination pops a fresh physical register from the
// free list. Sources that name the destination of an earlier instruction of
// the same group take that instruction's new physical register instead
// (dependency check). The map table is written with the group's new names.
//
// Deep mode splits this over two cycles, as the original design describes: stage A
// reads the map table and the free list; stage B does the dependency check and
// writes the map table. Because a group's names reach the map table only at
// the end of stage B, the next group (then in stage A) reads stale entries.
// Stage A therefore compares its logical sources with the destinations of the
// group in stage B (hazard detection), and stage B picks the previous group's
// physical names where a hazard was found (hazard correction). In shallow mode
// the latch between A and B is transparent and hazard detection is off.
//
// Each map entry also holds an "early" bit: whether the latest producer of
// that register makes its low half-word at the end of EX1. The scheduler uses
// it to choose speculative or non-speculative wakeup (document: this
// information is propagated through the map table).
//
// This design's choices: the free list is a circular FIFO, refilled by the
// reorder buffer through fr_*; a group is accepted only if the free list holds
// WIDTH registers and the caller does not stall; map table recovery after a
// misprediction is not provided (the original design does not describe it).
//
// Timing: a group accepted in cycle t appears on out_* in cycle t (shallow)
// or t+1 (deep), the cycle in which the map table is written.
module dps_rename
  import dps_pkg::*;
#(
  parameter int unsigned WIDTH = 8,     // rename width
  parameter int unsigned NPHYS = 160,   // physical registers
  localparam int unsigned PW   = $clog2(NPHYS),
  localparam int unsigned LW   = $clog2(NLREG),
  localparam int unsigned GW   = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dps_mode_e         mode,
  input  logic              stall,
  // incoming group
  input  logic [WIDTH-1:0]  in_valid,
  input  alu_op_e           in_op    [WIDTH],
  input  logic [LW-1:0]     in_lsrc1 [WIDTH],
  input  logic [LW-1:0]     in_lsrc2 [WIDTH],
  input  logic [LW-1:0]     in_ldst  [WIDTH],
  output logic              in_ready,
  // registers returned to the free list
  input  logic [WIDTH-1:0]  fr_valid,
  input  logic [PW-1:0]     fr_preg  [WIDTH],
  // renamed group
  output logic [WIDTH-1:0]  out_valid,
  output alu_op_e           out_op      [WIDTH],
  output logic [LW-1:0]     out_ldst    [WIDTH],
  output logic [PW-1:0]     out_psrc1   [WIDTH],
  output logic [PW-1:0]     out_psrc2   [WIDTH],
  output logic              out_early1  [WIDTH],
  output logic              out_early2  [WIDTH],
  output logic [PW-1:0]     out_pdst    [WIDTH],
  output logic [PW-1:0]     out_old_pdst[WIDTH],
  output logic              busy,          // stage B holds a group
  output logic [15:0]       hazard_count   // hazard corrections made
);
  localparam int unsigned FLN = NPHYS - NLREG;   // free-list capacity

  typedef struct packed {
    logic          valid;
    alu_op_e       op;
    logic [LW-1:0] lsrc1, lsrc2, ldst;
    logic [PW-1:0] newp;
    logic [PW-1:0] mp1, mp2, mold;     // map table read values
    logic          me1, me2;           // map table early bits
    logic          hz1, hz2, hzo;      // hazard against previous group
    logic [GW-1:0] hi1, hi2, hio;      // slot of the previous group
  } slot_t;

  typedef struct packed {
    logic          valid;
    logic [LW-1:0] ldst;
    logic [PW-1:0] newp;
    logic          early;
  } prev_t;

  // map table
  logic [PW-1:0] map_p [NLREG];
  logic          map_e [NLREG];
  // free list
  logic [PW-1:0] fl [FLN];
  logic [$clog2(FLN+1)-1:0] fl_cnt;
  int unsigned fl_head, fl_tail;

  slot_t a_slot [WIDTH];
  slot_t b_slot [WIDTH];
  slot_t b_reg  [WIDTH];   // stage B register content (deep mode view)
  prev_t prev   [WIDTH];
  logic  deep;
  logic  accept;

  assign deep     = (mode == MODE_DEEP);
  assign in_ready = !stall && (fl_cnt >= ($clog2(FLN+1))'(WIDTH));
  assign accept   = in_ready && (|in_valid);

  // ---------------- stage A: read map table and free list, detect hazards
  always_comb begin
    int unsigned k2;
    k2 = 0;
    for (int k = 0; k < WIDTH; k++) begin
      a_slot[k]       = '0;
      a_slot[k].valid = accept && in_valid[k];
      a_slot[k].op    = in_op[k];
      a_slot[k].lsrc1 = in_lsrc1[k];
      a_slot[k].lsrc2 = in_lsrc2[k];
      a_slot[k].ldst  = in_ldst[k];
      a_slot[k].newp  = fl[(fl_head + k2) % FLN];
      a_slot[k].mp1   = map_p[in_lsrc1[k]];
      a_slot[k].me1   = map_e[in_lsrc1[k]];
      a_slot[k].mp2   = map_p[in_lsrc2[k]];
      a_slot[k].me2   = map_e[in_lsrc2[k]];
      a_slot[k].mold  = map_p[in_ldst[k]];
      if (in_valid[k]) k2 = k2 + 1;
      // hazard detection against the group now in stage B (deep mode only)
      for (int j = 0; j < WIDTH; j++) begin
        if (deep && b_reg[j].valid) begin
          if (b_reg[j].ldst == in_lsrc1[k]) begin a_slot[k].hz1 = 1'b1; a_slot[k].hi1 = GW'(j); end
          if (b_reg[j].ldst == in_lsrc2[k]) begin a_slot[k].hz2 = 1'b1; a_slot[k].hi2 = GW'(j); end
          if (b_reg[j].ldst == in_ldst[k])  begin a_slot[k].hzo = 1'b1; a_slot[k].hio = GW'(j); end
        end
      end
    end
  end

  // configurable latch between the two rename stages
  for (genvar k = 0; k < WIDTH; k++) begin : g_lat
    dps_cfg_latch #(.W($bits(slot_t))) u_lat (
      .clk, .rst_n, .transparent(!deep), .en(1'b1),
      .d(a_slot[k]), .q(b_slot[k]), .stored(b_reg[k])
    );
  end

  // ---------------- stage B: dependency check, hazard correction
  always_comb begin
    for (int k = 0; k < WIDTH; k++) begin
      out_valid[k]    = b_slot[k].valid;
      out_op[k]       = b_slot[k].op;
      out_ldst[k]     = b_slot[k].ldst;
      out_pdst[k]     = b_slot[k].newp;
      // hazard correction: previous group or map table
      out_psrc1[k]    = b_slot[k].hz1 ? prev[b_slot[k].hi1].newp  : b_slot[k].mp1;
      out_early1[k]   = b_slot[k].hz1 ? prev[b_slot[k].hi1].early : b_slot[k].me1;
      out_psrc2[k]    = b_slot[k].hz2 ? prev[b_slot[k].hi2].newp  : b_slot[k].mp2;
      out_early2[k]   = b_slot[k].hz2 ? prev[b_slot[k].hi2].early : b_slot[k].me2;
      out_old_pdst[k] = b_slot[k].hzo ? prev[b_slot[k].hio].newp  : b_slot[k].mold;
      // dependency check within the group: the youngest earlier writer wins
      for (int j = 0; j < k; j++) begin
        if (b_slot[j].valid && b_slot[j].ldst == b_slot[k].lsrc1) begin
          out_psrc1[k] = b_slot[j].newp; out_early1[k] = op_early(b_slot[j].op);
        end
        if (b_slot[j].valid && b_slot[j].ldst == b_slot[k].lsrc2) begin
          out_psrc2[k] = b_slot[j].newp; out_early2[k] = op_early(b_slot[j].op);
        end
        if (b_slot[j].valid && b_slot[j].ldst == b_slot[k].ldst)
          out_old_pdst[k] = b_slot[j].newp;
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int k = 0; k < WIDTH; k++) busy |= deep && b_slot[k].valid;
  end

  // ---------------- state: map table, free list, previous group
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NLREG; r++) begin
        map_p[r] <= PW'(r);
        map_e[r] <= 1'b0;
      end
      for (int i = 0; i < FLN; i++) fl[i] <= PW'(NLREG + i);
      fl_head      <= 0;
      fl_tail      <= 0;
      fl_cnt       <= ($clog2(FLN+1))'(FLN);
      hazard_count <= '0;
      for (int k = 0; k < WIDTH; k++) prev[k] <= '0;
    end else begin
      int unsigned npop, npush, nhz;
      npop = 0; npush = 0; nhz = 0;
      // map table write at the end of stage B, in program order
      for (int k = 0; k < WIDTH; k++) begin
        if (b_slot[k].valid) begin
          map_p[b_slot[k].ldst] <= b_slot[k].newp;
          map_e[b_slot[k].ldst] <= op_early(b_slot[k].op);
        end
        prev[k] <= '{valid: b_slot[k].valid, ldst: b_slot[k].ldst,
                     newp: b_slot[k].newp, early: op_early(b_slot[k].op)};
        if (b_slot[k].valid) nhz += 32'(b_slot[k].hz1) + 32'(b_slot[k].hz2);
      end
      // free list pop (stage A) and push (retire)
      for (int k = 0; k < WIDTH; k++) if (a_slot[k].valid) npop++;
      for (int k = 0; k < WIDTH; k++) begin
        if (fr_valid[k]) begin
          fl[(fl_tail + npush) % FLN] <= fr_preg[k];
          npush++;
        end
      end
      fl_head      <= (fl_head + npop) % FLN;
      fl_tail      <= (fl_tail + npush) % FLN;
      fl_cnt       <= fl_cnt + ($clog2(FLN+1))'(npush) - ($clog2(FLN+1))'(npop);
      hazard_count <= hazard_count + 16'(nhz);
    end
  end

`ifndef SYNTHESIS
  // The free list never overflows: at most FLN registers are ever free.
  always_ff @(posedge clk)
    if (rst_n) assert (32'(fl_cnt) <= FLN) else $error("free list overflow");
`endif
endmodule
