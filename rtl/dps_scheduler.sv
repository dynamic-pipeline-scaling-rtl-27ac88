// dps_scheduler: select-free issue logic with speculative (W) and
// non-speculative (S) wakeup, for deep and shallow pipeline modes.
//
// Each issue-queue entry keeps a dependence vector: one bit per wakeup-array
// entry it waits on, kept in two matrices. dep_w marks producers that may wake
// it speculatively (the producer makes its low half-word early, so the
// half-word bypass lets the consumer follow one cycle behind); dep_s marks
// producers that must actually be selected first. An entry requests issue
// when it is valid, has neither W nor S set, and every producer it depends on
// has the required flag set. Entries hold two flags, as in the original design's
// modified issue logic: W (woken / requested) and S (selected).
//
// Deep mode (two stages, wakeup then select): requesting entries set W at the
// end of the wakeup cycle, which already wakes their speculative consumers.
// The request vector crosses a configurable latch to the select stage. Select
// grants the ISSUE_W oldest requesters (age matrix) and sets their S bit.
// Requesters that lose (collisions) clear W and may request again one cycle
// later. In register read the scoreboard confirms each granted instruction:
// if its sources were really available the entry is freed; otherwise it was a
// pileup and both W and S are cleared.
//
// Shallow mode (one stage): the latch is transparent, wakeup and select happen
// in the same cycle, only selection wakes consumers, and an entry is freed as
// soon as it is selected. Freeing an entry clears its column in every
// dependence vector, so the column can be reused.
//
// The W/S mechanism, the collision and pileup rules and the age-based select
// follow the original design. The queue size, the age matrix, the compaction of
// grants onto issue lanes (lowest entry index to lane 0) and the treatment of
// all instructions as single-class ALU operations are this design's choices.
//
// Timing (deep): insert in cycle t, request t+1, select t+2, register read
// t+3. A speculative consumer requests one cycle after its producer; a
// non-speculative consumer two cycles after.
module dps_scheduler
  import dps_pkg::*;
#(
  parameter int unsigned N       = 32,   // wakeup-array entries
  parameter int unsigned WIDTH   = 8,    // instructions inserted per cycle
  parameter int unsigned ISSUE_W = 8,    // instructions issued per cycle
  parameter int unsigned NPHYS   = 160,
  parameter int unsigned ROB_N   = 128,
  localparam int unsigned PW = $clog2(NPHYS),
  localparam int unsigned EW = $clog2(N),
  localparam int unsigned RW = $clog2(ROB_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dps_mode_e         mode,
  // insert
  input  logic [WIDTH-1:0]  ins_valid,
  input  alu_op_e           ins_op     [WIDTH],
  input  logic [PW-1:0]     ins_psrc1  [WIDTH],
  input  logic [PW-1:0]     ins_psrc2  [WIDTH],
  input  logic              ins_early1 [WIDTH],
  input  logic              ins_early2 [WIDTH],
  input  logic [PW-1:0]     ins_pdst   [WIDTH],
  input  logic [RW-1:0]     ins_rob    [WIDTH],
  output logic [EW:0]       free_cnt,
  output logic              empty,
  // issue
  output logic [ISSUE_W-1:0] iss_valid,
  output logic [EW-1:0]      iss_entry [ISSUE_W],
  output alu_op_e            iss_op    [ISSUE_W],
  output logic [PW-1:0]      iss_psrc1 [ISSUE_W],
  output logic [PW-1:0]      iss_psrc2 [ISSUE_W],
  output logic [PW-1:0]      iss_pdst  [ISSUE_W],
  output logic [RW-1:0]      iss_rob   [ISSUE_W],
  // scoreboard verdict at register read
  input  logic [ISSUE_W-1:0] fb_valid,
  input  logic [EW-1:0]      fb_entry  [ISSUE_W],
  input  logic [ISSUE_W-1:0] fb_ok,
  // event counters
  output logic [31:0]        collisions,
  output logic [31:0]        pileups,
  output logic [31:0]        spec_wakeups
);
  typedef struct packed {
    alu_op_e       op;
    logic [PW-1:0] psrc1, psrc2, pdst;
    logic [RW-1:0] rob;
  } payload_t;

  logic [N-1:0] valid, wbit, sbit;
  logic [N-1:0] dep_w [N];
  logic [N-1:0] dep_s [N];
  logic [N-1:0] older [N];   // older[i][j]: entry j is older than entry i
  payload_t     pl    [N];

  logic          deep;
  logic [N-1:0]  req_now, req_sel, grant, free_now, squash;
  logic [EW-1:0] alloc [WIDTH];
  logic [WIDTH-1:0] alloc_ok;

  assign deep = (mode == MODE_DEEP);

  // ---------------- wakeup: build the request vector
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic ok;
      ok = 1'b1;
      for (int j = 0; j < N; j++) begin
        if (dep_w[i][j] && !(deep ? wbit[j] : sbit[j])) ok = 1'b0;
        if (dep_s[i][j] && !sbit[j])                    ok = 1'b0;
      end
      req_now[i] = valid[i] && !wbit[i] && !sbit[i] && ok;
    end
  end

  // wakeup / select boundary
  dps_cfg_latch #(.W(N)) u_req_lat (
    .clk, .rst_n, .transparent(!deep), .en(1'b1), .d(req_now), .q(req_sel), .stored()
  );

  // ---------------- select: the ISSUE_W oldest requesters
  always_comb begin
    for (int i = 0; i < N; i++)
      grant[i] = req_sel[i] && ($countones(req_sel & older[i]) < ISSUE_W);
  end

  // compaction of grants onto issue lanes
  always_comb begin
    int unsigned l;
    l = 0;
    iss_valid = '0;
    for (int k = 0; k < ISSUE_W; k++) begin
      iss_entry[k] = '0;
      iss_op[k]    = OP_ADD;
      iss_psrc1[k] = '0;
      iss_psrc2[k] = '0;
      iss_pdst[k]  = '0;
      iss_rob[k]   = '0;
    end
    for (int i = 0; i < N; i++) begin
      if (grant[i] && l < ISSUE_W) begin
        iss_valid[l] = 1'b1;
        iss_entry[l] = EW'(i);
        iss_op[l]    = pl[i].op;
        iss_psrc1[l] = pl[i].psrc1;
        iss_psrc2[l] = pl[i].psrc2;
        iss_pdst[l]  = pl[i].pdst;
        iss_rob[l]   = pl[i].rob;
        l++;
      end
    end
  end

  // ---------------- entries freed or squashed this cycle
  always_comb begin
    free_now = '0;
    squash   = '0;
    if (!deep) free_now = grant;
    for (int k = 0; k < ISSUE_W; k++) begin
      if (fb_valid[k] && deep) begin
        if (fb_ok[k]) free_now[fb_entry[k]] = 1'b1;
        else          squash[fb_entry[k]]   = 1'b1;
      end
    end
  end

  // ---------------- allocation of free entries to inserted instructions
  always_comb begin
    int unsigned rank, nfree;
    rank = 0;
    alloc_ok = '0;
    for (int s = 0; s < WIDTH; s++) begin
      alloc[s] = '0;
      nfree    = 0;
      if (ins_valid[s]) begin
        for (int i = 0; i < N; i++) begin
          if (!valid[i]) begin
            if (nfree == rank) begin
              alloc[s]    = EW'(i);
              alloc_ok[s] = 1'b1;
            end
            nfree++;
          end
        end
        rank++;
      end
    end
  end

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < N; i++) free_cnt += (EW+1)'(!valid[i]);
    empty = (valid == '0);
  end

  // ---------------- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      wbit  <= '0;
      sbit  <= '0;
      for (int i = 0; i < N; i++) begin
        dep_w[i] <= '0;
        dep_s[i] <= '0;
        older[i] <= '0;
        pl[i]    <= '0;
      end
      collisions   <= '0;
      pileups      <= '0;
      spec_wakeups <= '0;
    end else begin
      logic [N-1:0] nvalid, nw, ns;
      nvalid = valid;
      nw     = wbit;
      ns     = sbit;
      if (deep) begin
        nw = nw | req_now;                 // speculative wakeup flag
        ns = ns | grant;                   // selected
        nw = nw & ~(req_sel & ~grant);     // collisions re-request
        nw = nw & ~squash;                 // pileups re-request
        ns = ns & ~squash;
      end
      nvalid = nvalid & ~free_now;
      nw     = nw & ~free_now;
      ns     = ns & ~free_now;
      // freed entries leave every dependence vector
      for (int i = 0; i < N; i++) begin
        dep_w[i] <= dep_w[i] & ~free_now;
        dep_s[i] <= dep_s[i] & ~free_now;
      end
      // insert
      for (int s = 0; s < WIDTH; s++) begin
        if (ins_valid[s] && alloc_ok[s]) begin
          logic [N-1:0] dw, ds, od;
          dw = '0; ds = '0;
          od = valid;
          for (int j = 0; j < N; j++) begin
            if (valid[j] && !free_now[j]) begin
              if (pl[j].pdst == ins_psrc1[s]) begin
                if (ins_early1[s]) dw[j] = 1'b1; else ds[j] = 1'b1;
              end
              if (pl[j].pdst == ins_psrc2[s]) begin
                if (ins_early2[s]) dw[j] = 1'b1; else ds[j] = 1'b1;
              end
            end
          end
          for (int m = 0; m < s; m++) begin
            if (ins_valid[m] && alloc_ok[m]) begin
              od[alloc[m]] = 1'b1;
              if (ins_pdst[m] == ins_psrc1[s]) begin
                if (ins_early1[s]) dw[alloc[m]] = 1'b1; else ds[alloc[m]] = 1'b1;
              end
              if (ins_pdst[m] == ins_psrc2[s]) begin
                if (ins_early2[s]) dw[alloc[m]] = 1'b1; else ds[alloc[m]] = 1'b1;
              end
            end
          end
          dep_w[alloc[s]] <= dw;
          dep_s[alloc[s]] <= ds;
          pl[alloc[s]]    <= '{op: ins_op[s], psrc1: ins_psrc1[s], psrc2: ins_psrc2[s],
                               pdst: ins_pdst[s], rob: ins_rob[s]};
          nvalid[alloc[s]] = 1'b1;
          nw[alloc[s]]     = 1'b0;
          ns[alloc[s]]     = 1'b0;
          older[alloc[s]] <= od;
        end
      end
      // a new entry is younger than every other entry
      for (int i = 0; i < N; i++) begin
        logic [N-1:0] o;
        o = older[i];
        for (int s = 0; s < WIDTH; s++)
          if (ins_valid[s] && alloc_ok[s]) o[alloc[s]] = 1'b0;
        if (!newly(32'(i))) older[i] <= o;
      end
      valid <= nvalid;
      wbit  <= nw;
      sbit  <= ns;
      if (deep) begin
        collisions   <= collisions + 32'($countones(req_sel & ~grant));
        pileups      <= pileups + 32'($countones(squash));
      end
      spec_wakeups <= spec_wakeups + 32'(deep ? $countones(req_now) : 0);
    end
  end

  // true when entry i receives a new instruction this cycle
  function automatic logic newly(int unsigned i);
    logic r;
    r = 1'b0;
    for (int s = 0; s < WIDTH; s++)
      if (ins_valid[s] && alloc_ok[s] && 32'(alloc[s]) == i) r = 1'b1;
    return r;
  endfunction

`ifndef SYNTHESIS
  // Rules of the handshake with the scoreboard and the dispatcher.
  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 0; k < WIDTH; k++)
      assert (!ins_valid[k] || alloc_ok[k]) else $error("insert into a full queue");
    for (int k = 0; k < ISSUE_W; k++)
      assert (!(fb_valid[k] && !deep && !fb_ok[k])) else $error("pileup in shallow mode");
  end
`endif
endmodule
