// dps_rob: reorder buffer.
//
// Instructions enter in program order at the end of rename (up to WIDTH per
// cycle), are marked complete when their result is written back (up to LANES
// per cycle, in any order) and retire in program order, up to WIDTH per cycle,
// from the head. Retiring an instruction makes its destination's previous
// physical register free; ret_* feeds the rename free list.
//
// The original design gives the size (128 entries) and the retire rate (8 per cycle)
// and places retirement in the RE stage; the circular-buffer organisation,
// the index hand-out (alloc_idx) and the absence of exception or branch
// recovery are this design's choices.
//
// Timing: alloc_idx is combinational from the current tail; an instruction
// completed in cycle c can retire in cycle c+1.
module dps_rob #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned LANES = 8,
  parameter int unsigned NPHYS = 160,
  parameter int unsigned LW    = 5,
  localparam int unsigned PW = $clog2(NPHYS),
  localparam int unsigned RW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WIDTH-1:0]  alloc_valid,
  input  logic [LW-1:0]     alloc_ldst [WIDTH],
  input  logic [PW-1:0]     alloc_pdst [WIDTH],
  input  logic [PW-1:0]     alloc_old  [WIDTH],
  output logic [RW-1:0]     alloc_idx  [WIDTH],
  output logic [RW:0]       free_cnt,
  output logic              empty,
  input  logic [LANES-1:0]  cmp_valid,
  input  logic [RW-1:0]     cmp_idx    [LANES],
  output logic [WIDTH-1:0]  ret_valid,
  output logic [LW-1:0]     ret_ldst   [WIDTH],
  output logic [PW-1:0]     ret_pdst   [WIDTH],
  output logic [PW-1:0]     ret_old    [WIDTH],
  output logic [31:0]       retired
);
  logic [DEPTH-1:0] done;
  logic [LW-1:0]    e_ldst [DEPTH];
  logic [PW-1:0]    e_pdst [DEPTH];
  logic [PW-1:0]    e_old  [DEPTH];
  int unsigned      head, tail, count;

  assign free_cnt = (RW+1)'(DEPTH - count);
  assign empty    = (count == 0);

  always_comb begin
    int unsigned k2;
    k2 = 0;
    for (int k = 0; k < WIDTH; k++) begin
      alloc_idx[k] = RW'((tail + k2) % DEPTH);
      if (alloc_valid[k]) k2++;
    end
  end

  // retire: the longest run of completed entries at the head, up to WIDTH
  always_comb begin
    logic stop;
    stop = 1'b0;
    for (int k = 0; k < WIDTH; k++) begin
      int unsigned idx;
      idx = (head + k) % DEPTH;
      ret_valid[k] = !stop && (k < count) && done[idx];
      if (!ret_valid[k]) stop = 1'b1;
      ret_ldst[k] = e_ldst[idx];
      ret_pdst[k] = e_pdst[idx];
      ret_old[k]  = e_old[idx];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done    <= '0;
      head    <= 0;
      tail    <= 0;
      count   <= 0;
      retired <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        e_ldst[i] <= '0;
        e_pdst[i] <= '0;
        e_old[i]  <= '0;
      end
    end else begin
      int unsigned na, nr;
      logic [DEPTH-1:0] nd;
      na = 0; nr = 0;
      nd = done;
      for (int k = 0; k < WIDTH; k++) if (ret_valid[k]) begin
        nd[(head + k) % DEPTH] = 1'b0;
        nr++;
      end
      for (int k = 0; k < LANES; k++) if (cmp_valid[k]) nd[cmp_idx[k]] = 1'b1;
      for (int k = 0; k < WIDTH; k++) if (alloc_valid[k]) begin
        e_ldst[alloc_idx[k]] <= alloc_ldst[k];
        e_pdst[alloc_idx[k]] <= alloc_pdst[k];
        e_old[alloc_idx[k]]  <= alloc_old[k];
        nd[alloc_idx[k]] = 1'b0;
        na++;
      end
      done    <= nd;
      head    <= (head + nr) % DEPTH;
      tail    <= (tail + na) % DEPTH;
      count   <= count + na - nr;
      retired <= retired + nr;
    end
  end

`ifndef SYNTHESIS
  always_ff @(posedge clk) if (rst_n) begin
    assert (count <= DEPTH) else $error("reorder buffer overflow");
  end
`endif
endmodule
