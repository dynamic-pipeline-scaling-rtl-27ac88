// dps_scoreboard: per-physical-register record of correctly issued producers.
//
// With select-free scheduling an instruction can be selected although one of
// its producers lost arbitration (a pileup). This scoreboard catches that in
// the register-read stage, as the original design describes: a destination register
// is marked not-ready when its instruction is dispatched and ready once that
// instruction has been confirmed as correctly issued. An instruction in
// register read is correct when both its sources are ready; its destination
// becomes ready at the end of that cycle.
//
// Two instructions that depend on each other are never in register read in
// the same cycle (a consumer is selected at least one cycle after its
// producer), so no same-cycle forwarding is needed. The per-register bit
// vector and the reset state (all registers ready) are this design's choices.
//
// Interface: alloc_* clears bits (dispatch), chk_* checks up to ISSUE_W
// instructions and returns chk_ok combinationally; correct ones set their
// destination's bit at the next clock edge.
module dps_scoreboard #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned ISSUE_W = 8,
  parameter int unsigned NPHYS   = 160,
  localparam int unsigned PW = $clog2(NPHYS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   alloc_valid,
  input  logic [PW-1:0]      alloc_preg [WIDTH],
  input  logic [ISSUE_W-1:0] chk_valid,
  input  logic [PW-1:0]      chk_src1   [ISSUE_W],
  input  logic [PW-1:0]      chk_src2   [ISSUE_W],
  input  logic [PW-1:0]      chk_dst    [ISSUE_W],
  output logic [ISSUE_W-1:0] chk_ok
);
  logic [NPHYS-1:0] ready;

  always_comb
    for (int k = 0; k < ISSUE_W; k++)
      chk_ok[k] = ready[chk_src1[k]] && ready[chk_src2[k]];

  always_ff @(posedge clk) begin
    if (!rst_n) ready <= '1;
    else begin
      logic [NPHYS-1:0] n;
      n = ready;
      for (int k = 0; k < ISSUE_W; k++)
        if (chk_valid[k] && chk_ok[k]) n[chk_dst[k]] = 1'b1;
      for (int k = 0; k < WIDTH; k++)
        if (alloc_valid[k]) n[alloc_preg[k]] = 1'b0;
      ready <= n;
    end
  end
endmodule
