// dps_cfg_latch: configurable pipeline latch.
//
// Every other pipeline latch of a DPS pipeline is one of these. In deep mode
// (transparent = 0) it is an ordinary edge-triggered register that loads d
// when en is high, so the logic on either side forms two pipeline stages. In
// shallow mode (transparent = 1) q follows d combinationally and the two
// stages merge into one. The latch behaviour (transparent in shallow mode,
// opaque in deep mode) follows the original design; the load enable and the
// synchronous reset value are this design's own choices.
//
// Interface: d/q of any packed type width W; en loads in deep mode; rst_n
// clears the stored value to RESET_VAL; stored is the register's content,
// which logic that is used only in deep mode reads to avoid a combinational
// path through the latch in shallow mode. Timing: q = d in the same cycle when
// transparent, q = d of the last enabled cycle otherwise.
module dps_cfg_latch #(
  parameter int unsigned W = 32,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         transparent,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] stored
);
  logic [W-1:0] r;

  assign stored = r;

  always_ff @(posedge clk) begin
    if (!rst_n)  r <= RESET_VAL;
    else if (en) r <= d;
  end

  assign q = transparent ? d : r;
endmodule
