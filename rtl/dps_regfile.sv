// dps_regfile: physical register file.
//
// NPHYS words of XLEN bits with RPORTS combinational read ports and WPORTS
// write ports. A read of a register written in the same cycle returns the
// new value (write-through), so a consumer reading in the cycle its producer
// writes back needs no extra bypass. Registers reset to zero, which is the
// initial value of every architectural register. The original design only says the
// register file is read in RR and written in WB; port counts follow the
// issue width, and write-through and reset are this design's choices.
module dps_regfile #(
  parameter int unsigned NPHYS  = 160,
  parameter int unsigned XW     = 32,
  parameter int unsigned RPORTS = 16,
  parameter int unsigned WPORTS = 8,
  localparam int unsigned PW = $clog2(NPHYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PW-1:0]     raddr [RPORTS],
  output logic [XW-1:0]     rdata [RPORTS],
  input  logic [WPORTS-1:0] we,
  input  logic [PW-1:0]     waddr [WPORTS],
  input  logic [XW-1:0]     wdata [WPORTS]
);
  logic [XW-1:0] mem [NPHYS];

  always_comb begin
    for (int r = 0; r < RPORTS; r++) begin
      rdata[r] = mem[raddr[r]];
      for (int w = 0; w < WPORTS; w++)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPHYS; i++) mem[i] <= '0;
    end else begin
      for (int w = 0; w < WPORTS; w++)
        if (we[w]) mem[waddr[w]] <= wdata[w];
    end
  end
endmodule
