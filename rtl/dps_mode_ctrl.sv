// dps_mode_ctrl: pipeline-mode controller.
//
// A shallow pipeline stage holds the logic of two deep stages, so at a given
// voltage the shallow pipeline runs at most at half the deep pipeline's top
// frequency. This controller picks the mode from the frequency requested by
// the frequency-scaling software: shallow when the request is at or below
// F_MAX/2 (and DPS is enabled), deep otherwise. The mode rule and the
// frequency ladder (levels of 100 MHz, deep 200..1000, shallow 100..500) follow
// the original design; how the switch is carried out is this design's choice: the
// controller asks the front end to stop dispatching (drain), waits until the
// back-end reports it is empty, then flips the mode in one cycle.
//
// The frequency handed to the clock generator (f_out) never exceeds what the
// current mode supports: a request for a deep-only frequency is held at
// F_MAX/2 until the switch to deep mode has happened.
//
// For a variable-voltage processor the controller also names the lowest
// supply level that carries f_out in the current mode (v_level, v_mv): level
// i holds i*200 MHz in deep mode but only i*100 MHz in shallow mode, whose
// stages are twice as long. The five levels and their voltages (0.70 V to
// 1.19 V) follow the original design's operating points; rounding a deep
// frequency up to the next level is this design's choice.
//
// Interface: f_req in units of 100 MHz; dps_en = 0 keeps a rigid deep
// pipeline. Timing: mode changes on the cycle after drain and empty are both
// high; switches counts completed switches.
module dps_mode_ctrl
  import dps_pkg::*;
#(
  parameter int unsigned F_MAX = 10,   // peak frequency, 100 MHz units (1 GHz)
  parameter int unsigned FW    = 4     // width of the frequency fields
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dps_en,
  input  logic [FW-1:0] f_req,
  input  logic          pipe_empty,
  output dps_mode_e     mode,
  output logic          drain,
  output logic [FW-1:0] f_out,
  output logic [15:0]   switches,
  output logic [FW-1:0] v_level,
  output logic [10:0]   v_mv
);
  localparam logic [FW-1:0] F_HALF = FW'(F_MAX / 2);

  dps_mode_e want;

  always_comb begin
    want = (dps_en && f_req <= F_HALF) ? MODE_SHALLOW : MODE_DEEP;
    drain = (want != mode);
    if (mode == MODE_SHALLOW && f_req > F_HALF) f_out = F_HALF;
    else                                         f_out = f_req;
    v_level = (mode == MODE_SHALLOW) ? f_out : FW'((f_out + 1'b1) >> 1);
    v_mv    = level_mv(4'(v_level));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= MODE_DEEP;
      switches <= '0;
    end else if (drain && pipe_empty) begin
      mode     <= want;
      switches <= switches + 16'd1;
    end
  end
endmodule
