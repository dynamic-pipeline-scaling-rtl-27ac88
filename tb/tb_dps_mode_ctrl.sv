// tb_dps_mode_ctrl: checks the mode rule (shallow at or below half the peak
// frequency, only when DPS is enabled), that a switch waits for an empty
// pipeline and takes one cycle once it is empty, and the frequency clamp.
module tb_dps_mode_ctrl;
  import dps_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       dps_en, pipe_empty, drain;
  logic [3:0] f_req, f_out;
  dps_mode_e  mode;
  logic [15:0] switches;
  int checks = 0, failures = 0;

  logic [3:0]  v_level;
  logic [10:0] v_mv;
  // operating points: level, deep MHz, shallow MHz, mV
  int lv_deep [6]    = '{0, 200, 400, 600, 800, 1000};
  int lv_shallow [6] = '{0, 100, 200, 300, 400, 500};
  int lv_mv [6]      = '{0, 700, 820, 950, 1070, 1190};

  dps_mode_ctrl dut (.*);

  // the voltage level must be the lowest one whose frequency in the current
  // mode reaches f_out
  task automatic check_volt();
    int lev;
    lev = 0;
    for (int i = 5; i >= 1; i--)
      if (((mode == MODE_SHALLOW) ? lv_shallow[i] : lv_deep[i]) >= 100 * int'(f_out)) lev = i;
    check(int'(v_level) == lev, $sformatf("voltage level %0d for %0d MHz, expected %0d", v_level, 100 * f_out, lev));
    check(int'(v_mv) == lv_mv[lev], "supply voltage");
  endtask

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    dps_en = 1; pipe_empty = 0; f_req = 10;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(mode == MODE_DEEP, "reset in deep mode");
    for (int f = 1; f <= 10; f++) begin
      for (int en = 0; en < 2; en++) begin
        dps_mode_e want;
        int wait_c;
        dps_en = en[0]; f_req = 4'(f); pipe_empty = 0;
        want = (en == 1 && f <= 5) ? MODE_SHALLOW : MODE_DEEP;
        #1;
        check(drain == (mode != want), $sformatf("drain f=%0d en=%0d", f, en));
        check(f_out == ((mode == MODE_SHALLOW && f > 5) ? 4'd5 : 4'(f)), "frequency clamp");
        check_volt();
        wait_c = $urandom_range(1, 4);
        repeat (wait_c) begin
          dps_mode_e m0;
          m0 = mode;
          @(posedge clk); #1;
          check(mode == m0, "no switch while the pipeline is busy");
        end
        pipe_empty = 1;
        @(posedge clk); #1;
        check(mode == want, $sformatf("mode after drain f=%0d en=%0d", f, en));
        check(!drain, "drain released");
        check(f_out == 4'(f), "requested frequency granted");
        check_volt();
      end
    end
    check(switches > 0, "switch counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
