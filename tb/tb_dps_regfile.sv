// tb_dps_regfile: random writes and reads against an array model, including
// same-cycle write-through and reset to zero.
module tb_dps_regfile;
  localparam int NPHYS = 160, RP = 4, WP = 3, PW = $clog2(NPHYS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [PW-1:0] raddr [RP];
  logic [31:0]   rdata [RP];
  logic [WP-1:0] we;
  logic [PW-1:0] waddr [WP];
  logic [31:0]   wdata [WP];
  logic [31:0]   model [NPHYS];
  int checks = 0, failures = 0;

  dps_regfile #(.NPHYS(NPHYS), .XW(32), .RPORTS(RP), .WPORTS(WP)) dut (.*);

  initial begin
    we = '0;
    for (int i = 0; i < RP; i++) raddr[i] = '0;
    for (int i = 0; i < WP; i++) begin waddr[i] = '0; wdata[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NPHYS; i++) model[i] = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int w = 0; w < WP; w++) begin
        we[w]    = $urandom_range(0, 1);
        waddr[w] = PW'($urandom_range(0, NPHYS - 1));
        wdata[w] = $urandom();
      end
      for (int r = 0; r < RP; r++) raddr[r] = (r == 0 && we[0]) ? waddr[0] : PW'($urandom_range(0, NPHYS - 1));
      #1;
      for (int r = 0; r < RP; r++) begin
        logic [31:0] e;
        e = model[raddr[r]];
        for (int w = 0; w < WP; w++) if (we[w] && waddr[w] == raddr[r]) e = wdata[w];
        checks++;
        if (rdata[r] !== e) begin failures++; $display("FAIL read %0d: %h vs %h", raddr[r], rdata[r], e); end
      end
      @(posedge clk);
      for (int w = 0; w < WP; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
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
