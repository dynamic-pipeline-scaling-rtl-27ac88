// tb_dps_scoreboard: random dispatch (clear) and confirmed issue (set) of
// physical registers against a bit-vector model; checks every verdict.
module tb_dps_scoreboard;
  localparam int W = 4, IW = 4, NPHYS = 48, PW = $clog2(NPHYS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0]  alloc_valid;
  logic [PW-1:0] alloc_preg [W];
  logic [IW-1:0] chk_valid, chk_ok;
  logic [PW-1:0] chk_src1 [IW], chk_src2 [IW], chk_dst [IW];
  logic [NPHYS-1:0] model;
  int checks = 0, failures = 0, n_bad = 0;

  dps_scoreboard #(.WIDTH(W), .ISSUE_W(IW), .NPHYS(NPHYS)) dut (.*);

  initial begin
    alloc_valid = '0; chk_valid = '0;
    for (int k = 0; k < W; k++) alloc_preg[k] = '0;
    for (int k = 0; k < IW; k++) begin chk_src1[k] = '0; chk_src2[k] = '0; chk_dst[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = '1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < W; k++) begin
        alloc_valid[k] = ($urandom_range(0, 2) == 0);
        alloc_preg[k]  = PW'($urandom_range(0, NPHYS - 1));
      end
      for (int k = 0; k < IW; k++) begin
        chk_valid[k] = $urandom_range(0, 1);
        chk_src1[k]  = PW'($urandom_range(0, NPHYS - 1));
        chk_src2[k]  = PW'($urandom_range(0, NPHYS - 1));
        chk_dst[k]   = PW'($urandom_range(0, NPHYS - 1));
      end
      #1;
      for (int k = 0; k < IW; k++) begin
        logic e;
        e = model[chk_src1[k]] && model[chk_src2[k]];
        checks++;
        if (chk_ok[k] !== e) begin failures++; $display("FAIL verdict lane %0d", k); end
        if (!e) n_bad++;
      end
      @(posedge clk);
      begin
        logic [NPHYS-1:0] n;
        n = model;
        for (int k = 0; k < IW; k++)
          if (chk_valid[k] && model[chk_src1[k]] && model[chk_src2[k]]) n[chk_dst[k]] = 1'b1;
        for (int k = 0; k < W; k++) if (alloc_valid[k]) n[alloc_preg[k]] = 1'b0;
        model = n;
      end
    end
    checks++;
    if (n_bad == 0) begin failures++; $display("FAIL: no pileup verdict seen"); end
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
