// tb_dps_cfg_latch: checks the configurable latch in both modes.
// Opaque (deep): q shows the value loaded at the last enabled clock edge.
// Transparent (shallow): q equals d in the same cycle. Reset loads RESET_VAL.
module tb_dps_cfg_latch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        transparent, en;
  logic [15:0] d, q, stored, model;
  int checks = 0, failures = 0;

  dps_cfg_latch #(.W(16), .RESET_VAL(16'h5A5A)) dut (.*);

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    transparent = 0; en = 1; d = 16'h1234;
    @(posedge clk); #1;
    check(q == 16'h5A5A, "reset value");
    rst_n = 1;
    model = 16'h5A5A;
    for (int i = 0; i < 400; i++) begin
      transparent = (i >= 200) ^ (i % 37 == 0);
      en = ($urandom_range(0, 3) != 0);
      d  = 16'($urandom());
      #1;
      if (transparent) check(q == d, "transparent: q follows d");
      else             check(q == model, $sformatf("opaque: q=%h expected %h", q, model));
      check(stored == model, "stored register");
      @(posedge clk);
      if (en) model = d;
      #1;
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
