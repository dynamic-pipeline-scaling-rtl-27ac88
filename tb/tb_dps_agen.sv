// tb_dps_agen: random base/offset pairs in deep and shallow mode. Checks the
// cache index (low half of base + offset) one cycle after issue, the full
// address two cycles after issue in deep mode and one cycle after in shallow
// mode, and the tags that travel with them.
module tb_dps_agen;
  import dps_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dps_mode_e   mode;
  logic        in_valid, m1_valid, m2_valid;
  logic [7:0]  in_tag, m1_tag, m2_tag;
  logic [31:0] in_base, in_offset, m2_addr;
  logic [15:0] m1_index;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] exp_a [int];
  logic [7:0]  exp_t [int];
  logic        exp_v [int];

  dps_agen dut (.*);

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cycle, s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    int c1, c2;
    c1 = cycle - 1;
    c2 = (mode == MODE_DEEP) ? cycle - 2 : cycle - 1;
    if (exp_v.exists(c1)) begin
      check(m1_valid == exp_v[c1], "index valid");
      if (exp_v[c1]) begin
        check(m1_index == exp_a[c1][15:0], "cache index");
        check(m1_tag == exp_t[c1], "index tag");
      end
    end
    if (exp_v.exists(c2)) begin
      check(m2_valid == exp_v[c2], "address valid");
      if (exp_v[c2]) begin
        check(m2_addr == exp_a[c2], $sformatf("address %h expected %h", m2_addr, exp_a[c2]));
        check(m2_tag == exp_t[c2], "address tag");
      end
    end
    exp_v[cycle] = in_valid;
    exp_a[cycle] = in_base + in_offset;
    exp_t[cycle] = in_tag;
    cycle <= cycle + 1;
  end

  initial begin
    mode = MODE_DEEP; in_valid = 0; in_tag = 0; in_base = 0; in_offset = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      mode = (ph == 1) ? MODE_SHALLOW : MODE_DEEP;
      exp_v.delete();
      for (int t = 0; t < 500; t++) begin
        @(negedge clk);
        in_valid  = $urandom_range(0, 1);
        in_tag    = 8'($urandom());
        in_base   = $urandom();
        in_offset = ($urandom_range(0, 1) == 1) ? 32'($signed(16'($urandom()))) : $urandom();
      end
      @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
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
