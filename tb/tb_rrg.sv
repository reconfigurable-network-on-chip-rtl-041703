// tb_rrg: reconfiguration registers.
// Checks the reset values, that a configuration write takes effect on the
// next cycle, that key words written to the staging copy do not change the
// active key until the commit, that the commit loads key and salt together
// and pulses rekey for exactly one cycle, and that an index above 5 is
// ignored.
module tb_rrg;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, key_we = 0, key_commit = 0;
  sec_cfg_t cfg_in = '0, cfg;
  logic [2:0] key_idx = 0;
  logic [31:0] key_word = 0;
  logic [127:0] key;
  logic [63:0] iv_salt;
  logic rekey;
  rrg dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [31:0] w [6] = '{32'h00112233, 32'h44556677, 32'h8899aabb, 32'hccddeeff, 32'hcafef00d, 32'h12345678};
  initial begin
    repeat (2) @(posedge clk);
    #1 check(cfg.tier == TIER_NOSEC && key == '0 && !rekey, "reset values");
    rst_n = 1;
    @(negedge clk);
    cfg_in = '{learn: 1'b1, det_sleep: 16'd77, dos_tier: DOS_DETECT_LOCALIZE, tier: TIER_DOS};
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    check(cfg == cfg_in, "cfg write next cycle");
    for (int i = 0; i < 6; i++) begin
      key_we = 1; key_idx = 3'(i); key_word = w[i];
      @(negedge clk);
      check(key == '0 && iv_salt == '0, "key unchanged before commit");
    end
    key_idx = 3'd6; key_word = 32'hdeadbeef;     // ignored
    @(negedge clk);
    key_we = 0;
    key_commit = 1;
    @(negedge clk);
    key_commit = 0;
    check(key == {w[0], w[1], w[2], w[3]}, "key after commit");
    check(iv_salt == {w[4], w[5]}, "salt after commit");
    check(rekey, "rekey pulse");
    @(negedge clk);
    check(!rekey, "rekey one cycle");
    check(cfg.det_sleep == 16'd77, "cfg held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
