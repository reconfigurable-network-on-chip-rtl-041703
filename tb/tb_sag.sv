// tb_sag: security agent.
// Drives service messages into the agent and checks: a heartbeat request is
// answered to its sender with battery, congestion and attack flags; CFG,
// KEY_WORD and KEY_COMMIT messages drive the register write port (and CFG
// clears the attack flag); an attack raises exactly one interrupt to the
// engine at tier 3 and none below it; the interrupt goes before a pending
// heartbeat answer; a stalled transmit port holds the message.
module tb_sag;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_id_t my_id = '{y: 3'd2, x: 3'd5}, rse_id = '{y: 3'd0, x: 3'd0};
  logic [7:0] battery = 8'd150;
  logic congested = 0, attacked = 0, attack_clear;
  tier_e tier = TIER_AUTH;
  logic cfg_we, key_we, key_commit;
  sec_cfg_t cfg_out;
  logic [2:0] key_idx;
  logic [31:0] key_word;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 1;
  svc_msg_t rx_msg = '0, tx_msg;
  sag dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic put(svc_type_e t, logic [47:0] d, node_id_t from);
    rx_msg = '{data: d, mtype: t, src: from, dst: my_id};
    rx_valid = 1;
    #1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!tx_valid, "idle after reset");
    congested = 1;
    put(SM_HB_REQ, '0, '{y: 3'd1, x: 3'd1});
    @(negedge clk);
    rx_valid = 0;
    check(tx_valid && tx_msg.mtype == SM_HB_RESP && tx_msg.dst == '{y: 3'd1, x: 3'd1}, "heartbeat answer");
    check(tx_msg.data[9:0] == {1'b0, 1'b1, 8'd150} && tx_msg.src == my_id, "answer payload");
    @(negedge clk);
    check(!tx_valid, "one answer");
    // register writes
    put(SM_CFG, 48'({1'b0, 16'd5, 1'b1, 2'd3}), rse_id);
    check(cfg_we && cfg_out.tier == TIER_DOS && cfg_out.dos_tier == DOS_DETECT_LOCALIZE && cfg_out.det_sleep == 16'd5 && attack_clear, "cfg write");
    put(SM_KEY_WORD, {13'd0, 3'd4, 32'habcd0123}, rse_id);
    check(key_we && key_idx == 3'd4 && key_word == 32'habcd0123 && !cfg_we, "key word");
    put(SM_KEY_COMMIT, '0, rse_id);
    check(key_commit && !key_we, "key commit");
    @(negedge clk);
    rx_valid = 0;
    // attack below tier 3: no interrupt
    attacked = 1;
    repeat (3) @(negedge clk);
    check(!tx_valid, "no interrupt below tier 3");
    attacked = 0;
    @(negedge clk);
    tier = TIER_DOS;
    tx_ready = 0;
    put(SM_HB_REQ, '0, rse_id);
    @(negedge clk);
    rx_valid = 0;
    attacked = 1;
    @(negedge clk);
    @(negedge clk);
    check(tx_valid && tx_msg.mtype == SM_ATTACK_IRQ && tx_msg.dst == rse_id, "interrupt first");
    tx_ready = 1;
    @(negedge clk);
    check(tx_valid && tx_msg.mtype == SM_HB_RESP && tx_msg.data[9], "then answer with attack flag");
    @(negedge clk);
    check(!tx_valid, "one interrupt per attack");
    repeat (5) @(negedge clk);
    check(!tx_valid, "still one interrupt");
    attacked = 0;
    @(negedge clk);
    attacked = 1;
    @(negedge clk);
    check(tx_valid && tx_msg.mtype == SM_ATTACK_IRQ, "new attack, new interrupt");
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
