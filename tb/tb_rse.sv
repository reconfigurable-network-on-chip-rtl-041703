// tb_rse: runtime security engine on a 2x2 network (4 nodes).
// The engine's transmit port is always ready; every message it sends is
// logged with its cycle. Checks:
//  * after reset: for each node 0..3 six KEY_WORD messages carrying the key
//    (words 0..3) and salt (words 4..5), then KEY_COMMIT; then one CFG per
//    node carrying the requested configuration; one message per cycle,
//  * the first heartbeat round starts HB_PERIOD cycles after the idle state
//    is entered and sends HB_REQ to every node,
//  * a heartbeat answer with a low battery makes the engine order tier 1,
//  * an attack interrupt makes it order tier 3 with localization at once,
//  * after a full round without attack reports it returns to the requested
//    configuration,
//  * a rekey request repeats the key distribution.
module tb_rse;
  import nocsec_pkg::*;
  localparam int unsigned NX = 2, NY = 2, N = 4, HB_PERIOD = 100, HB_WAIT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_id_t my_id = '0;
  sec_cfg_t base_cfg = '{learn: 1'b0, det_sleep: 16'd0, dos_tier: DOS_DETECT_ONLY, tier: TIER_AUTH};
  logic [127:0] master_key = 128'h0f0e0d0c0b0a09080706050403020100;
  logic [63:0] master_salt = 64'h1122334455667788;
  logic rekey_req = 0, rx_valid = 0, tx_valid, tx_ready = 1;
  svc_msg_t rx_msg = '0, tx_msg;
  sec_cfg_t cur_cfg;
  logic key_done, cfg_sent, hb_round, irq_seen;
  rse #(.NX(NX), .NY(NY), .HB_PERIOD(HB_PERIOD), .HB_WAIT(HB_WAIT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) cyc++;
  svc_msg_t log_m [$];
  int unsigned log_c [$];
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    log_m.push_back(tx_msg);
    log_c.push_back(cyc);
  end

  function automatic node_id_t nid(int unsigned n);
    return '{y: COORD_W'(n / NX), x: COORD_W'(n % NX)};
  endfunction

  task automatic expect_keys();
    logic [31:0] w [6];
    w = '{master_key[127:96], master_key[95:64], master_key[63:32], master_key[31:0],
          master_salt[63:32], master_salt[31:0]};
    for (int n = 0; n < N; n++) begin
      for (int i = 0; i < 7; i++) begin
        svc_msg_t m;
        wait (log_m.size() > 0);
        m = log_m.pop_front();
        void'(log_c.pop_front());
        check(m.dst == nid(n), "key message destination");
        if (i < 6) check(m.mtype == SM_KEY_WORD && m.data[34:32] == 3'(i) && m.data[31:0] == w[i], $sformatf("key word %0d node %0d", i, n));
        else       check(m.mtype == SM_KEY_COMMIT, "key commit");
      end
    end
  endtask

  task automatic expect_cfg(sec_cfg_t c, output int unsigned last_cyc);
    for (int n = 0; n < N; n++) begin
      svc_msg_t m;
      wait (log_m.size() > 0);
      m = log_m.pop_front();
      last_cyc = log_c.pop_front();
      check(m.mtype == SM_CFG && m.dst == nid(n) && sec_cfg_t'(m.data[19:0]) == c, $sformatf("cfg to node %0d", n));
    end
  endtask

  task automatic expect_hb(output int unsigned first_cyc);
    for (int n = 0; n < N; n++) begin
      svc_msg_t m;
      int unsigned c;
      wait (log_m.size() > 0);
      m = log_m.pop_front();
      c = log_c.pop_front();
      if (n == 0) first_cyc = c;
      check(m.mtype == SM_HB_REQ && m.dst == nid(n), "heartbeat request");
    end
  endtask

  task automatic answer(logic [7:0] batt, bit att);
    @(negedge clk);
    rx_msg = '{data: 48'({att, 1'b0, batt}), mtype: SM_HB_RESP, src: nid(1), dst: my_id};
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
  endtask

  int unsigned t_cfg, t_hb;
  sec_cfg_t low = '{learn: 1'b0, det_sleep: 16'd0, dos_tier: DOS_DETECT_ONLY, tier: TIER_ENC};
  sec_cfg_t att = '{learn: 1'b0, det_sleep: 16'd0, dos_tier: DOS_DETECT_LOCALIZE, tier: TIER_DOS};
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_keys();
    expect_cfg(base_cfg, t_cfg);
    check(key_done, "key_done");
    expect_hb(t_hb);
    // cfg sent at t_cfg; idle from t_cfg+1; round starts after HB_PERIOD idle cycles
    check(t_hb - t_cfg == HB_PERIOD + 1, $sformatf("heartbeat period (%0d)", t_hb - t_cfg));
    answer(8'd10, 1'b0);
    wait (hb_round);
    expect_cfg(low, t_cfg);
    // attack interrupt
    @(negedge clk);
    rx_msg = '{data: '0, mtype: SM_ATTACK_IRQ, src: nid(3), dst: my_id};
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    expect_cfg(att, t_cfg);
    // next rounds: no battery problem and no attack -> requested cfg again
    expect_hb(t_hb);
    answer(8'd200, 1'b0);
    expect_cfg(base_cfg, t_cfg);
    // rekey
    @(negedge clk);
    rekey_req = 1;
    @(negedge clk);
    rekey_req = 0;
    expect_keys();
    expect_cfg(base_cfg, t_cfg);
    check(log_m.size() == 0, "nothing else sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
