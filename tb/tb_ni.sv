// tb_ni: two network interfaces wired back to back.
// Node a = (0,0) and node b = (0,1): a's data injection port feeds b's
// ejection port and the other way round, credits included; the service
// ports are crossed the same way. The test plays the security engine on
// both engine client ports:
//  * key words, commit and a tier-2 configuration are sent to each NI over
//    the service link, and the NI's configuration output must follow,
//  * a 3-block packet a -> b must arrive with the original data and the tag
//    verified (pkt_ok), and a 2-block packet b -> a as well,
//  * with only b switched to tier 2 and a at tier 1, a's untagged packet is
//    dropped by b (pkt_drop) and never reaches b's IP,
//  * a heartbeat request from the engine at a gets b's answer with the
//    battery level.
module tb_ni;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [TS_W-1:0] now = 0;
  always @(posedge clk) now <= now + 1;

  localparam node_id_t IDA = '{y: 3'd0, x: 3'd0}, IDB = '{y: 3'd0, x: 3'd1};

  // per-node signals, index 0 = a, 1 = b
  logic       ip_tx_valid [2], ip_tx_ready [2], ip_tx_last [2];
  node_id_t   ip_tx_dst [2];
  logic [31:0] ip_tx_user [2];
  logic [127:0] ip_tx_data [2];
  logic       ip_rx_valid [2], ip_rx_last [2], ip_rx_ready [2];
  data_hdr_t  ip_rx_hdr [2];
  logic [127:0] ip_rx_data [2];
  logic       inj_valid [2], inj_credit [2], ej_credit [2];
  data_flit_t inj_flit [2];
  logic       s_inj_valid [2], s_inj_credit [2], s_ej_credit [2];
  svc_flit_t  s_inj_flit [2];
  logic       rse_tx_valid [2], rse_tx_ready [2], rse_rx_valid [2];
  svc_msg_t   rse_tx_msg [2], rse_rx_msg [2];
  logic       attack_clear [2], pkt_sent [2], pkt_ok [2], pkt_drop [2], suspicious [2], mip_valid [2], accused [2];
  sec_cfg_t   cfg [2];
  node_id_t   mip [2];

  for (genvar i = 0; i < 2; i++) begin : g
    ni #(.NX(2), .NY(1)) u_ni (
      .clk, .rst_n, .my_id(i == 0 ? IDA : IDB), .rse_id(IDA), .now,
      .ip_tx_valid(ip_tx_valid[i]), .ip_tx_ready(ip_tx_ready[i]), .ip_tx_dst(ip_tx_dst[i]),
      .ip_tx_user(ip_tx_user[i]), .ip_tx_data(ip_tx_data[i]), .ip_tx_last(ip_tx_last[i]),
      .ip_rx_valid(ip_rx_valid[i]), .ip_rx_hdr(ip_rx_hdr[i]), .ip_rx_data(ip_rx_data[i]),
      .ip_rx_last(ip_rx_last[i]), .ip_rx_ready(ip_rx_ready[i]),
      .inj_valid(inj_valid[i]), .inj_flit(inj_flit[i]), .inj_credit(inj_credit[i]),
      .ej_valid(inj_valid[1-i]), .ej_flit(inj_flit[1-i]), .ej_credit(ej_credit[i]),
      .svc_inj_valid(s_inj_valid[i]), .svc_inj_flit(s_inj_flit[i]), .svc_inj_credit(s_inj_credit[i]),
      .svc_ej_valid(s_inj_valid[1-i]), .svc_ej_flit(s_inj_flit[1-i]), .svc_ej_credit(s_ej_credit[i]),
      .rse_tx_valid(rse_tx_valid[i]), .rse_tx_msg(rse_tx_msg[i]), .rse_tx_ready(rse_tx_ready[i]),
      .rse_rx_valid(rse_rx_valid[i]), .rse_rx_msg(rse_rx_msg[i]),
      .battery(i == 0 ? 8'd99 : 8'd42), .congested(1'b0), .attacked(1'b0),
      .attack_clear(attack_clear[i]), .cfg(cfg[i]),
      .pkt_sent(pkt_sent[i]), .pkt_ok(pkt_ok[i]), .pkt_drop(pkt_drop[i]),
      .suspicious(suspicious[i]), .mip_valid(mip_valid[i]), .mip(mip[i]), .accused(accused[i])
    );
    assign inj_credit[i]   = ej_credit[1-i];
    assign s_inj_credit[i] = s_ej_credit[1-i];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int unsigned n_ok [2] = '{0, 0}, n_drop [2] = '{0, 0}, n_rx [2] = '{0, 0};
  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++) begin
    if (pkt_ok[i]) n_ok[i]++;
    if (pkt_drop[i]) n_drop[i]++;
    if (ip_rx_valid[i] && ip_rx_ready[i] && ip_rx_last[i]) n_rx[i]++;
  end

  // engine messages are injected from node i and eaten by the other node
  task automatic svc_send(int i, svc_type_e t, logic [47:0] d);
    rse_tx_valid[i] <= 1'b1;
    rse_tx_msg[i]   <= '{data: d, mtype: t, src: IDA, dst: i == 0 ? IDB : IDA};
    @(posedge clk);
    while (!rse_tx_ready[i]) @(posedge clk);
    rse_tx_valid[i] <= 1'b0;
  endtask

  task automatic configure(int i, tier_e t);
    logic [127:0] k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    logic [63:0]  s = 64'h0102030405060708;
    for (int w = 0; w < 4; w++) svc_send(i, SM_KEY_WORD, {13'd0, 3'(w), k[127 - 32*w -: 32]});
    svc_send(i, SM_KEY_WORD, {13'd0, 3'd4, s[63:32]});
    svc_send(i, SM_KEY_WORD, {13'd0, 3'd5, s[31:0]});
    svc_send(i, SM_KEY_COMMIT, '0);
    svc_send(i, SM_CFG, 48'({1'b0, 16'd0, 1'b0, t}));
  endtask

  function automatic logic [127:0] pay(logic [31:0] u, int b);
    return {u, 32'(b), 32'h5a5a_0000 ^ u, ~u};
  endfunction

  task automatic send(int i, int len, logic [31:0] u);
    for (int b = 0; b < len; b++) begin
      ip_tx_valid[i] <= 1'b1;
      ip_tx_dst[i]   <= i == 0 ? IDB : IDA;
      ip_tx_user[i]  <= u;
      ip_tx_data[i]  <= pay(u, b);
      ip_tx_last[i]  <= b == len - 1;
      @(posedge clk);
      while (!ip_tx_ready[i]) @(posedge clk);
    end
    ip_tx_valid[i] <= 1'b0;
  endtask

  // receivers check data
  int unsigned rb [2] = '{0, 0};
  always @(posedge clk) if (rst_n) for (int i = 0; i < 2; i++)
    if (ip_rx_valid[i] && ip_rx_ready[i]) begin
      check(ip_rx_data[i] == pay(ip_rx_hdr[i].user, rb[i]), $sformatf("node %0d block %0d data", i, rb[i]));
      rb[i] = ip_rx_last[i] ? 0 : rb[i] + 1;
    end

  initial begin
    for (int i = 0; i < 2; i++) begin
      ip_tx_valid[i] = 0; ip_tx_last[i] = 0; ip_tx_dst[i] = '0; ip_tx_user[i] = '0; ip_tx_data[i] = '0;
      ip_rx_ready[i] = 1; rse_tx_valid[i] = 0; rse_tx_msg[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    configure(0, TIER_AUTH);     // to b
    configure(1, TIER_AUTH);     // to a
    repeat (5) @(posedge clk);
    check(cfg[0].tier == TIER_AUTH && cfg[1].tier == TIER_AUTH, "both at tier 2");
    repeat (40) @(posedge clk);  // hash keys computed
    send(0, 3, 32'hAAAA_0001);
    send(1, 2, 32'hBBBB_0002);
    repeat (300) @(posedge clk);
    check(n_rx[1] == 1 && n_ok[1] == 1, "a -> b delivered, tag ok");
    check(n_rx[0] == 1 && n_ok[0] == 1, "b -> a delivered, tag ok");
    // a at tier 1, b stays at tier 2: untagged packet dropped
    svc_send(1, SM_CFG, 48'({1'b0, 16'd0, 1'b0, TIER_ENC}));
    repeat (5) @(posedge clk);
    check(cfg[0].tier == TIER_ENC, "a at tier 1");
    send(0, 2, 32'hAAAA_0003);
    repeat (200) @(posedge clk);
    check(n_drop[1] == 1 && n_rx[1] == 1, "untagged packet dropped at b");
    // heartbeat: engine at a asks b
    svc_send(0, SM_HB_REQ, '0);
    begin
      int c = 0;
      while (!(rse_rx_valid[0] && rse_rx_msg[0].mtype == SM_HB_RESP) && c < 100) begin
        @(posedge clk);
        c++;
      end
      check(rse_rx_msg[0].mtype == SM_HB_RESP && rse_rx_msg[0].data[7:0] == 8'd42 && rse_rx_msg[0].src == IDB, "heartbeat answer from b");
    end
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
