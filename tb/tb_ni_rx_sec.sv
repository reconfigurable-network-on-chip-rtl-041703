// tb_ni_rx_sec: connects a transmit engine to the receive engine and checks
//  - tier 2, 3, 1 and 0 packets arrive with the original plaintext and header,
//  - a tier-2 packet with one ciphertext bit flipped on the wire is dropped
//    and nothing of it reaches the IP,
//  - a tier-2 packet with a forged tag is dropped,
//  - an untagged (tier 1) packet is dropped while the receiver runs tier 2
//    (packets in flight across a tier change),
//  - the header event reports source, hop count and latency.
// Expected values come from the test's own message table, not from the DUT.
module tb_ni_rx_sec;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  tier_e tx_tier, rx_tier;
  logic [127:0] key, h_key;
  logic [63:0] iv_salt;
  logic rekey, h_valid;
  node_id_t my_id, ip_dst;
  logic [TS_W-1:0] now;
  logic tx_valid, tx_ready, tx_last, pkt_sent;
  logic [31:0] tx_user;
  logic [127:0] tx_data;
  logic w_valid, w_ready;
  data_flit_t w_flit, w_flit_t;
  logic ip_valid, ip_last, ip_ready;
  data_hdr_t ip_hdr;
  logic [127:0] ip_data;
  logic hdr_evt, pkt_ok, pkt_drop;
  node_id_t evt_src;
  logic [HOP_W-1:0] evt_hops;
  logic [TS_W-1:0] evt_lat;
  int checks = 0, failures = 0;
  int tamper_idx;   // flit index to corrupt, -1 none
  int tamper_cnt;
  int n_ok = 0, n_drop = 0;

  ni_tx_sec u_tx (.clk, .rst_n, .tier(tx_tier), .key, .iv_salt, .rekey, .my_id, .now,
                  .h_key, .h_valid, .ip_valid(tx_valid), .ip_ready(tx_ready), .ip_dst,
                  .ip_user(tx_user), .ip_data(tx_data), .ip_last(tx_last),
                  .out_valid(w_valid), .out_flit(w_flit), .out_ready(w_ready), .pkt_sent);
  ni_rx_sec dut (.clk, .rst_n, .tier(rx_tier), .key, .h_key, .iv_salt, .now,
                 .in_valid(w_valid), .in_flit(w_flit_t), .in_ready(w_ready),
                 .ip_valid, .ip_hdr, .ip_data, .ip_last, .ip_ready,
                 .hdr_evt, .evt_src, .evt_hops, .evt_lat, .pkt_ok, .pkt_drop);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  always_comb begin
    w_flit_t = w_flit;
    if (tamper_cnt == tamper_idx) w_flit_t.data[5] = ~w_flit.data[5];
  end
  always @(posedge clk) if (w_valid && w_ready) tamper_cnt <= tamper_cnt + 1;

  logic [127:0] rcv [$];
  data_hdr_t rcv_hdr;
  always @(posedge clk) begin
    if (ip_valid && ip_ready) begin rcv.push_back(ip_data); rcv_hdr = ip_hdr; end
    if (pkt_ok) n_ok++;
    if (pkt_drop) n_drop++;
    if (hdr_evt) begin
      checks++;
      if (evt_src !== my_id || evt_hops !== 4'd4 || evt_lat > 32'd40) begin
        failures++; $display("FAIL hdr evt %h %0d %0d", evt_src, evt_hops, evt_lat);
      end
    end
  end

  task automatic send(input tier_e t, input logic [127:0] m0, input logic [127:0] m1, input int tidx);
    int ok0, dr0;
    ok0 = n_ok; dr0 = n_drop;
    rcv.delete();
    @(negedge clk);
    tamper_idx = tidx; tamper_cnt = 0;
    tx_tier = t;
    tx_valid = 1; tx_data = m0; tx_last = 0;
    while (1) begin @(posedge clk); if (tx_ready) break; end
    @(negedge clk); tx_data = m1; tx_last = 1;
    while (1) begin @(posedge clk); if (tx_ready) break; end
    @(negedge clk); tx_valid = 0; tx_last = 0;
    while (n_ok == ok0 && n_drop == dr0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_ok(input logic [127:0] m0, input logic [127:0] m1, input string what);
    checks++;
    if (rcv.size() != 2 || rcv[0] !== m0 || rcv[1] !== m1 || rcv_hdr.user !== tx_user) begin
      failures++; $display("FAIL %s: got %0d blocks", what, rcv.size());
    end
  endtask
  task automatic expect_drop(input string what);
    checks++;
    if (rcv.size() != 0) begin failures++; $display("FAIL %s: %0d blocks delivered", what, rcv.size()); end
  endtask

  initial begin
    int drops;
    tx_tier = TIER_NOSEC; rx_tier = TIER_AUTH;
    key = 128'h000102030405060708090a0b0c0d0e0f; iv_salt = 64'hfeedface12345678;
    rekey = 0; my_id = '{y: 3'd1, x: 3'd0}; ip_dst = '{y: 3'd3, x: 3'd2}; now = 0;
    tx_valid = 0; tx_last = 0; tx_user = 32'h5a5a0001; tx_data = '0; ip_ready = 1;
    tamper_idx = -1; tamper_cnt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); rekey = 1; @(negedge clk); rekey = 0;
    while (!h_valid) @(negedge clk);

    send(TIER_AUTH, 128'h1111, 128'h2222, -1);       expect_ok(128'h1111, 128'h2222, "tier2");
    send(TIER_DOS,  128'h3333, 128'h4444, -1);       expect_ok(128'h3333, 128'h4444, "tier3");
    drops = n_drop;
    send(TIER_AUTH, 128'h5555, 128'h6666, 2);        expect_drop("tampered c2");
    send(TIER_AUTH, 128'h5555, 128'h6666, 3);        expect_drop("forged tag");
    send(TIER_ENC,  128'h7777, 128'h8888, -1);       expect_drop("untagged at tier 2");
    checks++; if (n_drop - drops != 3) begin failures++; $display("FAIL drop count %0d", n_drop - drops); end
    rx_tier = TIER_ENC;
    send(TIER_ENC,  128'h7777, 128'h8888, -1);       expect_ok(128'h7777, 128'h8888, "tier1");
    // slow IP on the stream path
    fork
      send(TIER_NOSEC, 128'h9999, 128'haaaa, -1);
      begin repeat (30) begin @(negedge clk); ip_ready = 1'($urandom_range(0, 1)); end ip_ready = 1; end
    join
    expect_ok(128'h9999, 128'haaaa, "tier0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
