// tb_noc_sec_full: the secure NoC at its default size (8x8 mesh) through one
// complete operation.
//
// After reset the engine distributes the key to all 64 nodes and broadcasts
// the requested configuration (tier 2: encryption and authentication). Node
// (0,0) then sends a 3-block packet to node (7,7) (14 hops) and node (7,7)
// answers with a 1-block packet. Both must arrive with the tag verified and
// the original data. Checked: every node reaches tier 2, both packets are
// delivered intact, no packet is dropped, and the 14-hop path's network
// latency (from the header time stamp) is at least the zero-load 4 cycles
// per router of the pipeline for 15 routers.
module tb_noc_sec_full;
  import nocsec_pkg::*;

  localparam int unsigned N = MESH_X * MESH_Y;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sec_cfg_t base_cfg = '{learn: 1'b0, det_sleep: 16'd0, dos_tier: DOS_DETECT_ONLY, tier: TIER_AUTH};
  logic [127:0] master_key = 128'h000102030405060708090a0b0c0d0e0f;
  logic [63:0]  master_salt = 64'h0123456789abcdef;
  logic rekey_req = 1'b0;
  sec_cfg_t rse_cfg;
  logic rse_key_done, rse_cfg_sent, rse_hb_round, rse_irq_seen;
  logic [N-1:0] ip_tx_valid = '0, ip_tx_ready, ip_tx_last = '0;
  node_id_t [N-1:0] ip_tx_dst = '0;
  logic [N-1:0][31:0] ip_tx_user = '0;
  logic [N-1:0][127:0] ip_tx_data = '0;
  logic [N-1:0] ip_rx_valid, ip_rx_last, ip_rx_ready = '1;
  data_hdr_t [N-1:0] ip_rx_hdr;
  logic [N-1:0][127:0] ip_rx_data;
  logic [N-1:0][7:0] battery = {N{8'd200}};
  tier_e [N-1:0] node_tier;
  logic [N-1:0] attacked, congested, pkt_sent, pkt_ok, pkt_drop, suspicious, mip_valid, accused;
  node_id_t [N-1:0] mip;

  noc_sec_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  localparam int unsigned SRC = 0, DST = N - 1;
  int unsigned n_ok = 0, n_drop = 0;
  always @(posedge clk) if (rst_n) begin
    n_ok   += $countones(pkt_ok);
    n_drop += $countones(pkt_drop);
  end

  task automatic send(int unsigned s, node_id_t d, int unsigned len, logic [31:0] user);
    for (int b = 0; b < len; b++) begin
      ip_tx_valid[s] <= 1'b1;
      ip_tx_dst[s]   <= d;
      ip_tx_user[s]  <= user;
      ip_tx_data[s]  <= {user, 32'(b), ~user, 32'hfeed_0000 + 32'(b)};
      ip_tx_last[s]  <= b == len - 1;
      @(posedge clk);
      while (!ip_tx_ready[s]) @(posedge clk);
    end
    ip_tx_valid[s] <= 1'b0;
  endtask

  task automatic receive(int unsigned r, int unsigned len, logic [31:0] user, node_id_t src,
                         output logic [TS_W-1:0] lat);
    for (int b = 0; b < len; b++) begin
      @(posedge clk);
      while (!ip_rx_valid[r]) @(posedge clk);
      check(ip_rx_data[r] == {user, 32'(b), ~user, 32'hfeed_0000 + 32'(b)}, $sformatf("block %0d data", b));
      check(ip_rx_last[r] == (b == len - 1), "last flag");
      check(ip_rx_hdr[r].src == src && ip_rx_hdr[r].user == user, "header");
      lat = dut.now - ip_rx_hdr[r].tstamp;
    end
  endtask

  logic [TS_W-1:0] lat;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (rse_cfg_sent);
    @(posedge clk);
    while (node_tier != {N{TIER_AUTH}}) @(posedge clk);
    check(1'b1, "all nodes at tier 2");
    fork
      send(SRC, '{y: 3'd7, x: 3'd7}, 3, 32'h1111_2222);
      receive(DST, 3, 32'h1111_2222, '{y: 3'd0, x: 3'd0}, lat);
    join
    $display("14-hop packet: latency %0d cycles", lat);
    check(lat >= 32'(4 * 15), "latency at least the zero-load pipeline delay");
    fork
      send(DST, '{y: 3'd0, x: 3'd0}, 1, 32'h3333_4444);
      receive(SRC, 1, 32'h3333_4444, '{y: 3'd7, x: 3'd7}, lat);
    join
    repeat (20) @(posedge clk);
    check(n_ok == 2, $sformatf("two tags verified (%0d)", n_ok));
    check(n_drop == 0, "no drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
