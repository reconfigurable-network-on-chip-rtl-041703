// tb_noc_sec_patterns: the six synthetic traffic patterns on the default
// 8x8 secure NoC at tier 2 (encryption and authentication).
//
// As in the evaluation setup, the eight IPs of the top row (secure zone) are
// the sources and the bottom row holds the destinations, so every packet
// crosses the six middle rows. For a source in column x the destination is:
//   URD uniform random      (7, random column)
//   TRD tornado             (7, (x + 3) mod 8)
//   BCT bit complement      (7, ~x)
//   BRS bit reverse         (7, x with its 3 bits reversed)
//   BRT bit rotation        (7, x rotated right by one)
//   TPS transpose           node (x, 0): the transposed id {x, 0} of {0, x}
// (the mapping of the bit patterns onto the 3-bit column index, and transpose
// on the full id, are this test's choices). Each source sends PKTS packets
// of 4 blocks per pattern, back to back. Checked per packet: the data and
// header at the destination, the tag verified (pkt_ok), no drop; per pattern:
// all packets delivered. The mean network latency per pattern is printed.
module tb_noc_sec_patterns;
  import nocsec_pkg::*;

  localparam int unsigned N = MESH_X * MESH_Y, PKTS = 2, LEN = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sec_cfg_t base_cfg = '{learn: 1'b0, det_sleep: 16'd0, dos_tier: DOS_DETECT_ONLY, tier: TIER_AUTH};
  logic [127:0] master_key = 128'hfeffe9928665731c6d6a8f9467308308;
  logic [63:0]  master_salt = 64'h0f1e2d3c4b5a6978;
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
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic logic [127:0] pay(logic [31:0] u, int b);
    return {u, 32'(b) ^ 32'h0bad_cafe, ~u, u + 32'(b)};
  endfunction

  function automatic node_id_t pattern_dst(int p, logic [2:0] x);
    unique case (p)
      0: return '{y: 3'd7, x: 3'($urandom_range(7))};
      1: return '{y: 3'd7, x: x + 3'd3};
      2: return '{y: 3'd7, x: ~x};
      3: return '{y: 3'd7, x: {x[0], x[1], x[2]}};
      4: return '{y: 3'd7, x: {x[0], x[2:1]}};
      default: return '{y: x, x: 3'd0};
    endcase
  endfunction

  int unsigned n_ok = 0, n_drop = 0, n_rx = 0;
  longint unsigned lat_sum = 0;
  int unsigned rb [N];
  always @(posedge clk) if (rst_n) begin
    n_ok   += $countones(pkt_ok);
    n_drop += $countones(pkt_drop);
    for (int n = 0; n < N; n++)
      if (ip_rx_valid[n] && ip_rx_ready[n]) begin
        data_hdr_t h;
        h = ip_rx_hdr[n];
        check(ip_rx_data[n] == pay(h.user, rb[n]), $sformatf("data at node %0d", n));
        check(h.dst == node_id_t'(n) && h.src.y == 3'd0 && h.user[7:0] == 8'(h.src.x), "header");
        if (ip_rx_last[n]) begin
          n_rx++;
          lat_sum += 64'(dut.now - h.tstamp);
          rb[n] = 0;
        end else rb[n]++;
      end
  end

  // Sources: row-0 IP x sends todo[x] packets of LEN blocks back to back.
  int unsigned todo [MESH_X];
  int unsigned kpk [MESH_X];
  int unsigned bb [MESH_X];
  int cur_p = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int x = 0; x < MESH_X; x++) begin
        todo[x] = 0;
        kpk[x]  = 0;
        bb[x]   = 0;
      end
    end else begin
      for (int x = 0; x < MESH_X; x++) begin
        if (ip_tx_valid[x] && ip_tx_ready[x]) begin
          if (ip_tx_last[x]) begin
            ip_tx_valid[x] <= 1'b0;
            todo[x] = todo[x] - 1;
            kpk[x]  = kpk[x] + 1;
            bb[x]   = 0;
          end else begin
            bb[x] = bb[x] + 1;
            ip_tx_data[x] <= pay(ip_tx_user[x], bb[x]);
            ip_tx_last[x] <= bb[x] == LEN - 1;
          end
        end else if (!ip_tx_valid[x] && todo[x] != 0) begin
          logic [31:0] u;
          u = {8'(cur_p), 8'(kpk[x]), 8'hAA, 8'(x)};
          ip_tx_valid[x] <= 1'b1;
          ip_tx_dst[x]   <= pattern_dst(cur_p, 3'(x));
          ip_tx_user[x]  <= u;
          ip_tx_data[x]  <= pay(u, 0);
          ip_tx_last[x]  <= LEN == 1;
        end
      end
    end
  end

  string names [6] = '{"URD", "TRD", "BCT", "BRS", "BRT", "TPS"};
  initial begin
    for (int n = 0; n < N; n++) rb[n] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait (rse_cfg_sent);
    while (node_tier != {N{TIER_AUTH}}) @(posedge clk);
    for (int p = 0; p < 6; p++) begin
      int unsigned rx0, c;
      longint unsigned l0;
      rx0 = n_rx;
      l0  = lat_sum;
      cur_p = p;
      for (int x = 0; x < MESH_X; x++) todo[x] = PKTS;
      c = 0;
      while (n_rx - rx0 < MESH_X * PKTS && c < 3000) begin
        @(posedge clk);
        c++;
      end
      check(n_rx - rx0 == MESH_X * PKTS, $sformatf("%s: all packets delivered", names[p]));
      $display("%s: %0d packets, mean latency %0d cycles", names[p], n_rx - rx0,
               (lat_sum - l0) / longint'(n_rx - rx0 == 0 ? 1 : n_rx - rx0));
    end
    repeat (20) @(posedge clk);
    check(n_ok == 6 * MESH_X * PKTS, $sformatf("tags verified (%0d)", n_ok));
    check(n_drop == 0, "no drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
