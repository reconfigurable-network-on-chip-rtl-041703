// tb_noc_sec_top: end-to-end test of the secure NoC on a 4x4 mesh.
//
// Every node has a traffic generator IP that sends packets of 1..4 blocks to
// random destinations; the payload is a known function of (source, user
// field, block index), so every receiver checks the decrypted data, and a
// wire monitor checks that body flits are plaintext at tier 0 and never at
// tiers 1-3. The scenario walks through all mechanisms:
//   key distribution, configuration broadcast, tier 0/1/2/3 packets,
//   heartbeat rounds, low battery -> tier 1, congestion -> tier 3 detect
//   only, attack detection (PAC) -> interrupt -> tier 3 with localization,
//   localization of the flooding IP (MIP broadcast naming it), packets
//   dropped at a tier change, and a rekey with traffic still delivered.
// The attacker is node A=9 (middle rows), the victim V=13 (bottom row, a
// slow memory-like IP that accepts one beat in four). Each mechanism is
// counted; one that never happened is a failure. Latencies are not checked
// here (see the block tests).
module tb_noc_sec_top;
  import nocsec_pkg::*;

  localparam int unsigned NX = 4, NY = 4, N = NX * NY;
  localparam int unsigned A = 9, V = 13;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sec_cfg_t base_cfg;
  logic [127:0] master_key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic [63:0]  master_salt = 64'hcafebabe_facedbad;
  logic rekey_req = 1'b0;
  sec_cfg_t rse_cfg;
  logic rse_key_done, rse_cfg_sent, rse_hb_round, rse_irq_seen;

  logic [N-1:0] ip_tx_valid, ip_tx_ready, ip_tx_last;
  node_id_t [N-1:0] ip_tx_dst;
  logic [N-1:0][31:0] ip_tx_user;
  logic [N-1:0][127:0] ip_tx_data;
  logic [N-1:0] ip_rx_valid, ip_rx_last, ip_rx_ready;
  data_hdr_t [N-1:0] ip_rx_hdr;
  logic [N-1:0][127:0] ip_rx_data;
  logic [N-1:0][7:0] battery;
  tier_e [N-1:0] node_tier;
  logic [N-1:0] attacked, congested, pkt_sent, pkt_ok, pkt_drop, suspicious, mip_valid, accused;
  node_id_t [N-1:0] mip;

  noc_sec_top #(.NX(NX), .NY(NY), .HB_PERIOD(1500), .HB_WAIT(120), .CONG_TH(4),
                .PAC_STEP(16), .PAC_ACTIVE(512), .LOC_TIMEOUT(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic node_id_t nid(int unsigned n);
    return '{y: COORD_W'(n / NX), x: COORD_W'(n % NX)};
  endfunction

  function automatic logic [127:0] payload(logic [31:0] user, logic [7:0] b);
    return {user, user[7:0], b, 16'hc0de, ~user, user ^ 32'h1234_5678};
  endfunction

  // ---------------- traffic generators ----------------
  int unsigned rate_pm = 0;          // normal packets per 1000 cycles per node
  bit attack_on = 1'b0;
  bit [N-1:0] busy;
  logic [3:0] plen [N];
  logic [3:0] pb [N];
  logic [23:0] pseq [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= '0;
      ip_tx_valid <= '0;
      for (int n = 0; n < N; n++) pseq[n] <= '0;
    end else begin
      for (int n = 0; n < N; n++) begin
        if (!busy[n]) begin
          bit go;
          node_id_t d;
          logic [3:0] l;
          go = (n == A && attack_on) || ($urandom_range(999) < rate_pm);
          if (go) begin
            if (n == A && attack_on) begin
              d = nid(V);
              l = 4'd4;
            end else begin
              int unsigned k;
              k = $urandom_range(N - 2);
              if (k >= n) k++;
              d = nid(k);
              l = 4'($urandom_range(4, 1));
            end
            busy[n]        <= 1'b1;
            plen[n]        <= l;
            pb[n]          <= '0;
            ip_tx_dst[n]   <= d;
            ip_tx_user[n]  <= {pseq[n], l, 4'(n)};
            ip_tx_data[n]  <= payload({pseq[n], l, 4'(n)}, 8'd0);
            ip_tx_last[n]  <= l == 4'd1;
            ip_tx_valid[n] <= 1'b1;
            pseq[n]        <= pseq[n] + 1'b1;
          end
        end else if (ip_tx_valid[n] && ip_tx_ready[n]) begin
          if (ip_tx_last[n]) begin
            busy[n]        <= 1'b0;
            ip_tx_valid[n] <= 1'b0;
          end else begin
            pb[n]          <= pb[n] + 1'b1;
            ip_tx_data[n]  <= payload(ip_tx_user[n], 8'(pb[n] + 1'b1));
            ip_tx_last[n]  <= pb[n] + 4'd2 == plen[n];
          end
        end
      end
    end
  end

  // ---------------- receivers ----------------
  bit slow_victim = 1'b0;
  logic [7:0] rb [N];
  int unsigned rx_tier_cnt [4];
  int unsigned rx_pkts = 0, rx_from_attacker = 0;

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++)
      ip_rx_ready[n] <= !(n == V && slow_victim) || ($urandom_range(3) == 0);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) rb[n] = '0;
      for (int t = 0; t < 4; t++) rx_tier_cnt[t] = 0;
    end else begin
      for (int n = 0; n < N; n++) begin
        if (ip_rx_valid[n] && ip_rx_ready[n]) begin
          data_hdr_t h;
          h = ip_rx_hdr[n];
          check(ip_rx_data[n] == payload(h.user, rb[n]), $sformatf("node %0d data from %0d blk %0d", n, h.src, rb[n]));
          check(h.dst == nid(n) && nid(32'(h.user[3:0])) == h.src, "header dst/src");
          if (ip_rx_last[n]) begin
            check(rb[n] + 8'd1 == 8'(h.user[7:4]), "packet length");
            rx_tier_cnt[h.tier]++;
            rx_pkts++;
            if (h.src == nid(A)) rx_from_attacker++;
            rb[n] = '0;
          end else rb[n] = rb[n] + 1'b1;
        end
      end
    end
  end

  // ---------------- wire monitor: body flits encrypted? ----------------
  int unsigned wire_plain = 0, wire_cipher = 0;
  logic [31:0] wuser [N];
  logic [7:0]  wb [N];
  tier_e       wtier [N];
  always @(posedge clk) begin
    if (rst_n) for (int n = 0; n < N; n++) begin
      if (dut.d_in_valid[n]) begin
        data_flit_t f;
        f = data_flit_t'(dut.d_in_flit[n]);
        if (f.head) begin
          data_hdr_t h;
          h = data_hdr_t'(f.data);
          wuser[n] = h.user;
          wtier[n] = h.tier;
          wb[n]    = '0;
        end else begin
          if (wb[n] < 8'(wuser[n][7:4])) begin
            if (wtier[n] == TIER_NOSEC) begin
              check(f.data == payload(wuser[n], wb[n]), "tier 0 body is plaintext");
              wire_plain++;
            end else begin
              check(f.data != payload(wuser[n], wb[n]), "tier>=1 body is not plaintext");
              wire_cipher++;
            end
          end
          wb[n]++;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int unsigned n_keydist = 0, n_cfg = 0, n_hb = 0, n_irq = 0, n_drop = 0, n_ok = 0;
  int unsigned n_batt = 0, n_cong = 0, n_loc_mode = 0, n_mip_ok = 0, n_mip_bad = 0;
  int unsigned n_attacked = 0, n_susp = 0;
  logic in_key_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    // a key distribution ends when the engine leaves its key state
    if (in_key_q && dut.u_rse.state != 3'd0) n_keydist++;
    in_key_q = dut.u_rse.state == 3'd0;
    if (rse_cfg_sent) n_cfg++;
    if (rse_hb_round) n_hb++;
    if (rse_irq_seen) n_irq++;
    n_drop += $countones(pkt_drop);
    n_ok   += $countones(pkt_ok);
    n_susp += $countones(suspicious);
    if (|attacked) n_attacked++;
    if (rse_cfg_sent && rse_cfg.tier == TIER_ENC && base_cfg.tier != TIER_ENC) n_batt++;
    if (rse_cfg_sent && rse_cfg.tier == TIER_DOS && rse_cfg.dos_tier == DOS_DETECT_ONLY && base_cfg.tier != TIER_DOS) n_cong++;
    if (rse_cfg_sent && rse_cfg.tier == TIER_DOS && rse_cfg.dos_tier == DOS_DETECT_LOCALIZE) n_loc_mode++;
    for (int n = 0; n < N; n++) if (mip_valid[n]) begin
      if (mip[n] == nid(A)) n_mip_ok++;
      else n_mip_bad++;
    end
  end

  task automatic wait_cycles(int unsigned c);
    repeat (c) @(posedge clk);
  endtask

  task automatic set_cfg(tier_e t, dos_tier_e d, bit learn);
    base_cfg = '{learn: learn, det_sleep: 16'd0, dos_tier: d, tier: t};
  endtask

  // wait until every node runs the tier
  task automatic wait_tier(tier_e t, int unsigned limit);
    int unsigned c = 0;
    while (c < limit && !(node_tier == {N{t}})) begin
      @(posedge clk);
      c++;
    end
    check(node_tier == {N{t}}, $sformatf("all nodes at tier %0d", t));
  endtask

  int unsigned rx_before, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    set_cfg(TIER_NOSEC, DOS_DETECT_ONLY, 1'b0);
    for (int n = 0; n < N; n++) battery[n] = 8'd200;
    wait_cycles(4);
    rst_n = 1'b1;
    wait (rse_key_done);
    wait_tier(TIER_NOSEC, 100);

    // tier 0
    rate_pm = 8;
    wait_cycles(2000);
    // tier 1
    set_cfg(TIER_ENC, DOS_DETECT_ONLY, 1'b0);
    wait_tier(TIER_ENC, 500);
    wait_cycles(2000);
    // tier 2
    set_cfg(TIER_AUTH, DOS_DETECT_ONLY, 1'b0);
    wait_tier(TIER_AUTH, 500);
    wait_cycles(2000);
    // low battery -> tier 1 at the next heartbeat
    battery[6] = 8'd10;
    wait_tier(TIER_ENC, 4000);
    battery[6] = 8'd200;
    wait_tier(TIER_AUTH, 4000);
    // congestion with tier 2 -> detection switched on
    slow_victim = 1'b1;
    attack_on = 1'b1;
    wait_tier(TIER_DOS, 6000);
    attack_on = 1'b0;
    wait_cycles(3000);
    slow_victim = 1'b0;
    // tier 3 profiling, then detection and localization
    set_cfg(TIER_DOS, DOS_DETECT_LOCALIZE, 1'b1);
    wait_cycles(6000);
    set_cfg(TIER_DOS, DOS_DETECT_LOCALIZE, 1'b0);
    wait_cycles(2000);
    slow_victim = 1'b1;
    attack_on = 1'b1;
    begin
      int unsigned c = 0;
      while (c < 20000 && n_mip_ok == 0) begin
        @(posedge clk);
        c++;
      end
    end
    attack_on = 1'b0;
    slow_victim = 1'b0;
    wait_cycles(3000);
    // rekey with traffic running
    rekey_req = 1'b1;
    @(posedge clk);
    rekey_req = 1'b0;
    wait (!dut.u_rse.rekey_pend && dut.u_rse.state == 3'd2);
    rx_before = rx_pkts;
    wait_cycles(2000);
    check(rx_pkts > rx_before, "traffic delivered after rekey");
    rate_pm = 0;
    wait_cycles(1500);

    $display("mechanisms: keydist=%0d cfg=%0d hb=%0d tier_rx=%0d/%0d/%0d/%0d ok=%0d drop=%0d batt=%0d cong=%0d attacked_cycles=%0d irq=%0d loc_mode=%0d susp=%0d mip_ok=%0d mip_bad=%0d wire plain/cipher=%0d/%0d rx=%0d from_A=%0d",
             n_keydist, n_cfg, n_hb, rx_tier_cnt[0], rx_tier_cnt[1], rx_tier_cnt[2], rx_tier_cnt[3],
             n_ok, n_drop, n_batt, n_cong, n_attacked, n_irq, n_loc_mode, n_susp, n_mip_ok, n_mip_bad,
             wire_plain, wire_cipher, rx_pkts, rx_from_attacker);
    check(n_keydist >= 2, "key distribution (reset and rekey)");
    check(n_cfg > 0, "configuration broadcast");
    check(n_hb > 0, "heartbeat round");
    for (int t = 0; t < 4; t++) check(rx_tier_cnt[t] > 0, $sformatf("packets delivered at tier %0d", t));
    check(n_ok > 0, "tags verified");
    check(n_drop > 0, "packet dropped at a tier change");
    check(n_batt > 0, "low battery lowered the tier");
    check(n_cong > 0, "congestion switched detection on");
    check(n_attacked > 0, "PAC bound violation");
    check(n_irq > 0, "attack interrupt");
    check(n_loc_mode > 0, "tier 3 with localization ordered");
    check(n_susp > 0, "late packet seen by a DLC");
    check(n_mip_ok > 0, "attacker localized");
    check(n_mip_bad == 0, "no innocent node accused");
    check(wire_plain > 0 && wire_cipher > 0, "wire monitor saw both");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait_cycles(120000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
