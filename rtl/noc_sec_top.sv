// noc_sec_top: reconfigurable NoC security architecture, NX x NY nodes.
//
// Two meshes with XY routing connect the nodes: the data NoC (128-bit
// payload flits, wormhole, credit flow control) carries the IPs' packets, the
// service NoC (one-flit messages) carries the security traffic. Each node has
//  * a data router and a service router (inside the two noc_mesh instances),
//  * an NI (ni) with the tiered encryption / authentication engines, the
//    reconfiguration registers, the security agent, the destination latency
//    curve and the localization handlers,
//  * a PAC monitor (pac_monitor) on the router's arrivals that detects a
//    flooding DoS attack against its packet-arrival-curve bounds; it runs
//    while tier 3 is active,
//  * a congestion flag: router buffer occupancy >= CONG_TH flits (this
//    design's stand-in for the congestion sensor).
// The runtime security engine (rse) sits at node RSE_NODE and configures all
// NIs over the service NoC. A free-running counter gives the global time
// stamp carried in packet headers for the latency curves.
// The IPs, the battery sensors and the key store are outside the design:
// their signals are ports. Per-node ports are arrays indexed by node number
// n = y*NX + x.
// The PAC bounds are learnt while the configuration's learn bit is set; the
// bound write port is not brought out (tied off).
// Lint notes that stand: the service mesh's arrival and occupancy counts, the
// PAC monitors' bound/count/active/violation outputs and the DoS-tier bit of
// the configuration at this level are not used here (the DoS tier is used
// inside the NI); they stay on the sub-blocks for observation.
module noc_sec_top
  import nocsec_pkg::*;
#(
  parameter int unsigned NX        = MESH_X,
  parameter int unsigned NY        = MESH_Y,
  parameter int unsigned RSE_NODE  = 0,
  parameter int unsigned HB_PERIOD = 4096,
  parameter int unsigned HB_WAIT   = 256,
  parameter int unsigned CONG_TH   = 12,
  parameter int unsigned PAC_NWIN  = 8,
  parameter int unsigned PAC_STEP  = 32,
  parameter int unsigned PAC_ACTIVE = 1024,
  parameter int unsigned LOC_TIMEOUT = 512,
  parameter int unsigned MAX_BLK   = 4,
  localparam int unsigned N        = NX * NY
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // security engine control
  input  sec_cfg_t               base_cfg,
  input  logic [127:0]           master_key,
  input  logic [63:0]            master_salt,
  input  logic                   rekey_req,
  output sec_cfg_t               rse_cfg,
  output logic                   rse_key_done,
  output logic                   rse_cfg_sent,
  output logic                   rse_hb_round,
  output logic                   rse_irq_seen,
  // IP transmit, per node
  input  logic     [N-1:0]       ip_tx_valid,
  output logic     [N-1:0]       ip_tx_ready,
  input  node_id_t [N-1:0]       ip_tx_dst,
  input  logic     [N-1:0][31:0] ip_tx_user,
  input  logic     [N-1:0][127:0] ip_tx_data,
  input  logic     [N-1:0]       ip_tx_last,
  // IP receive, per node
  output logic      [N-1:0]        ip_rx_valid,
  output data_hdr_t [N-1:0]        ip_rx_hdr,
  output logic      [N-1:0][127:0] ip_rx_data,
  output logic      [N-1:0]        ip_rx_last,
  input  logic      [N-1:0]        ip_rx_ready,
  // sensors
  input  logic     [N-1:0][7:0]  battery,
  // per-node status
  output tier_e    [N-1:0]       node_tier,
  output logic     [N-1:0]       attacked,
  output logic     [N-1:0]       congested,
  output logic     [N-1:0]       pkt_sent,
  output logic     [N-1:0]       pkt_ok,
  output logic     [N-1:0]       pkt_drop,
  output logic     [N-1:0]       suspicious,
  output logic     [N-1:0]       mip_valid,
  output node_id_t [N-1:0]       mip,
  output logic     [N-1:0]       accused
);
  localparam int unsigned PCW = 12;

  logic [TS_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // ---------------- meshes ----------------
  logic [N-1:0]              d_in_valid, d_in_credit, d_out_valid, d_out_credit;
  logic [N-1:0][DATA_FW-1:0] d_in_flit, d_out_flit;
  logic [N-1:0][2:0]         d_arrivals, s_arrivals;
  logic [N-1:0][7:0]         d_occ, s_occ;
  logic [N-1:0]              s_in_valid, s_in_credit, s_out_valid, s_out_credit;
  logic [N-1:0][SVC_FW-1:0]  s_in_flit, s_out_flit;

  noc_mesh #(.NX(NX), .NY(NY), .FW(DATA_FW)) u_data_noc (
    .clk, .rst_n,
    .loc_in_valid(d_in_valid), .loc_in_flit(d_in_flit), .loc_in_credit(d_in_credit),
    .loc_out_valid(d_out_valid), .loc_out_flit(d_out_flit), .loc_out_credit(d_out_credit),
    .arrivals(d_arrivals), .occupancy(d_occ)
  );

  noc_mesh #(.NX(NX), .NY(NY), .FW(SVC_FW)) u_svc_noc (
    .clk, .rst_n,
    .loc_in_valid(s_in_valid), .loc_in_flit(s_in_flit), .loc_in_credit(s_in_credit),
    .loc_out_valid(s_out_valid), .loc_out_flit(s_out_flit), .loc_out_credit(s_out_credit),
    .arrivals(s_arrivals), .occupancy(s_occ)
  );

  // ---------------- security engine ----------------
  logic     rse_tx_valid, rse_tx_ready, rse_rx_valid;
  svc_msg_t rse_tx_msg, rse_rx_msg;
  node_id_t rse_id;
  assign rse_id = '{y: COORD_W'(RSE_NODE / NX), x: COORD_W'(RSE_NODE % NX)};

  rse #(.NX(NX), .NY(NY), .HB_PERIOD(HB_PERIOD), .HB_WAIT(HB_WAIT)) u_rse (
    .clk, .rst_n, .my_id(rse_id), .base_cfg, .master_key, .master_salt, .rekey_req,
    .rx_valid(rse_rx_valid), .rx_msg(rse_rx_msg),
    .tx_valid(rse_tx_valid), .tx_msg(rse_tx_msg), .tx_ready(rse_tx_ready),
    .cur_cfg(rse_cfg), .key_done(rse_key_done), .cfg_sent(rse_cfg_sent),
    .hb_round(rse_hb_round), .irq_seen(rse_irq_seen)
  );

  // ---------------- nodes ----------------
  logic [N-1:0] n_rse_tx_ready, n_rse_rx_valid;
  svc_msg_t [N-1:0] n_rse_rx_msg;

  for (genvar n = 0; n < N; n++) begin : g_node
    node_id_t   id;
    sec_cfg_t   cfg;
    logic       attack_clear;
    data_flit_t inj_f, ej_f;
    svc_flit_t  sinj_f;
    logic [PAC_NWIN-1:0][PCW-1:0] pac_bound, pac_count;
    logic       pac_active, pac_violation;

    assign id = '{y: COORD_W'(n / NX), x: COORD_W'(n % NX)};
    assign congested[n] = d_occ[n] >= 8'(CONG_TH);
    assign node_tier[n] = cfg.tier;
    assign ej_f         = data_flit_t'(d_out_flit[n]);
    assign d_in_flit[n] = DATA_FW'(inj_f);
    assign s_in_flit[n] = SVC_FW'(sinj_f);

    ni #(.NX(NX), .NY(NY), .MAX_BLK(MAX_BLK), .LOC_TIMEOUT(LOC_TIMEOUT)) u_ni (
      .clk, .rst_n, .my_id(id), .rse_id, .now,
      .ip_tx_valid(ip_tx_valid[n]), .ip_tx_ready(ip_tx_ready[n]), .ip_tx_dst(ip_tx_dst[n]),
      .ip_tx_user(ip_tx_user[n]), .ip_tx_data(ip_tx_data[n]), .ip_tx_last(ip_tx_last[n]),
      .ip_rx_valid(ip_rx_valid[n]), .ip_rx_hdr(ip_rx_hdr[n]), .ip_rx_data(ip_rx_data[n]),
      .ip_rx_last(ip_rx_last[n]), .ip_rx_ready(ip_rx_ready[n]),
      .inj_valid(d_in_valid[n]), .inj_flit(inj_f), .inj_credit(d_in_credit[n]),
      .ej_valid(d_out_valid[n]), .ej_flit(ej_f), .ej_credit(d_out_credit[n]),
      .svc_inj_valid(s_in_valid[n]), .svc_inj_flit(sinj_f), .svc_inj_credit(s_in_credit[n]),
      .svc_ej_valid(s_out_valid[n]), .svc_ej_flit(svc_flit_t'(s_out_flit[n])),
      .svc_ej_credit(s_out_credit[n]),
      .rse_tx_valid(n == RSE_NODE ? rse_tx_valid : 1'b0),
      .rse_tx_msg(rse_tx_msg), .rse_tx_ready(n_rse_tx_ready[n]),
      .rse_rx_valid(n_rse_rx_valid[n]), .rse_rx_msg(n_rse_rx_msg[n]),
      .battery(battery[n]), .congested(congested[n]), .attacked(attacked[n]),
      .attack_clear, .cfg,
      .pkt_sent(pkt_sent[n]), .pkt_ok(pkt_ok[n]), .pkt_drop(pkt_drop[n]),
      .suspicious(suspicious[n]), .mip_valid(mip_valid[n]), .mip(mip[n]),
      .accused(accused[n])
    );

    pac_monitor #(.NWIN(PAC_NWIN), .WIN_STEP(PAC_STEP), .ACTIVE_CYCLES(PAC_ACTIVE),
                  .CNT_W(PCW)) u_pac (
      .clk, .rst_n, .enable(cfg.tier == TIER_DOS), .learn(cfg.learn),
      .det_sleep(cfg.det_sleep), .arrivals(d_arrivals[n]), .clear(attack_clear),
      .bound_we(1'b0), .bound_idx('0), .bound_wdata('0),
      .bound(pac_bound), .count(pac_count), .active(pac_active),
      .violation(pac_violation), .attacked(attacked[n])
    );
  end

  assign rse_tx_ready = n_rse_tx_ready[RSE_NODE];
  assign rse_rx_valid = n_rse_rx_valid[RSE_NODE];
  assign rse_rx_msg   = n_rse_rx_msg[RSE_NODE];
endmodule
