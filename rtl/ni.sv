// ni: network interface of one node, with its security hardware.
//
// Between an IP and its router the NI holds:
//  * ni_tx_sec / ni_rx_sec: packetisation with the tier-dependent encryption
//    and authentication (tier 1: counter-mode AES, tier 2/3: plus the Galois
//    hash tag) and their checks at the receiver,
//  * rrg: the reconfiguration registers (tier, DoS options, key, IV salt),
//  * sag: the security agent that answers the engine's heartbeat, raises the
//    attack interrupt and writes the rrg,
//  * dlc_unit: the destination latency curve used to name a suspect source,
//  * dos_localizer: the localization handlers of this node's router,
//  * svc_port: the node's access to the service NoC, shared by the agent,
//    the localizer and (at one node) the security engine.
// Data NoC side: flits are injected under credit flow control (INJ_DEPTH
// credits = the router's local input buffer) and ejected into an EJ_DEPTH
// flit FIFO whose pops return credits to the router. The credit counter and
// ejection FIFO sizes are this design's own. All interfaces are valid/ready
// on the IP side and valid/credit on the network side.
// Lint notes that stand: h_valid, the FIFO count, the DLC curve and the
// localizer flags are observation outputs of the sub-blocks that this level
// does not need (they are visible hierarchically for debug).
module ni
  import nocsec_pkg::*;
#(
  parameter int unsigned NX        = MESH_X,
  parameter int unsigned NY        = MESH_Y,
  parameter int unsigned CTR_BASE  = 0,
  parameter int unsigned MAX_BLK   = 4,
  parameter int unsigned INJ_DEPTH = 4,
  parameter int unsigned EJ_DEPTH  = 4,
  parameter int unsigned LOC_TIMEOUT = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  node_id_t         my_id,
  input  node_id_t         rse_id,
  input  logic [TS_W-1:0]  now,
  // IP transmit
  input  logic             ip_tx_valid,
  output logic             ip_tx_ready,
  input  node_id_t         ip_tx_dst,
  input  logic [31:0]      ip_tx_user,
  input  logic [127:0]     ip_tx_data,
  input  logic             ip_tx_last,
  // IP receive
  output logic             ip_rx_valid,
  output data_hdr_t        ip_rx_hdr,
  output logic [127:0]     ip_rx_data,
  output logic             ip_rx_last,
  input  logic             ip_rx_ready,
  // data NoC local port
  output logic             inj_valid,
  output data_flit_t       inj_flit,
  input  logic             inj_credit,
  input  logic             ej_valid,
  input  data_flit_t       ej_flit,
  output logic             ej_credit,
  // service NoC local port
  output logic             svc_inj_valid,
  output svc_flit_t        svc_inj_flit,
  input  logic             svc_inj_credit,
  input  logic             svc_ej_valid,
  input  svc_flit_t        svc_ej_flit,
  output logic             svc_ej_credit,
  // security engine client (tie off where no engine sits)
  input  logic             rse_tx_valid,
  input  svc_msg_t         rse_tx_msg,
  output logic             rse_tx_ready,
  output logic             rse_rx_valid,
  output svc_msg_t         rse_rx_msg,
  // sensors and router monitor
  input  logic [7:0]       battery,
  input  logic             congested,
  input  logic             attacked,
  output logic             attack_clear,
  output sec_cfg_t         cfg,
  // events
  output logic             pkt_sent,
  output logic             pkt_ok,
  output logic             pkt_drop,
  output logic             suspicious,
  output logic             mip_valid,
  output node_id_t         mip,
  output logic             accused
);
  localparam int unsigned ICW = $clog2(INJ_DEPTH + 1);

  // ---------------- configuration ----------------
  logic [127:0] key, h_key;
  logic [63:0]  iv_salt;
  logic         rekey, h_valid;
  logic         cfg_we, key_we, key_commit;
  sec_cfg_t     cfg_in;
  logic [2:0]   key_idx;
  logic [31:0]  key_word;

  rrg u_rrg (
    .clk, .rst_n, .cfg_we, .cfg_in, .key_we, .key_idx, .key_word, .key_commit,
    .cfg, .key, .iv_salt, .rekey
  );

  // ---------------- transmit ----------------
  logic         tx_out_valid, tx_out_ready;
  data_flit_t   tx_out_flit;
  logic [ICW-1:0] credits;

  ni_tx_sec #(.CTR_BASE(CTR_BASE)) u_tx (
    .clk, .rst_n, .tier(cfg.tier), .key, .iv_salt, .rekey, .my_id, .now,
    .h_key, .h_valid,
    .ip_valid(ip_tx_valid), .ip_ready(ip_tx_ready), .ip_dst(ip_tx_dst),
    .ip_user(ip_tx_user), .ip_data(ip_tx_data), .ip_last(ip_tx_last),
    .out_valid(tx_out_valid), .out_flit(tx_out_flit), .out_ready(tx_out_ready),
    .pkt_sent
  );

  assign tx_out_ready = credits != '0;
  assign inj_valid    = tx_out_valid && tx_out_ready;
  assign inj_flit     = tx_out_flit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= ICW'(INJ_DEPTH);
    else        credits <= credits - ICW'(inj_valid) + ICW'(inj_credit);
  end

  // ---------------- receive ----------------
  logic       ej_empty, ej_full, rx_in_ready, rx_pop;
  data_flit_t ej_head;
  logic [$clog2(EJ_DEPTH+1)-1:0] ej_count;
  logic             hdr_evt;
  node_id_t         evt_src;
  logic [HOP_W-1:0] evt_hops;
  logic [TS_W-1:0]  evt_lat;

  sync_fifo #(.W($bits(data_flit_t)), .DEPTH(EJ_DEPTH)) u_ejq (
    .clk, .rst_n, .push(ej_valid), .din(ej_flit), .pop(rx_pop),
    .dout(ej_head), .empty(ej_empty), .full(ej_full), .count(ej_count)
  );
  assign rx_pop    = !ej_empty && rx_in_ready;
  assign ej_credit = rx_pop;

  ni_rx_sec #(.CTR_BASE(CTR_BASE), .MAX_BLK(MAX_BLK)) u_rx (
    .clk, .rst_n, .tier(cfg.tier), .key, .h_key, .iv_salt, .now,
    .in_valid(!ej_empty), .in_flit(ej_head), .in_ready(rx_in_ready),
    .ip_valid(ip_rx_valid), .ip_hdr(ip_rx_hdr), .ip_data(ip_rx_data),
    .ip_last(ip_rx_last), .ip_ready(ip_rx_ready),
    .hdr_evt, .evt_src, .evt_hops, .evt_lat, .pkt_ok, .pkt_drop
  );

  // ---------------- DoS localization ----------------
  localparam int unsigned LAT_W_DLC = 16;
  logic     cand_valid, cand_clear;
  node_id_t cand;
  logic [LAT_W_DLC+3:0]   mean_q4 [2**HOP_W];
  logic [2*LAT_W_DLC+7:0] var_q8  [2**HOP_W];

  dlc_unit #(.LAT_W(LAT_W_DLC)) u_dlc (
    .clk, .rst_n, .learn(cfg.learn), .evt(hdr_evt), .evt_src, .evt_hops, .evt_lat,
    .suspicious, .cand_valid, .cand, .cand_clear, .mean_q4, .var_q8
  );

  logic                     loc_tx_valid, loc_tx_ready, loc_rx_ready, sag_rx_ready;
  svc_msg_t                 loc_tx_msg, sag_tx_msg, svc_rx_msg;
  logic                     sag_tx_valid, sag_tx_ready;
  logic [2:0]               svc_rx_valid;
  logic [NPORTS-1:0][1:0]   loc_flags;

  dos_localizer #(.NX(NX), .NY(NY), .TIMEOUT(LOC_TIMEOUT)) u_loc (
    .clk, .rst_n, .my_id,
    .enable(cfg.tier == TIER_DOS && cfg.dos_tier == DOS_DETECT_LOCALIZE),
    .attacked, .congested, .cand_valid, .cand, .cand_clear,
    .rx_valid(svc_rx_valid[1]), .rx_msg(svc_rx_msg), .rx_ready(loc_rx_ready),
    .tx_valid(loc_tx_valid), .tx_msg(loc_tx_msg), .tx_ready(loc_tx_ready),
    .mip_valid, .mip, .accused, .flags(loc_flags)
  );

  // ---------------- security agent ----------------
  sag u_sag (
    .clk, .rst_n, .my_id, .rse_id, .battery, .congested, .attacked,
    .tier(cfg.tier), .attack_clear,
    .cfg_we, .cfg_out(cfg_in), .key_we, .key_idx, .key_word, .key_commit,
    .rx_valid(svc_rx_valid[0]), .rx_msg(svc_rx_msg), .rx_ready(sag_rx_ready),
    .tx_valid(sag_tx_valid), .tx_msg(sag_tx_msg), .tx_ready(sag_tx_ready)
  );

  // ---------------- service NoC port ----------------
  logic [2:0] svc_tx_ready;

  svc_port #(.NCLI(3), .DEPTH(INJ_DEPTH)) u_svc (
    .clk, .rst_n,
    .tx_valid({rse_tx_valid, loc_tx_valid, sag_tx_valid}),
    .tx_msg({rse_tx_msg, loc_tx_msg, sag_tx_msg}),
    .tx_ready(svc_tx_ready),
    .rx_valid(svc_rx_valid), .rx_msg(svc_rx_msg),
    .inj_valid(svc_inj_valid), .inj_flit(svc_inj_flit), .inj_credit(svc_inj_credit),
    .ej_valid(svc_ej_valid), .ej_flit(svc_ej_flit), .ej_credit(svc_ej_credit)
  );
  assign sag_tx_ready = svc_tx_ready[0];
  assign loc_tx_ready = svc_tx_ready[1];
  assign rse_tx_ready = svc_tx_ready[2];
  assign rse_rx_valid = svc_rx_valid[2];
  assign rse_rx_msg   = svc_rx_msg;

  a_no_ej_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(ej_valid && ej_full && !rx_pop));
  a_svc_always_ready: assert property (@(posedge clk) disable iff (!rst_n) loc_rx_ready && sag_rx_ready);
endmodule
