// nocsec_pkg: types and constants shared by the reconfigurable NoC security design.
//
// The design is a mesh network-on-chip whose network interfaces (NIs) can run
// one of four security tiers, chosen at run time: no security, tier 1
// (counter-mode AES encryption), tier 2 (encryption plus a Galois-hash
// authentication tag) and tier 3 (tier 2 plus DoS attack detection at every
// router and localization of the attacking IP). Two physical networks exist:
// the data NoC carries IP traffic, the service NoC carries heartbeat,
// configuration, key and localization messages.
//
// The tier numbering, the AES-128 / 128-bit block / 96-bit IV / 128-bit GHASH
// choices and the 8x8 mesh follow the source architecture; the field layouts of
// the header flit and the service message are this design's own.
// Lint note that stands: make_iv uses 58 of the 64 salt bits (58 + 6-bit
// source + 32-bit sequence = 96-bit IV); the salt register stays a round 64.
package nocsec_pkg;

  // Mesh coordinates: 3 bits each, so up to 8x8 nodes.
  localparam int unsigned COORD_W = 3;
  localparam int unsigned MESH_X  = 8;
  localparam int unsigned MESH_Y  = 8;

  typedef struct packed {
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] x;
  } node_id_t;

  // Router port numbering.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards y-1
    P_EAST  = 3'd2,   // towards x+1
    P_SOUTH = 3'd3,   // towards y+1
    P_WEST  = 3'd4    // towards x-1
  } port_e;
  localparam int unsigned NPORTS = 5;

  // Security tiers held in the reconfiguration registers.
  typedef enum logic [1:0] {
    TIER_NOSEC = 2'd0,
    TIER_ENC   = 2'd1,
    TIER_AUTH  = 2'd2,
    TIER_DOS   = 2'd3
  } tier_e;

  // DoS tier parameter (Algorithm 3).
  typedef enum logic {
    DOS_DETECT_ONLY    = 1'b0,
    DOS_DETECT_LOCALIZE = 1'b1
  } dos_tier_e;

  // ---------------------------------------------------------------------------
  // Data NoC
  // ---------------------------------------------------------------------------
  localparam int unsigned BLK_W  = 128;          // cipher block = flit payload
  localparam int unsigned DATA_FW = BLK_W + 2;   // + head, tail bits
  localparam int unsigned HOP_W  = 4;            // up to 14 hops in 8x8
  localparam int unsigned TS_W   = 32;
  localparam int unsigned SEQ_W  = 32;

  // Header flit payload. It travels in plaintext and is the associated data
  // A (one full block) of the authentication. dst must stay in the low bits:
  // routers read the destination from there.
  typedef struct packed {
    logic [31:0]        user;      // IP-defined header bits (address, opcode ...)
    logic [TS_W-1:0]    tstamp;    // injection time, for DLC latency
    logic [SEQ_W-1:0]   seq;       // per-source packet number, part of the nonce
    logic [13:0]        rsvd;
    logic [HOP_W-1:0]   hops;      // XY hop count source -> destination
    tier_e              tier;      // tier at injection; tag present if >= TIER_AUTH
    node_id_t           src;
    node_id_t           dst;
  } data_hdr_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [BLK_W-1:0]  data;
  } data_flit_t;

  // ---------------------------------------------------------------------------
  // Service NoC: every message is one flit.
  // ---------------------------------------------------------------------------
  typedef enum logic [3:0] {
    SM_HB_REQ     = 4'd1,  // RSE -> SAG   security heartbeat
    SM_HB_RESP    = 4'd2,  // SAG -> RSE   battery, congestion, attack flag
    SM_ATTACK_IRQ = 4'd3,  // SAG -> RSE   potential attack interrupt
    SM_CFG        = 4'd4,  // RSE -> SAG   tier and parameters
    SM_KEY_WORD   = 4'd5,  // RSE -> SAG   one 32-bit word of key / IV salt
    SM_KEY_COMMIT = 4'd6,  // RSE -> SAG   new key complete
    SM_QUERY      = 4'd7,  // localizer -> localizer: congestion status?
    SM_QREPLY     = 4'd8,  // reply, data[0] = congested
    SM_DIAG       = 4'd9,  // diagnostic message <S,D>, data holds S
    SM_MIP        = 4'd10  // broadcast: data holds the malicious IP
  } svc_type_e;

  localparam int unsigned SVC_DATA_W = 48;

  typedef struct packed {
    logic [SVC_DATA_W-1:0] data;
    svc_type_e             mtype;
    node_id_t              src;
    node_id_t              dst;
  } svc_msg_t;

  localparam int unsigned SVC_MSG_W = $bits(svc_msg_t);
  localparam int unsigned SVC_FW    = SVC_MSG_W + 2;

  typedef struct packed {
    logic      head;
    logic      tail;
    svc_msg_t  msg;
  } svc_flit_t;

  // Configuration payload of SM_CFG (low bits of data).
  typedef struct packed {
    logic        learn;       // profiling: build PAC bounds and DLCs
    logic [15:0] det_sleep;   // detectionInterval: sleep cycles between active periods
    dos_tier_e   dos_tier;
    tier_e       tier;
  } sec_cfg_t;

  // Heartbeat response payload.
  typedef struct packed {
    logic       attacked;
    logic       congested;
    logic [7:0] battery;
  } hb_info_t;

  // Per-packet nonce: IV = salt || source || sequence number (96 bits). The
  // sequence number and the source make the counter blocks IV || q unique per
  // packet and per block under one key.
  function automatic logic [95:0] make_iv(logic [63:0] salt, node_id_t src, logic [SEQ_W-1:0] seq);
    return {salt[57:0], src, seq};
  endfunction

  // Port through which a message sent from src by XY routing enters the
  // router of cur (P_LOCAL when src == cur).
  function automatic port_e xy_arrival_port(node_id_t cur, node_id_t src);
    if (src.y != cur.y)      return (src.y < cur.y) ? P_NORTH : P_SOUTH;
    else if (src.x != cur.x) return (src.x < cur.x) ? P_WEST : P_EAST;
    else                     return P_LOCAL;
  endfunction

  // Next node on the XY path from cur towards dst.
  function automatic node_id_t xy_next(node_id_t cur, node_id_t dst);
    node_id_t n;
    n = cur;
    unique case (xy_route(cur, dst))
      P_EAST:  n.x = cur.x + 1'b1;
      P_WEST:  n.x = cur.x - 1'b1;
      P_SOUTH: n.y = cur.y + 1'b1;
      P_NORTH: n.y = cur.y - 1'b1;
      default: ;
    endcase
    return n;
  endfunction

  // XY-routing output port for a flit at (cur) going to (dst).
  function automatic port_e xy_route(node_id_t cur, node_id_t dst);
    if (dst.x > cur.x)      return P_EAST;
    else if (dst.x < cur.x) return P_WEST;
    else if (dst.y > cur.y) return P_SOUTH;
    else if (dst.y < cur.y) return P_NORTH;
    else                    return P_LOCAL;
  endfunction

  function automatic logic [HOP_W-1:0] hop_count(node_id_t a, node_id_t b);
    logic [COORD_W:0] dx, dy;
    dx = (a.x > b.x) ? {1'b0, a.x - b.x} : {1'b0, b.x - a.x};
    dy = (a.y > b.y) ? {1'b0, a.y - b.y} : {1'b0, b.y - a.y};
    return HOP_W'(dx + dy);
  endfunction

  // GF(2^128) product in the bit order of GCM (bit 127 of the vector is the
  // coefficient of x^0), reduction polynomial x^128 + x^7 + x^2 + x + 1.
  function automatic logic [127:0] gf128_mul_full(logic [127:0] a, logic [127:0] b);
    logic [127:0] z, v;
    z = '0;
    v = b;
    for (int i = 127; i >= 0; i--) begin
      if (a[i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'd0}) : (v >> 1);
    end
    return z;
  endfunction

endpackage
