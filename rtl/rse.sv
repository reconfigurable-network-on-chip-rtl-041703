// rse: runtime security engine.
//
// The engine sits at one node of the service NoC and decides, at run time,
// which security tier the whole network runs. It
//  1. after reset and on every rekey request, sends every node the AES key
//     and IV salt as six SM_KEY_WORD messages (key words 0..3, most
//     significant first, salt words 4..5) followed by SM_KEY_COMMIT,
//  2. sends every node its configuration (SM_CFG) when the chosen one
//     changes or after a key distribution,
//  3. every HB_PERIOD cycles sends the security heartbeat SM_HB_REQ to every
//     node and gathers the SM_HB_RESP answers for HB_WAIT cycles, keeping the
//     lowest battery level and whether any node reported congestion or an
//     attack,
//  4. on an SM_ATTACK_IRQ, or an attack flag in a heartbeat answer, moves the
//     network to tier 3 with localization.
// Policy (this design's own; the source leaves it to the system designer):
//   attack seen in the last round         -> tier 3, detect and localize
//   lowest battery < BATT_LOW             -> tier 1 (encryption only)
//   a node reported congestion            -> tier 3, detection only
//   otherwise                             -> the requested configuration
//                                            (input base_cfg)
// A node is sent its messages in index order 0..NX*NY-1, one per accepted
// cycle on the service port (tx_valid/tx_ready). rx messages are always
// accepted. The attack condition is cleared at the start of each heartbeat
// round, so the network returns to the requested tier once no node reports
// an attack for a full round.
// The answers' source and destination fields are not used (the engine only
// needs the worst case over all nodes), hence the unused-bits lint notice on
// rx_msg.
module rse
  import nocsec_pkg::*;
#(
  parameter int unsigned NX        = MESH_X,
  parameter int unsigned NY        = MESH_Y,
  parameter int unsigned HB_PERIOD = 4096,
  parameter int unsigned HB_WAIT   = 256,
  parameter logic [7:0]  BATT_LOW  = 8'd32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  node_id_t     my_id,
  input  sec_cfg_t     base_cfg,
  input  logic [127:0] master_key,
  input  logic [63:0]  master_salt,
  input  logic         rekey_req,
  input  logic         rx_valid,
  input  svc_msg_t     rx_msg,
  output logic         tx_valid,
  output svc_msg_t     tx_msg,
  input  logic         tx_ready,
  output sec_cfg_t     cur_cfg,
  output logic         key_done,     // key distribution finished at least once
  output logic         cfg_sent,     // pulse: a configuration broadcast ended
  output logic         hb_round,     // pulse: a heartbeat round ended
  output logic         irq_seen      // pulse: an attack interrupt arrived
);
  localparam int unsigned N  = NX * NY;
  localparam int unsigned NW = $clog2(N) > 0 ? $clog2(N) : 1;
  localparam int unsigned TW = $clog2(HB_PERIOD + 1);

  typedef enum logic [2:0] {R_KEY, R_CFG, R_IDLE, R_HB, R_WAIT} state_e;

  state_e          state;
  logic [NW-1:0]   node;
  logic [2:0]      widx;           // 0..5 key words, 6 commit
  logic [TW-1:0]   timer;
  logic            rekey_pend, attack_now, attack_round, cong_round;
  logic [7:0]      batt_min;
  sec_cfg_t        want;
  node_id_t        dst;

  assign dst = '{y: COORD_W'(node / NX), x: COORD_W'(node % NX)};

  // Configuration the policy asks for.
  always_comb begin
    want = base_cfg;
    if (attack_now || attack_round) begin
      want.tier     = TIER_DOS;
      want.dos_tier = DOS_DETECT_LOCALIZE;
    end else if (batt_min < BATT_LOW) begin
      want.tier     = TIER_ENC;
    end else if (cong_round && base_cfg.tier != TIER_DOS) begin
      want.tier     = TIER_DOS;
      want.dos_tier = DOS_DETECT_ONLY;
    end
  end

  // Service messages.
  always_comb begin
    logic [127:0] kw;
    kw = master_key;
    tx_valid = state == R_KEY || state == R_CFG || state == R_HB;
    tx_msg   = '0;
    tx_msg.src = my_id;
    tx_msg.dst = dst;
    unique case (state)
      R_KEY: begin
        if (widx == 3'd6) tx_msg.mtype = SM_KEY_COMMIT;
        else begin
          tx_msg.mtype = SM_KEY_WORD;
          unique case (widx)
            3'd0: tx_msg.data = {13'd0, widx, kw[127:96]};
            3'd1: tx_msg.data = {13'd0, widx, kw[95:64]};
            3'd2: tx_msg.data = {13'd0, widx, kw[63:32]};
            3'd3: tx_msg.data = {13'd0, widx, kw[31:0]};
            3'd4: tx_msg.data = {13'd0, widx, master_salt[63:32]};
            default: tx_msg.data = {13'd0, widx, master_salt[31:0]};
          endcase
        end
      end
      R_CFG:   begin tx_msg.mtype = SM_CFG;    tx_msg.data = SVC_DATA_W'(cur_cfg); end
      R_HB:    tx_msg.mtype = SM_HB_REQ;
      default: tx_msg.mtype = SM_HB_REQ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_KEY;
      node         <= '0;
      widx         <= '0;
      timer        <= '0;
      rekey_pend   <= 1'b0;
      attack_now   <= 1'b0;
      attack_round <= 1'b0;
      cong_round   <= 1'b0;
      batt_min     <= 8'hff;
      cur_cfg      <= '{learn: 1'b0, det_sleep: '0, dos_tier: DOS_DETECT_ONLY, tier: TIER_NOSEC};
      key_done     <= 1'b0;
      cfg_sent     <= 1'b0;
      hb_round     <= 1'b0;
      irq_seen     <= 1'b0;
    end else begin
      cfg_sent <= 1'b0;
      hb_round <= 1'b0;
      irq_seen <= 1'b0;
      if (rekey_req) rekey_pend <= 1'b1;

      // Reports from the nodes.
      if (rx_valid && rx_msg.mtype == SM_ATTACK_IRQ) begin
        attack_now <= 1'b1;
        irq_seen   <= 1'b1;
      end
      if (rx_valid && rx_msg.mtype == SM_HB_RESP) begin
        if (rx_msg.data[9])  attack_now <= 1'b1;
        if (rx_msg.data[8])  cong_round <= 1'b1;
        if (rx_msg.data[7:0] < batt_min) batt_min <= rx_msg.data[7:0];
      end

      unique case (state)
        R_KEY: if (tx_ready) begin
          if (widx == 3'd6) begin
            widx <= '0;
            if (node == NW'(N - 1)) begin
              node       <= '0;
              key_done   <= 1'b1;
              rekey_pend <= rekey_req;
              cur_cfg    <= want;
              state      <= R_CFG;
            end else node <= node + 1'b1;
          end else widx <= widx + 1'b1;
        end
        R_CFG: if (tx_ready) begin
          if (node == NW'(N - 1)) begin
            node     <= '0;
            cfg_sent <= 1'b1;
            timer    <= '0;
            state    <= R_IDLE;
          end else node <= node + 1'b1;
        end
        R_IDLE: begin
          timer <= timer + 1'b1;
          if (rekey_pend) begin
            state <= R_KEY;
          end else if (want != cur_cfg) begin
            cur_cfg <= want;
            state   <= R_CFG;
          end else if (timer >= TW'(HB_PERIOD - 1)) begin
            timer        <= '0;
            attack_round <= attack_now;
            attack_now   <= 1'b0;
            cong_round   <= 1'b0;
            batt_min     <= 8'hff;
            state        <= R_HB;
          end
        end
        R_HB: if (tx_ready) begin
          if (node == NW'(N - 1)) begin
            node  <= '0;
            timer <= '0;
            state <= R_WAIT;
          end else node <= node + 1'b1;
        end
        default: begin  // R_WAIT: gather heartbeat answers
          timer <= timer + 1'b1;
          if (timer >= TW'(HB_WAIT - 1)) begin
            timer        <= '0;
            hb_round     <= 1'b1;
            attack_round <= attack_now;
            state        <= R_IDLE;
          end
        end
      endcase
    end
  end

  a_widx: assert property (@(posedge clk) disable iff (!rst_n) widx <= 3'd6);
endmodule
