// dos_localizer: per-router event handlers that localize the IP launching a
// DoS attack, exchanging messages over the service NoC.
//
// Events handled (the numbered handlers of the localization algorithm):
//  * attack flagged by this router's PAC monitor and a candidate from the
//    local DLC: send QUERY to the router of the candidate S; on a QREPLY that
//    says S is congested, send a diagnostic message <S, D> (D = this node) to
//    every router on the XY path from S to D. The candidate is consumed.
//  * QUERY received: reply with this router's congestion status.
//  * DIAG <S, D> received: it arrives through the port p that XY routing from
//    D would use to enter this router (computed from D's coordinates). If all
//    flags are 0 the TIMEOUT timer starts. S == this node and flag[p] == 0
//    sets flag[p] = 1 (local IP suspected); S != this node sets flag[p] = 2
//    (this node only lies on a congested path).
//  * TIMEOUT: if any flag is 1 the local IP is the attacker: a MIP message
//    naming this node is sent to every node of the NX x NY mesh. The flags
//    are then reset.
//  * MIP received: mip_valid/mip report the malicious IP to the node.
// enable (tier 3 with localization selected) gates the attack handler; the
// other handlers always run so that neighbours' diagnosis works.
//
// Messages are single service flits (svc_msg_t). Replies have priority over
// the path and broadcast walks on the one transmit port. Timeout length and
// the reset of the flags after every timeout are this design's choices.
// Lint note that stands: the destination field of a received message is not
// read (it is always this node).
module dos_localizer
  import nocsec_pkg::*;
#(
  parameter int unsigned NX      = MESH_X,
  parameter int unsigned NY      = MESH_Y,
  parameter int unsigned TIMEOUT = 512
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_id_t  my_id,
  input  logic      enable,
  input  logic      attacked,
  input  logic      congested,
  input  logic      cand_valid,
  input  node_id_t  cand,
  output logic      cand_clear,
  // service port
  input  logic      rx_valid,
  input  svc_msg_t  rx_msg,
  output logic      rx_ready,
  output logic      tx_valid,
  output svc_msg_t  tx_msg,
  input  logic      tx_ready,
  // results
  output logic      mip_valid,
  output node_id_t  mip,
  output logic      accused,        // pulse: this node broadcast itself
  output logic [NPORTS-1:0][1:0] flags
);
  typedef enum logic [2:0] {L_IDLE, L_QUERY, L_WAIT, L_DIAG, L_BCAST} lst_e;
  lst_e st;

  node_id_t  s_id, walk, rep_to;
  logic      rep_pend, rep_cong;
  logic      handled;               // candidate of the current attack used
  logic [$clog2(TIMEOUT+1)-1:0] tmr;
  logic      tmr_on;
  logic      bcast_req;
  logic [2*COORD_W-1:0] bidx;
  logic [15:0] wait_cnt;

  assign rx_ready = 1'b1;

  // transmit selection
  always_comb begin
    tx_valid = 1'b0;
    tx_msg   = '0;
    tx_msg.src = my_id;
    if (rep_pend) begin
      tx_valid     = 1'b1;
      tx_msg.dst   = rep_to;
      tx_msg.mtype = SM_QREPLY;
      tx_msg.data  = SVC_DATA_W'(rep_cong);
    end else begin
      unique case (st)
        L_QUERY: begin
          tx_valid     = 1'b1;
          tx_msg.dst   = s_id;
          tx_msg.mtype = SM_QUERY;
        end
        L_DIAG: begin
          tx_valid     = 1'b1;
          tx_msg.dst   = walk;
          tx_msg.mtype = SM_DIAG;
          tx_msg.data  = SVC_DATA_W'({s_id, my_id});
        end
        L_BCAST: begin
          tx_valid     = 1'b1;
          tx_msg.dst   = node_id_t'(bidx);
          tx_msg.mtype = SM_MIP;
          tx_msg.data  = SVC_DATA_W'(my_id);
        end
        default: ;
      endcase
    end
  end

  logic rx_diag, rx_query, rx_reply, rx_mip;
  assign rx_diag  = rx_valid && rx_msg.mtype == SM_DIAG;
  assign rx_query = rx_valid && rx_msg.mtype == SM_QUERY;
  assign rx_reply = rx_valid && rx_msg.mtype == SM_QREPLY;
  assign rx_mip   = rx_valid && rx_msg.mtype == SM_MIP;

  node_id_t diag_s;
  port_e    diag_p;
  assign diag_s = node_id_t'(rx_msg.data[4*COORD_W-1:2*COORD_W]);
  assign diag_p = xy_arrival_port(my_id, rx_msg.src);

  logic any_one, all_zero;
  always_comb begin
    any_one  = 1'b0;
    all_zero = 1'b1;
    for (int p = 0; p < NPORTS; p++) begin
      if (flags[p] == 2'd1) any_one = 1'b1;
      if (flags[p] != 2'd0) all_zero = 1'b0;
    end
  end

  logic tx_fire;
  assign tx_fire = tx_valid && tx_ready;

  // next broadcast index, skipping ids outside the NX x NY mesh
  function automatic logic [2*COORD_W-1:0] bnext(logic [2*COORD_W-1:0] b);
    node_id_t n;
    n = node_id_t'(b);
    if (32'(n.x) + 1 < NX) n.x = n.x + 1'b1;
    else begin
      n.x = '0;
      n.y = n.y + 1'b1;
    end
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= L_IDLE;
      s_id       <= '0;
      walk       <= '0;
      rep_to     <= '0;
      rep_pend   <= 1'b0;
      rep_cong   <= 1'b0;
      handled    <= 1'b0;
      tmr        <= '0;
      tmr_on     <= 1'b0;
      bcast_req  <= 1'b0;
      bidx       <= '0;
      wait_cnt   <= '0;
      flags      <= '0;
      mip_valid  <= 1'b0;
      mip        <= '0;
      accused    <= 1'b0;
      cand_clear <= 1'b0;
    end else begin
      cand_clear <= 1'b0;
      accused    <= 1'b0;
      if (!attacked) handled <= 1'b0;

      // QUERY handler
      if (rx_query) begin
        rep_pend <= 1'b1;
        rep_to   <= rx_msg.src;
        rep_cong <= congested;
      end else if (rep_pend && tx_ready) rep_pend <= 1'b0;

      // MIP handler
      if (rx_mip) begin
        mip_valid <= 1'b1;
        mip       <= node_id_t'(rx_msg.data[2*COORD_W-1:0]);
      end

      // DIAG handler and TIMEOUT
      if (rx_diag) begin
        if (all_zero && !tmr_on) begin
          tmr_on <= 1'b1;
          tmr    <= '0;
        end
        if (diag_s == my_id) begin
          if (flags[diag_p] == 2'd0) flags[diag_p] <= 2'd1;
        end else flags[diag_p] <= 2'd2;
      end else if (tmr_on) begin
        if (tmr == ($clog2(TIMEOUT+1))'(TIMEOUT - 1)) begin
          tmr_on <= 1'b0;
          flags  <= '0;                 // RESET
          if (any_one) bcast_req <= 1'b1;
        end else tmr <= tmr + 1'b1;
      end

      // attack handler and message walks
      unique case (st)
        L_IDLE: begin
          if (bcast_req) begin
            bcast_req <= 1'b0;
            bidx      <= '0;
            accused   <= 1'b1;
            st        <= L_BCAST;
          end else if (enable && attacked && !handled && cand_valid) begin
            handled    <= 1'b1;
            s_id       <= cand;
            cand_clear <= 1'b1;
            if (cand != my_id) st <= L_QUERY;
          end
        end
        L_QUERY: if (tx_fire && !rep_pend) begin
          wait_cnt <= '0;
          st       <= L_WAIT;
        end
        L_WAIT: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (rx_reply && rx_msg.src == s_id) begin
            if (rx_msg.data[0]) begin
              walk <= s_id;
              st   <= L_DIAG;
            end else st <= L_IDLE;
          end else if (wait_cnt == 16'hffff) st <= L_IDLE;
        end
        L_DIAG: if (tx_fire && !rep_pend) begin
          if (xy_next(walk, my_id) == my_id) st <= L_IDLE;
          else walk <= xy_next(walk, my_id);
        end
        L_BCAST: if (tx_fire && !rep_pend) begin
          if (node_id_t'(bidx) == node_id_t'{y: COORD_W'(NY - 1), x: COORD_W'(NX - 1)}) st <= L_IDLE;
          else bidx <= bnext(bidx);
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
