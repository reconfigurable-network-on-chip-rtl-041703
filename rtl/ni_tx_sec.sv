// ni_tx_sec: transmit half of the network interface security engine.
//
// Turns a message from the local IP into a data-NoC packet and applies the
// security tier currently selected in the reconfiguration registers:
//   tier 0  header flit + plaintext blocks
//   tier 1  header flit + counter-mode ciphertext c_q = m_q ^ E_K(IV || q)
//   tier 2+ as tier 1, plus a tag flit T = GHASH_H(A, C) ^ E_K(IV || 0)
// The header flit is the associated data A: it is sent in plaintext and
// covered by the tag. The GHASH chain is X_i = (X_{i-1} ^ block) * H over the
// header, every ciphertext block and finally len(A) || len(C), as in the
// Galois/counter construction; the tag is the full 128 bits. The counter block
// for block q is IV || {q}_32 with IV = salt || source || sequence number.
//
// The IP offers one 128-bit block per beat (ip_valid/ip_ready, ip_last on the
// final block); dst and user are read on the first beat. The tier is sampled
// once per packet, so a reconfiguration never splits a packet. One AES core
// is shared by all counter blocks (12 cycles each) and the hash key H =
// E_K(0^128) is recomputed on a rekey request between packets. GHASH of block
// q runs in parallel with the AES of block q+1.
//
// out_valid/out_ready is a plain handshake; the NI turns it into credits.
// CTR_BASE = 0 numbers the counter blocks exactly as the architecture does
// (IV||0 for the tag, IV||1.. for data); CTR_BASE = 1 gives the NIST GCM
// numbering (J0 = IV||1) and is only used to check against published vectors.
module ni_tx_sec
  import nocsec_pkg::*;
#(
  parameter int unsigned CTR_BASE = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  tier_e            tier,
  input  logic [127:0]     key,
  input  logic [63:0]      iv_salt,
  input  logic             rekey,        // pulse: key changed, recompute H
  input  node_id_t         my_id,
  input  logic [TS_W-1:0]  now,
  output logic [127:0]     h_key,
  output logic             h_valid,
  // IP side
  input  logic             ip_valid,
  output logic             ip_ready,
  input  node_id_t         ip_dst,
  input  logic [31:0]      ip_user,
  input  logic [127:0]     ip_data,
  input  logic             ip_last,
  // NoC side
  output logic             out_valid,
  output data_flit_t       out_flit,
  input  logic             out_ready,
  output logic             pkt_sent
);
  typedef enum logic [3:0] {S_IDLE, S_HKEY, S_HDR, S_EK0, S_KS, S_DATA, S_LEN, S_LENW, S_TAG} st_e;
  st_e st;

  logic         aes_start, aes_ready, aes_done;
  logic [127:0] aes_pt, aes_ct;
  logic         gm_start, gm_ready, gm_done;
  logic [127:0] gm_a, gm_z;

  logic         rekey_pend;
  logic [SEQ_W-1:0] seq;
  data_hdr_t    hdr;
  tier_e        ptier;
  logic [95:0]  iv;
  logic [31:0]  q;
  logic [127:0] ek0, tag;
  logic         x_zero;
  logic [63:0]  len_c;
  logic [127:0] blk_out;

  aes128_enc u_aes (.clk, .rst_n, .start(aes_start), .key, .pt(aes_pt),
                    .ready(aes_ready), .done(aes_done), .ct(aes_ct));
  gf128_mul  u_gm  (.clk, .rst_n, .start(gm_start), .a(gm_a), .b(h_key),
                    .ready(gm_ready), .done(gm_done), .z(gm_z));

  logic enc, auth;
  assign enc  = (ptier != TIER_NOSEC);
  assign auth = (ptier == TIER_AUTH) || (ptier == TIER_DOS);

  assign blk_out = enc ? (ip_data ^ aes_ct) : ip_data;

  // Combinational control
  always_comb begin
    aes_start = 1'b0;
    aes_pt    = '0;
    gm_start  = 1'b0;
    gm_a      = '0;
    ip_ready  = 1'b0;
    out_valid = 1'b0;
    out_flit  = '0;
    unique case (st)
      S_IDLE: begin
        if (rekey_pend) begin
          aes_start = 1'b1;
          aes_pt    = '0;
        end else if (ip_valid && (tier != TIER_NOSEC)) begin
          aes_start = 1'b1;
          aes_pt    = {make_iv(iv_salt, my_id, seq),
                       32'((tier == TIER_ENC ? 1 : 0) + CTR_BASE)};
        end
      end
      S_HDR: begin
        out_valid = gm_ready || !auth;
        out_flit  = '{head: 1'b1, tail: 1'b0, data: 128'(hdr)};
        if (out_ready && auth && gm_ready) begin
          gm_start = 1'b1;
          gm_a     = hdr;
        end
      end
      S_EK0: if (aes_ready) begin
        aes_start = 1'b1;
        aes_pt    = {iv, 32'(1 + CTR_BASE)};
      end
      S_DATA: begin
        out_valid = ip_valid && (gm_ready || !auth);
        out_flit  = '{head: 1'b0, tail: ip_last && !auth, data: blk_out};
        ip_ready  = out_ready && (gm_ready || !auth);
        if (ip_valid && ip_ready) begin
          if (auth) begin
            gm_start = 1'b1;
            gm_a     = (x_zero ? '0 : gm_z) ^ blk_out;
          end
          if (enc && !ip_last) begin
            aes_start = 1'b1;
            aes_pt    = {iv, q + 32'(1 + CTR_BASE)};
          end
        end
      end
      S_LEN: if (gm_ready) begin
        gm_start = 1'b1;
        gm_a     = gm_z ^ {64'd128, len_c};
      end
      S_TAG: begin
        out_valid = 1'b1;
        out_flit  = '{head: 1'b0, tail: 1'b1, data: tag};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      rekey_pend <= 1'b0;
      h_key      <= '0;
      h_valid    <= 1'b0;
      seq        <= '0;
      hdr        <= '0;
      ptier      <= TIER_NOSEC;
      iv         <= '0;
      q          <= '0;
      ek0        <= '0;
      tag        <= '0;
      x_zero     <= 1'b1;
      len_c      <= '0;
      pkt_sent   <= 1'b0;
    end else begin
      pkt_sent <= 1'b0;
      if (rekey) rekey_pend <= 1'b1;
      unique case (st)
        S_IDLE: begin
          if (rekey_pend) begin
            rekey_pend <= rekey;
            h_valid    <= 1'b0;
            st         <= S_HKEY;
          end else if (ip_valid) begin
            hdr.user   <= ip_user;
            hdr.tstamp <= now;
            hdr.seq    <= seq;
            hdr.rsvd   <= '0;
            hdr.hops   <= hop_count(my_id, ip_dst);
            hdr.tier   <= tier;
            hdr.src    <= my_id;
            hdr.dst    <= ip_dst;
            ptier      <= tier;
            iv         <= make_iv(iv_salt, my_id, seq);
            seq        <= seq + 1'b1;
            q          <= 32'd1;
            x_zero     <= 1'b1;
            len_c      <= '0;
            st         <= S_HDR;
          end
        end
        S_HKEY: if (aes_done) begin
          h_key   <= aes_ct;
          h_valid <= 1'b1;
          st      <= S_IDLE;
        end
        S_HDR: if (out_valid && out_ready) begin
          if (auth) begin
            x_zero <= 1'b0;
            st     <= S_EK0;
          end else if (enc) st <= S_KS;
          else st <= S_DATA;
        end
        S_EK0: if (aes_ready) begin
          ek0 <= aes_ct;
          st  <= S_KS;
        end
        S_KS: if (aes_ready) st <= S_DATA;
        S_DATA: if (ip_valid && ip_ready) begin
          len_c <= len_c + 64'd128;
          q     <= q + 32'd1;
          if (ip_last) begin
            if (auth) st <= S_LEN;
            else begin
              st       <= S_IDLE;
              pkt_sent <= 1'b1;
            end
          end else if (enc) st <= S_KS;
        end
        S_LEN: if (gm_ready) st <= S_LENW;
        S_LENW: if (gm_done) begin
          tag <= gm_z ^ ek0;
          st  <= S_TAG;
        end
        S_TAG: if (out_ready) begin
          st       <= S_IDLE;
          pkt_sent <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The shared cores are only started when free.
  a_aes_free: assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> aes_ready);
  a_gm_free:  assert property (@(posedge clk) disable iff (!rst_n) gm_start |-> gm_ready);
  // The counter q never wraps inside a packet.
  a_q_range: assert property (@(posedge clk) disable iff (!rst_n) st == S_DATA |-> q != 32'd0);
endmodule
