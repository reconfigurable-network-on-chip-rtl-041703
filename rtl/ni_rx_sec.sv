// ni_rx_sec: receive half of the network interface security engine.
//
// Takes a data-NoC packet (header flit, payload flits, and a tag flit when the
// header says the packet was sent at tier 2 or 3) and hands the plaintext to
// the local IP. Counter-mode decryption regenerates the key stream
// E_K(IV || q) from the sender's sequence number and source in the header.
// For tagged packets the GHASH chain is recomputed over the header and the
// received ciphertext; the plaintext is held in a packet buffer of MAX_BLK
// blocks and released only when the computed tag equals the received one, so
// a tampered or spoofed packet never reaches the IP. A packet is dropped when
//   - its tag does not match,
//   - it carries no tag while the local tier is 2 or 3 (packets still in
//     flight across a tier 1 -> 2 switch), or
//   - it is tagged and longer than MAX_BLK blocks.
// The sender is expected to retransmit a dropped packet; that is the IPs'
// business and not part of this block.
//
// Packets sent at tier 0/1 are streamed straight through. Every header also
// produces a one-cycle hdr_evt with source, hop count and latency (now minus
// the header time stamp) for the destination latency curve.
//
// Interfaces: in_valid/in_ready flit stream; ip_valid/ip_ready block stream
// with ip_hdr held for the whole packet and ip_last on the final block.
// MAX_BLK = 4 (a 64-byte message) is this design's choice.
// Lint note that stands: the AES core's done pulse is not used; the FSM
// waits on its ready level instead, which cannot be missed.
module ni_rx_sec
  import nocsec_pkg::*;
#(
  parameter int unsigned CTR_BASE = 0,
  parameter int unsigned MAX_BLK  = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tier_e            tier,
  input  logic [127:0]     key,
  input  logic [127:0]     h_key,
  input  logic [63:0]      iv_salt,
  input  logic [TS_W-1:0]  now,
  // NoC side
  input  logic             in_valid,
  input  data_flit_t       in_flit,
  output logic             in_ready,
  // IP side
  output logic             ip_valid,
  output data_hdr_t        ip_hdr,
  output logic [127:0]     ip_data,
  output logic             ip_last,
  input  logic             ip_ready,
  // events
  output logic             hdr_evt,
  output node_id_t         evt_src,
  output logic [HOP_W-1:0] evt_hops,
  output logic [TS_W-1:0]  evt_lat,
  output logic             pkt_ok,
  output logic             pkt_drop
);
  localparam int unsigned BI_W  = $clog2(MAX_BLK + 1);
  localparam int unsigned IDX_W = (MAX_BLK > 1) ? $clog2(MAX_BLK) : 1;

  typedef enum logic [3:0] {S_IDLE, S_EK0, S_KS, S_BODY, S_STREAM, S_LEN, S_LENW,
                            S_CHECK, S_DELIVER, S_DROP} st_e;
  st_e st;

  logic         aes_start, aes_ready, aes_done;
  logic [127:0] aes_pt, aes_ct;
  logic         gm_start, gm_ready, gm_done;
  logic [127:0] gm_a, gm_z;

  aes128_enc u_aes (.clk, .rst_n, .start(aes_start), .key, .pt(aes_pt),
                    .ready(aes_ready), .done(aes_done), .ct(aes_ct));
  gf128_mul  u_gm  (.clk, .rst_n, .start(gm_start), .a(gm_a), .b(h_key),
                    .ready(gm_ready), .done(gm_done), .z(gm_z));

  data_hdr_t    hdr, in_hdr;
  logic [95:0]  iv;
  logic [31:0]  q;
  logic [127:0] ek0, rx_tag;
  logic [63:0]  len_c;
  logic [127:0] buf_q [MAX_BLK];
  logic [BI_W-1:0] nblk, didx;
  logic         too_long;
  logic         enc, auth;

  assign in_hdr  = data_hdr_t'(in_flit.data);
  assign ip_hdr  = hdr;
  assign enc     = (hdr.tier != TIER_NOSEC);
  assign auth    = (hdr.tier == TIER_AUTH) || (hdr.tier == TIER_DOS);

  logic local_auth;
  assign local_auth = (tier == TIER_AUTH) || (tier == TIER_DOS);

  logic [127:0] plain;
  assign plain = enc ? (in_flit.data ^ aes_ct) : in_flit.data;

  always_comb begin
    aes_start = 1'b0;
    aes_pt    = '0;
    gm_start  = 1'b0;
    gm_a      = '0;
    in_ready  = 1'b0;
    ip_valid  = 1'b0;
    ip_data   = '0;
    ip_last   = 1'b0;
    unique case (st)
      S_IDLE: begin
        in_ready = gm_ready && aes_ready;
        if (in_valid && in_flit.head && in_ready) begin
          if (in_hdr.tier == TIER_AUTH || in_hdr.tier == TIER_DOS) begin
            aes_start = 1'b1;
            aes_pt    = {make_iv(iv_salt, in_hdr.src, in_hdr.seq), 32'(CTR_BASE)};
            gm_start  = 1'b1;
            gm_a      = in_flit.data;
          end else if (in_hdr.tier == TIER_ENC && !local_auth) begin
            aes_start = 1'b1;
            aes_pt    = {make_iv(iv_salt, in_hdr.src, in_hdr.seq), 32'(1 + CTR_BASE)};
          end
        end
      end
      S_EK0: if (aes_ready) begin
        aes_start = 1'b1;
        aes_pt    = {iv, 32'(1 + CTR_BASE)};
      end
      S_BODY: begin
        // tagged packet: tail is the tag, others are ciphertext blocks
        in_ready = in_flit.tail || gm_ready;
        if (in_valid && !in_flit.tail && gm_ready) begin
          gm_start = 1'b1;
          gm_a     = gm_z ^ in_flit.data;
        end
      end
      S_KS: if (aes_ready && auth) begin
        // key stream of the next block, started as soon as this one is out
        aes_start = 1'b1;
        aes_pt    = {iv, q + 32'(CTR_BASE)};
      end
      S_STREAM: begin
        ip_valid = in_valid;
        ip_data  = plain;
        ip_last  = in_flit.tail;
        in_ready = ip_ready;
        if (in_valid && ip_ready && enc && !in_flit.tail) begin
          aes_start = 1'b1;
          aes_pt    = {iv, q + 32'(1 + CTR_BASE)};
        end
      end
      S_LEN: if (gm_ready) begin
        gm_start = 1'b1;
        gm_a     = gm_z ^ {64'd128, len_c};
      end
      S_DELIVER: begin
        ip_valid = 1'b1;
        ip_data  = buf_q[IDX_W'(didx)];
        ip_last  = (didx == nblk - 1'b1);
      end
      S_DROP: in_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      hdr      <= '0;
      iv       <= '0;
      q        <= '0;
      ek0      <= '0;
      rx_tag   <= '0;
      len_c    <= '0;
      nblk     <= '0;
      didx     <= '0;
      too_long <= 1'b0;
      hdr_evt  <= 1'b0;
      evt_src  <= '0;
      evt_hops <= '0;
      evt_lat  <= '0;
      pkt_ok   <= 1'b0;
      pkt_drop <= 1'b0;
    end else begin
      hdr_evt  <= 1'b0;
      pkt_ok   <= 1'b0;
      pkt_drop <= 1'b0;
      unique case (st)
        S_IDLE: if (in_valid && in_ready) begin
          if (in_flit.head) begin
            hdr      <= in_hdr;
            iv       <= make_iv(iv_salt, in_hdr.src, in_hdr.seq);
            q        <= 32'd1;
            len_c    <= '0;
            nblk     <= '0;
            didx     <= '0;
            too_long <= 1'b0;
            hdr_evt  <= 1'b1;
            evt_src  <= in_hdr.src;
            evt_hops <= in_hdr.hops;
            evt_lat  <= now - in_hdr.tstamp;
            if (in_hdr.tier == TIER_AUTH || in_hdr.tier == TIER_DOS) st <= S_EK0;
            else if (local_auth) st <= in_flit.tail ? S_IDLE : S_DROP;
            else if (in_hdr.tier == TIER_ENC) st <= S_KS;
            else st <= S_STREAM;
            if (!(in_hdr.tier == TIER_AUTH || in_hdr.tier == TIER_DOS) && local_auth)
              pkt_drop <= in_flit.tail;
          end
        end
        S_EK0: if (aes_ready) begin
          ek0 <= aes_ct;
          st  <= S_BODY;
        end
        S_KS: if (aes_ready) st <= auth ? S_BODY : S_STREAM;
        S_BODY: if (in_valid && in_ready) begin
          if (in_flit.tail) begin
            rx_tag <= in_flit.data;
            st     <= S_LEN;
          end else begin
            len_c <= len_c + 64'd128;
            q     <= q + 32'd1;
            st    <= S_KS;      // wait for this block's key stream
            if (nblk == BI_W'(MAX_BLK)) too_long <= 1'b1;
            else nblk <= nblk + 1'b1;
          end
        end
        S_STREAM: if (in_valid && in_ready) begin
          q <= q + 32'd1;
          if (in_flit.tail) begin
            st     <= S_IDLE;
            pkt_ok <= 1'b1;
          end else if (enc) st <= S_KS;
        end
        S_LEN: if (gm_ready) st <= S_LENW;
        S_LENW: if (gm_done) st <= S_CHECK;
        S_CHECK: begin
          if (((gm_z ^ ek0) == rx_tag) && !too_long && (nblk != '0)) st <= S_DELIVER;
          else begin
            st       <= S_IDLE;
            pkt_drop <= 1'b1;
          end
        end
        S_DELIVER: if (ip_ready) begin
          didx <= didx + 1'b1;
          if (didx == nblk - 1'b1) begin
            st     <= S_IDLE;
            pkt_ok <= 1'b1;
          end
        end
        S_DROP: if (in_valid && in_flit.tail) begin
          st       <= S_IDLE;
          pkt_drop <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // Packet buffer (no reset: an entry is always written before it is read).
  // In the tagged path a ciphertext block is stored when it arrives and turned
  // into plaintext when its key stream is ready.
  always_ff @(posedge clk) begin
    if (st == S_KS && aes_ready && auth && nblk != '0 && !too_long)
      buf_q[IDX_W'(nblk - 1'b1)] <= buf_q[IDX_W'(nblk - 1'b1)] ^ aes_ct;
    if (st == S_BODY && in_valid && in_ready && !in_flit.tail && nblk != BI_W'(MAX_BLK))
      buf_q[IDX_W'(nblk)] <= in_flit.data;
  end

  a_aes_free: assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> aes_ready);
  a_gm_free:  assert property (@(posedge clk) disable iff (!rst_n) gm_start |-> gm_ready);
endmodule
