// rrg: reconfiguration registers of one network interface.
//
// Hold the security tier and its parameters that the NI, the router's DoS
// monitor and the localizer read: tier, DoS tier (detect only / detect and
// localize), detection interval (sleep cycles), the profiling (learn) bit,
// the 128-bit AES key and the 64-bit IV salt. They are written only by the
// security agent, on orders of the security engine.
//
// Keys are written word by word into a staging copy (index 0..3 = key, most
// significant word first; 4..5 = salt) and become active together on commit,
// which also pulses `rekey` so the NI recomputes its hash key; a half-written
// key is never used. A configuration write takes effect the next cycle.
// Reset state: tier 0, detect-only, always active, learn off, key and salt 0.
// Of the architecture's tunable parameters only the tier and the tier-3
// options are variable here: the block cipher (AES), key size (128), block
// size (128), IV length (96) and hash (GHASH, 128-bit input) are fixed at
// the values of the evaluated configuration.
module rrg
  import nocsec_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  sec_cfg_t     cfg_in,
  input  logic         key_we,
  input  logic [2:0]   key_idx,
  input  logic [31:0]  key_word,
  input  logic         key_commit,
  output sec_cfg_t     cfg,
  output logic [127:0] key,
  output logic [63:0]  iv_salt,
  output logic         rekey
);
  logic [5:0][31:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '{learn: 1'b0, det_sleep: '0, dos_tier: DOS_DETECT_ONLY, tier: TIER_NOSEC};
      stage   <= '0;
      key     <= '0;
      iv_salt <= '0;
      rekey   <= 1'b0;
    end else begin
      rekey <= 1'b0;
      if (cfg_we) cfg <= cfg_in;
      if (key_we && key_idx < 3'd6) stage[3'd5 - key_idx] <= key_word;
      if (key_commit) begin
        key     <= {stage[5], stage[4], stage[3], stage[2]};
        iv_salt <= {stage[1], stage[0]};
        rekey   <= 1'b1;
      end
    end
  end
endmodule
