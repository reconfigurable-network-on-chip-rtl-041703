// aes128_enc: iterative AES-128 encryption core, the block cipher E_K of the
// counter-mode security engine.
//
// One AES round is computed per clock cycle; round keys are expanded on the fly
// next to the state, so no key schedule memory is needed. A request is taken
// when start && ready. The initial AddRoundKey happens in the accepting cycle's
// register load, rounds 1..10 take the next ten cycles and the result is held
// in an output register, so done pulses exactly LATENCY = 12 cycles after the
// start cycle and ct stays valid until the next start. The 12-cycle figure is
// the encryption latency the source architecture assumes; the round-per-cycle
// organisation is this design's choice. Only encryption is needed: counter
// mode decrypts by encrypting the counter again.
module aes128_enc
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic         ready,
  output logic         done,
  output logic [127:0] ct
);
  typedef enum logic [1:0] {S_IDLE, S_ROUND, S_OUT} st_e;
  st_e          st;
  logic [3:0]   rnd;       // round being computed, 1..10
  logic [127:0] state, rkey;
  logic [7:0]   rcon;
  logic [127:0] nk;

  assign ready = (st == S_IDLE);
  assign nk    = next_key(rkey, rcon);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      rnd   <= '0;
      state <= '0;
      rkey  <= '0;
      rcon  <= 8'h01;
      done  <= 1'b0;
      ct    <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          state <= pt ^ key;
          rkey  <= key;
          rcon  <= 8'h01;
          rnd   <= 4'd1;
          st    <= S_ROUND;
        end
        S_ROUND: begin
          state <= round_fn(state, rnd == 4'd10) ^ nk;
          rkey  <= nk;
          rcon  <= xtime(rcon);
          if (rnd == 4'd10) st <= S_OUT;
          rnd   <= rnd + 4'd1;
        end
        S_OUT: begin
          ct   <= state;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
