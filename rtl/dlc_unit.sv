// dlc_unit: destination latency curve (DLC) kept next to each IP for DoS
// attack localization.
//
// For every packet that reaches this node the receive engine reports the
// source, the hop count and the network latency. The unit keeps, per hop
// count k, the mean mu_k and variance sigma_k^2 of the latency of packets that
// travelled k hops, updated after every packet while `learn` is set. With
// learn clear the curve is frozen and a packet is suspicious when its latency
// is above mu_k + 1.96 sigma_k (the 97.5 % point of a normal distribution);
// the source of the latest suspicious packet is kept as the candidate
// malicious IP and handed to the localization logic.
//
// Hardware form (this design's choice): mean and variance are exponential
// moving averages with weight 2^-EMA_SHIFT (no division), mean in Q4 and
// variance in Q8 fixed point. The threshold test is done squared, so no
// square root is needed:  d = x - mu > 0  and  256 d^2 > 983 max(var, VAR_MIN)
// (983/256 = 3.84 ~ 1.96^2). The first sample of a hop count sets its mean.
// VAR_MIN keeps a perfectly regular curve from flagging a one-cycle jitter.
module dlc_unit
  import nocsec_pkg::*;
#(
  parameter int unsigned LAT_W     = 16,
  parameter int unsigned EMA_SHIFT = 3,
  parameter int unsigned VAR_MIN   = 4 * 256   // 4 cycles^2 in Q8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             learn,
  input  logic             evt,
  input  node_id_t         evt_src,
  input  logic [HOP_W-1:0] evt_hops,
  input  logic [TS_W-1:0]  evt_lat,
  output logic             suspicious,     // pulse: last packet was late
  output logic             cand_valid,
  output node_id_t         cand,
  input  logic             cand_clear,
  output logic [LAT_W+3:0] mean_q4 [2**HOP_W],
  output logic [2*LAT_W+7:0] var_q8 [2**HOP_W]
);
  localparam int unsigned NH = 2**HOP_W;
  localparam int unsigned MW = LAT_W + 4;        // mean width, Q4
  localparam int unsigned VW = 2 * LAT_W + 8;    // variance width, Q8

  logic [NH-1:0] seen;
  logic [LAT_W-1:0] x;
  logic signed [MW:0]   d;          // x - mean, Q4, signed
  logic signed [2*MW+1:0] dw;
  logic [2*MW+1:0]      d2;         // d^2, Q8
  logic [VW-1:0]        v_eff;
  logic                 late;

  assign x     = (evt_lat > TS_W'({LAT_W{1'b1}})) ? {LAT_W{1'b1}} : evt_lat[LAT_W-1:0];
  assign d     = $signed({1'b0, x, 4'b0}) - $signed({1'b0, mean_q4[evt_hops]});
  assign dw    = (2*MW+2)'(d);
  assign d2    = $unsigned(dw * dw);
  assign v_eff = (var_q8[evt_hops] < VW'(VAR_MIN)) ? VW'(VAR_MIN) : var_q8[evt_hops];
  assign late  = seen[evt_hops] && (d > 0) &&
                 ((64'(d2) << 8) > 64'(v_eff) * 64'd983);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen       <= '0;
      suspicious <= 1'b0;
      cand_valid <= 1'b0;
      cand       <= '0;
      for (int k = 0; k < NH; k++) begin
        mean_q4[k] <= '0;
        var_q8[k]  <= '0;
      end
    end else begin
      suspicious <= 1'b0;
      if (cand_clear) cand_valid <= 1'b0;
      if (evt) begin
        if (learn) begin
          seen[evt_hops] <= 1'b1;
          if (!seen[evt_hops]) begin
            mean_q4[evt_hops] <= {x, 4'b0};
            var_q8[evt_hops]  <= '0;
          end else begin
            mean_q4[evt_hops] <= MW'($signed({1'b0, mean_q4[evt_hops]}) + (d >>> EMA_SHIFT));
            if (VW'(d2) >= var_q8[evt_hops])
              var_q8[evt_hops] <= var_q8[evt_hops] + ((VW'(d2) - var_q8[evt_hops]) >> EMA_SHIFT);
            else
              var_q8[evt_hops] <= var_q8[evt_hops] - ((var_q8[evt_hops] - VW'(d2)) >> EMA_SHIFT);
          end
        end else if (late) begin
          suspicious <= 1'b1;
          cand_valid <= 1'b1;
          cand       <= evt_src;
        end
      end
    end
  end
endmodule
