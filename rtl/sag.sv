// sag: security agent of one network interface.
//
// The agent is the NI's end of the service NoC. It
//  * answers the engine's security heartbeat (SM_HB_REQ) with an SM_HB_RESP
//    carrying the battery level and the congestion flag read from the
//    sensors and the DoS monitor's attack flag,
//  * raises an SM_ATTACK_IRQ to the engine (rse_id) once when the router's
//    DoS monitor flags an attack while tier 3 is active,
//  * writes the reconfiguration registers from SM_CFG, SM_KEY_WORD and
//    SM_KEY_COMMIT messages. A configuration write also clears the DoS
//    monitor's attack flag (the engine has reacted to it).
// One response and one interrupt can be pending; the interrupt goes first.
// The message set and payload layout are this design's choice.
// The register write port is decoded straight from the received message, so
// most of its outputs are wires from rx_msg; that is intended.
// Lint notes that stand: the destination field of a received message is not
// read (the service port only delivers messages addressed to this node).
module sag
  import nocsec_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  node_id_t     my_id,
  input  node_id_t     rse_id,
  // sensors and monitors
  input  logic [7:0]   battery,
  input  logic         congested,
  input  logic         attacked,
  input  tier_e        tier,
  output logic         attack_clear,
  // RRG write port
  output logic         cfg_we,
  output sec_cfg_t     cfg_out,
  output logic         key_we,
  output logic [2:0]   key_idx,
  output logic [31:0]  key_word,
  output logic         key_commit,
  // service port
  input  logic         rx_valid,
  input  svc_msg_t     rx_msg,
  output logic         rx_ready,
  output logic         tx_valid,
  output svc_msg_t     tx_msg,
  input  logic         tx_ready
);
  logic      resp_pend, irq_pend, irq_sent;
  node_id_t  resp_to;
  hb_info_t  info;

  assign info     = '{attacked: attacked, congested: congested, battery: battery};
  assign rx_ready = 1'b1;

  assign cfg_we     = rx_valid && rx_msg.mtype == SM_CFG;
  assign cfg_out    = sec_cfg_t'(rx_msg.data[$bits(sec_cfg_t)-1:0]);
  assign key_we     = rx_valid && rx_msg.mtype == SM_KEY_WORD;
  assign key_idx    = rx_msg.data[34:32];
  assign key_word   = rx_msg.data[31:0];
  assign key_commit = rx_valid && rx_msg.mtype == SM_KEY_COMMIT;
  assign attack_clear = cfg_we;

  always_comb begin
    tx_valid = irq_pend || resp_pend;
    tx_msg   = '0;
    tx_msg.src  = my_id;
    tx_msg.data = SVC_DATA_W'(info);
    if (irq_pend) begin
      tx_msg.dst   = rse_id;
      tx_msg.mtype = SM_ATTACK_IRQ;
    end else begin
      tx_msg.dst   = resp_to;
      tx_msg.mtype = SM_HB_RESP;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_pend <= 1'b0;
      resp_to   <= '0;
      irq_pend  <= 1'b0;
      irq_sent  <= 1'b0;
    end else begin
      if (rx_valid && rx_msg.mtype == SM_HB_REQ) begin
        resp_pend <= 1'b1;
        resp_to   <= rx_msg.src;
      end else if (tx_ready && !irq_pend) resp_pend <= 1'b0;

      if (!attacked) irq_sent <= 1'b0;
      else if (tier == TIER_DOS && !irq_sent) begin
        irq_pend <= 1'b1;
        irq_sent <= 1'b1;
      end
      if (irq_pend && tx_ready) irq_pend <= 1'b0;
    end
  end
endmodule
