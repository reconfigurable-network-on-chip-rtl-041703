// svc_port: a node's attachment to the service NoC.
//
// Up to NCLI clients of one node (0 = security agent, 1 = DoS localizer,
// 2 = security engine where one sits) share the node's local port of the
// service mesh. Every service message is a single flit (head = tail = 1).
//  * Injection: round-robin among clients with a message, one flit per cycle
//    while the router input buffer has room. Room is tracked with a credit
//    counter that starts at DEPTH (the router's input buffer depth), is
//    decremented per flit sent and incremented per credit returned.
//  * Ejection: every client accepts a message in the cycle it is offered
//    (rx_ready of all clients is 1 by construction), so an ejected flit is
//    steered to its client by message type and its credit is returned in the
//    same cycle. No ejection buffer is needed.
// The grant is combinational from the valid inputs (client tx_ready in the
// same cycle). This is this design's own arrangement; the source only states
// that a separate physical network carries the security messages.
// Lint notes that stand: the head/tail bits of an ejected flit are always 1
// and are not read; the round-robin index variable is wider than needed.
module svc_port
  import nocsec_pkg::*;
#(
  parameter int unsigned NCLI  = 3,
  parameter int unsigned DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // clients
  input  logic      [NCLI-1:0]      tx_valid,
  input  svc_msg_t  [NCLI-1:0]      tx_msg,
  output logic      [NCLI-1:0]      tx_ready,
  output logic      [NCLI-1:0]      rx_valid,
  output svc_msg_t                  rx_msg,
  // service mesh local port
  output logic                      inj_valid,
  output svc_flit_t                 inj_flit,
  input  logic                      inj_credit,
  input  logic                      ej_valid,
  input  svc_flit_t                 ej_flit,
  output logic                      ej_credit
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = (NCLI > 1) ? $clog2(NCLI) : 1;

  logic [CW-1:0] credits;
  logic [IW-1:0] last, sel;
  logic          found;

  // Destination client of an ejected message.
  function automatic int unsigned client_of(svc_type_e t);
    case (t)
      SM_HB_REQ, SM_CFG, SM_KEY_WORD, SM_KEY_COMMIT: return 0;
      SM_QUERY, SM_QREPLY, SM_DIAG, SM_MIP:          return 1;
      default:                                       return 2;  // HB_RESP, ATTACK_IRQ
    endcase
  endfunction

  always_comb begin
    rx_msg   = ej_flit.msg;
    rx_valid = '0;
    for (int unsigned c = 0; c < NCLI; c++)
      rx_valid[c] = ej_valid && client_of(ej_flit.msg.mtype) == c;
  end
  assign ej_credit = ej_valid;

  // Round robin: first valid client after the one granted last.
  always_comb begin
    int unsigned k;
    found = 1'b0;
    sel   = '0;
    for (int unsigned i = 1; i <= NCLI; i++) begin
      k = (int'(last) + i) % NCLI;
      if (!found && tx_valid[k]) begin
        found = 1'b1;
        sel   = IW'(k);
      end
    end
  end

  always_comb begin
    tx_ready  = '0;
    inj_valid = found && credits != '0;
    if (inj_valid) tx_ready[sel] = 1'b1;
    inj_flit  = '{head: 1'b1, tail: 1'b1, msg: tx_msg[sel]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credits <= CW'(DEPTH);
      last    <= IW'(NCLI - 1);
    end else begin
      credits <= credits - CW'(inj_valid) + CW'(inj_credit);
      if (inj_valid) last <= sel;
    end
  end

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n) credits <= CW'(DEPTH));
endmodule
