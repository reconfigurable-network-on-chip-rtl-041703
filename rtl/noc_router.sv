// noc_router: five-port wormhole mesh router with XY routing, credit-based
// flow control and a three-stage pipeline plus a one-cycle link.
//
// The same router serves the data NoC (FW = 130: head, tail, 128-bit payload)
// and the service NoC (single-flit messages). A flit is {head, tail, payload};
// the destination node id sits in the low 6 payload bits of a head flit.
//
// Pipeline of one hop (zero load, 4 cycles):
//   1. buffer write / route computation: the flit sits in its input FIFO and
//      the XY output port of a head flit is computed from the FIFO front,
//   2. switch allocation: per output a round-robin arbiter picks one of the
//      requesting inputs; an output stays locked to one input from a head flit
//      until the tail flit (wormhole); a flit is only granted when the
//      downstream buffer has a credit; the winner leaves its FIFO into the
//      switch register,
//   3. switch traversal into the output register,
//   then link traversal: one more register drives the link into the
//   downstream input FIFO.
// Credits: each output starts with DEPTH credits (the downstream FIFO depth),
// spends one per granted flit and gets one back on out_credit when the
// downstream FIFO pops. in_credit reports this router's own FIFO pops
// upstream. No virtual channels are used.
//
// Monitoring outputs for DoS detection: arrivals = number of head flits
// (packets) entering the input buffers this cycle, occupancy = flits held in
// all input buffers.
//
// The three router stages and the one-cycle link follow the source
// architecture; FIFO depth, wormhole switching, round-robin arbitration and
// credits are this design's choices.
module noc_router
  import nocsec_pkg::*;
#(
  parameter int unsigned FW    = DATA_FW,
  parameter int unsigned DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  node_id_t              my_id,
  input  logic [NPORTS-1:0]         in_valid,
  input  logic [NPORTS-1:0][FW-1:0] in_flit,
  output logic [NPORTS-1:0]         in_credit,
  output logic [NPORTS-1:0]         out_valid,
  output logic [NPORTS-1:0][FW-1:0] out_flit,
  input  logic [NPORTS-1:0]         out_credit,
  output logic [2:0]                arrivals,
  output logic [7:0]                occupancy
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned PW = 3;

  // ---------------- input buffers ----------------
  logic [NPORTS-1:0][FW-1:0] front;
  logic [NPORTS-1:0]         empty, pop;
  logic [NPORTS-1:0][CW-1:0] cnt;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic unused_full;
    sync_fifo #(.W(FW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .push(in_valid[i]), .din(in_flit[i]), .pop(pop[i]),
      .dout(front[i]), .empty(empty[i]), .full(unused_full), .count(cnt[i]));
  end
  assign in_credit = pop;

  always_comb begin
    arrivals  = '0;
    occupancy = '0;
    for (int i = 0; i < NPORTS; i++) begin
      if (in_valid[i] && in_flit[i][FW-1]) arrivals = arrivals + 3'd1;
      occupancy = occupancy + 8'(cnt[i]);
    end
  end

  // ---------------- route computation ----------------
  logic [NPORTS-1:0][PW-1:0] route_q;      // output of the packet in progress
  logic [NPORTS-1:0][PW-1:0] req_port;
  for (genvar i = 0; i < NPORTS; i++) begin : g_rc
    node_id_t dst;
    assign dst = node_id_t'(front[i][2*COORD_W-1:0]);
    assign req_port[i] = front[i][FW-1] ? PW'(xy_route(my_id, dst)) : route_q[i];
  end

  // ---------------- switch allocation ----------------
  logic [NPORTS-1:0][CW-1:0] credits;
  logic [NPORTS-1:0]         locked;
  logic [NPORTS-1:0][PW-1:0] owner, rr;
  logic [NPORTS-1:0]         gnt_v;         // per output: a flit granted
  logic [NPORTS-1:0][PW-1:0] gnt_in;        // per output: winning input

  always_comb begin
    int unsigned i;
    i      = 0;
    pop    = '0;
    gnt_v  = '0;
    gnt_in = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (credits[o] != '0) begin
        if (locked[o]) begin
          if (!empty[owner[o]] && req_port[owner[o]] == PW'(o)) begin
            gnt_v[o]  = 1'b1;
            gnt_in[o] = owner[o];
          end
        end else begin
          for (int k = 1; k <= NPORTS; k++) begin
            i = (int'(rr[o]) + k) % NPORTS;
            if (!gnt_v[o] && !empty[i] && front[i][FW-1] && req_port[i] == PW'(o)) begin
              gnt_v[o]  = 1'b1;
              gnt_in[o] = PW'(i);
            end
          end
        end
      end
      if (gnt_v[o]) pop[gnt_in[o]] = 1'b1;
    end
  end

  // ---------------- switch / output / link registers ----------------
  logic [NPORTS-1:0]         sw_v, st_v;
  logic [NPORTS-1:0][FW-1:0] sw_f, st_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      route_q   <= '0;
      credits   <= {NPORTS{CW'(DEPTH)}};
      locked    <= '0;
      owner     <= '0;
      rr        <= '0;
      sw_v      <= '0;
      sw_f      <= '0;
      st_v      <= '0;
      st_f      <= '0;
      out_valid <= '0;
      out_flit  <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        credits[o] <= credits[o] - CW'(gnt_v[o]) + CW'(out_credit[o]);
        sw_v[o] <= gnt_v[o];
        if (gnt_v[o]) begin
          sw_f[o] <= front[gnt_in[o]];
          rr[o]   <= gnt_in[o];
          if (front[gnt_in[o]][FW-1]) route_q[gnt_in[o]] <= PW'(o);
          if (front[gnt_in[o]][FW-2]) locked[o] <= 1'b0;
          else begin
            locked[o] <= 1'b1;
            owner[o]  <= gnt_in[o];
          end
        end
      end
      st_v      <= sw_v;
      st_f      <= sw_f;
      out_valid <= st_v;
      out_flit  <= st_f;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                     credits[o] <= CW'(DEPTH));
  end
endmodule
