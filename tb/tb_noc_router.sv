// tb_noc_router: one router at (1,1). Checks
//  - XY port choice for destinations in all five directions,
//  - zero-load latency of 4 cycles (3 router stages + link),
//  - wormhole: two 3-flit packets from different inputs to one output leave
//    unmixed, both delivered,
//  - credits: with no credit returned, an output sends exactly DEPTH flits and
//    then stalls; returning credits lets the rest through,
//  - arrivals counts head flits entering the buffers.
module tb_noc_router;
  import nocsec_pkg::*;
  localparam int FW = 16 + 2;
  logic clk = 0, rst_n = 0;
  node_id_t my_id;
  logic [NPORTS-1:0] in_valid, in_credit, out_valid, out_credit;
  logic [NPORTS-1:0][FW-1:0] in_flit, out_flit;
  logic [2:0] arrivals;
  logic [7:0] occupancy;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic auto_credit;
  int arr_total = 0;

  noc_router #(.FW(FW), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) arr_total += arrivals;

  typedef struct { int port; logic [FW-1:0] f; longint t; } rec_t;
  longint t_push;
  rec_t outq [$];
  always @(posedge clk) for (int p = 0; p < NPORTS; p++) if (out_valid[p]) outq.push_back('{p, out_flit[p], $time});
  assign out_credit = auto_credit ? out_valid : '0;

  function automatic logic [FW-1:0] mk(logic h, logic t, int dy, int dx, int tag);
    return {h, t, 10'(tag), 3'(dy), 3'(dx)};
  endfunction

  task automatic inject(int p, logic [FW-1:0] f);
    @(negedge clk); in_valid[p] = 1; in_flit[p] = f; t_push = $time + 5;
    @(negedge clk); in_valid[p] = 0;
  endtask

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    rec_t r;
    my_id = '{y: 3'd1, x: 3'd1};
    in_valid = '0; in_flit = '0; auto_credit = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    // directions
    begin
      int dys[5] = '{1, 0, 1, 2, 1};
      int dxs[5] = '{1, 1, 2, 1, 0};
      int exp[5] = '{P_LOCAL, P_NORTH, P_EAST, P_SOUTH, P_WEST};
      for (int k = 0; k < 5; k++) begin
        outq.delete();
        inject(P_WEST, mk(1, 1, dys[k], dxs[k], k));
        repeat (8) @(negedge clk);
        chk(outq.size() == 1, "one flit out");
        if (outq.size() == 1) begin
          chk(outq[0].port == exp[k], $sformatf("port %0d exp %0d", outq[0].port, exp[k]));
          // buffer-write edge to downstream buffer-write edge
          chk(outq[0].t - t_push == 40, $sformatf("latency %0d", (outq[0].t - t_push) / 10));
        end
      end
    end
    chk(arr_total == 5, "arrivals");
    // wormhole: two 3-flit packets to the east from north and south
    outq.delete();
    fork
      begin inject(P_NORTH, mk(1,0,1,3,100)); inject(P_NORTH, mk(0,0,1,3,101)); inject(P_NORTH, mk(0,1,1,3,102)); end
      begin inject(P_SOUTH, mk(1,0,1,3,200)); inject(P_SOUTH, mk(0,0,1,3,201)); inject(P_SOUTH, mk(0,1,1,3,202)); end
    join
    repeat (15) @(negedge clk);
    chk(outq.size() == 6, $sformatf("6 flits, got %0d", outq.size()));
    if (outq.size() == 6) begin
      int base0, base1;
      base0 = int'(outq[0].f[15:6]); base1 = int'(outq[3].f[15:6]);
      chk((base0 == 100 || base0 == 200) && base1 == 300 - base0, "both packets");
      for (int k = 0; k < 3; k++) begin
        chk(int'(outq[k].f[15:6]) == base0 + k && outq[k].port == P_EAST, "pkt A contiguous");
        chk(int'(outq[3+k].f[15:6]) == base1 + k && outq[3+k].port == P_EAST, "pkt B contiguous");
      end
    end
    // credits: no credits returned -> exactly 4 flits leave
    outq.delete(); auto_credit = 0;
    inject(P_LOCAL, mk(1,0,1,0,10));
    for (int k = 1; k < 6; k++) inject(P_LOCAL, mk(0, k == 5, 1, 0, 10 + k));
    repeat (15) @(negedge clk);
    chk(outq.size() == 4, $sformatf("credit stall: %0d flits", outq.size()));
    @(negedge clk); out_credit_pulse();
    repeat (15) @(negedge clk);
    chk(outq.size() == 6, $sformatf("after credits: %0d flits", outq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic out_credit_pulse();
    force out_credit = 5'b10000;
    @(negedge clk); @(negedge clk);
    release out_credit;
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
