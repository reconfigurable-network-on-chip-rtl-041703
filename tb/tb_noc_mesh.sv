// tb_noc_mesh: 4x4 mesh (reduced from 8x8 to keep the run short). Every node
// sends random 3-flit packets to random destinations through the local port
// with its own credit counter; every node sinks with a random pause. Checks
// that every packet arrives exactly once at its destination with its flits in
// order and unmixed, that no flit is lost, and that a lone packet crossing
// h = 6 hops takes 4 * (h + 1) cycles (4 cycles per router) at zero load,
// from the injection buffer write to the ejection buffer write.
module tb_noc_mesh;
  import nocsec_pkg::*;
  localparam int NX = 4, NY = 4, N = NX * NY, FW = 24 + 2, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] loc_in_valid, loc_in_credit, loc_out_valid, loc_out_credit;
  logic [N-1:0][FW-1:0] loc_in_flit, loc_out_flit;
  logic [N-1:0][2:0] arrivals;
  logic [N-1:0][7:0] occupancy;
  int checks = 0, failures = 0;

  noc_mesh #(.NX(NX), .NY(NY), .FW(FW), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  // flit payload: [23:16] seq (per source), [15:12] flit idx, [11:6] src, [5:0] dst
  int credits [N];
  int sent [N];
  int recv_cnt = 0, sent_cnt = 0;
  int expect_seq [N][N];     // [src][dst] next packet number expected
  int cur_src [N], cur_idx [N];
  bit traffic_on = 0;
  int per_src_limit = 20;
  longint t_first, t_out;

  for (genvar n = 0; n < N; n++) begin : g_node
    // source
    int pkt_dst, fidx, seqn, gap;
    initial begin
      loc_in_valid[n] = 0; loc_in_flit[n] = '0; credits[n] = DEPTH; sent[n] = 0; seqn = 0;
      wait (traffic_on);
      while (seqn < per_src_limit) begin
        pkt_dst = $urandom_range(0, N - 1);
        for (fidx = 0; fidx < 3; fidx++) begin
          @(negedge clk);
          while (credits[n] == 0) @(negedge clk);
          loc_in_valid[n] = 1;
          loc_in_flit[n] = {fidx == 0, fidx == 2, 8'(seqn), 4'(fidx),
                            3'(n / NX), 3'(n % NX), 3'(pkt_dst / NX), 3'(pkt_dst % NX)};
          @(posedge clk); #1 loc_in_valid[n] = 0;
        end
        seqn++; sent_cnt++;
        gap = $urandom_range(0, 6);
        repeat (gap) @(negedge clk);
      end
    end
    always @(posedge clk) if (rst_n) credits[n] <= credits[n] - int'(loc_in_valid[n]) + int'(loc_in_credit[n]);

    // sink: a small buffer drained at random
    logic [FW-1:0] q [$];
    always @(posedge clk) begin
      loc_out_credit[n] <= 0;
      if (rst_n && loc_out_valid[n]) q.push_back(loc_out_flit[n]);
      if (q.size() > 0 && $urandom_range(0, 3) != 0) begin
        logic [FW-1:0] f;
        int s, d, idx;
        f = q.pop_front();
        loc_out_credit[n] <= 1;
        d = int'(f[5:3]) * NX + int'(f[2:0]);
        s = int'(f[11:9]) * NX + int'(f[8:6]);
        idx = int'(f[15:12]);
        checks++;
        if (d != n) begin failures++; $display("FAIL node %0d got flit for %0d %h t=%0t", n, d, f, $time); end
        if (idx == 0) begin
          if (cur_idx[n] != 0) begin failures++; $display("FAIL node %0d mixed packets", n); end
          cur_src[n] = s;
          if (int'(f[23:16]) < expect_seq[s][n]) begin failures++; $display("FAIL dup/order %0d->%0d", s, n); end
          expect_seq[s][n] = int'(f[23:16]) + 1;
        end else if (s != cur_src[n] || idx != cur_idx[n]) begin
          failures++; $display("FAIL node %0d flit order src %0d idx %0d", n, s, idx);
        end
        cur_idx[n] = (idx == 2) ? 0 : idx + 1;
        if (idx == 2) recv_cnt++;
      end
    end
    initial begin cur_idx[n] = 0; cur_src[n] = 0; for (int k = 0; k < N; k++) expect_seq[k][n] = 0; end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    // lone packet 0 -> 15 (6 hops), single flit: inject directly
    force loc_in_valid[0] = 1;
    force loc_in_flit[0] = {1'b1, 1'b1, 8'd0, 4'd0, 6'd0, 3'd3, 3'd3};
    t_first = $time + 5;
    @(negedge clk);
    release loc_in_valid[0]; release loc_in_flit[0];
    force loc_in_valid[0] = 0;
    @(posedge loc_out_valid[15]); t_out = $time;
    checks++;
    // out_valid of the last router rises one cycle before the NI would capture it
    if ((t_out - t_first) / 10 != 4 * 7 - 1) begin
      failures++; $display("FAIL zero-load latency %0d", (t_out - t_first) / 10);
    end
    release loc_in_valid[0];
    repeat (10) @(negedge clk);
    recv_cnt = 0;
    cur_idx[15] = 0;
    for (int k = 0; k < N; k++) expect_seq[0][k] = 0;
    traffic_on = 1;
    wait (sent_cnt == N * per_src_limit);
    repeat (400) @(negedge clk);
    checks++;
    if (recv_cnt != N * per_src_limit) begin failures++; $display("FAIL received %0d of %0d", recv_cnt, N * per_src_limit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
