// tb_dlc_unit: trains the latency curve with packets of 3 hops (latency
// 18..22) and 5 hops (latency 28..32), then checks that
//  - the learned means are within one cycle of the trace averages the test
//    computes itself,
//  - normal latencies are not flagged,
//  - a late packet (3 hops, 60 cycles) is flagged and its source becomes the
//    candidate; a late packet at a hop count never seen is not flagged,
//  - cand_clear drops the candidate.
module tb_dlc_unit;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic learn, evt, suspicious, cand_valid, cand_clear;
  node_id_t evt_src, cand;
  logic [HOP_W-1:0] evt_hops;
  logic [TS_W-1:0] evt_lat;
  logic [19:0] mean_q4 [16];
  logic [39:0] var_q8 [16];
  int checks = 0, failures = 0;
  int nsus = 0;

  dlc_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && suspicious) nsus++;

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic pkt(int hops, int lat, int sy, int sx);
    @(negedge clk);
    evt = 1; evt_hops = 4'(hops); evt_lat = 32'(lat); evt_src = '{y: 3'(sy), x: 3'(sx)};
    @(negedge clk); evt = 0;
  endtask

  initial begin
    int s3, s5, l;
    learn = 1; evt = 0; cand_clear = 0; evt_src = '0; evt_hops = 0; evt_lat = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    s3 = 0; s5 = 0;
    for (int i = 0; i < 200; i++) begin
      l = 18 + (i % 5); s3 += l; pkt(3, l, 0, 0);
      l = 28 + ((i * 3) % 5); s5 += l; pkt(5, l, 1, 1);
    end
    chk(mean_q4[3] >= 20'((s3 / 200 - 1) * 16) && mean_q4[3] <= 20'((s3 / 200 + 1) * 16),
        $sformatf("mean3 %0d/16 vs %0d", mean_q4[3], s3 / 200));
    chk(mean_q4[5] >= 20'((s5 / 200 - 1) * 16) && mean_q4[5] <= 20'((s5 / 200 + 1) * 16),
        $sformatf("mean5 %0d/16 vs %0d", mean_q4[5], s5 / 200));
    learn = 0;
    for (int i = 0; i < 20; i++) begin pkt(3, 18 + (i % 5), 0, 0); pkt(5, 28 + (i % 5), 1, 1); end
    repeat (2) @(negedge clk);
    chk(nsus == 0 && !cand_valid, $sformatf("false positives %0d", nsus));
    pkt(3, 60, 2, 6);
    repeat (2) @(negedge clk);
    chk(nsus == 1 && cand_valid && cand == '{y: 3'd2, x: 3'd6}, "late packet flagged");
    pkt(7, 200, 4, 4);
    repeat (2) @(negedge clk);
    chk(nsus == 1 && cand == '{y: 3'd2, x: 3'd6}, "unseen hop count not flagged");
    pkt(5, 45, 3, 1);
    repeat (2) @(negedge clk);
    chk(nsus == 2 && cand == '{y: 3'd3, x: 3'd1}, "late 5-hop packet flagged");
    @(negedge clk); cand_clear = 1; @(negedge clk); cand_clear = 0;
    chk(!cand_valid, "candidate cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
