// tb_dos_localizer: the four-node line A - S - D - V of the localization
// example (NX = 4, NY = 1), one localizer per node, joined by an ideal
// message network in the test (each message delivered 5 cycles after it is
// sent). The attacker A floods V, so the routers of D and V flag an attack;
// D's latency curve names S, V's names A; S and A report congestion.
// Expected (worked out by hand from the handlers):
//   S gets <S,D> (flag 1) and <A,V> (flag 2 on the same port) -> silent;
//   A gets <A,V> only -> flag 1 -> broadcasts itself;
// so exactly one MIP broadcast, from A, and every node ends with mip = A.
// A second phase checks that nothing happens with enable low, and that a
// non-congested reply stops the diagnosis.
module tb_dos_localizer;
  import nocsec_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  node_id_t my_id [N];
  logic enable [N], attacked [N], congested [N], cand_valid [N], cand_clear [N];
  node_id_t cand [N];
  logic rx_valid [N], rx_ready [N], tx_valid [N], tx_ready [N];
  svc_msg_t rx_msg [N], tx_msg [N];
  logic mip_valid [N], accused [N];
  node_id_t mip [N];
  logic [NPORTS-1:0][1:0] flags [N];
  int checks = 0, failures = 0;
  int n_msgs [16];
  int n_accused [N];

  for (genvar i = 0; i < N; i++) begin : g_n
    assign my_id[i] = '{y: 3'd0, x: 3'(i)};
    dos_localizer #(.NX(4), .NY(1), .TIMEOUT(64)) dut (
      .clk, .rst_n, .my_id(my_id[i]), .enable(enable[i]), .attacked(attacked[i]),
      .congested(congested[i]), .cand_valid(cand_valid[i]), .cand(cand[i]),
      .cand_clear(cand_clear[i]), .rx_valid(rx_valid[i]), .rx_msg(rx_msg[i]),
      .rx_ready(rx_ready[i]), .tx_valid(tx_valid[i]), .tx_msg(tx_msg[i]),
      .tx_ready(tx_ready[i]), .mip_valid(mip_valid[i]), .mip(mip[i]),
      .accused(accused[i]), .flags(flags[i]));
    assign tx_ready[i] = 1'b1;
    always @(posedge clk) if (rst_n && accused[i]) n_accused[i]++;
  end
  always #5 clk = ~clk;

  // ideal network: fixed 5-cycle delay, one delivery per node per cycle
  typedef struct { svc_msg_t m; int due; } ent_t;
  ent_t net [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int i = 0; i < N; i++) if (rst_n && tx_valid[i]) begin
      net.push_back('{tx_msg[i], cyc + 5});
      n_msgs[int'(tx_msg[i].mtype)]++;
    end
  end
  always @(negedge clk) begin
    bit busy [N];
    for (int i = 0; i < N; i++) begin rx_valid[i] = 0; busy[i] = 0; end
    for (int k = 0; k < net.size(); k++) begin
      int d;
      d = int'(net[k].m.dst.x);
      if (net[k].due <= cyc && !busy[d]) begin
        busy[d] = 1; rx_valid[d] = 1; rx_msg[d] = net[k].m;
        net.delete(k); k--;
      end
    end
  end
  // candidate register per node, as the DLC would hold it
  for (genvar i = 0; i < N; i++) begin : g_c
    always @(posedge clk) if (cand_clear[i]) cand_valid[i] <= 0;
  end

  task automatic chk(bit c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      enable[i] = 1; attacked[i] = 0; congested[i] = 0; cand_valid[i] = 0; cand[i] = '0;
      n_accused[i] = 0;
    end
    foreach (n_msgs[k]) n_msgs[k] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // A = 0, S = 1, D = 2, V = 3
    congested[0] = 1; congested[1] = 1; congested[2] = 1;
    cand[2] = '{y: 0, x: 1}; cand_valid[2] = 1;     // D suspects S
    cand[3] = '{y: 0, x: 0}; cand_valid[3] = 1;     // V suspects A
    @(negedge clk); attacked[2] = 1; attacked[3] = 1;
    repeat (30) @(negedge clk);
    chk(flags[1][P_EAST] == 2'd2, $sformatf("S flag %0d", flags[1][P_EAST]));
    chk(flags[0][P_EAST] == 2'd1, $sformatf("A flag %0d", flags[0][P_EAST]));
    repeat (150) @(negedge clk);
    chk(n_msgs[SM_QUERY] == 2 && n_msgs[SM_QREPLY] == 2, "two queries answered");
    chk(n_msgs[SM_DIAG] == 1 + 3, $sformatf("diag messages %0d", n_msgs[SM_DIAG]));
    chk(n_accused[0] == 1 && n_accused[1] == 0 && n_accused[2] == 0 && n_accused[3] == 0, "only A accused");
    chk(n_msgs[SM_MIP] == N, $sformatf("broadcast to all %0d", n_msgs[SM_MIP]));
    for (int i = 0; i < N; i++) chk(mip_valid[i] && mip[i] == '{y: 0, x: 0}, $sformatf("node %0d knows A", i));
    chk(flags[0] == '0 && flags[1] == '0, "flags reset after timeout");
    // disabled: no query
    attacked[2] = 0; attacked[3] = 0; enable[2] = 0;
    @(negedge clk);
    cand[2] = '{y: 0, x: 0}; cand_valid[2] = 1; attacked[2] = 1;
    repeat (50) @(negedge clk);
    chk(n_msgs[SM_QUERY] == 2, "no query while disabled");
    // not congested: query but no diagnosis
    attacked[2] = 0; enable[2] = 1; congested[0] = 0;
    @(negedge clk); attacked[2] = 1;
    repeat (50) @(negedge clk);
    chk(n_msgs[SM_QUERY] == 3 && n_msgs[SM_DIAG] == 4, "uncongested candidate cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
