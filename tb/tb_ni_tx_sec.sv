// tb_ni_tx_sec: sends three two-block messages through the transmit security
// engine (tiers 2, 1, 3) and one at tier 0, and compares every flit with
// values from an independent AES-128/GHASH model of the architecture's
// counter-mode construction (header = associated data, IV||0 for the tag,
// IV||q for block q, IV = salt || source || sequence number). Also checks the
// hash key E_K(0), head/tail marking, and the 13-cycle spacing of tier-1
// ciphertext flits (12-cycle AES plus one handoff cycle).
module tb_ni_tx_sec;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  tier_e tier;
  logic [127:0] key, h_key;
  logic [63:0] iv_salt;
  logic rekey, h_valid;
  node_id_t my_id, ip_dst;
  logic [TS_W-1:0] now;
  logic ip_valid, ip_ready, ip_last;
  logic [31:0] ip_user;
  logic [127:0] ip_data;
  logic out_valid, out_ready, pkt_sent;
  data_flit_t out_flit;
  int checks = 0, failures = 0;

  ni_tx_sec dut (.*);
  always #5 clk = ~clk;

  localparam logic [127:0] P0 = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] P1 = 128'hdeadbeef0123456789abcdeffedcba98;

  data_flit_t got [$];
  int unsigned flit_cyc [$];
  int unsigned cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (out_valid && out_ready) begin
      got.push_back(out_flit);
      flit_cyc.push_back(cyc);
    end
  end

  task automatic send(input tier_e t);
    @(negedge clk);
    tier = t;
    ip_valid = 1; ip_data = P0; ip_last = 0;
    while (1) begin @(posedge clk); if (ip_ready) break; end
    @(negedge clk); ip_data = P1; ip_last = 1;
    while (1) begin @(posedge clk); if (ip_ready) break; end
    @(negedge clk); ip_valid = 0; ip_last = 0;
    while (!pkt_sent) @(negedge clk);
  endtask

  task automatic expect_flit(input logic h, input logic tl, input logic [127:0] d, input string what);
    data_flit_t f;
    checks++;
    if (got.size() == 0) begin failures++; $display("FAIL %s: missing", what); return; end
    f = got.pop_front();
    void'(flit_cyc.pop_front());
    if (f.head !== h || f.tail !== tl || f.data !== d) begin
      failures++; $display("FAIL %s: %b%b %h exp %b%b %h", what, f.head, f.tail, f.data, h, tl, d);
    end
  endtask

  initial begin
    tier = TIER_NOSEC; key = 128'h2b7e151628aed2a6abf7158809cf4f3c; iv_salt = 64'h0123456789abcdef;
    rekey = 0; my_id = '{y: 3'd0, x: 3'd1}; ip_dst = '{y: 3'd2, x: 3'd3}; now = 32'h100;
    ip_valid = 0; ip_last = 0; ip_user = 32'hCAFEF00D; ip_data = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); rekey = 1; @(negedge clk); rekey = 0;
    while (!h_valid) @(negedge clk);
    checks++; if (h_key !== 128'h7df76b0c1ab899b33e42f047b91b546f) begin failures++; $display("FAIL H %h", h_key); end

    send(TIER_AUTH);
    expect_flit(1, 0, 128'hcafef00d000001000000000000012053, "t2 hdr");
    expect_flit(0, 0, 128'hf290afa02b37c7cda85b25c4c51f020e, "t2 c1");
    expect_flit(0, 0, 128'h80f56677d5e437f23b9406ba6ae57290, "t2 c2");
    expect_flit(0, 1, 128'h23cf29b4892114124a2bc83307074a5f, "t2 tag");

    send(TIER_ENC);
    expect_flit(1, 0, 128'hcafef00d000001000000000100011053, "t1 hdr");
    checks++;
    if (flit_cyc.size() >= 2 && flit_cyc[1] - flit_cyc[0] != 13) begin
      failures++; $display("FAIL block spacing %0d", flit_cyc[1] - flit_cyc[0]);
    end
    expect_flit(0, 0, 128'h261011c91a27e9f9b19b1da327098525, "t1 c1");
    expect_flit(0, 1, 128'h93a068515472f403c0f65e0f3a56254a, "t1 c2");

    // tier 3 with back-pressure on the output
    fork
      send(TIER_DOS);
      begin
        repeat (40) begin @(negedge clk); out_ready = 1'($urandom_range(0, 1)); end
        out_ready = 1;
      end
    join
    out_ready = 1;
    expect_flit(1, 0, 128'hcafef00d000001000000000200013053, "t3 hdr");
    expect_flit(0, 0, 128'h925922142be2f7a70414d7d86d4b4ffa, "t3 c1");
    expect_flit(0, 0, 128'h572350a2686b7015f7f147e37fd3764b, "t3 c2");
    expect_flit(0, 1, 128'h30a84f95036ff171fa02073ccc6fc158, "t3 tag");

    send(TIER_NOSEC);
    expect_flit(1, 0, 128'hcafef00d000001000000000300010053, "t0 hdr");
    expect_flit(0, 0, P0, "t0 m1");
    expect_flit(0, 1, P1, "t0 m2");
    checks++; if (got.size() != 0) begin failures++; $display("FAIL extra flits"); end
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
