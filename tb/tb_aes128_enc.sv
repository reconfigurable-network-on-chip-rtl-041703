// tb_aes128_enc: checks the AES-128 core against the FIPS-197 Appendix C.1
// vector and the SP 800-38A / FIPS-197 Appendix B vector, a back-to-back
// request, and the 12-cycle latency from start to done.
module tb_aes128_enc;
  logic clk = 0, rst_n = 0;
  logic start, ready, done;
  logic [127:0] key, pt, ct;
  int checks = 0, failures = 0;

  aes128_enc dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    checks++; if (!ready) begin failures++; $display("FAIL not ready"); end
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++; if (ct !== exp) begin failures++; $display("FAIL ct %h exp %h", ct, exp); end
    checks++; if (cyc != 12) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    start = 0; key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    // key = 0, block = 0 gives the GCM hash key of the all-zero key
    run('0, '0, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
