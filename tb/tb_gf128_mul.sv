// tb_gf128_mul: checks the digit-serial GF(2^128) multiplier against the
// GCM test-case-2 intermediate product X1 = C1 * H, against identities
// (multiplying by the field's one, by zero) and against the package's
// bit-serial reference on random operands, and checks the 8-cycle latency.
module tb_gf128_mul;
  import nocsec_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, ready, done;
  logic [127:0] a, b, z;
  int checks = 0, failures = 0;

  gf128_mul dut (.*);
  always #5 clk = ~clk;

  task automatic mul(input logic [127:0] x, input logic [127:0] y, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++; if (z !== exp) begin failures++; $display("FAIL %h*%h = %h exp %h", x, y, z, exp); end
    checks++; if (cyc != 8) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    logic [127:0] r1, r2;
    start = 0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mul(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
        128'h5e2ec746917062882c85b0685353deb7);
    mul({1'b1, 127'd0}, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    mul('0, 128'h1234, '0);
    for (int i = 0; i < 20; i++) begin
      r1 = {$urandom, $urandom, $urandom, $urandom};
      r2 = {$urandom, $urandom, $urandom, $urandom};
      mul(r1, r2, gf128_mul_full(r1, r2));
    end
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
