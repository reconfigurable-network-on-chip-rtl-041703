// gf128_mul: digit-serial multiplier in GF(2^128) for the Galois hash.
//
// Computes z = a * b with the GCM field convention (bit 127 of a vector is the
// coefficient of x^0, reduction by x^128 + x^7 + x^2 + x + 1). Each cycle
// consumes DIGIT bits of a, most significant first, adding the matching
// multiples of b (b * x^i, kept in a shifting register) into the accumulator.
// A request is accepted when start && ready; done pulses 128/DIGIT cycles
// later (8 cycles for the default DIGIT = 16) with z valid until the next
// start. The digit width is this design's choice; it keeps one GHASH step
// shorter than one 12-cycle AES block so authentication never slows the
// cipher down.
module gf128_mul #(
  parameter int unsigned DIGIT = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic         ready,
  output logic         done,
  output logic [127:0] z
);
  localparam int unsigned STEPS = 128 / DIGIT;

  logic         busy;
  logic [$clog2(STEPS+1)-1:0] cnt;
  logic [127:0] ar, v, acc;
  logic [127:0] acc_n, v_n;

  assign ready = !busy;

  // One digit step; the first step works on the operands directly so that the
  // load cycle already does useful work.
  logic [127:0] a_src;
  always_comb begin
    a_src = busy ? ar : a;
    acc_n = busy ? acc : '0;
    v_n   = busy ? v : b;
    for (int i = 0; i < DIGIT; i++) begin
      if (a_src[127-i]) acc_n = acc_n ^ v_n;
      v_n = v_n[0] ? ((v_n >> 1) ^ {8'he1, 120'd0}) : (v_n >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      ar   <= '0;
      v    <= '0;
      acc  <= '0;
      done <= 1'b0;
      z    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          ar   <= a << DIGIT;
          v    <= v_n;
          acc  <= acc_n;
          cnt  <= ($clog2(STEPS+1))'(1);
        end
      end else begin
        acc <= acc_n;
        v   <= v_n;
        ar  <= ar << DIGIT;
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(STEPS+1))'(STEPS - 1)) begin   // last digit
          busy <= 1'b0;
          done <= 1'b1;
          z    <= acc_n;
        end
      end
    end
  end
endmodule
