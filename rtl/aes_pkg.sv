// aes_pkg: AES-128 building blocks (FIPS-197) used by the counter-mode cipher.
//
// The S-box is not stored as a literal table: gen_sbox() computes it at
// elaboration time by walking the multiplicative group of GF(2^8) with the
// generator 3 (p runs over 3^k, q over 3^-k, so q = p^-1) and applying the AES
// affine map to the inverse. SBOX is then a 256-entry constant, i.e. a ROM.
package aes_pkg;

  function automatic logic [7:0] rotl8(logic [7:0] v, int unsigned s);
    return (v << s) | (v >> (8 - s));
  endfunction

  function automatic logic [255:0][7:0] gen_sbox();
    logic [255:0][7:0] t;
    logic [7:0] p, q, x;
    t = '0;
    p = 8'd1;
    q = 8'd1;
    for (int i = 0; i < 255; i++) begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = gen_sbox();

  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  // Byte i of a 128-bit AES state (byte 0 is the leftmost byte).
  function automatic logic [7:0] get_byte(logic [127:0] s, int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  // One encryption round without AddRoundKey. last = 1 skips MixColumns.
  function automatic logic [127:0] round_fn(logic [127:0] s, logic last);
    logic [127:0] sr;
    logic [127:0] mc;
    logic [7:0] a0, a1, a2, a3;
    // SubBytes + ShiftRows: out byte (4c+r) = SBOX(in byte 4((c+r)%4)+r)
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[127-8*(4*c+r) -: 8] = SBOX[get_byte(s, 4*((c+r)%4)+r)];
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(sr, 4*c);
      a1 = get_byte(sr, 4*c+1);
      a2 = get_byte(sr, 4*c+2);
      a3 = get_byte(sr, 4*c+3);
      mc[127-32*c -: 32] = {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
                            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
                            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
                            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
    end
    return last ? sr : mc;
  endfunction

  // Next AES-128 round key from the current one and the round constant.
  function automatic logic [127:0] next_key(logic [127:0] k, logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = k[127:96]; w1 = k[95:64]; w2 = k[63:32]; w3 = k[31:0];
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'd0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
