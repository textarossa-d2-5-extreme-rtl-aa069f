// Behavioural SHAKE-128/256 reference model for the testbenches.
//
// keccak_f applies the 24 rounds of Keccak-f[1600] to 25 64-bit lanes,
// lane (x, y) at index x + 5y, written the way the SHA-3 standard states the
// step mappings: theta through the column parities C and D, rho by walking
// (x, y) -> (y, 2x + 3y) with offsets (t+1)(t+2)/2, pi, chi, and iota with
// round-constant bits taken from the degree-8 LFSR rc(t). It shares no code
// with the RTL (which uses tabulated offsets and constants).
// shake_digest hashes the message whose byte i is msg_byte(i), i < len, and
// returns the first output block (rate/8 lanes). Messages are generated on
// the fly, so any length can be hashed without storing it.
package shake_ref_pkg;

  typedef longint unsigned lanes_t [25];

  function automatic logic [7:0] msg_byte(longint unsigned i);
    return 8'((i * 7 + 3 + (i >> 8) * 13) % 256);
  endfunction

  function automatic bit rc_bit(int t);
    logic [7:0] r = 8'h01;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      logic [8:0] r9 = {r, 1'b0};
      r9[0] = r9[0] ^ r9[8];
      r9[4] = r9[4] ^ r9[8];
      r9[5] = r9[5] ^ r9[8];
      r9[6] = r9[6] ^ r9[8];
      r = r9[7:0];
    end
    return r[0];
  endfunction

  function automatic longint unsigned rotl(longint unsigned v, int s);
    s = s % 64;
    return (s == 0) ? v : ((v << s) | (v >> (64 - s)));
  endfunction

  function automatic void keccak_f(ref lanes_t a);
    longint unsigned c [5], d [5];
    lanes_t b;
    for (int ir = 0; ir < 24; ir++) begin
      // theta
      for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
      for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
      for (int i = 0; i < 25; i++) a[i] ^= d[i%5];
      // rho
      begin
        int x = 1, y = 0;
        for (int t = 0; t < 24; t++) begin
          int ny = (2*x + 3*y) % 5;
          a[x + 5*y] = rotl(a[x + 5*y], (t+1)*(t+2)/2);
          x = y; y = ny;
        end
      end
      // pi: A'[x, y] = A[x + 3y, x]
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          b[x + 5*y] = a[(x + 3*y) % 5 + 5*x];
      // chi
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
      // iota
      for (int j = 0; j <= 6; j++)
        if (rc_bit(j + 7*ir)) a[0] ^= 64'd1 << ((1 << j) - 1);
    end
  endfunction

  // rate_bytes: 168 for SHAKE-128, 136 for SHAKE-256
  function automatic void shake_digest(int rate_bytes, longint unsigned len,
                                       output longint unsigned out [21]);
    lanes_t a;
    longint unsigned pos = 0;
    longint unsigned rb = longint'(rate_bytes);
    for (int i = 0; i < 25; i++) a[i] = 0;
    // full blocks, then the last (partial or empty) block with padding
    while (1) begin
      logic [7:0] blk [168];
      bit last = (len - pos) < rb;
      for (longint unsigned i = 0; i < rb; i++)
        blk[int'(i)] = (pos + i < len) ? msg_byte(pos + i) : 8'h00;
      if (last) begin
        blk[int'(len - pos)] ^= 8'h1F;
        blk[rate_bytes - 1] ^= 8'h80;
      end
      for (int i = 0; i < rate_bytes; i++) a[i/8] ^= longint'(blk[i]) << (8 * (i % 8));
      keccak_f(a);
      if (last) break;
      pos += rb;
    end
    for (int i = 0; i < 21; i++) out[i] = (i < rate_bytes / 8) ? a[i] : 0;
  endfunction

endpackage
