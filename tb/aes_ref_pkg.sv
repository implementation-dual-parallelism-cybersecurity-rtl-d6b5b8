// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL datapath: the state is a 4x4 byte
// matrix, the S-box is built by searching for each byte's multiplicative
// inverse and applying the affine map as rotations, and the key schedule
// works on 44 words. Blocks use FIPS-197 byte order (byte 0 in [127:120]).
package aes_ref_pkg;

  typedef logic [7:0] st_t [4][4];   // [row][col]

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] inv;
    inv = 8'h00;
    if (a != 0)
      for (int b = 1; b < 256; b++) if (mul(a, 8'(b)) == 8'h01) inv = 8'(b);
    return inv ^ rotl8(inv,1) ^ rotl8(inv,2) ^ rotl8(inv,3) ^ rotl8(inv,4) ^ 8'h63;
  endfunction

  logic [7:0] sb [256];
  logic [7:0] isb [256];
  bit         ready = 0;

  function automatic void init();
    if (ready) return;
    for (int i = 0; i < 256; i++) begin
      sb[i] = sbox(8'(i));
      isb[sb[i]] = 8'(i);
    end
    ready = 1;
  endfunction

  function automatic st_t to_state(input logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_state(input st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic void expand(input logic [127:0] key, output logic [31:0] w [44]);
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic st_t add_key(input st_t s, input logic [31:0] w [44], input int rnd);
    st_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[r][c] = s[r][c] ^ w[4*rnd + c][31 - 8*r -: 8];
    return o;
  endfunction

  function automatic logic [127:0] encrypt(input logic [127:0] key, input logic [127:0] pt);
    logic [31:0] w [44];
    st_t s, t;
    init();
    expand(key, w);
    s = add_key(to_state(pt), w, 0);
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][c] = sb[s[r][(c + r) % 4]];
      if (rnd != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = mul(t[r][c], 2) ^ mul(t[(r+1)%4][c], 3) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
      else s = t;
      s = add_key(s, w, rnd);
    end
    return from_state(s);
  endfunction

  function automatic logic [127:0] decrypt(input logic [127:0] key, input logic [127:0] ct);
    logic [31:0] w [44];
    st_t s, t;
    init();
    expand(key, w);
    s = add_key(to_state(ct), w, 10);
    for (int rnd = 9; rnd >= 0; rnd--) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = isb[s[r][c]];
      s = add_key(t, w, rnd);
      if (rnd != 0) begin
        t = s;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = mul(t[r][c], 8'h0e) ^ mul(t[(r+1)%4][c], 8'h0b) ^
                      mul(t[(r+2)%4][c], 8'h0d) ^ mul(t[(r+3)%4][c], 8'h09);
      end
    end
    return from_state(s);
  endfunction

endpackage
