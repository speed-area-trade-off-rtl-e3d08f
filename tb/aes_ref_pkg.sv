// aes_ref_pkg: a plain behavioural AES-128 model used by the testbenches as
// the expected-value reference.
//
// It shares no code with the RTL. The S-box is rebuilt at run time by brute
// force: for every byte the inverse is found by trying all 256 candidates with
// a shift-and-add GF(2^8) multiplier, and the affine map is applied bit by
// bit. MixColumns uses the same general multiplier. Byte i of a 128-bit block
// is bits [127-8i -: 8], column-major, as in FIPS-197.
package aes_ref_pkg;

  bit [7:0] sbox_tab [256];
  bit       sbox_built = 1'b0;

  function automatic bit [7:0] gmul(bit [7:0] a, bit [7:0] b);
    bit [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic void build_sbox();
    for (int x = 0; x < 256; x++) begin
      bit [7:0] inv = 8'h00, s;
      for (int y = 1; y < 256; y++)
        if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
               ^ ((8'h63 >> i) & 1);
      sbox_tab[x] = s;
    end
    sbox_built = 1'b1;
  endfunction

  function automatic bit [7:0] sbox(bit [7:0] x);
    if (!sbox_built) build_sbox();
    return sbox_tab[x];
  endfunction

  function automatic bit [7:0] gb(bit [127:0] s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic bit [127:0] sub_bytes(bit [127:0] s);
    bit [127:0] o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(gb(s, i));
    return o;
  endfunction

  function automatic bit [127:0] shift_rows(bit [127:0] s);
    bit [7:0] m [4][4];  // [row][col]
    bit [127:0] o;
    for (int i = 0; i < 16; i++) m[i%4][i/4] = gb(s, i);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127-8*(4*c+r) -: 8] = m[r][(c+r)%4];
    return o;
  endfunction

  function automatic bit [127:0] mix_columns(bit [127:0] s);
    bit [127:0] o;
    bit [7:0] coef [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        bit [7:0] acc = 0;
        for (int k = 0; k < 4; k++) acc ^= gmul(coef[(k - r + 4) % 4], gb(s, 4*c+k));
        o[127-8*(4*c+r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic bit [7:0] rcon(int r);
    bit [7:0] c = 8'h01;
    for (int i = 1; i < r; i++) c = gmul(c, 8'h02);
    return c;
  endfunction

  // Round key r from round key r-1.
  function automatic bit [127:0] next_key(bit [127:0] k, int r);
    bit [31:0] w [8];
    for (int j = 0; j < 4; j++) w[j] = k[127-32*j -: 32];
    for (int j = 4; j < 8; j++) begin
      bit [31:0] t = w[j-1];
      if (j == 4) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rcon(r);
      end
      w[j] = w[j-4] ^ t;
    end
    return {w[4], w[5], w[6], w[7]};
  endfunction

  // Round r applied to state s with previous round key k; returns the new
  // state and the round key used.
  function automatic void round(input bit [127:0] s, input bit [127:0] k, input int r,
                                output bit [127:0] so, output bit [127:0] ko);
    ko = next_key(k, r);
    so = shift_rows(sub_bytes(s));
    if (r != 10) so = mix_columns(so);
    so ^= ko;
  endfunction

  function automatic bit [127:0] encrypt(bit [127:0] key, bit [127:0] pt);
    bit [127:0] s = pt ^ key, k = key;
    for (int r = 1; r <= 10; r++) round(s, k, r, s, k);
    return s;
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
