// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 datapaths.
//
// The cipher is fixed to a 128-bit block and a 128-bit key, which fixes the
// number of rounds at ten. A 128-bit block is held as a packed vector with
// state byte 0 in bits [127:120] and byte 15 in bits [7:0]; bytes are numbered
// column by column, so byte i sits in row i%4 of column i/4 (the FIPS-197
// input order). A round key uses the same layout, its word j being bytes
// 4j..4j+3.
//
// The S-box is a direct 256-entry lookup table. The table is not typed in: it
// is computed at elaboration time from its definition (multiplicative inverse
// in GF(2^8) modulo x^8+x^4+x^3+x+1, then the affine map with constant 0x63).
// The inverse is found by walking the multiplicative group with generator 3
// and its inverse step in parallel, so each entry costs a handful of
// operations. After elaboration only the constant table is left, which a
// synthesis tool turns into a lookup table, as the architecture asks for.
//
// pipe_t is the bundle that travels down every pipeline: a valid bit, the
// round data and the round key that goes with it, since the key schedule is
// computed on the fly alongside the data.
package aes_pkg;

  localparam int unsigned NR         = 10;   // rounds of AES-128
  localparam int unsigned BLOCK_BITS = 128;

  // Latency in cycles (from the cycle a block is presented at a unit's input
  // to the first cycle its ciphertext is on the output, which equals the
  // number of pipeline registers), and clocks per block, per organisation.
  localparam int unsigned LAT_INNER_OUTER = 1 + 4 * NR;  // 41
  localparam int unsigned LAT_OUTER       = 1 + NR;      // 11
  localparam int unsigned LAT_MULTI_ROUND = 1 + NR;      // 11
  localparam int unsigned CPS_MULTI_ROUND = 2;           // clocks per sample

  typedef logic [7:0]            byte_t;
  typedef logic [31:0]           word_t;
  typedef logic [BLOCK_BITS-1:0] block_t;

  typedef struct packed {
    logic   valid;
    block_t state;
    block_t key;
  } pipe_t;

  // The three pipelined organisations of the AES unit.
  typedef enum logic [1:0] {
    ARCH_INNER_OUTER = 2'd0,  // 4 stages per round, 41 stages, 1 block/cycle
    ARCH_OUTER       = 2'd1,  // 1 stage per round, 11 stages, 1 block/cycle
    ARCH_MULTI_ROUND = 2'd2   // 2 rounds per stage, 5+1 stages, 1 block/2 cycles
  } aes_arch_e;

  // Byte i of a block (0 = most significant).
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[BLOCK_BITS-1-8*i -: 8];
  endfunction

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t rotl8(byte_t b, int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Whole S-box as a packed constant: entry v in bits [8*v +: 8].
  function automatic logic [2047:0] sbox_table();
    logic [2047:0] t;
    byte_t p, q, a;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int unsigned n = 0; n < 255; n++) begin
      // p <- p * 3
      p = p ^ xtime(p);
      // q <- q / 3, so that q stays the inverse of p
      q = q ^ byte_t'(q << 1);
      q = q ^ byte_t'(q << 2);
      q = q ^ byte_t'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      a = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
      t[8*p +: 8] = a;
    end
    t[7:0] = 8'h63;  // zero has no inverse; it maps to the affine constant
    return t;
  endfunction

  localparam logic [2047:0] SBOX_TABLE = sbox_table();

  // Round constant of key-expansion step r (1..NR): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 2; i <= NR; i++)
      if (i <= r) c = xtime(c);
    return c;
  endfunction

  // One column of MixColumns: multiply by {03}x^3+{01}x^2+{01}x+{02}.
  function automatic word_t mix_column(word_t c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

endpackage
