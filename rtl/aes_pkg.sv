// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 engine.
//
// The engine processes one 128-bit block with a 128-bit key in 10 rounds, as
// AES-128 prescribes. A block is held as a 128-bit vector whose most
// significant byte is state byte 0; bytes are numbered column by column
// (byte i sits in row i%4, column i/4), so bits [127:96] are column 0.
//
// The forward and inverse S-box tables are not typed in: they are computed at
// elaboration time from their definition, S(x) = A * x^-1 + 0x63 in GF(2^8)
// modulo x^8+x^4+x^3+x+1, where x^-1 = x^254 (and 0^-1 = 0) and A is the AES
// affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4). The inverse
// table is the inverse permutation of the forward one. Synthesis therefore
// sees two 256-entry constant lookup tables.
//
// The mode encoding (0 = encrypt, 1 = decrypt) follows the design description;
// the rest of this package is an implementation convenience.
package aes_pkg;

  localparam int unsigned NUM_ROUNDS  = 10;   // AES-128

  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;

  typedef enum logic {
    AES_ENC = 1'b0,
    AES_DEC = 1'b1
  } aes_mode_e;

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as x^254 (gives 0 for 0).
  function automatic logic [7:0] ginv(input logic [7:0] x);
    logic [7:0] r;
    logic [7:0] sq;
    r  = 8'h01;
    sq = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // exponent 254 = 8'b1111_1110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] make_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv(8'(i)));
    return t;
  endfunction

  function automatic logic [255:0][7:0] make_inv_sbox();
    logic [255:0][7:0] f;
    logic [255:0][7:0] t;
    f = make_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[f[i]] = 8'(i);
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX     = make_sbox();
  localparam logic [255:0][7:0] INV_SBOX = make_inv_sbox();

  // Round constant for key-schedule step n (1..10): x^(n-1) in GF(2^8).
  function automatic logic [7:0] rcon(input logic [3:0] n);
    logic [7:0] r;
    r = 8'h01;
    for (int i = 1; i < 10; i++) begin
      if (i < int'(n)) r = xtime(r);
    end
    return r;
  endfunction

  // Byte i (0..15) of a block, in the column-major order described above.
  function automatic logic [7:0] get_byte(input block_t b, input int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

endpackage
