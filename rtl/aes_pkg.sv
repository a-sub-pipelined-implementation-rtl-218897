// aes_pkg: types, constants and small GF(2^8) helpers shared by the
// sub-pipelined AES cores.
//
// The 128-bit state is kept in the FIPS-197 byte order: byte k of a block
// sits in bits [127-8k -: 8] and belongs to row k%4, column k/4. Keys are
// presented left-aligned in a 256-bit word, so a 128-bit key occupies
// key[255:128] and a 192-bit key key[255:64].
//
// The S-box tables are computed here by a constant function (the usual
// generator-3 walk of GF(2^8) followed by the affine transform) so that the
// look-up ROMs need no external data file. Only the tables are stored in
// hardware, never the arithmetic that produced them.
// The three key sizes and the three data path variants are those of the
// described design; the byte order and the left-aligned key are choices of
// this design.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;

  // Key length, selected with each key load.
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } key_size_e;

  // Which of the three proposed data paths a module is built as.
  typedef enum logic [1:0] {
    DP_ENC   = 2'd0,   // encryption only
    DP_DEC   = 2'd1,   // decryption only
    DP_JOINT = 2'd2    // joint encryption / decryption
  } datapath_e;

  // Contents of an S-box ROM.
  typedef enum logic [1:0] {
    SBOX_FWD  = 2'd0,  // 256 x 8, SubBytes
    SBOX_INV  = 2'd1,  // 256 x 8, InvSubBytes
    SBOX_BOTH = 2'd2   // 512 x 8, {inv, byte} addressed
  } sbox_kind_e;

  typedef logic [255:0][7:0] sbox_table_t;

  // Number of rounds for a key length.
  function automatic int unsigned num_rounds(key_size_e ks);
    case (ks)
      KEY128:  return 10;
      KEY192:  return 12;
      default: return 14;
    endcase
  endfunction

  // Number of 32-bit words in a key.
  function automatic int unsigned key_words(key_size_e ks);
    case (ks)
      KEY128:  return 4;
      KEY192:  return 6;
      default: return 8;
    endcase
  endfunction

  // Multiply by {02} modulo x^8+x^4+x^3+x+1: one left shift and a
  // conditional reduction.
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int unsigned n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  // Forward S-box: walk p = 3^k and q = 3^-k together, so q is the
  // multiplicative inverse of p, then apply the affine transform.
  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    logic [7:0] p, q, x;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int k = 0; k < 255; k++) begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'b0000};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  // Inverse S-box: the forward table inverted.
  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f, t;
    f = gen_sbox();
    t = '0;
    for (int k = 0; k < 256; k++) t[f[k]] = 8'(k);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  // Byte k of a state (FIPS-197 order).
  function automatic logic [7:0] get_byte(state_t s, int unsigned k);
    return s[127-8*k -: 8];
  endfunction

  // Source byte index that ShiftRows (inv=0) or InvShiftRows (inv=1)
  // moves into position k. Row r = k%4, column c = k/4.
  function automatic int unsigned shift_src(int unsigned k, logic inv);
    int unsigned r, c;
    r = k % 4;
    c = k / 4;
    return inv ? r + 4 * ((c + 4 - r) % 4) : r + 4 * ((c + r) % 4);
  endfunction

endpackage
