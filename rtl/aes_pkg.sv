// aes_pkg: types, constants and GF(2^8) arithmetic shared by the byte-serial
// AES-128 encrypter and decrypter.
//
// The S-box is not stored as a table. sbox_f() computes it from its
// definition: the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (raised to the power 254), followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. inv_sbox_f()
// applies the inverse affine map rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05 and
// then the same inversion. All functions are pure combinational logic.
//
// The control word ctrl_t is what the control unit drives into a core each
// cycle; the enums name the operations of the state and key registers.
package aes_pkg;

  typedef logic [7:0] byte_t;

  // Number of bytes in the state and in a round key, and AES-128 rounds.
  localparam int unsigned NB_BYTES = 16;
  localparam int unsigned NR       = 10;

  // State register operations.
  typedef enum logic [2:0] {
    ST_HOLD  = 3'd0,  // keep contents
    ST_LOAD  = 3'd1,  // parallel load of 128 bits
    ST_SHIFT = 3'd2,  // whole register shifts by one byte, din enters at the tail
    ST_TAIL  = 3'd3,  // only the last four byte slots shift, din enters at the tail
    ST_PERM  = 3'd4   // (Inv)ShiftRows in one cycle
  } st_op_e;

  // Key register operations.
  typedef enum logic [1:0] {
    K_HOLD  = 2'd0,
    K_LOAD  = 2'd1,
    K_SHIFT = 2'd2   // shift by one byte in the direction given by key_dir
  } key_op_e;

  // Source of the byte written into the key register on a shift.
  typedef enum logic [1:0] {
    KD_ROT   = 2'd0,  // rotate: Out 1 goes back in unchanged
    KD_PREV  = 2'd1,  // Out 1 xor the byte one word away (no S-box)
    KD_SBOX  = 2'd2   // Out 1 xor S-box(Out 2), xor RCON when rcon_use
  } key_din_e;

  // Source of the byte written into the state register on a shift.
  typedef enum logic [1:0] {
    SD_ARK  = 2'd0,   // state head xor round-key byte
    SD_SBK  = 2'd1,   // S-box(state head) xor round-key byte
    SD_MC   = 2'd2    // Mix-Columns output (xor round-key byte in the encrypter)
  } st_din_e;

  // Out 2 tap of the key register feeding the shared S-box.
  typedef enum logic [1:0] {
    T13 = 2'd0, T9 = 2'd1, T12 = 2'd2, T8 = 2'd3
  } tap_e;

  typedef enum logic [1:0] {
    RC_HOLD = 2'd0, RC_INIT = 2'd1, RC_FWD = 2'd2, RC_BACK = 2'd3
  } rcon_op_e;

  // Phases of the control unit.
  typedef enum logic [3:0] {
    PH_IDLE  = 4'd0,  // waiting for a load
    PH_PRE   = 4'd1,  // decrypter: forward key expansion up to the last round key
    PH_READY = 4'd2,  // decrypter: last round key ready, waiting for cipher text
    PH_ARK   = 4'd3,  // initial AddRoundKey, 16 cycles
    PH_KE    = 4'd4,  // (inverse) key expansion of one round key, 16 cycles
    PH_PERM  = 4'd5,  // (Inv)ShiftRows, 1 cycle
    PH_MIX   = 4'd6,  // SubBytes, MixColumns, AddRoundKey: 4 columns x 8 cycles
    PH_FIN   = 4'd7   // last round without MixColumns, 16 cycles
  } phase_e;

  typedef struct packed {
    logic     st_en;     // clock enable of the state register
    st_op_e   st_op;
    st_din_e  st_din;
    logic     mc_en;     // clock enable of the Mix-Columns registers
    logic     mc_load;   // 1: take a new byte, 0: rotate to the next output row
    logic     key_en;    // clock enable of the key register
    key_op_e  key_op;
    logic     key_dir;   // 0: shift toward byte 0 (ascending), 1: toward byte 15
    key_din_e key_din;
    tap_e     key_tap;
    logic     sbox_key;  // shared S-box serves the key register (1) or the state (0)
    logic     sbox_inv;  // inverse S-box (decrypter data path)
    logic     rcon_en;   // clock enable of the RCON register
    rcon_op_e rcon_op;
    logic     rcon_use;  // add RCON into this key byte
  } ctrl_t;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiplication, shift-and-add.
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      p ^= t & {8{b[i]}};
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse (0 maps to 0): a^254 = a^2 * a^4 * ... * a^128.
  function automatic byte_t ginv(byte_t a);
    byte_t sq, r;
    sq = gmul(a, a);
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gmul(sq, sq);
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t a, int unsigned n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox_f(byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox_f(byte_t a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  // Round-constant steps: multiply by x, and divide by x.
  function automatic byte_t rcon_next(byte_t a);
    return xtime(a);
  endfunction

  function automatic byte_t rcon_prev(byte_t a);
    return a[0] ? (((a ^ 8'h1b) >> 1) | 8'h80) : (a >> 1);
  endfunction

endpackage
