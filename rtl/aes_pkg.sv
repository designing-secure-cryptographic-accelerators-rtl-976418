// aes_pkg: AES-128 building blocks shared by the round and key-expansion stages.
//
// Everything is computed, no lookup tables: the S-box is the multiplicative inverse in
// GF(2^8) (as x^254) followed by the FIPS-197 affine map; the inverse S-box applies the
// inverse affine map first. State layout follows FIPS-197: byte 0 of the 128-bit block is
// bits [127:120] and byte index = row + 4*column. The pipeline slot types used between
// stages are also defined here.
package aes_pkg;
  import ifc_pkg::*;

  localparam int unsigned NR         = 10;  // rounds of AES-128
  localparam int unsigned SUB_STAGES = 3;   // pipeline registers per round (30-cycle latency)

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  typedef enum logic {MODE_ENC = 1'b0, MODE_DEC = 1'b1} mode_e;

  // one slot of the data pipeline
  typedef struct packed {
    logic   valid;
    mode_e  mode;
    label_t tag;    // label of the data held in the slot
    label_t owner;  // label of the user (principal) that issued the block
    logic [3:0] id; // request identifier, returned with the result
    block_t state;
  } data_slot_t;

  // one slot of the key pipeline
  typedef struct packed {
    label_t tag;    // label of the key
    block_t rk;     // round key
  } key_slot_t;

  // key selector of a request: scratchpad key slots 0..3, or the master key
  localparam int unsigned KEY_SLOTS  = 4;
  localparam logic [2:0]  KSEL_MASTER = 3'd4;

  // entry of the input, output and extra data buffers
  typedef struct packed {
    label_t     tag;     // label of the data in the entry
    label_t     owner;   // label of the user that issued the request
    logic [3:0] id;      // request identifier
    mode_e      mode;    // encrypt / decrypt
    logic [2:0] key_sel; // key to use (input buffer only)
    logic       err;     // release refused by the declassifier (output buffers only)
    block_t     data;
  } buf_entry_t;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 in GF(2^8) (0 maps to 0)
  function automatic byte_t gf_inv(byte_t a);
    byte_t a2   = gf_mul(a, a);
    byte_t a3   = gf_mul(a2, a);
    byte_t a6   = gf_mul(a3, a3);
    byte_t a12  = gf_mul(a6, a6);
    byte_t a15  = gf_mul(a12, a3);
    byte_t a30  = gf_mul(a15, a15);
    byte_t a60  = gf_mul(a30, a30);
    byte_t a120 = gf_mul(a60, a60);
    byte_t a126 = gf_mul(a120, a6);
    byte_t a127 = gf_mul(a126, a);
    return gf_mul(a127, a127);
  endfunction

  function automatic byte_t sbox(byte_t a);
    byte_t b = gf_inv(a);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(byte_t s);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = s[(i+2)%8] ^ s[(i+5)%8] ^ s[(i+7)%8];
    return gf_inv(b ^ 8'h05);
  endfunction

  function automatic byte_t get_byte(block_t s, int idx);
    return s[127 - 8*idx -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = sbox(get_byte(s, i));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127 - 8*i -: 8] = inv_sbox(get_byte(s, i));
    return r;
  endfunction

  // row r is rotated left by r columns
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*c) -: 8] = get_byte(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8*(row + 4*((c + row) % 4)) -: 8] = get_byte(s, row + 4*c);
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = get_byte(s, 4*c);
      byte_t a1 = get_byte(s, 4*c + 1);
      byte_t a2 = get_byte(s, 4*c + 2);
      byte_t a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++) begin
      byte_t a0 = get_byte(s, 4*c);
      byte_t a1 = get_byte(s, 4*c + 1);
      byte_t a2 = get_byte(s, 4*c + 2);
      byte_t a3 = get_byte(s, 4*c + 3);
      r[127 - 8*(4*c)     -: 8] = gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09);
      r[127 - 8*(4*c + 1) -: 8] = gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d);
      r[127 - 8*(4*c + 2) -: 8] = gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b);
      r[127 - 8*(4*c + 3) -: 8] = gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e);
    end
    return r;
  endfunction

  // round constant of round i (1..10): x^(i-1) in GF(2^8)
  function automatic byte_t rcon(int unsigned i);
    byte_t r = 8'h01;
    for (int unsigned k = 1; k < i; k++) r = xtime(r);
    return r;
  endfunction

  function automatic logic [31:0] sub_rot_word(logic [31:0] w);
    return {sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0]), sbox(w[31:24])};
  endfunction

  // round key i from round key i-1
  function automatic block_t key_step_fwd(block_t k, int unsigned i);
    logic [31:0] w0, w1, w2, w3;
    w0 = k[127:96] ^ sub_rot_word(k[31:0]) ^ {rcon(i), 24'h0};
    w1 = k[95:64] ^ w0;
    w2 = k[63:32] ^ w1;
    w3 = k[31:0]  ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // round key i-1 from round key i
  function automatic block_t key_step_inv(block_t k, int unsigned i);
    logic [31:0] w0, w1, w2, w3;
    w3 = k[31:0]  ^ k[63:32];
    w2 = k[63:32] ^ k[95:64];
    w1 = k[95:64] ^ k[127:96];
    w0 = k[127:96] ^ sub_rot_word(w3) ^ {rcon(i), 24'h0};
    return {w0, w1, w2, w3};
  endfunction

endpackage
