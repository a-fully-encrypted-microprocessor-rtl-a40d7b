// kpu_pkg: shared types, constants and functions of the encrypted-running
// processor ("KPU").
//
// The processor keeps user data encrypted in a 64-bit physical word that holds
// a 32-bit logical datum. The cipher is a Rijndael instance with a 64-bit block
// (a 4x2 byte state, Nb = 2), a 128-bit embedded key (Nk = 4) and 10 rounds,
// one round per pipeline stage. The document names 64-bit Rijndael with a
// 10-stage codec; the state layout, the row shifts for Nb = 2 (0,1,0,1), the key
// and the pad layout are this design's choices.
//
// Byte i of a 64-bit block is bits [63-8i -: 8]; column c holds bytes 4c..4c+3
// and row r of column c is byte 4c+r (the usual Rijndael column-major order).
//
// Program-address protocol (from the document): a 32-bit program address
// zero-filled to 64 bits counts as the "encrypted" form; its "decrypted" form is
// the same word with the top 16 bits set to 16'h7fff. Real data is padded so that
// its plaintext never starts with 16'h7fff (bit 63 of a data plaintext is 1).
//
// The instruction encodings are those of OpenRISC 1000 (ORBIS32) for the subset
// implemented; the prefix instruction uses the custom opcode 6'h1c, which is this
// design's choice.
package kpu_pkg;

  typedef logic [63:0] word_t;   // one physical (encrypted) word
  typedef logic [31:0] data_t;   // one logical datum

  localparam int unsigned MAX_ROUNDS = 14;
  localparam int unsigned CODEC_ROUNDS = 10;
  localparam logic [127:0] DEFAULT_KEY = 128'h2b7e1516_28aed2a6_abf71588_09cf4f3c;

  localparam logic [15:0] PA_TAG = 16'h7fff;   // top 16 bits of a decrypted program address

  // ------------------------------------------------------------------ GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box table, built from the generator 3 of GF(2^8)* and its inverse 0xf6:
  // walking p = 3^k and q = 3^-k together gives q = 1/p, to which the Rijndael
  // affine map (q ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63) is applied.
  typedef logic [255:0][7:0] sbox_t;

  function automatic sbox_t gen_sbox();
    sbox_t t;
    logic [7:0] p;
    logic [7:0] q;
    logic [7:0] v;
    p = 8'h01;
    q = 8'h01;
    t[0] = 8'h63;
    for (int k = 0; k < 255; k++) begin
      v = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]} ^ 8'h63;
      t[p] = v;
      p = p ^ xtime(p);          // p *= 3
      q = gmul(q, 8'hf6);        // q *= 1/3
    end
    return t;
  endfunction

  function automatic sbox_t gen_inv_sbox(input sbox_t s);
    sbox_t t;
    for (int i = 0; i < 256; i++) t[s[i]] = 8'(i);
    return t;
  endfunction

  localparam sbox_t SBOX = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox(SBOX);

  // ------------------------------------------------------------ key schedule
  // Standard Rijndael key expansion for Nk = 4 and Nb = 2: round key r is the
  // word pair w[2r], w[2r+1].
  typedef logic [MAX_ROUNDS:0][63:0] rkeys_t;

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic rkeys_t key_expand(input logic [127:0] key, input int unsigned rounds);
    logic [2*(MAX_ROUNDS+1)-1:0][31:0] w;
    logic [31:0] t;
    logic [7:0] rcon;
    rkeys_t rk;
    w = '0;
    rk = '0;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 2 * (MAX_ROUNDS + 1); i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = sub_word({t[23:0], t[31:24]}) ^ {rcon, 24'h0};
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= MAX_ROUNDS; r++)
      if (r <= rounds) rk[r] = {w[2*r], w[2*r+1]};
    return rk;
  endfunction

  // ------------------------------------------------------------ round steps
  function automatic logic [7:0] get_b(input word_t s, input int i);
    return s[63-8*i -: 8];
  endfunction

  function automatic word_t sub_bytes(input word_t s);
    word_t o;
    for (int i = 0; i < 8; i++) o[63-8*i -: 8] = SBOX[get_b(s, i)];
    return o;
  endfunction

  function automatic word_t inv_sub_bytes(input word_t s);
    word_t o;
    for (int i = 0; i < 8; i++) o[63-8*i -: 8] = INV_SBOX[get_b(s, i)];
    return o;
  endfunction

  // Rows 1 and 3 swap their two columns; rows 0 and 2 stay. With two columns
  // the shift is its own inverse.
  function automatic word_t shift_rows(input word_t s);
    word_t o;
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < 4; r++)
        o[63-8*(4*c+r) -: 8] = get_b(s, 4*((c + (r % 2)) % 2) + r);
    return o;
  endfunction

  // Products by the fixed MixColumns coefficients, as xtime chains:
  // 2x, 3x = 2x ^ x, 9x = 8x ^ x, 11x = 8x ^ 2x ^ x, 13x = 8x ^ 4x ^ x,
  // 14x = 8x ^ 4x ^ 2x.
  function automatic logic [7:0] m2(input logic [7:0] x);  return xtime(x); endfunction
  function automatic logic [7:0] m3(input logic [7:0] x);  return xtime(x) ^ x; endfunction
  function automatic logic [7:0] m9(input logic [7:0] x);  return xtime(xtime(xtime(x))) ^ x; endfunction
  function automatic logic [7:0] m11(input logic [7:0] x); return xtime(xtime(xtime(x))) ^ xtime(x) ^ x; endfunction
  function automatic logic [7:0] m13(input logic [7:0] x); return xtime(xtime(xtime(x))) ^ xtime(xtime(x)) ^ x; endfunction
  function automatic logic [7:0] m14(input logic [7:0] x); return xtime(xtime(xtime(x))) ^ xtime(xtime(x)) ^ xtime(x); endfunction

  function automatic logic [31:0] mix_col(input logic [31:0] a, input logic inv);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = a;
    if (!inv)
      return {m2(a0) ^ m3(a1) ^ a2 ^ a3,
              a0 ^ m2(a1) ^ m3(a2) ^ a3,
              a0 ^ a1 ^ m2(a2) ^ m3(a3),
              m3(a0) ^ a1 ^ a2 ^ m2(a3)};
    else
      return {m14(a0) ^ m11(a1) ^ m13(a2) ^ m9(a3),
              m9(a0) ^ m14(a1) ^ m11(a2) ^ m13(a3),
              m13(a0) ^ m9(a1) ^ m14(a2) ^ m11(a3),
              m11(a0) ^ m13(a1) ^ m9(a2) ^ m14(a3)};
  endfunction

  function automatic word_t mix_columns(input word_t s, input logic inv);
    return {mix_col(s[63:32], inv), mix_col(s[31:0], inv)};
  endfunction

  // One encryption round: SubBytes, ShiftRows, MixColumns (not in the last
  // round), AddRoundKey.
  function automatic word_t enc_round(input word_t s, input word_t rk, input logic last);
    word_t t;
    t = shift_rows(sub_bytes(s));
    if (!last) t = mix_columns(t, 1'b0);
    return t ^ rk;
  endfunction

  // One round of the straightforward inverse cipher: InvShiftRows,
  // InvSubBytes, AddRoundKey, InvMixColumns (not after the last round).
  function automatic word_t dec_round(input word_t s, input word_t rk, input logic last);
    word_t t;
    t = inv_sub_bytes(shift_rows(s)) ^ rk;
    if (!last) t = mix_columns(t, 1'b1);
    return t;
  endfunction

  // ---------------------------------------------------- address scrambling
  // User data addresses leave the core hashed by a keyed bijection of the
  // 32-bit plaintext address (xor, multiply by an odd constant, xor).
  localparam logic [31:0] ADDR_K0 = 32'h6a09e667;
  localparam logic [31:0] ADDR_K1 = 32'hbb67ae85;
  localparam logic [31:0] ADDR_MUL = 32'h9e3779b1;   // odd, hence invertible mod 2^32

  function automatic data_t addr_scramble(input data_t a);
    return ((a ^ ADDR_K0) * ADDR_MUL) ^ ADDR_K1;
  endfunction

  // ---------------------------------------------------------------- ALU
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_MUL,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_ROR, ALU_MOVHI, ALU_PASSB,
    ALU_SFEQ, ALU_SFNE, ALU_SFGTU, ALU_SFGEU, ALU_SFLTU, ALU_SFLEU,
    ALU_SFGTS, ALU_SFGES, ALU_SFLTS, ALU_SFLES
  } alu_op_e;

  // ------------------------------------------------------- OR1K opcodes
  localparam logic [5:0] OPC_J      = 6'h00;
  localparam logic [5:0] OPC_JAL    = 6'h01;
  localparam logic [5:0] OPC_BNF    = 6'h03;
  localparam logic [5:0] OPC_BF     = 6'h04;
  localparam logic [5:0] OPC_NOP    = 6'h05;
  localparam logic [5:0] OPC_MOVHI  = 6'h06;
  localparam logic [5:0] OPC_SYS    = 6'h08;
  localparam logic [5:0] OPC_RFE    = 6'h09;
  localparam logic [5:0] OPC_JR     = 6'h11;
  localparam logic [5:0] OPC_JALR   = 6'h12;
  localparam logic [5:0] OPC_PREFIX = 6'h1c;
  localparam logic [5:0] OPC_LD     = 6'h20;
  localparam logic [5:0] OPC_LWZ    = 6'h21;
  localparam logic [5:0] OPC_ADDI   = 6'h27;
  localparam logic [5:0] OPC_ANDI   = 6'h29;
  localparam logic [5:0] OPC_ORI    = 6'h2a;
  localparam logic [5:0] OPC_XORI   = 6'h2b;
  localparam logic [5:0] OPC_MULI   = 6'h2c;
  localparam logic [5:0] OPC_MFSPR  = 6'h2d;
  localparam logic [5:0] OPC_SFI    = 6'h2f;
  localparam logic [5:0] OPC_MTSPR  = 6'h30;
  localparam logic [5:0] OPC_SD     = 6'h34;
  localparam logic [5:0] OPC_SW     = 6'h35;
  localparam logic [5:0] OPC_ALU    = 6'h38;
  localparam logic [5:0] OPC_SF     = 6'h39;

  localparam logic [15:0] SPR_SR   = 16'd17;
  localparam logic [15:0] SPR_EPCR = 16'd32;
  localparam logic [15:0] SPR_ESR  = 16'd64;

  localparam logic [31:0] VEC_RESET   = 32'h0000_0100;
  localparam logic [31:0] VEC_ILLEGAL = 32'h0000_0700;
  localparam logic [31:0] VEC_SYSCALL = 32'h0000_0c00;

  localparam logic [5:0] REG_FLAG = 6'd32;   // the SR[F] flag, renamed as register 32
  localparam logic [5:0] REG_LR   = 6'd9;    // link register of l.jal / l.jalr

  // Instruction classes as the pipeline sees them.
  typedef enum logic [4:0] {
    C_NOP, C_ALU, C_LOAD, C_STORE, C_BRANCH, C_JUMP, C_JREG,
    C_PREFIX, C_SYS, C_RFE, C_MTSPR, C_MFSPR, C_ILLEGAL, C_HALT,
    C_SYNC_ENC, C_SYNC_DEC
  } iclass_e;

  // Performance and event counters of the core.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] retired_user;
    logic [31:0] retired_sup;
    logic [31:0] prefixes;
    logic [31:0] cfg_b;            // user instructions that took configuration B
    logic [31:0] stall_read;       // cycles held at the A read stage
    logic [31:0] stall_b_read;     // cycles held at the B read stage
    logic [31:0] stall_exec;       // cycles held at execute (drain, sync, memory order)
    logic [31:0] fwd_used;         // operands taken from the forwarding network
    logic [31:0] mispredicts;
    logic [31:0] mode_switches;
    logic [31:0] sync_regs;        // registers re-encrypted or re-decrypted at a mode switch
    logic [31:0] udc_read_hits;
    logic [31:0] udc_read_misses;
    logic [31:0] udc_write_hits;
    logic [31:0] udc_write_misses;
    logic [31:0] exceptions;
    logic [31:0] mem_order;        // cycles a user load waited for an in-flight store
  } perf_t;

endpackage
