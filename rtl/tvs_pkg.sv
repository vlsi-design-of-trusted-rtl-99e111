// tvs_pkg: constants, types and helper functions shared by the trusted
// virtual sensor. It fixes the sizes of the prototype (four 12-bit inputs,
// 4096 x 60-bit parameter SRAM, 128-bit key and nonce, 29-bit repetition
// code), the layout of the non-volatile memory that configures the sensor,
// and the arithmetic of the AES round used by AEGIS-128.
// The sizes are those of the published prototype. The NVM word map, the
// placement of the compacted ID buffer in the SRAM and the AEGIS constants
// (taken from the AEGIS specification) are choices of this design.
package tvs_pkg;

  // PWAR unit
  localparam int unsigned N_IN   = 4;    // maximum number of inputs n
  localparam int unsigned W_IN   = 12;   // bits per input and per coefficient
  localparam int unsigned W_Y    = 26;   // bits of the measurement y
  localparam int unsigned P_BITS = 12;   // p: up to 2^p hyper-rectangles
  localparam int unsigned Q_BITS = 7;    // q: up to 2^q intervals per input
  localparam int unsigned PK_W   = 3;    // bits to hold one p_k (0..7)

  // SRAM
  localparam int unsigned SRAM_DEPTH = 4096;
  localparam int unsigned SRAM_W     = (N_IN + 1) * W_IN;  // 60
  localparam int unsigned SRAM_AW    = 12;
  localparam int unsigned SLICES     = SRAM_W / W_IN;      // 5 NVM words per SRAM word

  // Cryptographic unit
  localparam int unsigned KEY_BITS   = 128;
  localparam int unsigned REP        = 29;                 // repetition code length r
  localparam int unsigned ID_BITS    = KEY_BITS * REP;     // 3712
  localparam int unsigned SEED_BITS  = 128;

  // NVM
  localparam int unsigned NVM_W      = 12;
  localparam int unsigned NVM_AW     = 15;
  localparam int unsigned RND_WORDS  = 31;                 // SRAM words holding RND candidates
  localparam int unsigned ID_WORDS   = 72;                 // SRAM words holding ID candidates
  localparam int unsigned HLP_NVM    = 310;                // NVM words of Helper Data
  localparam int unsigned CFG_NVM    = 3;                  // NVM words of PWAR configuration

  localparam int unsigned NVM_RND_BASE = 0;
  localparam int unsigned NVM_ID_BASE  = NVM_RND_BASE + RND_WORDS * SLICES;   // 155
  localparam int unsigned NVM_HLP_BASE = NVM_ID_BASE + ID_WORDS * SLICES;     // 515
  localparam int unsigned NVM_CFG_BASE = NVM_HLP_BASE + HLP_NVM;              // 825
  localparam int unsigned NVM_PAR_BASE = NVM_CFG_BASE + CFG_NVM;              // 828
  localparam int unsigned NVM_WORDS    = NVM_PAR_BASE + SRAM_DEPTH * SLICES;  // 21308

  // SRAM regions used during configuration (start-up values at the bottom)
  localparam int unsigned SRAM_RND_BASE = 0;
  localparam int unsigned SRAM_ID_BASE  = RND_WORDS;                          // 31
  localparam int unsigned SRAM_IDBUF_BASE = RND_WORDS + ID_WORDS;             // 103

  // Phases of the HDA stream
  typedef enum logic [1:0] {
    PH_RND = 2'd0,
    PH_ID  = 2'd1,
    PH_HLP = 2'd2
  } hda_phase_e;

  // Control unit states: power-up, three configuration states, idle and six
  // trusted-sensing states
  typedef enum logic [3:0] {
    ST_OFF_ON = 4'd0,
    ST_CONF1  = 4'd1,
    ST_CONF2  = 4'd2,
    ST_CONF3  = 4'd3,
    ST_IDLE   = 4'd4,
    ST_TS1    = 4'd5,
    ST_TS2    = 4'd6,
    ST_TS3    = 4'd7,
    ST_TS4    = 4'd8,
    ST_TS5    = 4'd9,
    ST_TS6    = 4'd10
  } ctrl_state_e;

  // AEGIS-128 constants (Fibonacci sequence modulo 256), byte 0 leftmost
  localparam logic [127:0] AEGIS_CONST1 = 128'h000101020305080d1522375990e97962;
  localparam logic [127:0] AEGIS_CONST2 = 128'hdb3d18556dc22ff12011314273b528dd;

  typedef logic [127:0] block_t;
  typedef block_t [4:0] aegis_state_t;   // index k is S_{i,k}

  // Multiplication in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  // AES S-box: multiplicative inverse (a^254, 0 maps to 0) then affine map
  function automatic logic [7:0] aes_sbox(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128, inv, s;
    a2   = gf_mul(a, a);
    a4   = gf_mul(a2, a2);
    a8   = gf_mul(a4, a4);
    a16  = gf_mul(a8, a8);
    a32  = gf_mul(a16, a16);
    a64  = gf_mul(a32, a32);
    a128 = gf_mul(a64, a64);
    inv  = gf_mul(gf_mul(gf_mul(a2, a4), gf_mul(a8, a16)),
                  gf_mul(gf_mul(a32, a64), a128));
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

endpackage
