// hda: Helper Data Algorithm of the SRAM PUF. It turns the power-up contents
// of the SRAM into the 128-bit AEGIS key and the 128-bit nonce seed while
// the masks and Helper Data stream in from the NVM, 12 bits per cycle.
//   PH_RND : each mask bit set selects one start-up bit of SRAM words 0..30
//            (RND cells); the first SEED_BITS selected bits form the seed,
//            first selected bit in seed bit 0.
//   PH_ID  : each mask bit set selects one start-up bit of SRAM words
//            31..102 (ID cells). Selected bits are packed into 60-bit words
//            and written back to a buffer region of the SRAM (id_we), since
//            the Helper Data only arrive after the whole ID mask.
//   PH_HLP : the buffered ID bits R' are read back and xored with the Helper
//            Data H, giving key_r ^ R ^ R'. Every REP consecutive bits are a
//            repetition codeword; a majority vote (at least REP/2+1 ones)
//            gives one key bit, key bit 0 first.
// Interface: the caller presents one NVM word per cycle (valid, phase,
// slice). slice s pairs the word with bits 12s+11..12s of the current SRAM
// word; on slice 0 that word must be on sram_rdata, and the block keeps it
// for slices 1..4. id_flush writes the last partial ID word. key_done rises
// once all KEY_BITS bits are decoded; seed is final after PH_RND.
// The selection by masks, the xor with Helper Data and the repetition code
// with r = 29 follow the published design. Processing 12 bits per cycle and
// parking the compacted ID bits in the SRAM are this design's choices.
module hda
  import tvs_pkg::*;
#(
  parameter int unsigned KEY_BITS_P  = KEY_BITS,
  parameter int unsigned REP_P       = REP,
  parameter int unsigned SEED_BITS_P = SEED_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  hda_phase_e        phase,
  input  logic [2:0]        slice,
  input  logic [NVM_W-1:0]  nvm_word,
  input  logic [SRAM_W-1:0] sram_rdata,
  input  logic              id_flush,
  output logic              id_we,
  output logic [6:0]        id_waddr_ofs,
  output logic [SRAM_W-1:0] id_wdata,
  output logic [SEED_BITS_P-1:0] seed,
  output logic [KEY_BITS_P-1:0]  key,
  output logic              key_done
);

  localparam int unsigned IDB = KEY_BITS_P * REP_P;   // ID bits used
  localparam int unsigned MAJ = REP_P / 2 + 1;        // votes for a one

  logic [SRAM_W-1:0]   word_q;
  logic [NVM_W-1:0]    cells;          // the 12 SRAM bits paired with nvm_word

  logic [7:0]          seed_cnt, seed_cnt_n;
  logic [SEED_BITS_P-1:0] seed_n;

  logic [SRAM_W+NVM_W-1:0] buf_q, buf_n;
  logic [6:0]          buf_cnt, buf_cnt_n;
  logic [6:0]          widx;
  logic                wr_n;

  logic [4:0]          ones_q, ones_n, pos_q, pos_n;
  logic [7:0]          kidx_q, kidx_n;
  logic [12:0]         used_q, used_n;
  logic [KEY_BITS_P-1:0] key_n;

  always_comb cells = (slice == 3'd0) ? sram_rdata[NVM_W-1:0]
                                      : word_q[NVM_W*slice +: NVM_W];

  // Seed: append the selected RND bits
  always_comb begin
    seed_n     = seed;
    seed_cnt_n = seed_cnt;
    if (valid && phase == PH_RND)
      for (int b = 0; b < NVM_W; b++)
        if (nvm_word[b] && seed_cnt_n < 8'(SEED_BITS_P)) begin
          seed_n[seed_cnt_n[6:0]] = cells[b];
          seed_cnt_n = seed_cnt_n + 8'd1;
        end
  end

  // ID: append the selected ID bits, emit full 60-bit words
  always_comb begin
    buf_n     = buf_q;
    buf_cnt_n = buf_cnt;
    wr_n      = 1'b0;
    if (valid && phase == PH_ID)
      for (int b = 0; b < NVM_W; b++)
        if (nvm_word[b]) begin
          buf_n[buf_cnt_n] = cells[b];
          buf_cnt_n = buf_cnt_n + 7'd1;
        end
    if (buf_cnt_n >= 7'(SRAM_W)) begin
      wr_n      = 1'b1;
      buf_cnt_n = buf_cnt_n - 7'(SRAM_W);
    end else if (id_flush && buf_cnt_n != 0) begin
      wr_n      = 1'b1;
      buf_cnt_n = '0;
    end
  end

  // Key: xor with Helper Data and majority-decode the repetition code
  always_comb begin
    logic kb;
    kb     = 1'b0;
    ones_n = ones_q;
    pos_n  = pos_q;
    kidx_n = kidx_q;
    used_n = used_q;
    key_n  = key;
    if (valid && phase == PH_HLP)
      for (int b = 0; b < NVM_W; b++)
        if (used_n < 13'(IDB)) begin
          kb     = nvm_word[b] ^ cells[b];
          ones_n = ones_n + 5'(kb);
          used_n = used_n + 13'd1;
          if (pos_n == 5'(REP_P - 1)) begin
            key_n[kidx_n[6:0]] = (ones_n >= 5'(MAJ));
            kidx_n = kidx_n + 8'd1;
            ones_n = '0;
            pos_n  = '0;
          end else begin
            pos_n = pos_n + 5'd1;
          end
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q       <= '0;
      seed         <= '0;
      seed_cnt     <= '0;
      buf_q        <= '0;
      buf_cnt      <= '0;
      widx         <= '0;
      id_we        <= 1'b0;
      id_waddr_ofs <= '0;
      id_wdata     <= '0;
      ones_q       <= '0;
      pos_q        <= '0;
      kidx_q       <= '0;
      used_q       <= '0;
      key          <= '0;
    end else begin
      if (valid && slice == 3'd0) word_q <= sram_rdata;
      seed     <= seed_n;
      seed_cnt <= seed_cnt_n;
      id_we    <= wr_n;
      if (wr_n) begin
        id_wdata     <= buf_n[SRAM_W-1:0];
        id_waddr_ofs <= widx;
        widx         <= widx + 7'd1;
        buf_q        <= (buf_n >> SRAM_W);
      end else begin
        buf_q <= buf_n;
      end
      buf_cnt <= buf_cnt_n;
      ones_q  <= ones_n;
      pos_q   <= pos_n;
      kidx_q  <= kidx_n;
      used_q  <= used_n;
      key     <= key_n;
    end
  end

  assign key_done = (kidx_q == 8'(KEY_BITS_P));

endmodule
