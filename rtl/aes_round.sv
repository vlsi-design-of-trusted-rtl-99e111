// aes_round: the AES encryption round function as AEGIS uses it,
// MixColumns(ShiftRows(SubBytes(state))), with no round key added (AEGIS
// xors the neighbouring state word in afterwards). Purely combinational.
// Interface: state_i / state_o are 128-bit AES states, byte 0 in bits
// 127:120, bytes taken column by column as in FIPS-197.
// The three operations are those named for the round; the S-box is computed
// as a GF(2^8) inversion plus the affine map rather than stored, which is
// this design's choice.
module aes_round
  import tvs_pkg::*;
(
  input  logic [127:0] state_i,
  output logic [127:0] state_o
);

  logic [7:0] sb [16];
  logic [7:0] sr [16];
  logic [7:0] mc [16];

  always_comb begin
    for (int i = 0; i < 16; i++)
      sb[i] = aes_sbox(state_i[127 - 8*i -: 8]);
    // ShiftRows: row r of column c comes from column (c + r) mod 4
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c + r] = sb[4*((c + r) % 4) + r];
    // MixColumns
    for (int c = 0; c < 4; c++) begin
      mc[4*c+0] = gf_mul(sr[4*c+0], 8'h02) ^ gf_mul(sr[4*c+1], 8'h03) ^ sr[4*c+2] ^ sr[4*c+3];
      mc[4*c+1] = sr[4*c+0] ^ gf_mul(sr[4*c+1], 8'h02) ^ gf_mul(sr[4*c+2], 8'h03) ^ sr[4*c+3];
      mc[4*c+2] = sr[4*c+0] ^ sr[4*c+1] ^ gf_mul(sr[4*c+2], 8'h02) ^ gf_mul(sr[4*c+3], 8'h03);
      mc[4*c+3] = gf_mul(sr[4*c+0], 8'h03) ^ sr[4*c+1] ^ sr[4*c+2] ^ gf_mul(sr[4*c+3], 8'h02);
    end
    for (int i = 0; i < 16; i++)
      state_o[127 - 8*i -: 8] = mc[i];
  end

endmodule
