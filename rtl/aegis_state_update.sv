// aegis_state_update: one AEGIS-128 StateUpdate, computed in a single
// combinational step. Five AES rounds work in parallel, one per state word:
//   S'0 = AESRound(S4) ^ S0 ^ m,  S'k = AESRound(S(k-1)) ^ Sk  for k = 1..4.
// The round on S4 wraps around to the first word together with the message
// word m. Structure and equations follow the published StateUpdate; the
// state is a packed array of five 128-bit words, index k holding S_{i,k}.
module aegis_state_update
  import tvs_pkg::*;
(
  input  aegis_state_t s_i,
  input  block_t       m_i,
  output aegis_state_t s_o
);

  block_t r [5];

  for (genvar k = 0; k < 5; k++) begin : g_round
    aes_round u_round (.state_i(s_i[k]), .state_o(r[k]));
  end

  always_comb begin
    s_o[0] = r[4] ^ s_i[0] ^ m_i;
    for (int k = 1; k < 5; k++)
      s_o[k] = r[k-1] ^ s_i[k];
  end

endmodule
