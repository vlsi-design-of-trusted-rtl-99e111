// aegis128: AEGIS-128 authenticated encryption of one 128-bit block, the
// virtual measurement. One StateUpdate circuit (five parallel AES rounds)
// is reused every cycle; a small FSM feeds it the right message word:
//   start      : S = {key^nonce, C1, C2, key^C1, key^C2}, first update
//   10 cycles  : nonce processing, m = key (even steps) or key^nonce (odd)
//   msg_valid  : C_t = y ^ S1 ^ S4 ^ (S2 & S3), then S = Update(S, y);
//                tmp = S3 ^ 128 is latched from the updated state
//   FINAL_ROUNDS cycles : S = Update(S, tmp)
//   1 cycle    : tag = S0 ^ S1 ^ S2 ^ S3 ^ S4
// Timing: init_done rises 10 cycles after start; ct_valid pulses the cycle
// after msg_valid is seen with init_done; tag_valid pulses FINAL_ROUNDS + 1
// cycles after that. ct and tag hold their values until the next start.
// The sequence of steps, the placement of the two constants in the initial
// state and the literal "xor 128" follow the published algorithm for the
// sensor; the constant values come from the AEGIS specification, and the
// tag's fifth term is S4 (the printed formula repeats S3). Latching tmp in
// the same cycle as the message update is this design's choice; it makes
// the tag phase FINAL_ROUNDS + 1 cycles long.
module aegis128
  import tvs_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS  = 10,
  parameter int unsigned FINAL_ROUNDS = 6
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t key,
  input  block_t nonce,
  input  logic   msg_valid,
  input  block_t msg,
  output logic   busy,
  output logic   init_done,
  output block_t ct,
  output logic   ct_valid,
  output block_t tag,
  output logic   tag_valid
);

  typedef enum logic [2:0] {A_IDLE, A_INIT, A_WAIT, A_FIN, A_TAG} a_state_e;

  a_state_e     st;
  aegis_state_t s, su_in, su_out;
  block_t       m, key_q, kn_q, tmp_q;
  logic [3:0]   cnt;

  aegis_state_update u_update (.s_i(su_in), .m_i(m), .s_o(su_out));

  // Operand selection for the single StateUpdate instance
  always_comb begin
    su_in = s;
    m     = key_q;
    unique case (st)
      A_IDLE: begin
        su_in[0] = key ^ nonce;
        su_in[1] = AEGIS_CONST1;
        su_in[2] = AEGIS_CONST2;
        su_in[3] = key ^ AEGIS_CONST1;
        su_in[4] = key ^ AEGIS_CONST2;
        m        = key;                       // step i = -10 is even
      end
      A_INIT:  m = cnt[0] ? kn_q : key_q;     // step i = -10 + cnt
      A_WAIT:  m = msg;
      A_FIN:   m = tmp_q;
      default: m = key_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= A_IDLE;
      s         <= '0;
      key_q     <= '0;
      kn_q      <= '0;
      tmp_q     <= '0;
      cnt       <= '0;
      ct        <= '0;
      tag       <= '0;
      ct_valid  <= 1'b0;
      tag_valid <= 1'b0;
      init_done <= 1'b0;
    end else begin
      ct_valid  <= 1'b0;
      tag_valid <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          key_q     <= key;
          kn_q      <= key ^ nonce;
          s         <= su_out;
          cnt       <= 4'd1;
          init_done <= 1'b0;
          st        <= (INIT_ROUNDS > 1) ? A_INIT : A_WAIT;
          if (INIT_ROUNDS <= 1) init_done <= 1'b1;
        end
        A_INIT: begin
          s   <= su_out;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(INIT_ROUNDS - 1)) begin
            st        <= A_WAIT;
            init_done <= 1'b1;
          end
        end
        A_WAIT: if (msg_valid) begin
          ct       <= msg ^ s[1] ^ s[4] ^ (s[2] & s[3]);
          ct_valid <= 1'b1;
          s        <= su_out;
          tmp_q    <= su_out[3] ^ block_t'(128);
          cnt      <= '0;
          st       <= A_FIN;
        end
        A_FIN: begin
          s   <= su_out;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(FINAL_ROUNDS - 1)) st <= A_TAG;
        end
        A_TAG: begin
          tag       <= s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
          tag_valid <= 1'b1;
          init_done <= 1'b0;
          st        <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign busy = (st != A_IDLE);

  // A start request is only honoured in A_IDLE
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> st == A_IDLE);

endmodule
