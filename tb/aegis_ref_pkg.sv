// aegis_ref_pkg: reference model used by the testbenches. It computes the
// AES round and AEGIS-128 as written for the sensor in plain procedural code,
// independently of the RTL: the S-box is found by walking the multiplicative
// group with generator 3 (not by inversion), MixColumns uses xtime.
package aegis_ref_pkg;

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int s);
    return (v << s) | (v >> (8 - s));
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] p, q, x;
    if (a == 8'h00) return 8'h63;
    p = 8'h01;
    q = 8'h01;
    do begin
      p = p ^ (p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ (q << 1);
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      if (p == a) return x ^ 8'h63;
    end while (p != 8'h01);
    return 8'h00;
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] v);
    return {v[6:0], 1'b0} ^ (v[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] ref_aes_round(input logic [127:0] s);
    logic [7:0] st [4][4];
    logic [7:0] t  [4][4];
    logic [7:0] a0, a1, a2, a3;
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        st[r][c] = ref_sbox(s[127 - 8*(4*c + r) -: 8]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        t[r][c] = st[r][(c + r) % 4];
    for (int c = 0; c < 4; c++) begin
      a0 = t[0][c]; a1 = t[1][c]; a2 = t[2][c]; a3 = t[3][c];
      st[0][c] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      st[1][c] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      st[2][c] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      st[3][c] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = st[r][c];
    return o;
  endfunction

  typedef logic [127:0] ref_state_t [5];

  function automatic void ref_update(ref ref_state_t s, input logic [127:0] m);
    ref_state_t n;
    n[0] = ref_aes_round(s[4]) ^ s[0] ^ m;
    n[1] = ref_aes_round(s[0]) ^ s[1];
    n[2] = ref_aes_round(s[1]) ^ s[2];
    n[3] = ref_aes_round(s[2]) ^ s[3];
    n[4] = ref_aes_round(s[3]) ^ s[4];
    s = n;
  endfunction

  localparam logic [127:0] C1 = 128'h000101020305080d1522375990e97962;
  localparam logic [127:0] C2 = 128'hdb3d18556dc22ff12011314273b528dd;

  function automatic void ref_aegis(input logic [127:0] key, input logic [127:0] nonce,
                                    input logic [127:0] y, input int final_rounds,
                                    output logic [127:0] ct, output logic [127:0] tag);
    ref_state_t s;
    logic [127:0] tmp;
    s[0] = key ^ nonce;
    s[1] = C1;
    s[2] = C2;
    s[3] = key ^ C1;
    s[4] = key ^ C2;
    for (int i = -10; i <= -1; i++)
      ref_update(s, (i % 2 != 0) ? (key ^ nonce) : key);
    ct = y ^ s[1] ^ s[4] ^ (s[2] & s[3]);
    ref_update(s, y);
    tmp = s[3] ^ 128'd128;
    for (int i = 1; i <= final_rounds; i++)
      ref_update(s, tmp);
    tag = s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
  endfunction

endpackage
