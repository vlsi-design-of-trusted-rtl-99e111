// trusted_virtual_sensor: a virtual sensor whose measurement is a
// piecewise-affine function of up to four inputs over a hyper-rectangular
// partition of the input space (PWAR), encrypted and authenticated with
// AEGIS-128 under a key that is never stored: it is rebuilt at every
// power-up from the start-up values of the sensor's own SRAM (an SRAM PUF)
// and Helper Data kept in an external NVM.
// Blocks, wired as in the published architecture:
//   PWAR Unit          : sram_puf (4096 x 60 parameters), address_generator,
//                        arithmetic
//   Cryptographic Unit : hda, nonce_counter, aegis128
//   Control Unit       : control_unit (FSM, NVM addressing, SRAM port mux)
// The SRAM is shared: during configuration its power-up contents feed the
// HDA, then it is overwritten with the PWAR parameters.
// Interface: por_n is the power-on reset (a low pulse is also a power cycle
// of the SRAM model); nvm_addr / nvm_data reach the external NVM (data one
// clock after the address); x_valid / x_data take the four 12-bit inputs in
// four consecutive clocks while ready is high; out_valid pulses when nonce,
// ct (ciphertext, measurement in bits 25:0 of the plaintext) and tag are
// valid; state shows the control FSM state. Configuration takes about 21,300 clocks, a measurement 20 clocks.
// PUF_DEVICE_ID and PUF_FLIP_PERMIL only parameterise the SRAM simulation
// model: which chip it behaves like, and how often its stable cells flip.
module trusted_virtual_sensor
  import tvs_pkg::*;
#(
  parameter int unsigned PUF_DEVICE_ID   = 1,
  parameter int unsigned PUF_FLIP_PERMIL = 5
) (
  input  logic              clk,
  input  logic              por_n,
  output logic [NVM_AW-1:0] nvm_addr,
  input  logic [NVM_W-1:0]  nvm_data,
  input  logic              x_valid,
  input  logic [W_IN-1:0]   x_data,
  output logic              ready,
  output logic              out_valid,
  output block_t            nonce,
  output block_t            ct,
  output block_t            tag,
  output ctrl_state_e       state
);

  logic                sram_re, sram_we;
  logic [SRAM_AW-1:0]  sram_raddr, sram_waddr;
  logic [SRAM_W-1:0]   sram_rdata, sram_wdata;
  logic                hda_valid, hda_flush, hda_id_we, hda_key_done;
  hda_phase_e          hda_phase;
  logic [2:0]          hda_slice;
  logic [6:0]          hda_id_waddr_ofs;
  logic [SRAM_W-1:0]   hda_id_wdata;
  block_t              seed, key, cur_nonce;
  logic                nc_load, nc_inc;
  logic                ag_en, ar_en;
  logic [N_IN*W_IN-1:0] x_vec;
  logic [N_IN*PK_W-1:0] pk;
  logic [SRAM_AW-1:0]  ag_addr;
  logic [2:0]          n_used;
  logic [3:0]          frac;
  logic [W_Y-1:0]      y;
  logic                ae_start, ae_msg_valid, ae_ct_valid, ae_tag_valid;
  block_t              ae_msg, ae_ct, ae_tag;

  control_unit u_ctrl (
    .clk, .rst_n(por_n),
    .nvm_addr, .nvm_data,
    .x_valid, .x_data, .ready, .out_valid,
    .nonce_o(nonce), .ct_o(ct), .tag_o(tag), .state,
    .sram_re, .sram_raddr, .sram_we, .sram_waddr, .sram_wdata,
    .hda_valid, .hda_phase, .hda_slice, .hda_flush,
    .hda_id_we, .hda_id_waddr_ofs, .hda_id_wdata, .hda_key_done,
    .nc_load, .nc_inc, .nonce(cur_nonce),
    .ag_en, .x_vec, .pk, .ag_addr, .ar_en, .n_used, .frac, .y(y),
    .ae_start, .ae_msg_valid, .ae_msg, .ae_ct_valid, .ae_ct,
    .ae_tag_valid, .ae_tag
  );

  sram_puf #(
    .DEPTH(SRAM_DEPTH), .WIDTH(SRAM_W), .AW(SRAM_AW), .DEVICE_ID(PUF_DEVICE_ID),
    .FLIP_PERMIL(PUF_FLIP_PERMIL)
  ) u_sram (
    .clk, .por_n,
    .re(sram_re), .raddr(sram_raddr), .rdata(sram_rdata),
    .we(sram_we), .waddr(sram_waddr), .wdata(sram_wdata)
  );

  hda u_hda (
    .clk, .rst_n(por_n),
    .valid(hda_valid), .phase(hda_phase), .slice(hda_slice),
    .nvm_word(nvm_data), .sram_rdata, .id_flush(hda_flush),
    .id_we(hda_id_we), .id_waddr_ofs(hda_id_waddr_ofs), .id_wdata(hda_id_wdata),
    .seed, .key, .key_done(hda_key_done)
  );

  nonce_counter #(.W(128)) u_nonce (
    .clk, .rst_n(por_n), .load(nc_load), .seed, .inc(nc_inc), .nonce(cur_nonce)
  );

  aegis128 u_aegis (
    .clk, .rst_n(por_n), .start(ae_start), .key, .nonce(cur_nonce),
    .msg_valid(ae_msg_valid), .msg(ae_msg), .busy(), .init_done(),
    .ct(ae_ct), .ct_valid(ae_ct_valid), .tag(ae_tag), .tag_valid(ae_tag_valid)
  );

  address_generator #(.N_IN(N_IN), .W_IN(W_IN), .P_BITS(P_BITS), .PK_W(PK_W)) u_agen (
    .clk, .rst_n(por_n), .en(ag_en), .x(x_vec), .pk, .addr(ag_addr)
  );

  arithmetic #(.N_IN(N_IN), .W_IN(W_IN), .W_Y(W_Y)) u_arith (
    .clk, .rst_n(por_n), .en(ar_en), .x(x_vec), .f(sram_rdata),
    .n_used, .frac, .y(y)
  );

endmodule
