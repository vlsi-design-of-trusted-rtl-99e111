// tb_puf_stress: key recovery of the whole sensor under the worst start-up
// noise of the SRAM, and rejection of a copied NVM image on another chip.
// A chip is enrolled under nominal conditions: a low-noise SRAM model of
// device 1 (5 per mille flips) is powered up five times; the cells that never
// changed are the ID cells and Helper Data = repeated random key xor their
// first values. Two sensors are then run from the same NVM image:
//   - genuine : device 1 with 96 per mille flips on every power-up, the worst
//               measured change of operating conditions (start-up ramp time).
//               Up to 14 of 29 cells per key bit may flip; the repetition
//               code must still give the enrolled key, so every ciphertext
//               and tag must match the reference model.
//   - copy    : device 2, a different chip programmed with the same NVM.
//               About half its ID cells differ, so its key must differ and
//               none of its tags may verify under the enrolled key.
// Three power-ups of six measurements each are run. Counted: power-ups,
// PUF bit errors, the largest number of errors in one 29-bit codeword, and
// measurements the copy failed to authenticate.
module tb_puf_stress;
  import tvs_pkg::*;
  import aegis_ref_pkg::*;

  localparam int NW    = 21308;
  localparam int FRAC  = 4;
  localparam int POWER = 3;
  localparam int MEAS  = 6;

  logic clk = 0, por_n = 0;
  logic x_valid = 0;
  logic [11:0] x_data = '0;
  logic [14:0] g_addr, c_addr;
  logic [11:0] g_data, c_data;
  logic g_ready, g_ov, c_ready, c_ov;
  logic [127:0] g_nonce, g_ct, g_tag, c_nonce, c_ct, c_tag;
  ctrl_state_e g_state, c_state;
  int n_idle_both = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trusted_virtual_sensor #(.PUF_DEVICE_ID(1), .PUF_FLIP_PERMIL(96)) genuine (
    .clk, .por_n, .nvm_addr(g_addr), .nvm_data(g_data), .x_valid, .x_data,
    .ready(g_ready), .out_valid(g_ov), .nonce(g_nonce), .ct(g_ct), .tag(g_tag),
    .state(g_state));

  trusted_virtual_sensor #(.PUF_DEVICE_ID(2), .PUF_FLIP_PERMIL(5)) copy (
    .clk, .por_n, .nvm_addr(c_addr), .nvm_data(c_data), .x_valid, .x_data,
    .ready(c_ready), .out_valid(c_ov), .nonce(c_nonce), .ct(c_ct), .tag(c_tag),
    .state(c_state));

  // one NVM image, read by both sensors
  logic [11:0] nvm [NW];
  always_ff @(posedge clk) begin
    g_data <= nvm[g_addr];
    c_data <= nvm[c_addr];
  end

  // enrolment SRAM of device 1 under nominal conditions
  logic        e_por_n = 0, e_re = 0;
  logic [11:0] e_raddr = '0;
  logic [59:0] e_rdata;
  sram_puf #(.DEVICE_ID(1), .FLIP_PERMIL(5)) enrol (
    .clk, .por_n(e_por_n), .re(e_re), .raddr(e_raddr), .rdata(e_rdata),
    .we(1'b0), .waddr('0), .wdata('0));

  logic [59:0] ref_img [103];
  logic [59:0] chg [103];
  int id_pos [4320];
  int n_id;
  logic [127:0] k_true;
  logic [11:0] fpar [4096][5];
  int pk_v [4] = '{3, 3, 3, 3};

  int n_power = 0, n_puf_err = 0, worst_cw = 0, n_copy_rejected = 0;

  always @(posedge clk) if (g_state == ST_IDLE && c_state == ST_IDLE) n_idle_both++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic enrol_device();
    for (int r = 0; r < 5; r++) begin
      e_por_n = 0;
      @(negedge clk);
      e_por_n = 1;
      for (int w = 0; w < 103; w++) begin
        e_re = 1;
        e_raddr = 12'(w);
        @(negedge clk);
        if (r == 0) begin ref_img[w] = e_rdata; chg[w] = '0; end
        else chg[w] |= e_rdata ^ ref_img[w];
      end
    end
    e_re = 0;
  endtask

  task automatic build_nvm();
    for (int i = 0; i < NW; i++) nvm[i] = '0;
    for (int c = 0; c < 1860; c++) nvm[c / 12][c % 12] = chg[c / 60][c % 60];
    n_id = 0;
    for (int c = 0; c < 4320; c++) begin
      logic idc;
      idc = ~chg[31 + c / 60][c % 60];
      nvm[155 + c / 12][c % 12] = idc;
      if (idc) begin id_pos[n_id] = 31 * 60 + c; n_id++; end
    end
    check(n_id >= 3712, $sformatf("only %0d ID cells enrolled", n_id));
    k_true = {$urandom, $urandom, $urandom, $urandom};
    for (int j = 0; j < 3712; j++)
      nvm[515 + j / 12][j % 12] = k_true[j / 29] ^ ref_img[id_pos[j] / 60][id_pos[j] % 60];
    nvm[825] = 12'd4;
    nvm[826] = {3'(pk_v[0]), 3'(pk_v[1]), 3'(pk_v[2]), 3'(pk_v[3])};
    nvm[827] = 12'(FRAC);
    for (int a = 0; a < 4096; a++)
      for (int s = 0; s < 5; s++) begin
        fpar[a][s] = 12'($urandom);
        nvm[828 + 5 * a + s] = fpar[a][s];
      end
  endtask

  task automatic power_up();
    int cyc, e, errs;
    por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;
    errs = 0;
    for (int b = 0; b < 128; b++) begin
      e = 0;
      for (int j = 29 * b; j < 29 * b + 29; j++)
        if (genuine.u_sram.mem[id_pos[j] / 60][id_pos[j] % 60] !== ref_img[id_pos[j] / 60][id_pos[j] % 60])
          e++;
      errs += e;
      if (e > worst_cw) worst_cw = e;
    end
    n_puf_err += errs;
    n_power++;
    cyc = 0;
    while (!(g_ready && c_ready) && cyc < 30000) begin @(negedge clk); cyc++; end
    check(g_ready && c_ready, "a sensor never became ready");
  endtask

  task automatic measure();
    int a, xv [4], cyc;
    longint yv;
    logic [127:0] ect, etag, cct, ctag;
    for (int k = 0; k < 4; k++) xv[k] = $urandom % 4096;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      x_valid = 1;
      x_data  = 12'(xv[k]);
      @(negedge clk);
    end
    x_valid = 0;
    cyc = 4;
    while (!g_ov && cyc < 100) begin @(negedge clk); cyc++; end
    check(g_ov && c_ov, "no out_valid");
    a = 0;
    for (int k = 0; k < 4; k++) a = a * (2 ** pk_v[k]) + xv[k] / (2 ** (12 - pk_v[k]));
    yv = longint'(signed'(fpar[a][0])) * (1 << FRAC);
    for (int j = 1; j <= 4; j++)
      yv += longint'(signed'(fpar[a][j])) * longint'(signed'(12'(xv[j-1])));
    ref_aegis(k_true, g_nonce, {102'b0, 26'(yv)}, 6, ect, etag);
    check(g_ct === ect && g_tag === etag, $sformatf("genuine sensor: tag %h expected %h", g_tag, etag));
    ref_aegis(k_true, c_nonce, {102'b0, 26'(yv)}, 6, cct, ctag);
    check(c_ct !== cct && c_tag !== ctag, "copied NVM image authenticated on another chip");
    if (c_tag !== ctag) n_copy_rejected++;
  endtask

  initial begin
    enrol_device();
    build_nvm();
    for (int p = 0; p < POWER; p++) begin
      power_up();
      for (int m = 0; m < MEAS; m++) measure();
    end
    $display("power_ups=%0d puf_bit_errors=%0d (%0d per mille) worst_codeword_errors=%0d copy_rejected=%0d",
             n_power, n_puf_err, n_puf_err * 1000 / (3712 * n_power), worst_cw, n_copy_rejected);
    // about 9.6% of 3712 cells flip per power-up; check the noise really was high
    check(n_puf_err > 250 * n_power, "start-up noise lower than intended");
    check(worst_cw >= 7, "no codeword with many errors");
    check(n_copy_rejected == POWER * MEAS, "copy rejection count");
    check(n_idle_both > 0, "the two sensors never idled together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
