// tb_trusted_virtual_sensor: end-to-end test of the sensor at its full size
// (no parameter overrides), programmed with the yaw-rate partition of three
// inputs split into 4, 16 and 2 intervals (p = 2, 4, 1; 128 hyper-
// rectangles) and random affine coefficients for all 4096 SRAM words.
//  1. Enrolment: a second SRAM model of the same device is powered up five
//     times; cells that never change are ID cells, the others RND cells.
//     Helper Data = repeated random key xor the ID cells' first values.
//  2. The NVM image (masks, Helper Data, PWAR configuration, parameters) is
//     served one word per clock, one clock after the address.
//  3. After power-up the sensor configures itself; then measurements are
//     taken. Each result is checked against an independent model: interval
//     lookup, affine function, and AEGIS under the enrolled key with the
//     nonce the sensor reports. Nonces must count up by one.
//  4. A power cycle repeats configuration and measurements.
// Counted mechanisms: configuration runs, each FSM state, power cycles,
// PUF bit errors corrected by the repetition code, nonce updates, distinct
// hyper-rectangles. Latencies: configuration 21,308 NVM reads plus at most
// 8 clocks; a measurement 20 clocks from the first input word to out_valid.
module tb_trusted_virtual_sensor;
  import tvs_pkg::*;
  import aegis_ref_pkg::*;

  localparam int NW = 21308;

  logic clk = 0, por_n = 0;
  logic [14:0] nvm_addr;
  logic [11:0] nvm_data;
  logic x_valid = 0;
  logic [11:0] x_data = '0;
  logic ready, out_valid;
  logic [127:0] nonce, ct, tag;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trusted_virtual_sensor dut (.clk, .por_n, .nvm_addr, .nvm_data, .x_valid, .x_data,
                              .ready, .out_valid, .nonce, .ct, .tag, .state);

  // NVM
  logic [11:0] nvm [NW];
  always_ff @(posedge clk) nvm_data <= nvm[nvm_addr];

  // Enrolment SRAM of the same device
  logic        e_por_n = 0, e_re = 0;
  logic [11:0] e_raddr = '0;
  logic [59:0] e_rdata;
  sram_puf #(.DEVICE_ID(1)) enrol (.clk, .por_n(e_por_n), .re(e_re), .raddr(e_raddr),
                                   .rdata(e_rdata), .we(1'b0), .waddr('0), .wdata('0));

  logic [59:0] ref_img [103];
  logic [59:0] chg [103];
  int id_pos [4320];
  int n_id;
  logic [127:0] k_true;
  logic [11:0] fpar [4096][5];
  int pk_v [4] = '{2, 4, 1, 0};
  localparam int FRAC = 6;

  // mechanism counters
  int n_conf = 0, n_power = 0, n_meas = 0, n_nonce_step = 0, n_puf_err = 0;
  int st_seen [11];
  bit region_hit [4096];

  always @(posedge clk) if (por_n) st_seen[int'(state)]++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
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
        @(negedge clk);             // read data of word w is now on e_rdata
        if (r == 0) begin ref_img[w] = e_rdata; chg[w] = '0; end
        else chg[w] |= e_rdata ^ ref_img[w];
      end
    end
    e_re = 0;
  endtask

  task automatic build_nvm();
    int j;
    for (int i = 0; i < NW; i++) nvm[i] = '0;
    for (int c = 0; c < 1860; c++) nvm[c / 12][c % 12] = chg[c / 60][c % 60];
    n_id = 0;
    for (int c = 0; c < 4320; c++) begin
      logic idc;
      idc = ~chg[31 + c / 60][c % 60];
      nvm[155 + c / 12][c % 12] = idc;
      if (idc) begin id_pos[n_id] = 31 * 60 + c; n_id++; end
    end
    k_true = {$urandom, $urandom, $urandom, $urandom};
    for (j = 0; j < 3712; j++)
      nvm[515 + j / 12][j % 12] = k_true[j / 29] ^ ref_img[id_pos[j] / 60][id_pos[j] % 60];
    nvm[825] = 12'd3;
    nvm[826] = {3'(pk_v[0]), 3'(pk_v[1]), 3'(pk_v[2]), 3'(pk_v[3])};
    nvm[827] = 12'(FRAC);
    for (int a = 0; a < 4096; a++)
      for (int s = 0; s < 5; s++) begin
        fpar[a][s] = 12'($urandom);
        nvm[828 + 5 * a + s] = fpar[a][s];
      end
  endtask

  task automatic power_up_and_configure();
    int cyc, errs;
    por_n = 0;
    repeat (2) @(negedge clk);
    por_n = 1;
    // bit errors of this power-up against enrolment, over the ID cells in use
    errs = 0;
    for (int j = 0; j < 3712; j++)
      if (dut.u_sram.mem[id_pos[j] / 60][id_pos[j] % 60] !== ref_img[id_pos[j] / 60][id_pos[j] % 60])
        errs++;
    n_puf_err += errs;
    n_power++;
    cyc = 0;
    while (!ready && cyc < 30000) begin @(negedge clk); cyc++; end
    check(ready, "sensor never became ready");
    check(cyc >= NW && cyc <= NW + 8, $sformatf("configuration took %0d clocks", cyc));
    n_conf++;
  endtask

  task automatic measure(input int xv [4], inout logic [127:0] last_nonce, input bit first);
    int a, cyc;
    longint yv;
    logic [127:0] ect, etag;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      x_valid = 1;
      x_data  = 12'(xv[k]);
      @(negedge clk);
    end
    x_valid = 0;
    cyc = 4;
    while (!out_valid && cyc < 100) begin @(negedge clk); cyc++; end
    check(out_valid, "no out_valid");
    check(cyc == 20, $sformatf("measurement took %0d clocks, expected 20", cyc));
    a = 0;
    for (int k = 0; k < 4; k++)
      a = a * (2 ** pk_v[k]) + (xv[k] & 12'hfff) / (2 ** (12 - pk_v[k]));
    region_hit[a] = 1;
    yv = longint'(signed'(fpar[a][0])) * (1 << FRAC);
    for (int j = 1; j <= 3; j++)
      yv += longint'(signed'(fpar[a][j])) * longint'(signed'(12'(xv[j-1])));
    ref_aegis(k_true, nonce, {102'b0, 26'(yv)}, 6, ect, etag);
    check(ct === ect,  $sformatf("ciphertext %h expected %h (y=%0d)", ct, ect, yv));
    check(tag === etag, $sformatf("tag %h expected %h", tag, etag));
    if (!first) begin
      check(nonce === last_nonce + 1, "nonce did not advance by one");
      n_nonce_step++;
    end
    last_nonce = nonce;
    n_meas++;
  endtask

  initial begin
    logic [127:0] ln, seed1;
    int xv [4];
    enrol_device();
    build_nvm();
    for (int p = 0; p < 2; p++) begin
      power_up_and_configure();
      for (int m = 0; m < 24; m++) begin
        for (int k = 0; k < 4; k++) xv[k] = $urandom % 4096;
        measure(xv, ln, m == 0);
        if (m == 0 && p == 0) seed1 = nonce;
        if (m == 0 && p == 1) check(nonce !== seed1, "nonce seed repeated after power cycle");
      end
    end
    begin
      int nreg;
      nreg = 0;
      foreach (region_hit[i]) nreg += region_hit[i];
      check(nreg >= 20, $sformatf("only %0d hyper-rectangles visited", nreg));
      $display("configurations=%0d power_ups=%0d measurements=%0d nonce_updates=%0d puf_bit_errors_corrected=%0d regions=%0d",
               n_conf, n_power, n_meas, n_nonce_step, n_puf_err, nreg);
    end
    for (int s = 0; s < 11; s++)
      check(st_seen[s] > 0, $sformatf("state %0d never visited", s));
    check(n_conf == 2 && n_power == 2, "configuration after each power-up");
    check(n_nonce_step > 0, "nonce updates");
    check(n_puf_err > 0, "no PUF bit error was corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
