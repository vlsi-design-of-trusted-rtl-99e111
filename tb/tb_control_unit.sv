// tb_control_unit: runs the control FSM alone against simple stand-ins for
// the NVM (random image), the HDA (raises key_done two clocks after the last
// Helper Data word; issues three ID-buffer writes), the address generator,
// the arithmetic block and AEGIS (ciphertext 2 clocks after the measurement,
// tag 3 clocks later). It checks:
//  - every NVM word 0..21307 is read exactly once, in order;
//  - the HDA stream: 155/360/310 words per phase, slices 0..4 in turn, one
//    flush on the last ID-mask word, and an SRAM read of the right start-up
//    or buffer word on every slice 0 (31, 72 and 62 reads);
//  - ID-buffer writes reach SRAM words 103 + offset;
//  - the three configuration words and all 4096 parameter words (f_i0 in
//    bits 11:0) are written where they belong; the seed is loaded once;
//  - in trusted sensing: the inputs, the order TS1..TS6, the enables, the
//    nonce update and AEGIS start, and that outputs match the stand-ins.
module tb_control_unit;
  import tvs_pkg::*;

  localparam int NW = 21308;
  logic clk = 0, rst_n = 0;
  logic [14:0] nvm_addr;
  logic [11:0] nvm_data;
  logic x_valid = 0;
  logic [11:0] x_data = '0;
  logic ready, out_valid;
  block_t nonce_o, ct_o, tag_o;
  ctrl_state_e state;
  logic sram_re, sram_we;
  logic [11:0] sram_raddr, sram_waddr;
  logic [59:0] sram_wdata;
  logic hda_valid, hda_flush;
  hda_phase_e hda_phase;
  logic [2:0] hda_slice;
  logic hda_id_we = 0;
  logic [6:0] hda_id_waddr_ofs = '0;
  logic [59:0] hda_id_wdata = '0;
  logic hda_key_done = 0;
  logic nc_load, nc_inc;
  block_t nonce = '0;
  logic ag_en, ar_en;
  logic [47:0] x_vec;
  logic [11:0] pk, ag_addr;
  logic [2:0] n_used;
  logic [3:0] frac;
  logic [25:0] y = '0;
  logic ae_start, ae_msg_valid, ae_ct_valid = 0, ae_tag_valid = 0;
  block_t ae_msg, ae_ct = '0, ae_tag = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.*);

  logic [11:0] nvm [NW];
  always_ff @(posedge clk) nvm_data <= nvm[nvm_addr];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitors of the configuration mode
  int next_addr = 0, addr_err = 0, cnt_ph [3], slice_err = 0, flushes = 0;
  int rd_cnt [3], rd_err = 0, par_wr = 0, par_err = 0, idw_err = 0, loads = 0;
  int exp_slice = 0;
  logic [14:0] last_addr = '1;
  hda_phase_e last_ph = PH_RND;
  always @(posedge clk) if (rst_n) begin
    if (state inside {ST_CONF1, ST_CONF2, ST_CONF3} && nvm_addr != last_addr) begin
      if (int'(nvm_addr) != next_addr) addr_err++;
      next_addr = int'(nvm_addr) + 1;
      last_addr = nvm_addr;
    end
    if (hda_valid) begin
      if (hda_phase != last_ph) exp_slice = 0;
      last_ph = hda_phase;
      cnt_ph[int'(hda_phase)]++;
      if (int'(hda_slice) != exp_slice) slice_err++;
      exp_slice = (exp_slice + 1) % 5;
    end
    if (hda_flush) flushes++;
    if (nc_load) loads++;
    if (sram_re && state inside {ST_CONF1, ST_CONF2}) begin
      // the read issued now is for the word whose NVM data arrives next clock
      int base [3] = '{0, 31, 103};
      int ph;
      ph = (nvm_addr < 155) ? 0 : (nvm_addr < 515) ? 1 : 2;
      if (int'(sram_raddr) != base[ph] + rd_cnt[ph]) rd_err++;
      rd_cnt[ph]++;
    end
    if (sram_we && hda_id_we) begin
      if (sram_waddr != 12'(103 + hda_id_waddr_ofs) || sram_wdata != hda_id_wdata) idw_err++;
    end else if (sram_we) begin
      logic [59:0] e;
      for (int s = 0; s < 5; s++) e[12*s +: 12] = nvm[828 + 5 * int'(sram_waddr) + s];
      checks++;
      if (int'(sram_waddr) != par_wr || sram_wdata != e) begin
        par_err++;
        failures++;
      end
      par_wr++;
    end
  end

  // HDA stand-in: key_done two clocks after the last Helper Data word
  int hlp_seen = 0;
  always @(posedge clk) begin
    if (hda_valid && hda_phase == PH_HLP) hlp_seen++;
    if (hlp_seen == 310) begin
      repeat (2) @(posedge clk);
      hda_key_done <= 1;
    end
  end

  initial begin
    int cyc;
    for (int i = 0; i < NW; i++) nvm[i] = 12'($urandom);
    nvm[825] = 12'd3;
    nvm[826] = {3'd2, 3'd4, 3'd1, 3'd0};
    nvm[827] = 12'd6;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // three ID-buffer writes during the ID phase
    wait (hda_valid && hda_phase == PH_ID);
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      hda_id_we = 1; hda_id_waddr_ofs = 7'(i * 5); hda_id_wdata = {$urandom, $urandom};
      @(negedge clk);
      hda_id_we = 0;
    end
    cyc = 0;
    while (!ready && cyc < 30000) begin @(negedge clk); cyc++; end
    check(ready, "never reached IDLE");
    check(addr_err == 0 && next_addr == NW, $sformatf("NVM order errors %0d, last %0d", addr_err, next_addr));
    check(cnt_ph[0] == 155 && cnt_ph[1] == 360 && cnt_ph[2] == 310,
          $sformatf("phase words %0d %0d %0d", cnt_ph[0], cnt_ph[1], cnt_ph[2]));
    check(slice_err == 0, "slice sequence");
    check(flushes == 1, $sformatf("%0d flushes", flushes));
    check(rd_cnt[0] == 31 && rd_cnt[1] == 72 && rd_cnt[2] == 62 && rd_err == 0,
          $sformatf("start-up reads %0d %0d %0d, %0d wrong", rd_cnt[0], rd_cnt[1], rd_cnt[2], rd_err));
    check(idw_err == 0, "ID buffer writes");
    check(par_wr == 4096 && par_err == 0, $sformatf("%0d parameter writes, %0d wrong", par_wr, par_err));
    check(n_used == 3 && pk == {3'd2, 3'd4, 3'd1, 3'd0} && frac == 6, "configuration words");
    check(loads == 1, "seed loaded once");

    // Trusted sensing, three measurements
    for (int m = 0; m < 3; m++) begin
      logic [11:0] xv [4];
      int t, t_start, t_ag, t_rd, t_ar, t_msg;
      block_t n_exp, ct_s, tag_s;
      ctrl_state_e seq [$];
      for (int k = 0; k < 4; k++) xv[k] = 12'($urandom);
      ag_addr = 12'($urandom);
      y = 26'($urandom);
      ct_s = {$urandom, $urandom, $urandom, $urandom};
      tag_s = {$urandom, $urandom, $urandom, $urandom};
      t_start = -1; t_ag = -1; t_rd = -1; t_ar = -1; t_msg = -1;
      seq.delete();
      for (t = 0; t < 60 && !out_valid; t++) begin
        x_valid = (t < 4);
        x_data  = (t < 4) ? xv[t] : '0;
        #1;
        if (nc_inc) begin
          check(t == 0, "nonce update in the first input clock");
          nonce = nonce + 1;
          n_exp = nonce;
        end
        if (ae_start) t_start = t;
        if (ag_en) begin t_ag = t; check(x_vec == {xv[0], xv[1], xv[2], xv[3]}, "inputs to the address generator"); end
        if (state == ST_TS3) begin t_rd = t; check(sram_re && sram_raddr == ag_addr, "SRAM read of generated address"); end
        if (ar_en) t_ar = t;
        if (ae_msg_valid && t_msg < 0) begin
          t_msg = t;
          check(ae_msg == block_t'(y), "measurement to AEGIS");
          fork begin
            repeat (2) @(posedge clk);
            ae_ct <= ct_s; ae_ct_valid <= 1;
            @(posedge clk) ae_ct_valid <= 0;
            repeat (2) @(posedge clk);
            ae_tag <= tag_s; ae_tag_valid <= 1;
            @(posedge clk) ae_tag_valid <= 0;
          end join_none
        end
        if (seq.size() == 0 || seq[$] != state) seq.push_back(state);
        @(negedge clk);
      end
      check(out_valid, "out_valid");
      check(t_start == 1 && t_ag == 4 && t_rd == 5 && t_ar == 6 && t_msg == 7,
            $sformatf("timing start %0d ag %0d rd %0d ar %0d msg %0d", t_start, t_ag, t_rd, t_ar, t_msg));
      check(seq.size() == 7 && seq[0] == ST_IDLE && seq[1] == ST_TS1 && seq[2] == ST_TS2 &&
            seq[3] == ST_TS3 && seq[4] == ST_TS4 && seq[5] == ST_TS5 && seq[6] == ST_TS6,
            $sformatf("state order IDLE, TS1..TS6: %p", seq));
      check(nonce_o == n_exp && ct_o == ct_s && tag_o == tag_s, "outputs");
      @(negedge clk);
      check(ready, "back to IDLE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
