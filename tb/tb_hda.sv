// tb_hda: enrols a random SRAM image, makes Helper Data from a random key
// (H = repeated key xor the enrolment values of the ID cells), then changes
// the SRAM image the way a new power-up would (codeword k gets k mod 15 bit
// errors, so up to 14 of 29) and streams masks and Helper Data into the HDA
// exactly as the control unit does: one NVM word per clock, the matching
// SRAM word on slice 0, the HDA's ID-buffer writes stored back into the SRAM
// image. It checks the seed (first 128 RND-selected bits), the recovered key,
// the number of buffer words written and that key_done rises one clock after
// the last Helper Data word. A second pass puts 15 errors into codeword 0,
// which must flip key bit 0 and no other.
module tb_hda;
  import tvs_pkg::*;

  logic clk = 0, rst_n = 0;
  logic valid, id_flush, id_we, key_done;
  hda_phase_e phase;
  logic [2:0] slice;
  logic [11:0] nvm_word;
  logic [59:0] sram_rdata, id_wdata;
  logic [6:0] id_waddr_ofs;
  logic [127:0] seed, key;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hda dut (.clk, .rst_n, .valid, .phase, .slice, .nvm_word, .sram_rdata, .id_flush,
           .id_we, .id_waddr_ofs, .id_wdata, .seed, .key, .key_done);

  logic [59:0] img [200];          // SRAM image (start-up region and ID buffer)
  logic [11:0] rnd_mask [155];
  logic [11:0] id_mask  [360];
  logic [11:0] helper   [310];
  logic [127:0] k_true, seed_exp;
  int id_pos [4320];               // cell index of the n-th ID cell
  int n_id, n_wr;

  function automatic logic cellv(input int c);
    return img[c / 60][c % 60];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (id_we) begin
    img[103 + id_waddr_ofs] <= id_wdata;
    n_wr++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int extra_err0, output logic [127:0] key_o);
    int ns, cyc_done, last_cyc, cyc;
    // enrolment image
    for (int w = 0; w < 200; w++) img[w] = {$urandom, $urandom};
    for (int i = 0; i < 155; i++)
      for (int b = 0; b < 12; b++) rnd_mask[i][b] = ($urandom % 100) < 12;
    n_id = 0;
    for (int i = 0; i < 360; i++)
      for (int b = 0; b < 12; b++) begin
        id_mask[i][b] = ($urandom % 100) < 92;
        if (id_mask[i][b]) begin id_pos[n_id] = 31 * 60 + i * 12 + b; n_id++; end
      end
    k_true = {$urandom, $urandom, $urandom, $urandom};
    for (int j = 0; j < 3720; j++)
      helper[j / 12][j % 12] = (j < 3712) ? (k_true[j / 29] ^ cellv(id_pos[j])) : 1'b0;
    seed_exp = '0;
    ns = 0;
    for (int c = 0; c < 1860; c++)
      if (rnd_mask[c / 12][c % 12] && ns < 128) begin seed_exp[ns] = cellv(c); ns++; end
    // new power-up: errors in ID cells
    for (int k = 0; k < 128; k++) begin
      int ne;
      ne = (k == 0 && extra_err0 > 0) ? extra_err0 : k % 15;
      for (int e = 0; e < ne; e++) begin
        int c;
        c = id_pos[k * 29 + e * 2 % 29];
        img[c / 60][c % 60] = ~img[c / 60][c % 60];
      end
    end
    n_wr = 0;
    valid = 0; id_flush = 0; phase = PH_RND; slice = 0; nvm_word = '0; sram_rdata = '0;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0; cyc_done = -1;
    for (int a = 0; a < 825; a++) begin
      int o, w;
      valid = 1;
      if (a < 155)      begin phase = PH_RND; o = a;       w = o / 5;       nvm_word = rnd_mask[o]; end
      else if (a < 515) begin phase = PH_ID;  o = a - 155; w = 31 + o / 5;  nvm_word = id_mask[o]; end
      else              begin phase = PH_HLP; o = a - 515; w = 103 + o / 5; nvm_word = helper[o]; end
      slice      = 3'(o % 5);
      sram_rdata = (o % 5 == 0) ? img[w] : {$urandom, $urandom};
      id_flush   = (a == 514);
      @(negedge clk);
      cyc++;
      if (key_done && cyc_done < 0) cyc_done = cyc;
    end
    last_cyc = cyc;
    valid = 0; id_flush = 0;
    repeat (3) begin
      @(negedge clk);
      cyc++;
      if (key_done && cyc_done < 0) cyc_done = cyc;
    end
    check(seed === seed_exp, $sformatf("seed %h expected %h", seed, seed_exp));
    check(n_wr == (n_id + 59) / 60, $sformatf("%0d ID buffer words, expected %0d", n_wr, (n_id + 59) / 60));
    check(cyc_done == last_cyc, $sformatf("key_done at %0d, last helper word at %0d", cyc_done, last_cyc));
    key_o = key;
  endtask

  initial begin
    logic [127:0] k;
    run(0, k);
    check(k === k_true, $sformatf("key %h expected %h", k, k_true));
    run(15, k);
    check(k[0] !== k_true[0], "15 errors in codeword 0 should flip key bit 0");
    check(k[127:1] === k_true[127:1], "other key bits with up to 14 errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
