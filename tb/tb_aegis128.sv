// tb_aegis128: encrypts random measurements under random keys and nonces
// and compares ciphertext and tag with the reference model. It also checks
// the timing: init_done 10 clocks after start (nonce processing), ct_valid
// one clock after the measurement is accepted, tag_valid FINAL_ROUNDS + 1
// clocks after the ciphertext. A second instance with seven finalisation
// rounds is checked against the reference with seven rounds.
module tb_aegis128;
  import tvs_pkg::*;
  import aegis_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   start, msg_valid;
  block_t key, nonce, msg;
  logic   busy, init_done, ct_valid, tag_valid;
  block_t ct, tag;
  logic   busy7, init_done7, ct_valid7, tag_valid7;
  block_t ct7, tag7;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aegis128 dut (.clk, .rst_n, .start, .key, .nonce, .msg_valid, .msg, .busy,
                .init_done, .ct, .ct_valid, .tag, .tag_valid);
  aegis128 #(.FINAL_ROUNDS(7)) dut7 (.clk, .rst_n, .start, .key, .nonce, .msg_valid, .msg,
                .busy(busy7), .init_done(init_done7), .ct(ct7), .ct_valid(ct_valid7),
                .tag(tag7), .tag_valid(tag_valid7));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t ect, etag, ect7, etag7;
    int t0, t_init, t_ct, t_tag, t_tag7;
    start = 0; msg_valid = 0; key = '0; nonce = '0; msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      @(negedge clk);
      key   = {$urandom, $urandom, $urandom, $urandom};
      nonce = (n == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      msg   = block_t'($urandom % (1 << 26));
      start = 1;
      t0 = 0;
      @(negedge clk);
      start = 0;
      // msg presented early (level), as the control unit does
      msg_valid = (n % 2 == 0);
      t_init = -1; t_ct = -1; t_tag = -1; t_tag7 = -1;
      for (int c = 1; c < 40 && (t_tag < 0 || t_tag7 < 0); c++) begin
        if (init_done && t_init < 0) t_init = c;
        if (c == 14) msg_valid = 1;
        if (ct_valid)  t_ct = c;
        if (tag_valid) t_tag = c;
        if (tag_valid7) t_tag7 = c;
        if (ct_valid) msg_valid = 0;
        @(negedge clk);
      end
      ref_aegis(key, nonce, msg, 6, ect, etag);
      ref_aegis(key, nonce, msg, 7, ect7, etag7);
      check(ct === ect,   $sformatf("ct %h expected %h", ct, ect));
      check(tag === etag, $sformatf("tag %h expected %h", tag, etag));
      check(ct7 === ect7 && tag7 === etag7, "seven-round instance");
      check(t_init == 10, $sformatf("init_done after %0d clocks, expected 10", t_init));
      if (n % 2 == 0)
        check(t_ct == 11, $sformatf("ciphertext after %0d clocks, expected 11", t_ct));
      else
        check(t_ct == 15, $sformatf("late msg: ciphertext after %0d clocks, expected 15", t_ct));
      check(t_tag - t_ct == 7, $sformatf("tag %0d clocks after ciphertext, expected 7", t_tag - t_ct));
      check(t_tag7 - t_ct == 8, $sformatf("7-round tag %0d clocks after ciphertext", t_tag7 - t_ct));
      check(!busy, "idle after tag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
