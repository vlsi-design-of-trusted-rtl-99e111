// tb_nonce_counter: loads seeds (including ones that carry across all 128
// bits), counts up, checks that load wins over inc and that the value holds
// when neither is asserted. Expected values are kept in a separate model.
module tb_nonce_counter;
  logic clk = 0, rst_n = 0, load = 0, inc = 0;
  logic [127:0] seed = '0, nonce, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  nonce_counter dut (.clk, .rst_n, .load, .seed, .inc, .nonce);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (nonce !== '0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 400; i++) begin
      load = ($urandom % 10 == 0);
      inc  = ($urandom % 3 != 0);
      case ($urandom % 4)
        0: seed = {128{1'b1}};
        1: seed = {64'h0, {64{1'b1}}};
        default: seed = {$urandom, $urandom, $urandom, $urandom};
      endcase
      @(negedge clk);
      if (load) model = seed;
      else if (inc) begin
        // add one by rippling the carry bit by bit
        logic c;
        c = 1'b1;
        for (int b = 0; b < 128; b++) begin
          logic s;
          s = model[b] ^ c;
          c = model[b] & c;
          model[b] = s;
        end
      end
      checks++;
      if (nonce !== model) begin
        failures++;
        $display("FAIL step %0d: %h expected %h", i, nonce, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
