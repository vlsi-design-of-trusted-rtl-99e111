// tb_address_generator: random inputs and random partitions (p_k of 0..7,
// at most 12 bits in total). The expected address takes, for each input in
// order x_1..x_4, the interval index floor(x_k / 2^(12 - p_k)) and combines
// the indices as digits of a mixed-radix number, x_1 most significant.
// Checks the one-clock latency and that the address holds while en is low.
module tb_address_generator;
  logic clk = 0, rst_n = 0, en = 0;
  logic [47:0] x;
  logic [11:0] pk;
  logic [11:0] addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  address_generator dut (.clk, .rst_n, .en, .x, .pk, .addr);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4];
    int xv [4];
    int expect_a, total, prev;
    x = '0; pk = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      total = 0;
      for (int k = 0; k < 4; k++) begin
        p[k] = $urandom % 8;
        if (total + p[k] > 12) p[k] = 12 - total;
        total += p[k];
        xv[k] = $urandom % 4096;
      end
      if (i == 0) begin p = '{2, 4, 1, 0}; end   // the yaw-rate partition
      x  = {12'(xv[0]), 12'(xv[1]), 12'(xv[2]), 12'(xv[3])};
      pk = {3'(p[0]), 3'(p[1]), 3'(p[2]), 3'(p[3])};
      expect_a = 0;
      for (int k = 0; k < 4; k++)
        expect_a = expect_a * (2 ** p[k]) + xv[k] / (2 ** (12 - p[k]));
      en = 1;
      @(negedge clk);
      checks++;
      if (addr !== 12'(expect_a)) begin
        failures++;
        $display("FAIL p=%p x=%p addr=%h expected %h", p, xv, addr, expect_a);
      end
      // hold while disabled
      prev = addr;
      en = 0;
      x = ~x;
      @(negedge clk);
      checks++;
      if (addr !== 12'(prev)) begin failures++; $display("FAIL address changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
