// tb_arithmetic: random signed inputs, coefficients, number of inputs and
// fixed-point shifts, including the extreme values -2048 and 2047. The
// expected value is computed with integers: sum of f_j * x_j for j <= n_used
// plus f_0 * 2^min(frac, 12). Checks the one-clock latency.
module tb_arithmetic;
  logic clk = 0, rst_n = 0, en = 0;
  logic [47:0] x;
  logic [59:0] f;
  logic [2:0]  n_used;
  logic [3:0]  frac;
  logic signed [25:0] y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  arithmetic dut (.clk, .rst_n, .en, .x, .f, .n_used, .frac, .y);

  function automatic int rnd12(input int mode);
    case (mode)
      0: return -2048;
      1: return 2047;
      default: return int'($urandom % 4096) - 2048;
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv [4];
    int fv [5];
    longint e;
    int sh;
    x = '0; f = '0; n_used = 0; frac = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      int mode;
      mode = (i < 40) ? (i % 2) : 2;
      for (int k = 0; k < 4; k++) xv[k] = rnd12(mode);
      for (int k = 0; k < 5; k++) fv[k] = rnd12(mode);
      n_used = 3'($urandom % 5);
      frac   = 4'($urandom % 16);
      x = {12'(xv[0]), 12'(xv[1]), 12'(xv[2]), 12'(xv[3])};
      f = {12'(fv[4]), 12'(fv[3]), 12'(fv[2]), 12'(fv[1]), 12'(fv[0])};
      sh = (frac > 12) ? 12 : int'(frac);
      e = longint'(fv[0]) * (longint'(1) << sh);
      for (int j = 1; j <= 4; j++)
        if (j <= n_used) e += longint'(fv[j]) * longint'(xv[j-1]);
      en = 1;
      @(negedge clk);
      checks++;
      if (longint'(y) != e) begin
        failures++;
        $display("FAIL x=%p f=%p n=%0d frac=%0d y=%0d expected %0d", xv, fv, n_used, frac, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
