// tb_aes_round: checks the AES round against the FIPS-197 worked example
// (first round of Appendix B, key addition left out) and against the
// reference model for random states.
module tb_aes_round;
  import aegis_ref_pkg::*;

  logic [127:0] si, so;
  int checks = 0, failures = 0;

  aes_round dut (.state_i(si), .state_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    #1;
    checks++;
    if (so !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++;
      $display("FAIL known answer: %h", so);
    end
    checks++;
    if (ref_aes_round(si) !== 128'h046681e5e0cb199a48f8d37a2806264c) begin
      failures++;
      $display("FAIL reference model known answer");
    end
    for (int i = 0; i < 300; i++) begin
      si = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (so !== ref_aes_round(si)) begin
        failures++;
        $display("FAIL %h -> %h expected %h", si, so, ref_aes_round(si));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
