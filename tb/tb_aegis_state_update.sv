// tb_aegis_state_update: drives random states and message words into one
// StateUpdate and compares all five output words with the reference model.
module tb_aegis_state_update;
  import tvs_pkg::*;
  import aegis_ref_pkg::*;

  aegis_state_t si, so;
  block_t       m;
  ref_state_t   rs;
  int checks = 0, failures = 0;

  aegis_state_update dut (.s_i(si), .m_i(m), .s_o(so));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      for (int k = 0; k < 5; k++) begin
        si[k] = {$urandom, $urandom, $urandom, $urandom};
        rs[k] = si[k];
      end
      m = (i % 3 == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      ref_update(rs, m);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (so[k] !== rs[k]) begin
          failures++;
          $display("FAIL word %0d: %h expected %h", k, so[k], rs[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
