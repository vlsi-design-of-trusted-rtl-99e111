// tb_sram_puf: checks the SRAM model as a memory and as a PUF.
// Memory: random writes read back one clock after the read address, and a
// read in the same clock as a write to another word is undisturbed.
// PUF: over six power-ups of device 1, the share of cells whose start-up
// value ever changed must lie between 3% and 15% (about 7% noise cells plus
// rare flips); against device 2 about half the cells differ (40%..60%);
// a second model of device 1 agrees with the first on at least 85%.
module tb_sram_puf;
  logic clk = 0;
  logic por_a = 0, por_b = 0, por_c = 0;
  logic re = 0, we = 0;
  logic [11:0] raddr = '0, waddr = '0;
  logic [59:0] wdata = '0, rd_a, rd_b, rd_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_puf #(.DEVICE_ID(1)) dut  (.clk, .por_n(por_a), .re, .raddr, .rdata(rd_a), .we, .waddr, .wdata);
  sram_puf #(.DEVICE_ID(2)) dev2 (.clk, .por_n(por_b), .re, .raddr, .rdata(rd_b), .we(1'b0), .waddr, .wdata);
  sram_puf #(.DEVICE_ID(1)) dev1 (.clk, .por_n(por_c), .re, .raddr, .rdata(rd_c), .we(1'b0), .waddr, .wdata);

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

  localparam int NWD = 200;
  logic [59:0] first [NWD];
  logic [59:0] chg   [NWD];

  initial begin
    int nchg, ndiff2, nsame1;
    logic [59:0] model [16];
    // PUF statistics
    for (int r = 0; r < 6; r++) begin
      por_a = 0; por_b = 0; por_c = 0;
      @(negedge clk);
      por_a = 1; por_b = 1; por_c = 1;
      ndiff2 = 0; nsame1 = 0;
      for (int w = 0; w < NWD; w++) begin
        re = 1; raddr = 12'(w);
        @(negedge clk);
        if (r == 0) begin first[w] = rd_a; chg[w] = '0; end
        else chg[w] |= rd_a ^ first[w];
        ndiff2 += $countones(rd_a ^ rd_b);
        nsame1 += 60 - $countones(rd_a ^ rd_c);
      end
      check(ndiff2 > NWD * 60 * 40 / 100 && ndiff2 < NWD * 60 * 60 / 100,
            $sformatf("device 1 vs 2 differ in %0d of %0d cells", ndiff2, NWD * 60));
      check(nsame1 > NWD * 60 * 85 / 100,
            $sformatf("two models of device 1 agree in only %0d cells", nsame1));
    end
    nchg = 0;
    for (int w = 0; w < NWD; w++) nchg += $countones(chg[w]);
    check(nchg > NWD * 60 * 3 / 100 && nchg < NWD * 60 * 15 / 100,
          $sformatf("%0d of %0d cells changed over six power-ups", nchg, NWD * 60));
    // Memory behaviour
    re = 0;
    for (int i = 0; i < 16; i++) begin
      model[i] = {$urandom, $urandom};
      we = 1; waddr = 12'(1000 + i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 16; i++) begin
      re = 1; raddr = 12'(1000 + i);
      // simultaneous write elsewhere
      we = 1; waddr = 12'(3000 + i); wdata = {$urandom, $urandom};
      @(posedge clk);
      #1;
      check(rd_a === model[i], $sformatf("word %0d read %h expected %h", 1000 + i, rd_a, model[i]));
      @(negedge clk);
    end
    we = 0; re = 0;
    @(negedge clk);
    check(rd_a === model[15], "read data must hold when re is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
