// nonce_counter: holds the AEGIS nonce. During configuration it is loaded
// with the seed taken from the SRAM RND cells (load, one cycle); in trusted
// sensing it counts up by one each time a fresh nonce is needed (inc, one
// cycle), so a nonce is never reused within a power cycle and the starting
// point differs from one power-up to the next. load has priority over inc.
// Seeding from the PUF and counting follow the published design; the step of
// +1, the wrap-around at 2^W and the reset value 0 are this design's choices.
module nonce_counter #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         inc,
  output logic [W-1:0] nonce
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    nonce <= '0;
    else if (load) nonce <= seed;
    else if (inc)  nonce <= nonce + 1'b1;
  end

endmodule
