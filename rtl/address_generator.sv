// address_generator: finds the hyper-rectangle that holds the input vector.
// Each input x_k is split into 2^p_k equal intervals, so its p_k most
// significant bits are the interval index; the indices are concatenated,
// x_1 leftmost, into the SRAM address of the affine function. Unused upper
// address bits are zero (the concatenation is right-aligned).
// Interface: x packs x_1..x_N (x_1 in the top W_IN bits), pk packs p_1..p_N
// (p_1 in the top bits). The address is registered: it appears one clock
// after en. The concatenation of MSBs follows the published design;
// right-alignment and registering are this design's choices.
module address_generator #(
  parameter int unsigned N_IN   = 4,
  parameter int unsigned W_IN   = 12,
  parameter int unsigned P_BITS = 12,
  parameter int unsigned PK_W   = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [N_IN*W_IN-1:0]   x,
  input  logic [N_IN*PK_W-1:0]   pk,
  output logic [P_BITS-1:0]      addr
);

  logic [P_BITS-1:0] a;

  always_comb begin
    logic [W_IN-1:0] xk;
    logic [PK_W-1:0] p;
    a = '0;
    for (int k = 0; k < N_IN; k++) begin
      xk = x[(N_IN-1-k)*W_IN +: W_IN];
      p  = pk[(N_IN-1-k)*PK_W +: PK_W];
      if (p != 0)
        a = P_BITS'((a << p) | P_BITS'(xk >> (W_IN - int'(p))));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  addr <= '0;
    else if (en) addr <= a;
  end

endmodule
