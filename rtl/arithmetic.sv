// arithmetic: evaluates the affine function of the selected hyper-rectangle,
//   y = f_1*x_1 + f_2*x_2 + f_3*x_3 + f_4*x_4 + (f_0 << frac),
// with four parallel signed multipliers and one adder tree. Inputs and
// coefficients are 12-bit two's complement; inputs above n_used are treated
// as zero. frac (0..12, larger values act as 12) places the offset at the
// binary point of the products; with that limit the 26-bit result is exact.
// Interface: x packs x_1..x_N with x_1 in the top bits; f is one SRAM word,
// f_0 in bits 11:0, f_1 in 23:12 and so on. y is registered one clock after en.
// The n multipliers plus adder and the 12/26-bit widths follow the published
// design; signedness and the meaning of the fixed-point setting are this
// design's reading.
module arithmetic #(
  parameter int unsigned N_IN = 4,
  parameter int unsigned W_IN = 12,
  parameter int unsigned W_Y  = 26
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [N_IN*W_IN-1:0]     x,
  input  logic [(N_IN+1)*W_IN-1:0] f,
  input  logic [2:0]               n_used,
  input  logic [3:0]               frac,
  output logic signed [W_Y-1:0]    y
);

  logic signed [W_Y-1:0] sum;

  always_comb begin
    logic signed [W_IN-1:0]   xj, fj;
    logic signed [2*W_IN-1:0] prod;
    logic [3:0]               sh;
    sh  = (frac > 4'(W_IN)) ? 4'(W_IN) : frac;
    sum = W_Y'(signed'(f[W_IN-1:0])) <<< sh;
    for (int j = 1; j <= N_IN; j++) begin
      xj   = signed'(x[(N_IN-j)*W_IN +: W_IN]);
      fj   = signed'(f[j*W_IN +: W_IN]);
      prod = xj * fj;
      if (j <= int'(n_used))
        sum = sum + W_Y'(prod);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= sum;
  end

endmodule
