// sram_puf: behavioural model of the dual-port SRAM macro (4096 words of
// 60 bits) that stores the PWAR parameters and whose power-up contents act as
// a Physical Unclonable Function. It is a simulation model, not logic to be
// synthesized: the real part is a foundry memory.
// Power-up (por_n low) draws new start-up values for every cell. Each cell
// has a preferred value given by a hash of DEVICE_ID and its position, so
// two models with the same DEVICE_ID behave like the same chip and models
// with different IDs like different chips. RND_PCT percent of the cells
// (also chosen by the hash) power up at random, as the noise-dominated RND
// cells do; the others flip away from their preferred value with probability
// FLIP_PERMIL per mille, as the stable ID cells occasionally do.
// Ports: one read port (re, raddr, rdata one clock later) and one write port
// (we, waddr, wdata), both on clk. The start-up behaviour follows the
// published description of the PUF; the percentages and the hash are this
// model's choices.
module sram_puf #(
  parameter int unsigned DEPTH       = 4096,
  parameter int unsigned WIDTH       = 60,
  parameter int unsigned AW          = 12,
  parameter int unsigned DEVICE_ID   = 1,
  parameter int unsigned RND_PCT     = 7,
  parameter int unsigned FLIP_PERMIL = 5
) (
  input  logic             clk,
  input  logic             por_n,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  function automatic int unsigned mix(input int unsigned v);
    v = v ^ (v >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  function automatic logic startup_bit(input int unsigned cidx);
    int unsigned h_val, h_cls;
    h_val = mix(cidx ^ (DEVICE_ID * 32'h9e3779b9));
    h_cls = mix(h_val ^ 32'h5bd1e995);
    if ((h_cls % 100) < RND_PCT)
      return 1'($urandom);
    else if (($urandom % 1000) < FLIP_PERMIL)
      return ~h_val[7];
    else
      return h_val[7];
  endfunction

  always @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      for (int a = 0; a < int'(DEPTH); a++)
        for (int b = 0; b < int'(WIDTH); b++)
          mem[a][b] <= startup_bit(a * WIDTH + b);
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
