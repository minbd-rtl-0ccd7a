// lfsr16: 16-bit Galois linear-feedback shift register, the pseudo-random source of a
// router. It advances every clock cycle and never reaches the all-zero state
// (polynomial x^16 + x^14 + x^13 + x^11 + 1, period 65535). The seed is a parameter so
// that neighbouring routers draw different sequences; a zero seed is replaced by 1.
// Output 'rnd' is the current register value; it is valid from the first cycle after
// reset. The generator itself is this design's choice: the router only needs some cheap
// pseudo-random bits for its arbitration and buffer-redirection decisions.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rnd
);
  localparam logic [15:0] TAPS      = 16'hB400;
  localparam logic [15:0] SEED_SAFE = (SEED == 16'h0) ? 16'h0001 : SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd <= SEED_SAFE;
    else        rnd <= rnd[0] ? ((rnd >> 1) ^ TAPS) : (rnd >> 1);
  end
endmodule
