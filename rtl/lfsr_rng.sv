// lfsr_rng: 16-bit Galois linear feedback shift register random number
// generator (polynomial x^16 + x^14 + x^13 + x^11 + 1, maximal length 65535).
//
// It supplies the random amplitude of the external input spikes. The state
// advances by one step on every cycle with en=1; rnd is the current state.
// Synchronous active-low reset loads SEED (must be non-zero).
module lfsr_rng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] rnd
);
  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= SEED;
    else if (en) rnd <= rnd[0] ? ((rnd >> 1) ^ 16'hB400) : (rnd >> 1);
  end
endmodule
