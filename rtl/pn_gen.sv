// pn_gen: pseudo-noise (PN) sequence generator.
//
// A W-bit Galois linear-feedback shift register: every enabled SYSCLK cycle
// the register shifts right by one and, when the bit shifted out is 1, is
// XORed with TAPS. With the default TAPS (x^16 + x^14 + x^13 + x^11 + 1) the
// sequence has the maximal length 2^16 - 1. The fault injector uses two of
// them, one as the random fault generator and one as the source of the
// random pulse. The document names PN sequence generators; the polynomial,
// width and seeds are this design's choice. A seed of zero is replaced by 1
// because the all-zero state would lock the register.
//
// Timing: `state` changes one cycle after each cycle with en high.
module pn_gen #(
  parameter int unsigned W        = 16,
  parameter logic [W-1:0] TAPS    = 16'hB400,
  parameter logic [W-1:0] SEED    = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] state
);

  localparam logic [W-1:0] SEED_NZ = (SEED == '0) ? W'(1) : SEED;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED_NZ;
    else if (en) state <= (state >> 1) ^ (state[0] ? TAPS : '0);
  end

endmodule
