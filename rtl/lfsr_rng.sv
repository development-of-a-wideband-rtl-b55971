// lfsr_rng - 32-bit linear feedback shift register random number generator with
// three taps; its low bits choose the noise scenario.
//
// Every enabled clock the register shifts left by one and the new bit 0 is the XOR of
// the three tapped bits 31 (MSB), 29 and 2. After reset, or when load_seed is high,
// the register holds the 32-bit seed. A register that reaches all zeros would stay
// there, so it is reloaded with the seed instead. The low RND_W bits of the register
// are copied into a separate random number register, which the noise selector reads.
// The 32-bit width, the three taps, the left shift with XOR feedback and the seed
// follow the published generator; which three bits are tapped is read from its
// drawing (bit 29 and the MSB are labelled there), and bit 2, the seed value and the
// all-zero guard are this design's choices. A three-tap 32-bit register cannot be
// maximal-length (no primitive trinomial of degree 32 exists), so the period is
// shorter than 2^32 - 1; the generator only has to pick among eight noise cases.
//
// Interface: en advances the register (the "stop randomisation" switch clears it);
// rnd and state are registered outputs.
module lfsr_rng #(
  parameter logic [31:0] SEED  = 32'h1D87_2B41,
  parameter int unsigned RND_W = 3,
  parameter int unsigned TAP_A = 31,
  parameter int unsigned TAP_B = 29,
  parameter int unsigned TAP_C = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load_seed,
  input  logic [31:0]      seed,        // used by load_seed; reset uses SEED
  output logic [31:0]      state,
  output logic [RND_W-1:0] rnd
);

  logic        fb;
  logic [31:0] nxt;

  always_comb begin
    fb  = state[TAP_A] ^ state[TAP_B] ^ state[TAP_C];
    nxt = {state[30:0], fb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      rnd   <= '0;
    end else begin
      if (load_seed)
        state <= (seed == '0) ? SEED : seed;
      else if (en)
        state <= (nxt == '0) ? SEED : nxt;
      if (en)
        rnd <= state[RND_W-1:0];
    end
  end

endmodule
