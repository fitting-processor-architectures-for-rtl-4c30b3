// Pseudo-random number generator for random replacement.
//
// A 32-bit Galois linear-feedback shift register with the maximal-length polynomial
// x^32 + x^22 + x^2 + x + 1 (tap mask 32'h80200003). The design only requires a generator that
// is cheap in FPGA logic and of adequate statistical quality; the exact generator is this
// design's choice. A seed of zero is replaced by 1, since the all-zero state never leaves.
//
// Interface: `load` copies `seed` into the state; otherwise `step` advances the state by one
// shift. `value` is the current state and changes the cycle after a step.
module prng #(
  parameter int unsigned WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS = 32'h80200003
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] value
);
  logic [WIDTH-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WIDTH'(1);
    end else if (load) begin
      state <= (seed == '0) ? WIDTH'(1) : seed;
    end else if (step) begin
      state <= state[0] ? ((state >> 1) ^ TAPS) : (state >> 1);
    end
  end

  assign value = state;
endmodule
