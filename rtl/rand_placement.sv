// Random-placement set index for a cache.
//
// The set of a line is a hash of its line address and a per-run seed, so which lines collide
// in a set changes from run to run and a set conflict is a random event with a probability.
// The structure is random-modulo-like: the low line-address bits (the classic modulo index) are
// XORed with a mask taken from a hash of the remaining bits and the seed. For a fixed upper
// part the mapping is a permutation of the sets, so lines of one way-sized block never collide
// with one another; lines of different blocks collide with a probability close to 1/sets that
// changes with the seed. The hash is the 32-bit finalizer of MurmurHash3 (two multiplies and
// three xor-shifts) applied to (upper bits XOR seed); its non-linearity makes the collision
// pattern depend on the seed (a pure XOR of seed and tag would cancel out). The exact hash is
// this design's choice.
//
// Purely combinational.
module rand_placement #(
  parameter int unsigned LA_W  = 28,  // line address width (address bits above the line offset)
  parameter int unsigned IDX_W = 8    // log2(number of sets)
) (
  input  logic [LA_W-1:0]  line_addr,
  input  logic [31:0]      seed,
  output logic [IDX_W-1:0] set_idx
);
  localparam logic [31:0] M1 = 32'h85EB_CA6B;
  localparam logic [31:0] M2 = 32'hC2B2_AE35;

  logic [31:0] upper;
  logic [31:0] mixed;

  always_comb begin
    upper   = 32'(line_addr >> IDX_W);
    mixed   = upper ^ seed;
    mixed   = mixed ^ (mixed >> 16);
    mixed   = mixed * M1;
    mixed   = mixed ^ (mixed >> 13);
    mixed   = mixed * M2;
    mixed   = mixed ^ (mixed >> 16);
    set_idx = line_addr[IDX_W-1:0] ^ mixed[31 -: IDX_W];
  end
endmodule
