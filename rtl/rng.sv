// rng: source of fresh randomness for masking and for the threshold adder.
//
// A xorshift128 generator (Marsaglia) with a 128-bit state, stepped three
// times per enabled cycle so that every cycle delivers three new 32-bit words:
// the first two form `rnd_mask` (the two random words a MASK needs), and the
// low four bits of the third form `rnd_add` (the four fresh bits of one TI
// addition). `seed_load` loads `seed` into the state (an all-zero seed, which
// would lock the generator, is replaced by a fixed constant). Outputs are
// registered state, valid one cycle after load and changing on every cycle
// with `en` high.
//
// From the document: the protected ALU has direct access to a source of
// randomness. The document does not say what that source is; a deployment
// would use a true random number generator or a cryptographic PRNG seeded
// from one. This xorshift generator is this design's stand-in with the same
// interface and is not a secure source.
module rng
  import scp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  logic [127:0]      seed,
  input  logic              en,
  output logic [2*XLEN-1:0] rnd_mask,
  output logic [3:0]        rnd_add
);
  localparam logic [127:0] DEFAULT_SEED = 128'h075bcd15_159a55e5_1f123bb5_05491333;

  logic [3:0][31:0] st, nx;  // st[3]=x, st[2]=y, st[1]=z, st[0]=w

  function automatic logic [3:0][31:0] step(logic [3:0][31:0] s);
    logic [31:0]      t;
    logic [3:0][31:0] o;
    t    = s[3] ^ (s[3] << 11);
    o[3] = s[2];
    o[2] = s[1];
    o[1] = s[0];
    o[0] = s[0] ^ (s[0] >> 19) ^ t ^ (t >> 8);
    return o;
  endfunction

  assign nx = step(step(step(st)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= DEFAULT_SEED;
    end else if (seed_load) begin
      st <= (seed == '0) ? DEFAULT_SEED : seed;
    end else if (en) begin
      st <= nx;
    end
  end

  // after three steps st[2], st[1], st[0] are the three newest words
  assign rnd_mask = {st[1], st[2]};
  assign rnd_add  = st[0][3:0];

endmodule
