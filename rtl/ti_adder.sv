// ti_adder: three-share threshold-implementation (TI) adder, bit-serial.
//
// Adds two secret words a and b, each given as three Boolean shares
// (a = a[0]^a[1]^a[2]), and returns the sum modulo 2^WIDTH as three shares,
// without ever combining the shares of a value.
//
// How it works: a ripple-carry adder processed one bit per clock cycle, least
// significant bit first. The sum bit s = a ^ b ^ c is linear and is formed
// share by share. The carry c' = maj(a, b, c) = ab ^ ac ^ bc is the only
// non-linear step. Each of its three output shares is computed from two input
// shares only (share 0 from shares 1 and 2, share 1 from 2 and 0, share 2
// from 0 and 1), which is the non-completeness rule of a TI, and the output
// shares are re-masked with two fresh bits so the shared carry stays uniform.
// The carry shares are kept in a register between bits, which stops glitches
// from crossing from one bit's non-linear layer into the next.
//
// Randomness: four fresh bits per addition, taken with `start`. Bits [3:2]
// give a random sharing of the initial carry 0; bits [1:0], rotated one place
// per cycle through the 4-bit register, re-mask the carry every cycle.
//
// Timing: `start` is sampled while the adder is idle; that edge already
// processes bit 0. `done` is high (combinationally, from registers) in the
// WIDTH-th cycle counting the start cycle as the first, with the full sum on
// `sum`; the caller takes it at the end of that cycle. So an addition occupies
// WIDTH cycles (32 at the default). `busy` is high between start and done.
//
// From the document: three shares, TI, ripple-carry construction, four bits
// of fresh randomness per operation, 32 cycles per 32-bit addition. The exact
// share equations, the use of the four bits and the handshake are this
// design's own. WIDTH must be at least 2. The document doubles the clock of this adder to halve its
// latency in system cycles; here it runs on the system clock.
module ti_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [2:0][WIDTH-1:0]  a,
  input  logic [2:0][WIDTH-1:0]  b,
  input  logic [3:0]             rnd,
  output logic                   busy,
  output logic                   done,
  output logic [2:0][WIDTH-1:0]  sum
);
  localparam int unsigned CW = $clog2(WIDTH);

  if (WIDTH < 2) begin : g_check
    $error("ti_adder: WIDTH must be at least 2");
  end

  logic [2:0][WIDTH-1:0] ar, br, sr;  // operand and sum shift registers
  logic [2:0]            cr;          // carry shares
  logic [3:0]            rr;          // randomness register
  logic [CW-1:0]         cnt;         // index of the next bit

  logic                  go;          // a bit is processed this cycle
  logic                  first;       // this cycle processes bit 0
  logic [2:0][WIDTH-1:0] xa, xb;      // operand source for this cycle
  logic [2:0]            x, y, z;     // shares of a_i, b_i, c_i
  logic [3:0]            xr;          // randomness for this cycle
  logic [2:0]            s, cn;       // sum bit and next carry shares

  assign first = start && !busy;
  assign go    = first || busy;

  // share j of the product u*v from shares (j+1) and (j+2) only
  function automatic logic [2:0] ti_and(logic [2:0] u, logic [2:0] v);
    logic [2:0] o;
    o[0] = (u[1] & v[1]) ^ (u[1] & v[2]) ^ (u[2] & v[1]);
    o[1] = (u[2] & v[2]) ^ (u[2] & v[0]) ^ (u[0] & v[2]);
    o[2] = (u[0] & v[0]) ^ (u[0] & v[1]) ^ (u[1] & v[0]);
    return o;
  endfunction

  always_comb begin
    if (first) begin
      xa = a;
      xb = b;
      xr = rnd;
      z  = {rnd[3], rnd[2], rnd[3] ^ rnd[2]};  // sharing of carry-in 0
    end else begin
      xa = ar;
      xb = br;
      xr = rr;
      z  = cr;
    end
    for (int j = 0; j < 3; j++) begin
      x[j] = xa[j][0];
      y[j] = xb[j][0];
    end
    s  = x ^ y ^ z;
    cn = ti_and(x, y) ^ ti_and(x, z) ^ ti_and(y, z);
    cn = cn ^ {xr[0] ^ xr[1], xr[1], xr[0]};
  end

  assign done = busy && cnt == CW'(WIDTH - 1);

  // sum seen by the caller in the done cycle: last bit on top of the register
  always_comb begin
    for (int j = 0; j < 3; j++) begin
      sum[j] = {s[j], sr[j][WIDTH-1:1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar   <= '0;
      br   <= '0;
      sr   <= '0;
      cr   <= '0;
      rr   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (go) begin
      for (int j = 0; j < 3; j++) begin
        ar[j] <= xa[j] >> 1;
        br[j] <= xb[j] >> 1;
        sr[j] <= {s[j], sr[j][WIDTH-1:1]};
      end
      cr   <= cn;
      rr   <= {xr[2:0], xr[3]};
      cnt  <= first ? CW'(1) : cnt + CW'(1);
      busy <= !done;
    end
  end

endmodule
