// spanning_tree_adder: hybrid sparse-prefix ("spanning tree") adder.
//
// sum = a + b + cin (mod 2^WIDTH), cout = carry out. Purely combinational.
//
// How it works, in three steps as the document describes:
//   1. Generate/propagate per bit: g = a & b, p = a ^ b. The carry in is
//      folded into bit 0 (g0' = g0 | p0 & cin) so the tree needs no extra input.
//   2. Carry network. Black cells merge each 4-bit group into a group
//      (G, P) pair in two levels. A sparse spanning tree over the WIDTH/4
//      groups then forms the prefix generate of every group boundary in
//      log2(WIDTH/4) levels (Sklansky pattern); a merge whose span already
//      reaches bit 0 needs only its generate and is a grey cell, every other
//      merge is a black cell. Only the carry into every fourth bit is made.
//   3. Sum. Each 4-bit group ripples its carry through a 4-bit ripple-carry
//      adder (rca4).
// The 4-bit groups, the BC/GC cells and the final ripple stage follow the
// document; the choice of the Sklansky pattern for the group-level tree is
// this design's own.
// WIDTH must be 4 times a power of two.
module spanning_tree_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = WIDTH / 4;         // 4-bit groups
  localparam int unsigned NL = (NG > 1) ? $clog2(NG) : 1;

  // step 1: bit generate / propagate
  logic [WIDTH-1:0] g, p, gt;
  assign g  = a & b;
  assign p  = a ^ b;
  // tree input: carry in folded into bit 0
  assign gt = {g[WIDTH-1:1], g[0] | (p[0] & cin)};

  // step 2a: 4-bit group (G, P) with black cells
  logic [NG-1:0] g2lo, p2lo, g2hi, p2hi;    // (1:0) and (3:2) pairs
  logic [NL:0][NG-1:0] gl, pl;              // group prefix, level by level

  for (genvar k = 0; k < NG; k++) begin : g_group
    black_cell u_lo (.g_hi(gt[4*k+1]), .p_hi(p[4*k+1]),
                     .g_lo(gt[4*k]),   .p_lo(p[4*k]),
                     .g(g2lo[k]), .p(p2lo[k]));
    black_cell u_hi (.g_hi(gt[4*k+3]), .p_hi(p[4*k+3]),
                     .g_lo(gt[4*k+2]), .p_lo(p[4*k+2]),
                     .g(g2hi[k]), .p(p2hi[k]));
    black_cell u_grp (.g_hi(g2hi[k]), .p_hi(p2hi[k]),
                      .g_lo(g2lo[k]), .p_lo(p2lo[k]),
                      .g(gl[0][k]), .p(pl[0][k]));
  end

  // step 2b: sparse tree across the groups
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    for (genvar k = 0; k < NG; k++) begin : g_node
      localparam int unsigned J = ((k >> l) << l) - 1;  // right neighbour
      if (((k >> l) & 1) == 1 && k < (2 << l)) begin : g_gc
        // span reaches bit 0: generate only
        grey_cell u_gc (.g_hi(gl[l][k]), .p_hi(pl[l][k]), .g_lo(gl[l][J]),
                        .g(gl[l+1][k]));
        assign pl[l+1][k] = 1'b0;  // not used further on
      end else if (((k >> l) & 1) == 1) begin : g_bc
        black_cell u_bc (.g_hi(gl[l][k]), .p_hi(pl[l][k]),
                         .g_lo(gl[l][J]), .p_lo(pl[l][J]),
                         .g(gl[l+1][k]), .p(pl[l+1][k]));
      end else begin : g_pass
        assign gl[l+1][k] = gl[l][k];
        assign pl[l+1][k] = pl[l][k];
      end
    end
  end

  // step 3: 4-bit ripple-carry sum per group
  for (genvar k = 0; k < NG; k++) begin : g_sum
    logic c_in_grp;
    if (k == 0) begin : g_first
      assign c_in_grp = cin;
    end else begin : g_rest
      assign c_in_grp = gl[NL][k-1];
    end
    rca4 u_rca (.g(g[4*k+3:4*k]), .p(p[4*k+3:4*k]), .cin(c_in_grp),
                .s(sum[4*k+3:4*k]));
  end

  assign cout = gl[NL][NG-1];

endmodule
