// rca4: 4-bit ripple-carry sum stage of the spanning-tree adder.
//
// Takes the per-bit generate/propagate of one 4-bit group and the carry into
// the group (from the prefix tree) and ripples it through the four bits:
//   s[i] = p[i] ^ c[i],  c[i+1] = g[i] | (p[i] & c[i]).
// Purely combinational. The 4-bit group size is the document's.
module rca4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] s
);
  logic [4:0] c;  // c[4] is the group carry out, made by the prefix tree instead

  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    assign s[i]   = p[i] ^ c[i];
    assign c[i+1] = g[i] | (p[i] & c[i]);
  end
endmodule
