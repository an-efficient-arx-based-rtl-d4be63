// grey_cell: prefix-network cell that produces only the group generate.
//
// Used where the merged span already reaches bit 0, so its propagate is never
// needed again: G = g_hi | (p_hi & g_lo). Purely combinational. The cell
// follows the document's description of the grey cell.
module grey_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);
  assign g = g_hi | (p_hi & g_lo);
endmodule
