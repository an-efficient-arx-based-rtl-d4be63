// unprot_alu: the auxiliary, unprotected ALU for plain (public) data.
//
// Computes loop counters, addresses, round constants and other public inputs
// of a cipher without occupying the protected adder. Every operation takes a
// single cycle (purely combinational). Addition and subtraction use the
// spanning-tree adder (subtraction as a + ~b + 1); the other operations are
// AND, OR, XOR, rotate left/right by b[4:0], and pass-b (load immediate).
//
// From the document: a separate unprotected ALU with single-cycle operations,
// used for control and round constants, and the spanning-tree adder as the
// design's adder. The operation list is this design's own. The adder's carry
// out is not used: the instruction set has no carry flag.
module unprot_alu
  import scp_pkg::*;
(
  input  ualu_op_e op,
  input  word_t    a,
  input  word_t    b,
  output word_t    y
);
  word_t      add_b, add_s;
  logic       add_cin, add_cout;
  logic [4:0] sh;

  assign add_cin = (op == UA_SUB);
  assign add_b   = add_cin ? ~b : b;
  assign sh      = b[4:0];

  spanning_tree_adder #(.WIDTH(XLEN)) u_adder (
    .a    (a),
    .b    (add_b),
    .cin  (add_cin),
    .sum  (add_s),
    .cout (add_cout)
  );

  always_comb begin
    unique case (op)
      UA_ADD, UA_SUB: y = add_s;
      UA_XOR:  y = a ^ b;
      UA_AND:  y = a & b;
      UA_OR:   y = a | b;
      UA_ROTL: y = rotl(a, sh);
      UA_ROTR: y = rotr(a, sh);
      UA_PASSB: y = b;
      default: y = '0;
    endcase
  end

endmodule
