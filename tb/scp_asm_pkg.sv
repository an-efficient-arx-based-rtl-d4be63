// scp_asm_pkg: instruction assembler for the processor's testbenches.
// Builds 32-bit instruction words in the format documented in scp_pkg:
// [31:27] opcode, [26:23] rd, [22:19] rs1, [18:15] rs2, [15:0] imm16.
package scp_asm_pkg;
  import scp_pkg::*;

  // Assemble one instruction.
  function automatic logic [31:0] instr(opcode_e op, int unsigned rd,
                                        int unsigned rs1, int unsigned rs2,
                                        int imm);
    logic [31:0] w;
    w = {op, rd[3:0], rs1[3:0], 19'd0};
    if (op inside {OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_OR,
                   OP_PADD, OP_PXOR, OP_PXORR})
      w[18:15] = rs2[3:0];
    else
      w[15:0] = imm[15:0];
    return w;
  endfunction

endpackage
