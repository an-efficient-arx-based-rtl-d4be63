// scp_decoder: instruction decoder of the processor (combinational).
//
// Turns a 32-bit instruction word into the control bundle ctrl_t: which
// register of which register file each read port addresses and whether it is
// used (for the hazard check), the operation of the unprotected and of the
// protected ALU, the extended immediate, memory and branch controls, and the
// register the result is written to. Undefined opcodes decode to a no-op with
// valid_op low. The read addresses ra1/pa1 (rs1) and the write address wa
// (rd) are the instruction fields themselves, wired through without logic.
//
// Field layout ([31:27] opcode, [26:23] rd, [22:19] rs1, [18:15] rs2,
// [15:0] imm16) and the opcode list are in scp_pkg. The document describes a
// RISC processor with separate protected and unprotected register files and
// load/store instructions; the encoding itself is this design's own.
module scp_decoder
  import scp_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  opcode_e    op;
  regaddr_t   rd, rs1, rs2;
  logic [15:0] imm16;
  word_t      sext, zext;

  assign op    = opcode_e'(instr[31:27]);
  assign rd    = instr[26:23];
  assign rs1   = instr[22:19];
  assign rs2   = instr[18:15];
  assign imm16 = instr[15:0];
  assign sext  = {{16{imm16[15]}}, imm16};
  assign zext  = {16'd0, imm16};

  always_comb begin
    ctrl          = '0;
    ctrl.valid_op = 1'b1;
    ctrl.ra1      = rs1;
    ctrl.ra2      = rs2;
    ctrl.pa1      = rs1;
    ctrl.pa2      = rs2;
    ctrl.wa       = rd;
    ctrl.uop      = UA_ADD;
    ctrl.pop      = PA_XOR;
    unique case (op)
      OP_NOP: ;
      OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_OR: begin
        unique case (op)
          OP_ADD:  ctrl.uop = UA_ADD;
          OP_SUB:  ctrl.uop = UA_SUB;
          OP_XOR:  ctrl.uop = UA_XOR;
          OP_AND:  ctrl.uop = UA_AND;
          default: ctrl.uop = UA_OR;
        endcase
        ctrl.use_r1 = 1'b1;
        ctrl.use_r2 = 1'b1;
        ctrl.wr_r   = 1'b1;
      end
      OP_ADDI, OP_ORI, OP_ROTL, OP_ROTR: begin
        unique case (op)
          OP_ADDI: ctrl.uop = UA_ADD;
          OP_ORI:  ctrl.uop = UA_OR;
          OP_ROTL: ctrl.uop = UA_ROTL;
          default: ctrl.uop = UA_ROTR;
        endcase
        ctrl.imm    = (op == OP_ADDI) ? sext : zext;
        ctrl.ub_imm = 1'b1;
        ctrl.use_r1 = 1'b1;
        ctrl.wr_r   = 1'b1;
      end
      OP_LUI: begin
        ctrl.uop    = UA_PASSB;
        ctrl.imm    = {imm16, 16'd0};
        ctrl.ub_imm = 1'b1;
        ctrl.wr_r   = 1'b1;
      end
      OP_LD, OP_PLD: begin
        ctrl.imm      = sext;
        ctrl.ub_imm   = 1'b1;
        ctrl.use_r1   = 1'b1;
        ctrl.mem_rd   = 1'b1;
        ctrl.mem_prot = (op == OP_PLD);
        ctrl.wr_r     = (op == OP_LD);
        ctrl.wr_p     = (op == OP_PLD);
      end
      OP_ST: begin
        ctrl.imm    = sext;
        ctrl.ub_imm = 1'b1;
        ctrl.use_r1 = 1'b1;
        ctrl.ra2    = rd;
        ctrl.use_r2 = 1'b1;
        ctrl.mem_wr = 1'b1;
      end
      OP_PST: begin
        ctrl.imm      = sext;
        ctrl.ub_imm   = 1'b1;
        ctrl.use_r1   = 1'b1;
        ctrl.pa2      = rd;
        ctrl.use_p2   = 1'b1;
        ctrl.mem_wr   = 1'b1;
        ctrl.mem_prot = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.imm    = sext;
        ctrl.ra2    = rd;
        ctrl.use_r1 = 1'b1;
        ctrl.use_r2 = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.br_ne  = (op == OP_BNE);
      end
      OP_JMP: begin
        ctrl.imm  = sext;
        ctrl.jump = 1'b1;
      end
      OP_HALT: ctrl.halt = 1'b1;
      OP_PADD, OP_PXOR: begin
        ctrl.prot   = 1'b1;
        ctrl.pop    = (op == OP_PADD) ? PA_ADD : PA_XOR;
        ctrl.use_p1 = 1'b1;
        ctrl.use_p2 = 1'b1;
        ctrl.wr_p   = 1'b1;
      end
      OP_PROTL, OP_PROTR: begin
        ctrl.prot   = 1'b1;
        ctrl.pop    = (op == OP_PROTL) ? PA_ROTL : PA_ROTR;
        ctrl.imm    = zext;
        ctrl.use_p1 = 1'b1;
        ctrl.wr_p   = 1'b1;
      end
      OP_PXORR: begin
        ctrl.prot   = 1'b1;
        ctrl.pop    = PA_XORR;
        ctrl.use_p1 = 1'b1;
        ctrl.use_r2 = 1'b1;
        ctrl.wr_p   = 1'b1;
      end
      OP_PMOV: begin
        ctrl.prot   = 1'b1;
        ctrl.pop    = PA_MASK;
        ctrl.use_r1 = 1'b1;
        ctrl.wr_p   = 1'b1;
      end
      default: ctrl.valid_op = 1'b0;
    endcase
  end

endmodule
