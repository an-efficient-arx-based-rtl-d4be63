// scp_pkg: types and constants shared by the masked ARX processor.
//
// The processor keeps two kinds of data. Plain words (word_t) live in the
// unprotected register file and are handled by the single-cycle auxiliary
// ALU. Secret words are kept as three Boolean shares (shared_t), whose XOR is
// the value; they live in the protected register file and are only touched by
// the protected ALU. Word width 32 follows the document's addition in Z_2^32;
// the register counts, the instruction encoding and the opcode list are this
// design's own choices (the document names a RISC instruction set with load
// and store but does not list it).
//
// Instruction word (32 bits):
//   [31:27] opcode   [26:23] rd   [22:19] rs1   [18:15] rs2   [15:0] imm16
// rs2 and imm16 share bit 15; no instruction uses both. Stores and branches
// take their second register from the rd field.
package scp_pkg;

  localparam int unsigned XLEN    = 32;  // datapath width
  localparam int unsigned NSHARES = 3;   // Boolean shares of a protected word
  localparam int unsigned NREGS   = 16;  // registers per register file
  localparam int unsigned RAW     = 4;   // register address width

  typedef logic [XLEN-1:0]               word_t;
  typedef logic [NSHARES-1:0][XLEN-1:0]  shared_t;
  typedef logic [RAW-1:0]                regaddr_t;

  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    // unprotected ALU, R-type: rd = rs1 op rs2
    OP_ADD   = 5'd1,
    OP_SUB   = 5'd2,
    OP_XOR   = 5'd3,
    OP_AND   = 5'd4,
    OP_OR    = 5'd5,
    // unprotected ALU, I-type
    OP_ADDI  = 5'd6,   // rd = rs1 + sext(imm16)
    OP_ORI   = 5'd7,   // rd = rs1 | zext(imm16)
    OP_LUI   = 5'd8,   // rd = imm16 << 16
    OP_ROTL  = 5'd9,   // rd = rs1 <<< imm[4:0]
    OP_ROTR  = 5'd10,  // rd = rs1 >>> imm[4:0]
    // plain memory
    OP_LD    = 5'd11,  // rd = M[rs1 + sext(imm16)]
    OP_ST    = 5'd12,  // M[rs1 + sext(imm16)] = R[rd]
    // control
    OP_BEQ   = 5'd13,  // if R[rd] == R[rs1] pc = pc + sext(imm16)
    OP_BNE   = 5'd14,  // if R[rd] != R[rs1] pc = pc + sext(imm16)
    OP_JMP   = 5'd15,  // pc = pc + sext(imm16)
    OP_HALT  = 5'd16,  // stop and raise the done flag
    // protected ALU, operands and result in the protected register file
    OP_PADD  = 5'd17,  // S[rd] = S[rs1] + S[rs2]   (threshold adder, serial)
    OP_PXOR  = 5'd18,  // S[rd] = S[rs1] ^ S[rs2]
    OP_PROTL = 5'd19,  // S[rd] = S[rs1] <<< imm[4:0]
    OP_PROTR = 5'd20,  // S[rd] = S[rs1] >>> imm[4:0]
    OP_PXORR = 5'd21,  // S[rd] = S[rs1] ^ R[rs2]   (public constant into share 0)
    OP_PMOV  = 5'd22,  // S[rd] = mask(R[rs1])      (fresh random sharing)
    OP_PLD   = 5'd23,  // S[rd] = mask(M[rs1 + sext(imm16)])
    OP_PST   = 5'd24   // M[rs1 + sext(imm16)] = unmask(S[rd])
  } opcode_e;

  // Operations of the unprotected ALU.
  typedef enum logic [2:0] {
    UA_ADD  = 3'd0,
    UA_SUB  = 3'd1,
    UA_XOR  = 3'd2,
    UA_AND  = 3'd3,
    UA_OR   = 3'd4,
    UA_ROTL = 3'd5,
    UA_ROTR = 3'd6,
    UA_PASSB = 3'd7
  } ualu_op_e;

  // Operations of the protected ALU.
  typedef enum logic [2:0] {
    PA_ADD  = 3'd0,
    PA_XOR  = 3'd1,
    PA_ROTL = 3'd2,
    PA_ROTR = 3'd3,
    PA_XORR = 3'd4,
    PA_MASK = 3'd5
  } palu_op_e;

  // Decoded control of one instruction.
  typedef struct packed {
    logic      valid_op;   // a defined opcode
    // register reads
    regaddr_t  ra1;        // unprotected read port 1 address
    regaddr_t  ra2;        // unprotected read port 2 address
    logic      use_r1;
    logic      use_r2;
    regaddr_t  pa1;        // protected read port 1 address
    regaddr_t  pa2;        // protected read port 2 address
    logic      use_p1;
    logic      use_p2;
    // execute
    ualu_op_e  uop;
    logic      ub_imm;     // unprotected ALU operand B is the immediate
    word_t     imm;        // extended immediate
    logic      prot;       // instruction uses the protected ALU
    palu_op_e  pop;
    logic      mem_rd;     // read data RAM
    logic      mem_wr;     // write data RAM
    logic      mem_prot;   // load result is masked / store data is unmasked
    logic      branch;     // conditional branch
    logic      br_ne;      // branch if not equal
    logic      jump;       // unconditional jump
    logic      halt;
    // write back
    regaddr_t  wa;
    logic      wr_r;       // writes the unprotected register file
    logic      wr_p;       // writes the protected register file
  } ctrl_t;

  // Unmask a shared word.
  function automatic word_t unmask(shared_t s);
    return s[0] ^ s[1] ^ s[2];
  endfunction

  // Split a plain word into three shares with two fresh random words.
  function automatic shared_t mask(word_t v, word_t r1, word_t r2);
    shared_t s;
    s[0] = v ^ r1 ^ r2;
    s[1] = r1;
    s[2] = r2;
    return s;
  endfunction

  // Rotate left / right by n places.
  function automatic word_t rotl(word_t v, logic [4:0] n);
    logic [2*XLEN-1:0] t;
    t = {v, v} << n;
    return t[2*XLEN-1:XLEN];
  endfunction

  function automatic word_t rotr(word_t v, logic [4:0] n);
    logic [2*XLEN-1:0] t;
    t = {v, v} >> n;
    return t[XLEN-1:0];
  endfunction

endpackage
