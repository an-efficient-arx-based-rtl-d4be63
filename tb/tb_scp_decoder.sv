// tb_scp_decoder: decodes every opcode with random register fields and
// immediates and checks the control bundle against the instruction set
// table (which register file is written, which ALU operation, immediate
// extension, memory/branch flags, read-port addressing), plus undefined
// opcodes decoding to a no-op.
module tb_scp_decoder;
  import scp_pkg::*;
  import scp_asm_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] ins;
  ctrl_t       c;
  int          checks = 0, failures = 0;

  scp_decoder dut (.instr(ins), .ctrl(c));

  always #5 clk = ~clk;

  task automatic expect_eq(string what, opcode_e op, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s %s: got %0h want %0h", op.name(), what, got, want);
    end
  endtask

  initial begin
    int unsigned rd, rs1, rs2;
    int          imm;
    word_t       sx, zx;
    opcode_e     op;
    for (int n = 0; n < 50; n++) begin
      for (int o = 0; o <= int'(OP_PST); o++) begin
        op  = opcode_e'(o);
        rd  = $urandom_range(0, 15);
        rs1 = $urandom_range(0, 15);
        rs2 = $urandom_range(0, 15);
        imm = int'($urandom_range(0, 65535));
        ins = instr(op, rd, rs1, rs2, imm);
        sx  = word_t'(signed'(16'(imm)));
        zx  = word_t'(imm) & 32'h0000_ffff;
        #1;
        expect_eq("valid", op, c.valid_op, 1);
        expect_eq("wa", op, c.wa, rd);
        expect_eq("wr_r", op, c.wr_r,
                  op inside {OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_OR, OP_ADDI, OP_ORI,
                             OP_LUI, OP_ROTL, OP_ROTR, OP_LD});
        expect_eq("wr_p", op, c.wr_p,
                  op inside {OP_PADD, OP_PXOR, OP_PROTL, OP_PROTR, OP_PXORR, OP_PMOV, OP_PLD});
        expect_eq("prot", op, c.prot,
                  op inside {OP_PADD, OP_PXOR, OP_PROTL, OP_PROTR, OP_PXORR, OP_PMOV});
        expect_eq("mem_rd", op, c.mem_rd, op inside {OP_LD, OP_PLD});
        expect_eq("mem_wr", op, c.mem_wr, op inside {OP_ST, OP_PST});
        expect_eq("mem_prot", op, c.mem_prot, op inside {OP_PLD, OP_PST});
        expect_eq("branch", op, c.branch, op inside {OP_BEQ, OP_BNE});
        expect_eq("jump", op, c.jump, op == OP_JMP);
        expect_eq("halt", op, c.halt, op == OP_HALT);
        case (op)
          OP_ADD:  expect_eq("uop", op, c.uop, UA_ADD);
          OP_SUB:  expect_eq("uop", op, c.uop, UA_SUB);
          OP_XOR:  expect_eq("uop", op, c.uop, UA_XOR);
          OP_AND:  expect_eq("uop", op, c.uop, UA_AND);
          OP_OR:   expect_eq("uop", op, c.uop, UA_OR);
          OP_ROTL: expect_eq("uop", op, c.uop, UA_ROTL);
          OP_ROTR: expect_eq("uop", op, c.uop, UA_ROTR);
          OP_LUI:  expect_eq("uop", op, c.uop, UA_PASSB);
          OP_PADD: expect_eq("pop", op, c.pop, PA_ADD);
          OP_PXOR: expect_eq("pop", op, c.pop, PA_XOR);
          OP_PROTL: expect_eq("pop", op, c.pop, PA_ROTL);
          OP_PROTR: expect_eq("pop", op, c.pop, PA_ROTR);
          OP_PXORR: expect_eq("pop", op, c.pop, PA_XORR);
          OP_PMOV: expect_eq("pop", op, c.pop, PA_MASK);
          default: ;
        endcase
        if (op inside {OP_ADDI, OP_LD, OP_ST, OP_PLD, OP_PST, OP_BEQ, OP_BNE, OP_JMP})
          expect_eq("imm sext", op, c.imm, sx);
        if (op inside {OP_ORI, OP_ROTL, OP_ROTR, OP_PROTL, OP_PROTR})
          expect_eq("imm zext", op, c.imm, zx);
        if (op == OP_LUI) expect_eq("imm lui", op, c.imm, {zx[15:0], 16'd0});
        if (op inside {OP_ADD, OP_SUB, OP_XOR, OP_AND, OP_OR, OP_PXORR}) begin
          expect_eq("ra2", op, c.ra2, rs2);
          expect_eq("use_r2", op, c.use_r2, 1);
        end
        if (op inside {OP_ST, OP_BEQ, OP_BNE}) expect_eq("ra2=rd", op, c.ra2, rd);
        if (op == OP_PST) expect_eq("pa2=rd", op, c.pa2, rd);
        if (op inside {OP_PADD, OP_PXOR}) expect_eq("pa2", op, c.pa2, rs2);
        expect_eq("ra1", op, c.ra1, rs1);
        expect_eq("ub_imm", op, c.ub_imm,
                  op inside {OP_ADDI, OP_ORI, OP_LUI, OP_ROTL, OP_ROTR, OP_LD, OP_ST,
                             OP_PLD, OP_PST});
      end
      // undefined opcodes
      ins = {5'($urandom_range(int'(OP_PST) + 1, 31)), 27'($urandom)};
      #1;
      checks++;
      if (c.valid_op || c.wr_r || c.wr_p || c.mem_wr || c.branch || c.jump || c.halt) begin
        failures++; $display("FAIL undefined opcode not a no-op");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
