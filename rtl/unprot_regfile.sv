// unprot_regfile: register file of the unprotected datapath. Each register
// holds one plain (public) word: counters, addresses, round constants.
//
// Two combinational read ports and one write port. A read of the register
// being written in the same cycle returns the new value (write-through), so the
// pipeline's decode stage sees a result in the cycle it is written back.
// Registers reset to zero.
//
// From the document: a dedicated register file for the unprotected ALU. Its size
// (16 registers), port count and write-through are this design's own.
module unprot_regfile
  import scp_pkg::*;
#(
  parameter int unsigned NUM = NREGS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NUM)-1:0] ra1,
  input  logic [$clog2(NUM)-1:0] ra2,
  output word_t                  rd1,
  output word_t                  rd2,
  input  logic                   we,
  input  logic [$clog2(NUM)-1:0] wa,
  input  word_t                  wd
);
  word_t regs [NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2 = (we && wa == ra2) ? wd : regs[ra2];

endmodule
