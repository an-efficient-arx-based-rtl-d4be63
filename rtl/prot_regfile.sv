// prot_regfile: register file of the protected datapath. Each register holds
// one secret word as three Boolean shares, so the shares of a value are only
// ever combined by the protected ALU's share-wise logic, never here.
//
// Two combinational read ports and two write ports: port 1 for the pipeline's
// write-back stage, port 2 for results of the parallel masked adders. The
// pipeline never writes the same register on both ports in one cycle; if it
// did, port 1 would win. A read of a register being written in the same cycle
// returns the new value (write-through), so the decode stage sees a result in
// the cycle it is written. Registers reset to all-zero shares.
//
// From the document: a dedicated register file for the protected ALU. Its size
// (16 registers), port count and write-through are this design's own.
module prot_regfile
  import scp_pkg::*;
#(
  parameter int unsigned NUM = NREGS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NUM)-1:0] ra1,
  input  logic [$clog2(NUM)-1:0] ra2,
  output shared_t                rd1,
  output shared_t                rd2,
  input  logic                   we,
  input  logic [$clog2(NUM)-1:0] wa,
  input  shared_t                wd,
  input  logic                   we2,
  input  logic [$clog2(NUM)-1:0] wa2,
  input  shared_t                wd2
);
  shared_t regs [NUM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM; i++) regs[i] <= '0;
    end else begin
      if (we2) regs[wa2] <= wd2;
      if (we)  regs[wa]  <= wd;
    end
  end

  always_comb begin
    if (we && wa == ra1)        rd1 = wd;
    else if (we2 && wa2 == ra1) rd1 = wd2;
    else                        rd1 = regs[ra1];
  end

  always_comb begin
    if (we && wa == ra2)        rd2 = wd;
    else if (we2 && wa2 == ra2) rd2 = wd2;
    else                        rd2 = regs[ra2];
  end

endmodule
