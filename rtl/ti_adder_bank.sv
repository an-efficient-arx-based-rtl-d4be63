// ti_adder_bank: NADD threshold adders working in parallel.
//
// A masked addition takes XLEN cycles in one ti_adder. Instead of holding the
// pipeline for all of them, the execute stage hands the addition to a free
// adder of this bank and moves on; the result is written to the protected
// register file when the adder finishes. Up to NADD additions are in flight.
//
// Issue: with `issue` high the operands, the destination register and four
// fresh random bits go to the lowest-numbered idle adder; `accept` says one was
// idle (otherwise the caller must hold the request). At most one issue per
// cycle, so no two adders finish in the same cycle.
// Write back: `wb_valid` is high in the cycle an adder finishes (XLEN cycles
// after its issue cycle, the issue cycle counted as the first), with the
// destination on `wb_dest` and the result shares on `wb_data`.
// Scoreboard: `pending` has one bit per protected register, set from the issue
// edge until the edge that writes the result; the decode stage stalls any
// instruction that reads or writes a pending register.
//
// From the document: parallel adder instances raise throughput, and more than
// four give diminishing returns, so four is the default. The issue rule, the
// scoreboard and the separate write port are this design's own.
module ti_adder_bank
  import scp_pkg::*;
#(
  parameter int unsigned NADD = 4,
  parameter int unsigned NUM  = NREGS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   issue,
  input  shared_t                a,
  input  shared_t                b,
  input  logic [$clog2(NUM)-1:0] dest,
  input  logic [3:0]             rnd,
  output logic                   accept,
  output logic                   wb_valid,
  output logic [$clog2(NUM)-1:0] wb_dest,
  output shared_t                wb_data,
  output logic [NUM-1:0]         pending
);
  localparam int unsigned DW = $clog2(NUM);

  logic [NADD-1:0]          busy, done, start;
  shared_t                  sum   [NADD];
  logic [NADD-1:0][DW-1:0]  dst;

  // lowest idle adder takes the issue
  always_comb begin
    start = '0;
    for (int i = NADD - 1; i >= 0; i--) begin
      if (!busy[i]) start = NADD'(1) << i;
    end
    if (!issue) start = '0;
  end
  assign accept = issue && (start != '0);

  for (genvar i = 0; i < NADD; i++) begin : g_add
    ti_adder #(.WIDTH(XLEN)) u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .start (start[i]),
      .a     (a),
      .b     (b),
      .rnd   (rnd),
      .busy  (busy[i]),
      .done  (done[i]),
      .sum   (sum[i])
    );
  end

  always_comb begin
    wb_valid = |done;
    wb_dest  = '0;
    wb_data  = '0;
    for (int i = 0; i < NADD; i++) begin
      if (done[i]) begin
        wb_dest = dst[i];
        wb_data = sum[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst     <= '0;
      pending <= '0;
    end else begin
      for (int i = 0; i < NADD; i++) begin
        if (start[i]) dst[i] <= dest;
      end
      // a register cannot be issued while pending, so set and clear never
      // meet on the same bit
      if (wb_valid) pending[wb_dest] <= 1'b0;
      if (accept)   pending[dest]    <= 1'b1;
    end
  end

  // adders start in different cycles and all take XLEN cycles
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(done));
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> !pending[dest]);

endmodule
