// imem: instruction memory of the processor.
//
// DEPTH words of 32 bits. The host writes the program through the write port
// while the core is stopped. The core reads one instruction per cycle through
// a synchronous read port: the word at `raddr` appears on `rdata` after the
// clock edge at which `ren` is high; with `ren` low the output holds, which is
// how the fetch stage keeps an instruction during a pipeline stall.
//
// From the document: exactly one new instruction is fetched in each cycle.
// The depth (256 words), the host write port and the synchronous read are this
// design's own.
module imem #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  // host write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [31:0]              wdata,
  // core read port
  input  logic                     ren,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [31:0]              rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (ren) rdata <= mem[raddr];
  end

endmodule
