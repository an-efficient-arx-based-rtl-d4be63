// dmem: data RAM of the processor, holding plain (unmasked) words.
//
// DEPTH words of 32 bits behind one synchronous port: with `en` high, a write
// (`we` high) stores `wdata` at `addr`, and a read puts the word at `addr` on
// `rdata` after the clock edge. The processor's load/store instructions use
// the port while it runs; the host uses it (through the top's multiplexer) to
// place plaintext and key and to collect the result while it is stopped.
// Masked loads share the loaded word right after it leaves this RAM, and
// masked stores unmask right before it.
//
// From the document: plain values are loaded from and stored to RAM, which
// also lets the processor talk to an outside main CPU. The depth (256 words)
// and the single synchronous port are this design's own.
module dmem #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      rdata <= mem[addr];
    end
  end

endmodule
