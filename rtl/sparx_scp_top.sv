// sparx_scp_top: side-channel protected ARX processor with its memories.
//
// A small programmable core for ARX ciphers (SPARX and other add-rotate-xor
// algorithms). Secret state is held and processed as three Boolean shares by
// a protected datapath whose only non-linear unit is a threshold-implementation
// adder; public data (counters, addresses, round constants) go through a
// separate single-cycle ALU built on a spanning-tree adder.
//
// Contents: scp_core (four-stage pipeline, both ALUs and register files), the
// instruction memory imem, the data RAM dmem and the randomness source rng.
//
// Host interface (for an outside CPU): while `busy` is low the host writes
// the program into imem, writes and reads dmem through the host port
// (synchronous, read data one cycle after `host_dmem_en`), and may reseed the
// randomness source. A one-cycle `start` runs the program from address 0;
// `done` (the "encryption executed" flag) rises when the program executes
// HALT and stays high until the next start. While `busy` is high the core owns
// the data RAM and host accesses to it are ignored.
//
// From the document: the processor structure of its block diagram (two ALUs,
// two register files, RAM, randomness source) and the done flag for an outside
// CPU; NADD parallel masked adders (the document finds more than four not
// worth it). Memory depths and the host port are this design's own.
module sparx_scp_top
  import scp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned NADD       = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // randomness seed
  input  logic                          seed_load,
  input  logic [127:0]                  seed,
  // host access to instruction memory
  input  logic                          host_imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] host_imem_addr,
  input  logic [31:0]                   host_imem_wdata,
  // host access to data memory
  input  logic                          host_dmem_en,
  input  logic                          host_dmem_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] host_dmem_addr,
  input  logic [31:0]                   host_dmem_wdata,
  output logic [31:0]                   host_dmem_rdata
);
  localparam int unsigned PCW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  logic           imem_ren;
  logic [PCW-1:0] imem_addr;
  logic [31:0]    imem_rdata;

  logic           c_en, c_we;
  logic [DAW-1:0] c_addr;
  word_t          c_wdata;
  word_t          m_rdata;

  logic [2*XLEN-1:0] rnd_mask;
  logic [3:0]        rnd_add;

  scp_core #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH), .NADD(NADD)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .running    (busy),
    .done       (done),
    .imem_ren   (imem_ren),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .dmem_en    (c_en),
    .dmem_we    (c_we),
    .dmem_addr  (c_addr),
    .dmem_wdata (c_wdata),
    .dmem_rdata (m_rdata),
    .rnd_mask   (rnd_mask),
    .rnd_add    (rnd_add)
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk   (clk),
    .we    (host_imem_we && !busy),
    .waddr (host_imem_addr),
    .wdata (host_imem_wdata),
    .ren   (imem_ren),
    .raddr (imem_addr),
    .rdata (imem_rdata)
  );

  // the core owns the data RAM while it runs
  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk   (clk),
    .en    (busy ? c_en    : host_dmem_en),
    .we    (busy ? c_we    : host_dmem_we),
    .addr  (busy ? c_addr  : host_dmem_addr),
    .wdata (busy ? c_wdata : host_dmem_wdata),
    .rdata (m_rdata)
  );

  assign host_dmem_rdata = m_rdata;

  rng u_rng (
    .clk       (clk),
    .rst_n     (rst_n),
    .seed_load (seed_load && !busy),
    .seed      (seed),
    .en        (1'b1),
    .rnd_mask  (rnd_mask),
    .rnd_add   (rnd_add)
  );

endmodule
