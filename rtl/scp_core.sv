// scp_core: four-stage RISC pipeline with a protected and an unprotected ALU.
//
// Stages:
//   IF  fetch: the program counter addresses the instruction memory, whose
//       synchronous read delivers the instruction to ID one cycle later.
//       One instruction is fetched per cycle.
//   ID  decode and register read: scp_decoder, then both register files
//       (plain words and three-share words) are read.
//   EX  execute: the unprotected ALU (single cycle, spanning-tree adder)
//       computes plain results, load/store addresses and branch decisions;
//       the protected ALU computes share-wise XOR/rotation in one cycle and
//       hands a masked addition to one of NADD parallel threshold adders
//       (XLEN cycles each); the data RAM is addressed.
//   WB  write back: RAM read data arrives (and is masked with random shares
//       that were drawn in EX for a masked load), results go to the register
//       files.
//
// Hazards: a register written by the instruction in EX and read by the
// instruction in ID stalls IF and ID for one cycle (the register files write
// through, so no forwarding network is needed). A masked addition leaves EX
// as soon as an adder accepts it (EX waits only while all NADD adders are
// busy); its destination is marked pending until the adder writes the result
// through the protected register file's second port, and an instruction that
// reads or writes a pending register waits in ID. A taken branch or jump,
// decided in EX, flushes IF and ID (two wasted cycles). HALT, when it reaches
// EX, flushes the younger instructions and stops fetching; when it reaches WB
// the core stops and raises `done`, the flag an outside CPU polls. HALT
// leaves ID only when no masked addition is outstanding.
//
// Interface: `start` (while stopped) clears `done`, resets the pipeline and
// starts fetching at address 0. Memory ports connect to imem and dmem
// (synchronous, one cycle read latency); `rnd_mask`/`rnd_add` come from the
// randomness source, which must supply new values every cycle.
//
// From the document: four pipeline stages, RISC approach, two separate ALUs
// with their own register files, load/store between RAM and the register
// files, unmasked values in RAM, one instruction fetched per cycle, the 32-cycle
// masked adder, parallel adders (four by default). The stage split, the hazard handling by interlock and the
// branch scheme and the scoreboard for the adders are this design's own.
module scp_core
  import scp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned NADD       = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          running,
  output logic                          done,
  // instruction memory
  output logic                          imem_ren,
  output logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic [31:0]                   imem_rdata,
  // data memory
  output logic                          dmem_en,
  output logic                          dmem_we,
  output logic [$clog2(DMEM_DEPTH)-1:0] dmem_addr,
  output word_t                         dmem_wdata,
  input  word_t                         dmem_rdata,
  // randomness
  input  logic [2*XLEN-1:0]             rnd_mask,
  input  logic [3:0]                    rnd_add
);
  localparam int unsigned PCW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  // ---------------------------------------------------------------- state
  logic           halting;        // HALT seen in EX, fetch stopped
  logic [PCW-1:0] pc;

  logic           id_valid;
  logic [PCW-1:0] id_pc;

  logic           ex_valid;
  logic [PCW-1:0] ex_pc;
  ctrl_t          ex_ctrl;
  word_t          ex_ua, ex_ub;   // plain operands
  shared_t        ex_pa, ex_pb;   // shared operands

  logic           wb_valid;
  ctrl_t          wb_ctrl;
  word_t          wb_r;           // plain result
  shared_t        wb_p;           // shared result, or sharing of 0 for PLD

  // ---------------------------------------------------------------- ID
  ctrl_t   id_ctrl;
  word_t   rf_r1, rf_r2;
  shared_t rf_p1, rf_p2;
  logic    hazard, ex_stall, stall, flush;

  scp_decoder u_dec (.instr(imem_rdata), .ctrl(id_ctrl));

  // write-back port signals
  logic    wr_r, wr_p;
  word_t   wd_r;
  shared_t wd_p;

  unprot_regfile #(.NUM(NREGS)) u_rf_r (
    .clk(clk), .rst_n(rst_n),
    .ra1(id_ctrl.ra1), .ra2(id_ctrl.ra2), .rd1(rf_r1), .rd2(rf_r2),
    .we(wr_r), .wa(wb_ctrl.wa), .wd(wd_r)
  );

  // results of the parallel masked adders
  logic             add_wb_valid;
  regaddr_t         add_wb_dest;
  shared_t          add_wb_data;
  logic [NREGS-1:0] add_pending;

  prot_regfile #(.NUM(NREGS)) u_rf_p (
    .clk(clk), .rst_n(rst_n),
    .ra1(id_ctrl.pa1), .ra2(id_ctrl.pa2), .rd1(rf_p1), .rd2(rf_p2),
    .we(wr_p), .wa(wb_ctrl.wa), .wd(wd_p),
    .we2(add_wb_valid), .wa2(add_wb_dest), .wd2(add_wb_data)
  );

  // read-after-write on the instruction in EX, and any access to a register
  // whose masked sum is still in an adder (HALT waits for all of them)
  always_comb begin
    hazard = 1'b0;
    if (id_valid &&
        ((id_ctrl.use_p1 && add_pending[id_ctrl.pa1]) ||
         (id_ctrl.use_p2 && add_pending[id_ctrl.pa2]) ||
         (id_ctrl.wr_p   && add_pending[id_ctrl.wa])  ||
         (id_ctrl.halt   && add_pending != '0)))
      hazard = 1'b1;
    if (id_valid && ex_valid) begin
      if (ex_ctrl.wr_r &&
          ((id_ctrl.use_r1 && id_ctrl.ra1 == ex_ctrl.wa) ||
           (id_ctrl.use_r2 && id_ctrl.ra2 == ex_ctrl.wa)))
        hazard = 1'b1;
      if (ex_ctrl.wr_p &&
          ((id_ctrl.use_p1 && id_ctrl.pa1 == ex_ctrl.wa) ||
           (id_ctrl.use_p2 && id_ctrl.pa2 == ex_ctrl.wa)))
        hazard = 1'b1;
    end
  end

  // ---------------------------------------------------------------- EX
  word_t      ua_b, ua_y;
  shared_t    pa_y;
  logic       pa_ready, br_taken, eq;
  logic [PCW-1:0] br_target;

  assign ua_b = ex_ctrl.ub_imm ? ex_ctrl.imm : ex_ub;

  unprot_alu u_ualu (.op(ex_ctrl.uop), .a(ex_ua), .b(ua_b), .y(ua_y));

  prot_alu #(.NADD(NADD)) u_palu (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (ex_valid && ex_ctrl.prot),
    .op       (ex_ctrl.pop),
    .a        (ex_pa),
    .b        (ex_pb),
    .dest     (ex_ctrl.wa),
    .r        ((ex_ctrl.pop == PA_XORR) ? ex_ub : ex_ua),
    .rot      (ex_ctrl.imm[4:0]),
    .rnd_mask (rnd_mask),
    .rnd_add  (rnd_add),
    .y            (pa_y),
    .ready        (pa_ready),
    .add_wb_valid (add_wb_valid),
    .add_wb_dest  (add_wb_dest),
    .add_wb_data  (add_wb_data),
    .add_pending  (add_pending)
  );

  assign ex_stall  = ex_valid && ex_ctrl.prot && !pa_ready;
  assign eq        = (ex_ua == ex_ub);
  assign br_taken  = ex_valid && (ex_ctrl.jump || (ex_ctrl.branch && (eq ^ ex_ctrl.br_ne)));
  assign br_target = ex_pc + ex_ctrl.imm[PCW-1:0];
  assign flush     = br_taken || (ex_valid && ex_ctrl.halt);
  assign stall     = hazard || ex_stall;

  assign dmem_en    = ex_valid && (ex_ctrl.mem_rd || ex_ctrl.mem_wr);
  assign dmem_we    = ex_valid && ex_ctrl.mem_wr;
  assign dmem_addr  = ua_y[DAW-1:0];
  assign dmem_wdata = ex_ctrl.mem_prot ? unmask(ex_pb) : ex_ub;

  // ---------------------------------------------------------------- IF
  assign imem_ren  = running && !halting && !stall;
  assign imem_addr = pc;

  // ---------------------------------------------------------------- WB
  assign wr_r = wb_valid && wb_ctrl.wr_r;
  assign wr_p = wb_valid && wb_ctrl.wr_p;
  assign wd_r = wb_ctrl.mem_rd ? dmem_rdata : wb_r;
  always_comb begin
    wd_p = wb_p;
    if (wb_ctrl.mem_rd) wd_p[0] = wb_p[0] ^ dmem_rdata;  // mask on arrival
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      done     <= 1'b0;
      halting  <= 1'b0;
      pc       <= '0;
      id_valid <= 1'b0;
      id_pc    <= '0;
      ex_valid <= 1'b0;
      ex_pc    <= '0;
      ex_ctrl  <= '0;
      ex_ua    <= '0;
      ex_ub    <= '0;
      ex_pa    <= '0;
      ex_pb    <= '0;
      wb_valid <= 1'b0;
      wb_ctrl  <= '0;
      wb_r     <= '0;
      wb_p     <= '0;
    end else if (!running) begin
      if (start) begin
        running  <= 1'b1;
        done     <= 1'b0;
        halting  <= 1'b0;
        pc       <= '0;
        id_valid <= 1'b0;
        ex_valid <= 1'b0;
        wb_valid <= 1'b0;
      end
    end else begin
      // IF -> ID
      if (flush) begin
        pc       <= br_taken ? br_target : pc;
        id_valid <= 1'b0;
        halting  <= halting || (ex_valid && ex_ctrl.halt);
      end else if (imem_ren) begin
        pc       <= pc + PCW'(1);
        id_valid <= 1'b1;
        id_pc    <= pc;
      end else if (!stall) begin
        id_valid <= 1'b0;  // fetch stopped by HALT
      end

      // ID -> EX
      if (!ex_stall) begin
        if (flush || hazard || !id_valid) begin
          ex_valid <= 1'b0;
        end else begin
          ex_valid <= id_ctrl.valid_op;
          ex_pc    <= id_pc;
          ex_ctrl  <= id_ctrl;
          ex_ua    <= rf_r1;
          ex_ub    <= rf_r2;
          ex_pa    <= rf_p1;
          ex_pb    <= rf_p2;
        end
      end

      // EX -> WB
      wb_valid <= ex_valid && !ex_stall;
      if (!ex_stall) begin
        wb_ctrl <= ex_ctrl;
        // a masked addition writes back through its adder, not through WB
        if (ex_ctrl.prot && ex_ctrl.pop == PA_ADD) wb_ctrl.wr_p <= 1'b0;
        wb_r    <= ua_y;
        // a masked load takes a fresh sharing of zero now and adds the RAM
        // word to share 0 in WB
        wb_p    <= ex_ctrl.mem_rd ? mask('0, rnd_mask[XLEN-1:0], rnd_mask[2*XLEN-1:XLEN])
                                  : pa_y;
      end

      // WB: HALT retires
      if (wb_valid && wb_ctrl.halt) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- checks
  // only one of stall and flush can hold in a cycle: a stalled EX cannot branch
  assert property (@(posedge clk) disable iff (!rst_n) !(ex_stall && flush));
  // the data RAM is written only by a valid store
  assert property (@(posedge clk) disable iff (!rst_n) dmem_we |-> dmem_en);

endmodule
