// prot_alu: the side-channel protected ALU. It computes the three ARX
// operations on secret words held as three Boolean shares.
//
// XOR and rotation are linear, so each share is processed on its own and the
// result is ready in the same cycle. Addition is not linear and goes to a
// bank of NADD bit-serial threshold adders (ti_adder_bank), each taking XLEN
// cycles; several additions can be in flight at once. Two more operations
// bring public data in: XORR adds a plain word (a round constant or counter
// from the unprotected side) into share 0 only, and MASK splits a plain word
// into three fresh shares using two random words.
//
// Interface and timing: `req` is high, with `op` and the operands, while the
// instruction sits in the execute stage. For every operation except ADD the
// result is on `y` and `ready` is high in the same cycle. For ADD, `ready`
// says an adder accepted the operands (and destination `dest`) this cycle;
// with all adders busy `ready` stays low and the request must be held. The
// sum comes back XLEN cycles later on the add_wb_* port, which writes the
// protected register file directly; `add_pending` marks registers whose sum
// is still on its way.
//
// From the document: a protected ALU with a TI adder, an xor and a rotation
// unit, shares processed independently for the linear operations, parallel
// adder instances (up to four), direct access to a randomness source. XORR,
// MASK and the handshake are this design's own.
module prot_alu
  import scp_pkg::*;
#(
  parameter int unsigned NADD = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  palu_op_e         op,
  input  shared_t          a,
  input  shared_t          b,
  input  regaddr_t         dest,     // destination register of an ADD
  input  word_t            r,        // plain operand of XORR and MASK
  input  logic [4:0]       rot,      // rotation amount
  input  logic [2*XLEN-1:0] rnd_mask, // two random words for MASK
  input  logic [3:0]       rnd_add,  // four random bits per addition
  output shared_t          y,
  output logic             ready,
  // results of the parallel adders
  output logic             add_wb_valid,
  output regaddr_t         add_wb_dest,
  output shared_t          add_wb_data,
  output logic [NREGS-1:0] add_pending
);
  logic add_accept;

  ti_adder_bank #(.NADD(NADD), .NUM(NREGS)) u_adders (
    .clk      (clk),
    .rst_n    (rst_n),
    .issue    (req && (op == PA_ADD)),
    .a        (a),
    .b        (b),
    .dest     (dest),
    .rnd      (rnd_add),
    .accept   (add_accept),
    .wb_valid (add_wb_valid),
    .wb_dest  (add_wb_dest),
    .wb_data  (add_wb_data),
    .pending  (add_pending)
  );

  always_comb begin
    y     = '0;
    ready = 1'b1;
    unique case (op)
      PA_ADD:  ready = add_accept;  // result arrives on add_wb_*
      PA_XOR:  y = a ^ b;
      PA_ROTL: for (int j = 0; j < NSHARES; j++)
                 y[j] = rotl(a[j], rot);
      PA_ROTR: for (int j = 0; j < NSHARES; j++)
                 y[j] = rotr(a[j], rot);
      PA_XORR: begin
        y    = a;
        y[0] = a[0] ^ r;
      end
      PA_MASK: y = mask(r, rnd_mask[XLEN-1:0], rnd_mask[2*XLEN-1:XLEN]);
      default: y = '0;
    endcase
  end

endmodule
