// tb_sparx_scp_top: end-to-end test of the processor at its default sizes.
//
// Acting as the outside CPU, the testbench loads an ARX block cipher program
// (Speck64/128: 32-bit words, rotations by 8 and 3, 27 rounds, key schedule
// with the round index as constant) into the instruction memory, writes
// plaintext and key into the data RAM, starts the core and waits for the
// done flag, then reads the ciphertext back. The cipher state and key stay
// masked (three shares) from the masked loads to the masked stores; the round
// counter lives in the unprotected datapath and enters the key schedule
// through PXORR.
//
// Checks: the published Speck64/128 test vector, a reference model of the
// cipher in the testbench for random keys and plaintexts, the exact cycle
// count of one encryption (worked out from the pipeline rules), that two runs
// with different randomness give the same ciphertext but different shares
// inside the register file, and that every pipeline mechanism happened:
// read-after-write stall, wait for a pending masked sum, two masked additions
// in flight at once, an addition waiting because all four adders are busy
// (a second, short program), taken branch (flush), masked load, masked store,
// HALT/done.
module tb_sparx_scp_top;
  import scp_pkg::*;
  import scp_asm_pkg::*;

  localparam int ROUNDS = 27;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, busy, done;
  logic         seed_load = 1'b0;
  logic [127:0] seed = '0;
  logic         host_imem_we = 1'b0;
  logic [7:0]   host_imem_addr = '0;
  logic [31:0]  host_imem_wdata = '0;
  logic         host_dmem_en = 1'b0, host_dmem_we = 1'b0;
  logic [7:0]   host_dmem_addr = '0;
  logic [31:0]  host_dmem_wdata = '0, host_dmem_rdata;
  int           checks = 0, failures = 0;

  // mechanism counters
  int n_hazard = 0, n_pend_stall = 0, n_flush = 0, n_pld = 0, n_pst = 0, n_done = 0;
  int n_parallel = 0;  // cycles with two or more masked additions in flight
  int n_full = 0;      // cycles an addition waits in EX because all adders are busy

  sparx_scp_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .seed_load(seed_load), .seed(seed),
    .host_imem_we(host_imem_we), .host_imem_addr(host_imem_addr),
    .host_imem_wdata(host_imem_wdata),
    .host_dmem_en(host_dmem_en), .host_dmem_we(host_dmem_we),
    .host_dmem_addr(host_dmem_addr), .host_dmem_wdata(host_dmem_wdata),
    .host_dmem_rdata(host_dmem_rdata)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (busy) begin
      if (dut.u_core.hazard && dut.u_core.add_pending == '0) n_hazard++;
      if (dut.u_core.hazard && dut.u_core.add_pending != '0) n_pend_stall++;
      if ($countones(dut.u_core.u_palu.u_adders.busy) >= 2) n_parallel++;
      if (dut.u_core.ex_stall) n_full++;
      if (dut.u_core.br_taken) n_flush++;
      if (dut.u_core.ex_valid && dut.u_core.ex_ctrl.mem_rd && dut.u_core.ex_ctrl.mem_prot) n_pld++;
      if (dut.u_core.ex_valid && dut.u_core.ex_ctrl.mem_wr && dut.u_core.ex_ctrl.mem_prot) n_pst++;
    end
  end
  always @(posedge done) n_done++;

  // ------------------------------------------------------------ reference
  function automatic word_t ror(word_t v, int n); return (v >> n) | (v << (32 - n)); endfunction
  function automatic word_t rol(word_t v, int n); return (v << n) | (v >> (32 - n)); endfunction

  // key = {l2, l1, l0, k0}; pt = {x, y}
  function automatic logic [63:0] speck64_128(logic [127:0] key, logic [63:0] pt);
    word_t x, y, k, l [0:ROUNDS+2], t;
    {l[2], l[1], l[0], k} = key;
    {x, y} = pt;
    for (int i = 0; i < ROUNDS; i++) begin
      x = (ror(x, 8) + y) ^ k;
      y = rol(y, 3) ^ x;
      t = (k + ror(l[i], 8)) ^ word_t'(i);
      l[i+3] = t;
      k = rol(k, 3) ^ t;
    end
    return {x, y};
  endfunction

  // ------------------------------------------------------------ program
  logic [31:0] prog [64];
  int          plen;

  task automatic build_program();
    int p = 0;
    prog[p++] = instr(OP_PLD,  0, 0, 0, 0);        // 0  S0 = x
    prog[p++] = instr(OP_PLD,  1, 0, 0, 1);        // 1  S1 = y
    prog[p++] = instr(OP_PLD,  2, 0, 0, 2);        // 2  S2 = k0
    prog[p++] = instr(OP_PLD,  3, 0, 0, 3);        // 3  S3 = l0
    prog[p++] = instr(OP_PLD,  4, 0, 0, 4);        // 4  S4 = l1
    prog[p++] = instr(OP_PLD,  5, 0, 0, 5);        // 5  S5 = l2
    prog[p++] = instr(OP_ADDI, 2, 0, 0, 0);        // 6  R2 = i = 0
    prog[p++] = instr(OP_ADDI, 3, 0, 0, ROUNDS);   // 7  R3 = rounds
    // round loop, address 8; both additions of a round run in parallel
    prog[p++] = instr(OP_PROTR, 0, 0, 0, 8);       // 8  x = x >>> 8
    prog[p++] = instr(OP_PROTR, 6, 3, 0, 8);       // 9  t = l0 >>> 8
    prog[p++] = instr(OP_PADD,  0, 0, 1, 0);       // 10 x = x + y   (adder 0)
    prog[p++] = instr(OP_PADD,  6, 6, 2, 0);       // 11 t = t + k   (adder 1)
    prog[p++] = instr(OP_PROTL, 1, 1, 0, 3);       // 12 y = y <<< 3
    prog[p++] = instr(OP_PROTL, 3, 4, 0, 0);       // 13 l0 = l1
    prog[p++] = instr(OP_PROTL, 4, 5, 0, 0);       // 14 l1 = l2
    prog[p++] = instr(OP_PXOR,  0, 0, 2, 0);       // 15 x = x ^ k   (waits for adder 0)
    prog[p++] = instr(OP_PXOR,  1, 1, 0, 0);       // 16 y = y ^ x
    prog[p++] = instr(OP_PXORR, 6, 6, 2, 0);       // 17 t = t ^ i
    prog[p++] = instr(OP_PROTL, 2, 2, 0, 3);       // 18 k = k <<< 3
    prog[p++] = instr(OP_PXOR,  2, 2, 6, 0);       // 19 k = k ^ t
    prog[p++] = instr(OP_PROTL, 5, 6, 0, 0);       // 20 l2 = t
    prog[p++] = instr(OP_ADDI,  2, 2, 0, 1);       // 21 i = i + 1
    prog[p++] = instr(OP_BNE,   3, 2, 0, -14);     // 22 if i != rounds goto 8
    prog[p++] = instr(OP_PST,   0, 0, 0, 8);       // 23 M[8] = x
    prog[p++] = instr(OP_PST,   1, 0, 0, 9);       // 24 M[9] = y
    prog[p++] = instr(OP_HALT,  0, 0, 0, 0);       // 25
    plen = p;
  endtask

  // Cycles from the clock edge that samples `start` to the first cycle with
  // `done` high, worked out from the pipeline rules: instruction k is fetched
  // in cycle k+1 after that edge, so with no stalls HALT (the N-th issued
  // instruction) is written back in cycle N+3 and done is seen in cycle N+4.
  // On top of that, per round: 2 for the taken loop branch (not in the last
  // round), 1 for each read-after-write on the instruction just ahead
  // (15->16 y, 18->19 k, 21->22 i: three), and the wait of instruction 15 for
  // the sum of x. That addition is issued when instruction 10 is in EX (cycle
  // e); its adder writes the result at the end of cycle e+31, so 15 enters EX
  // in cycle e+33 instead of e+5: 28 cycles. The second addition finishes one
  // cycle later and is never waited for.
  int expect_cycles;

  function automatic int count_cycles();
    int issued;
    issued = 8 + 15 * ROUNDS + 3;  // setup, round loop, tail (incl. HALT)
    return issued + 4
         + 2 * (ROUNDS - 1)        // taken loop branches
         + 3 * ROUNDS              // read-after-write stalls
         + 28 * ROUNDS;            // wait for the masked sum of x
  endfunction

  // ------------------------------------------------------------ host side
  task automatic host_write_dmem(int a, word_t v);
    host_dmem_en = 1'b1; host_dmem_we = 1'b1; host_dmem_addr = 8'(a); host_dmem_wdata = v;
    @(posedge clk); #1;
    host_dmem_en = 1'b0; host_dmem_we = 1'b0;
  endtask

  task automatic host_read_dmem(int a, output word_t v);
    host_dmem_en = 1'b1; host_dmem_we = 1'b0; host_dmem_addr = 8'(a);
    @(posedge clk); #1;
    host_dmem_en = 1'b0;
    v = host_dmem_rdata;
  endtask

  task automatic encrypt(logic [127:0] key, logic [63:0] pt, logic [127:0] s,
                         output logic [63:0] ct, output int cycles);
    word_t hi, lo;
    seed = s; seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    host_write_dmem(0, pt[63:32]);
    host_write_dmem(1, pt[31:0]);
    host_write_dmem(2, key[31:0]);
    host_write_dmem(3, key[63:32]);
    host_write_dmem(4, key[95:64]);
    host_write_dmem(5, key[127:96]);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    host_read_dmem(8, hi);
    host_read_dmem(9, lo);
    ct = {hi, lo};
  endtask

  task automatic expect_eq64(string what, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    logic [63:0]  ct, ct2, pt;
    logic [127:0] key;
    int           cyc, cyc0;
    shared_t      s_first;

    build_program();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < plen; i++) begin
      host_imem_we = 1'b1; host_imem_addr = 8'(i); host_imem_wdata = prog[i];
      @(posedge clk); #1;
    end
    host_imem_we = 1'b0;

    // published test vector
    key = 128'h1b1a1918_13121110_0b0a0908_03020100;
    pt  = 64'h3b726574_7475432d;
    encrypt(key, pt, 128'h1, ct, cyc0);
    expect_eq64("Speck64/128 test vector", ct, 64'h8c6fa548_454e028b);
    expect_eq64("reference model on test vector", speck64_128(key, pt), 64'h8c6fa548_454e028b);
    s_first = dut.u_core.u_rf_p.regs[2];
    expect_cycles = count_cycles();
    $display("one encryption: %0d cycles (expected %0d)", cyc0, expect_cycles);
    expect_eq64("cycles per encryption", 64'(cyc0), 64'(expect_cycles));

    // same input, other randomness: same result, other shares
    encrypt(key, pt, 128'h2, ct2, cyc);
    expect_eq64("result independent of randomness", ct2, ct);
    checks++;
    if (dut.u_core.u_rf_p.regs[2] == s_first) begin
      failures++; $display("FAIL shares of the round key identical for different randomness");
    end
    checks++;
    if (unmask(dut.u_core.u_rf_p.regs[2]) != unmask(s_first)) begin
      failures++; $display("FAIL final round key differs between runs");
    end

    // random keys and plaintexts against the model
    for (int n = 0; n < 4; n++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      pt  = {$urandom, $urandom};
      encrypt(key, pt, {$urandom, $urandom, $urandom, $urandom}, ct, cyc);
      expect_eq64("random vector", ct, speck64_128(key, pt));
      expect_eq64("cycles", 64'(cyc), 64'(cyc0));
    end

    // second program: five independent masked additions; with four adders
    // the fifth waits in EX for a free one
    begin
      logic [31:0] burst [10];
      word_t       r0, r1;
      int          q = 0;
      burst[q++] = instr(OP_PLD,  0, 0, 0, 0);
      burst[q++] = instr(OP_PLD,  1, 0, 0, 1);
      for (int r = 2; r < 7; r++) burst[q++] = instr(OP_PADD, r, 0, 1, 0);
      burst[q++] = instr(OP_PST,  6, 0, 0, 20);
      burst[q++] = instr(OP_PST,  2, 0, 0, 21);
      burst[q++] = instr(OP_HALT, 0, 0, 0, 0);
      for (int i = 0; i < q; i++) begin
        host_imem_we = 1'b1; host_imem_addr = 8'(i); host_imem_wdata = burst[i];
        @(posedge clk); #1;
      end
      host_imem_we = 1'b0;
      host_write_dmem(0, 32'hfedc_ba98);
      host_write_dmem(1, 32'h0123_4567);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      while (!done) @(posedge clk);
      #1;
      host_read_dmem(20, r0);
      host_read_dmem(21, r1);
      expect_eq64("burst: fifth sum", 64'(r0), 64'(32'hfedc_ba98 + 32'h0123_4567));
      expect_eq64("burst: first sum", 64'(r1), 64'(32'hfedc_ba98 + 32'h0123_4567));
    end

    // every mechanism happened
    checks++;
    if (n_hazard == 0 || n_pend_stall == 0 || n_flush == 0 || n_pld == 0 || n_pst == 0 ||
        n_done == 0 || n_parallel == 0 || n_full == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("RAW stalls %0d, waits for a masked sum %0d, cycles with parallel additions %0d, all-adders-busy waits %0d, taken branches %0d, masked loads %0d, masked stores %0d, done %0d",
             n_hazard, n_pend_stall, n_parallel, n_full, n_flush, n_pld, n_pst, n_done);
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
