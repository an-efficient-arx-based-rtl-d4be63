// tb_scp_core: runs a directed program on the pipeline with simple memory
// models in the testbench and a random randomness source, and checks the data
// memory contents it leaves against values worked out by hand. The program
// covers every instruction, read-after-write stalls (plain and protected),
// load-use stalls, taken and not-taken branches, a loop, masked load/store,
// PMOV/PXORR and HALT with the done flag. Also checks the parallel masked
// adders: a reader of a pending sum waits, and an addition issued while four
// are in flight waits in EX for exactly the cycles the 32-cycle adder latency
// implies.
module tb_scp_core;
  import scp_pkg::*;
  import scp_asm_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              running, done;
  logic              imem_ren, dmem_en, dmem_we;
  logic [7:0]        imem_addr, dmem_addr;
  logic [31:0]       imem_rdata;
  word_t             dmem_wdata, dmem_rdata;
  logic [63:0]       rnd_mask;
  logic [3:0]        rnd_add;
  logic [31:0]       im [256];
  logic [31:0]       dm [256];
  int                checks = 0, failures = 0;
  int                n_hazard = 0, n_padd_stall = 0, n_flush = 0, padd_len = 0, padd_max = 0;
  int                n_pend = 0;

  scp_core dut (.clk(clk), .rst_n(rst_n), .start(start), .running(running), .done(done),
                .imem_ren(imem_ren), .imem_addr(imem_addr), .imem_rdata(imem_rdata),
                .dmem_en(dmem_en), .dmem_we(dmem_we), .dmem_addr(dmem_addr),
                .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
                .rnd_mask(rnd_mask), .rnd_add(rnd_add));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (imem_ren) imem_rdata <= im[imem_addr];
    if (dmem_en) begin
      if (dmem_we) dm[dmem_addr] <= dmem_wdata;
      dmem_rdata <= dm[dmem_addr];
    end
    rnd_mask <= {$urandom, $urandom};
    rnd_add  <= 4'($urandom);
  end

  // mechanism counters, from the pipeline's own control signals
  always_ff @(posedge clk) begin
    if (running) begin
      if (dut.hazard && !dut.ex_stall && dut.add_pending == '0) n_hazard++;
      if (dut.hazard && !dut.ex_stall && dut.add_pending != '0) n_pend++;
      if (dut.ex_stall) begin n_padd_stall++; padd_len++; end
      else if (padd_len != 0) begin
        if (padd_len > padd_max) padd_max = padd_len;
        padd_len = 0;
      end
      if (dut.br_taken) n_flush++;
    end
  end

  task automatic expect_eq(string what, word_t got, word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    int p = 0;
    for (int i = 0; i < 256; i++) begin im[i] = '0; dm[i] = '0; end
    dm[0] = 32'h0000_0005;
    dm[1] = 32'h1234_5678;
    dm[2] = 32'hffff_fff0;
    // plain part
    im[p++] = instr(OP_LD,   1, 0, 0, 0);         // R1 = 5
    im[p++] = instr(OP_ADDI, 2, 1, 0, 3);         // R2 = 8       (load-use stall)
    im[p++] = instr(OP_SUB,  3, 2, 1, 0);         // R3 = 3       (RAW stall)
    im[p++] = instr(OP_LUI,  4, 0, 0, 16'hdead);  // R4 = dead0000
    im[p++] = instr(OP_ORI,  4, 4, 0, 16'hbeef);  // R4 = deadbeef
    im[p++] = instr(OP_ROTL, 5, 4, 0, 8);         // R5 = adbeefde
    im[p++] = instr(OP_ROTR, 6, 4, 0, 4);         // R6 = fdeadbee
    im[p++] = instr(OP_XOR,  7, 5, 6, 0);         // R7 = R5 ^ R6
    im[p++] = instr(OP_AND,  8, 4, 6, 0);         // R8 = R4 & R6
    im[p++] = instr(OP_OR,   9, 4, 6, 0);         // R9 = R4 | R6
    im[p++] = instr(OP_ADD, 10, 4, 6, 0);         // R10 = R4 + R6
    // loop: R11 = sum 1..5 with R12 counting down
    im[p++] = instr(OP_ADDI, 11, 0, 0, 0);        // 11
    im[p++] = instr(OP_ADDI, 12, 1, 0, 0);        // 12: R12 = 5
    im[p++] = instr(OP_ADD,  11, 11, 12, 0);      // 13: loop
    im[p++] = instr(OP_ADDI, 12, 12, 0, -1);      // 14
    im[p++] = instr(OP_BNE,  0, 12, 0, -2);       // 15: if R12 != R0 goto 13
    im[p++] = instr(OP_BEQ,  1, 12, 0, 2);        // 16: R12(0) == R1(5)? not taken
    im[p++] = instr(OP_JMP,  0, 0, 0, 2);         // 17: skip 18
    im[p++] = instr(OP_ADDI, 11, 0, 0, 99);       // 18: skipped
    im[p++] = instr(OP_ST,  11, 0, 0, 16);        // 19: M[16] = 15
    im[p++] = instr(OP_ST,   3, 0, 0, 17);        // M[17] = 3
    im[p++] = instr(OP_ST,   5, 0, 0, 18);
    im[p++] = instr(OP_ST,   6, 0, 0, 19);
    im[p++] = instr(OP_ST,   7, 0, 0, 20);
    im[p++] = instr(OP_ST,   8, 0, 0, 21);
    im[p++] = instr(OP_ST,   9, 0, 0, 22);
    im[p++] = instr(OP_ST,  10, 0, 0, 23);
    // protected part
    im[p++] = instr(OP_PLD,  1, 0, 0, 1);         // S1 = mask(12345678)
    im[p++] = instr(OP_PLD,  2, 0, 0, 2);         // S2 = mask(fffffff0)
    im[p++] = instr(OP_PADD, 3, 1, 2, 0);         // S3 = 12345668  (RAW stall)
    im[p++] = instr(OP_PXOR, 4, 3, 1, 0);         // S4 = 10 (waits for the sum)
    im[p++] = instr(OP_PROTL,5, 1, 0, 12);        // S5 = 45678123
    im[p++] = instr(OP_PROTR,6, 1, 0, 12);        // S6 = 67812345
    im[p++] = instr(OP_PXORR,7, 1, 4, 0);         // S7 = 12345678 ^ deadbeef = cc99e897
    im[p++] = instr(OP_PMOV, 8, 4, 0, 0);         // S8 = mask(deadbeef)
    im[p++] = instr(OP_PADD, 9, 8, 8, 0);         // S9 = bd5b7dde
    for (int r = 10; r < 15; r++)                 // five independent additions:
      im[p++] = instr(OP_PADD, r, 1, 2, 0);       // one waits for a free adder
    im[p++] = instr(OP_PST, 14, 0, 0, 38);
    im[p++] = instr(OP_PST,  3, 0, 0, 32);
    im[p++] = instr(OP_PST,  4, 0, 0, 33);
    im[p++] = instr(OP_PST,  5, 0, 0, 34);
    im[p++] = instr(OP_PST,  6, 0, 0, 35);
    im[p++] = instr(OP_PST,  7, 0, 0, 36);
    im[p++] = instr(OP_PST,  9, 0, 0, 37);
    im[p++] = instr(OP_HALT, 0, 0, 0, 0);
    im[p++] = instr(OP_ST,  1, 0, 0, 40);         // after HALT: must not run

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done) @(posedge clk);
    #1;

    expect_eq("sum loop", dm[16], 15);
    expect_eq("sub",  dm[17], 3);
    expect_eq("rotl", dm[18], 32'hadbeefde);
    expect_eq("rotr", dm[19], 32'hfdeadbee);
    expect_eq("xor",  dm[20], 32'hadbeefde ^ 32'hfdeadbee);
    expect_eq("and",  dm[21], 32'hdeadbeef & 32'hfdeadbee);
    expect_eq("or",   dm[22], 32'hdeadbeef | 32'hfdeadbee);
    expect_eq("add",  dm[23], 32'hdeadbeef + 32'hfdeadbee);
    expect_eq("padd", dm[32], 32'h12345668);
    expect_eq("pxor", dm[33], 32'h10);
    expect_eq("protl", dm[34], 32'h45678123);
    expect_eq("protr", dm[35], 32'h67812345);
    expect_eq("pxorr", dm[36], 32'hcc99e897);
    expect_eq("pmov+padd", dm[37], 32'hdeadbeef + 32'hdeadbeef);
    expect_eq("fifth parallel padd", dm[38], 32'h12345668);
    expect_eq("after halt", dm[40], 0);
    expect_eq("halted", 32'(running), 0);
    // masked state really is shared: share 1 of S1 is not zero
    checks++;
    if (dut.u_rf_p.regs[1][1] == '0 || dut.u_rf_p.regs[1][0] == 32'h12345678) begin
      failures++; $display("FAIL masked load left an unshared value");
    end
    // with four adders and the S9 addition still in flight, the fourth of the
    // five waits in EX until the S9 adder (issued four cycles earlier) is
    // free again: 32 - 4 = 28 cycles
    expect_eq("all-adders-busy wait", padd_max, 28);
    checks++;
    if (n_hazard == 0 || n_flush < 5 || n_pend == 0) begin
      failures++; $display("FAIL mechanisms: hazard %0d flush %0d pending %0d", n_hazard, n_flush, n_pend);
    end
    $display("hazard stalls %0d, pending-sum stalls %0d, adders-busy stall cycles %0d, taken branches %0d",
             n_hazard, n_pend, n_padd_stall, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
