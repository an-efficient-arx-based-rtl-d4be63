// tb_prot_alu: checks the protected ALU on shared operands. For each
// operation the unmasked result is compared with the plain-value result; the
// linear operations must also be share-wise (each output share depends only
// on the same input share), MASK must produce a sharing of r that uses the
// given random words. ADD must be accepted at once and return its sum with
// its destination in the 32nd cycle (issue cycle counted), mark the
// destination pending meanwhile, and accept at most four additions in flight.
module tb_prot_alu;
  import scp_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              req = 1'b0;
  palu_op_e          op;
  shared_t           a, b, y;
  word_t             r;
  logic [4:0]        rot;
  logic [2*XLEN-1:0] rnd_mask;
  logic [3:0]        rnd_add;
  logic              ready;
  regaddr_t          dest;
  logic              wb_valid;
  regaddr_t          wb_dest;
  shared_t           wb_data;
  logic [NREGS-1:0]  pending;
  int                checks = 0, failures = 0;

  prot_alu dut (.clk(clk), .rst_n(rst_n), .req(req), .op(op), .a(a), .b(b), .dest(dest),
                .r(r), .rot(rot), .rnd_mask(rnd_mask), .rnd_add(rnd_add), .y(y), .ready(ready),
                .add_wb_valid(wb_valid), .add_wb_dest(wb_dest), .add_wb_data(wb_data),
                .add_pending(pending));

  always #5 clk = ~clk;

  function automatic shared_t share(word_t v);
    shared_t s;
    s[1] = $urandom;
    s[2] = $urandom;
    s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  function automatic word_t rl(word_t x, int unsigned n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  task automatic expect_eq(string what, word_t got, word_t want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    word_t x, z, k;
    int    n, cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    rnd_add = 4'h5;
    for (int i = 0; i < 200; i++) begin
      x = $urandom; z = $urandom; k = $urandom; n = $urandom_range(0, 31);
      a = share(x); b = share(z); r = k; rot = 5'(n);
      rnd_mask = {$urandom, $urandom};
      req = 1'b1;
      op = PA_XOR;  #1;
      expect_eq("xor", unmask(y), x ^ z);
      expect_eq("xor share 1", y[1], a[1] ^ b[1]);
      expect_eq("xor ready", 32'(ready), 1);
      op = PA_ROTL; #1;
      expect_eq("rotl", unmask(y), rl(x, n));
      expect_eq("rotl share 2", y[2], rl(a[2], n));
      op = PA_ROTR; #1;
      expect_eq("rotr", unmask(y), rl(x, (32 - n) % 32));
      op = PA_XORR; #1;
      expect_eq("xorr", unmask(y), x ^ k);
      expect_eq("xorr share 1", y[1], a[1]);
      op = PA_MASK; #1;
      expect_eq("mask", unmask(y), k);
      expect_eq("mask share 1", y[1], rnd_mask[31:0]);
      expect_eq("mask share 2", y[2], rnd_mask[63:32]);
      // masked addition: accepted at once, result 32 cycles later
      op = PA_ADD;
      dest = regaddr_t'(i);
      #1;
      expect_eq("add accepted", 32'(ready), 1);
      @(posedge clk); #1;
      req = 1'b0;
      a = share($urandom); b = share($urandom);  // adder keeps its own copy
      expect_eq("pending set", 32'(pending[dest]), 1);
      cyc = 2;
      while (!wb_valid && cyc < 100) begin
        @(posedge clk); #1;
        cyc++;
      end
      expect_eq("add", unmask(wb_data), x + z);
      expect_eq("add dest", 32'(wb_dest), 32'(dest));
      expect_eq("add cycles", cyc, 32);
      @(posedge clk); #1;
      expect_eq("pending cleared", 32'(pending[dest]), 0);
    end
    // four additions in flight, a fifth is refused until one finishes
    op = PA_ADD;
    for (int i = 0; i < 4; i++) begin
      a = share(32'(i)); b = share(32'(100)); dest = regaddr_t'(i); req = 1'b1;
      #1;
      expect_eq("parallel accept", 32'(ready), 1);
      @(posedge clk); #1;
    end
    dest = regaddr_t'(4);
    #1;
    cyc = 5;
    while (!ready && cyc < 100) begin
      // sums of the four come back one per cycle, in issue order
      if (wb_valid) expect_eq("parallel sum", unmask(wb_data), 32'(wb_dest) + 100);
      @(posedge clk); #1;
      cyc++;
    end
    expect_eq("fifth accepted when the first adder is free", cyc, 33);
    expect_eq("pending: first sum written, three in flight", 32'(pending[3:0]), 32'he);
    @(posedge clk); #1;
    req = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
