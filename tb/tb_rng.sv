// tb_rng: checks the randomness source against a separate xorshift128 model
// (Marsaglia's reference recurrence, three steps per enabled cycle), its hold
// when disabled, reseeding, and the replacement of an all-zero seed. Also
// checks that consecutive outputs differ.
module tb_rng;
  import scp_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              seed_load = 1'b0, en = 1'b0;
  logic [127:0]      seed = '0;
  logic [63:0]       rnd_mask, prev;
  logic [3:0]        rnd_add;
  int unsigned       x, y, z, w;
  int                checks = 0, failures = 0;

  rng dut (.clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed), .en(en),
           .rnd_mask(rnd_mask), .rnd_add(rnd_add));

  always #5 clk = ~clk;

  // one xorshift128 step; returns the new w
  function automatic int unsigned xs();
    int unsigned t;
    t = x ^ (x << 11);
    x = y; y = z; z = w;
    w = w ^ (w >> 19) ^ (t ^ (t >> 8));
    return w;
  endfunction

  task automatic compare();
    int unsigned w1, w2, w3;
    w1 = xs(); w2 = xs(); w3 = xs();
    @(posedge clk); #1;
    checks++;
    if (rnd_mask !== {w2, w1} || rnd_add !== w3[3:0]) begin
      failures++;
      $display("FAIL rng %h/%h want %h%h/%h", rnd_mask, rnd_add, w2, w1, w3[3:0]);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // reset seed
    {x, y, z, w} = 128'h075bcd15_159a55e5_1f123bb5_05491333;
    en = 1'b1;
    for (int i = 0; i < 100; i++) compare();
    // hold
    en = 1'b0;
    prev = rnd_mask;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (rnd_mask !== prev) begin failures++; $display("FAIL rng moved while disabled"); end
    // reseed
    seed = {$urandom, $urandom, $urandom, $urandom};
    seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    {x, y, z, w} = seed;
    en = 1'b1;
    for (int i = 0; i < 100; i++) begin
      prev = rnd_mask;
      compare();
      checks++;
      if (rnd_mask == prev) begin failures++; $display("FAIL repeated output"); end
    end
    // zero seed replaced
    en = 1'b0;
    seed = '0;
    seed_load = 1'b1;
    @(posedge clk); #1;
    seed_load = 1'b0;
    {x, y, z, w} = 128'h075bcd15_159a55e5_1f123bb5_05491333;
    en = 1'b1;
    for (int i = 0; i < 10; i++) compare();
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
