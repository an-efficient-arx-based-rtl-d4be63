// tb_ti_adder: checks the threshold adder. Random operands are split into
// three random shares, the adder is started with random fresh bits, and the
// unmasked result is compared with (a + b) mod 2^32. Also checks that the
// result arrives in exactly WIDTH cycles (start cycle included), that busy
// falls after done, and that the output shares are not a fixed sharing
// (share 1 differs between two additions of the same operands with different
// randomness and sharings).
module tb_ti_adder;
  localparam int unsigned W = 32;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                start = 1'b0;
  logic [2:0][W-1:0]   a, b, sum;
  logic [3:0]          rnd;
  logic                busy, done;
  int                  checks = 0, failures = 0;

  ti_adder #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                             .rnd(rnd), .busy(busy), .done(done), .sum(sum));

  always #5 clk = ~clk;

  function automatic logic [2:0][W-1:0] share(logic [W-1:0] v);
    logic [2:0][W-1:0] s;
    s[1] = $urandom;
    s[2] = $urandom;
    s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  task automatic run(logic [W-1:0] x, logic [W-1:0] y, output logic [2:0][W-1:0] res);
    int cyc;
    a = share(x); b = share(y); rnd = 4'($urandom);
    start = 1'b1;
    cyc = 1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc++;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
      if (cyc > 2 * W) break;
    end
    res = sum;
    checks++;
    if (cyc != W) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, W);
    end
    checks++;
    if ((sum[0] ^ sum[1] ^ sum[2]) !== x + y) begin
      failures++;
      $display("FAIL %h + %h = %h, got %h", x, y, x + y, sum[0] ^ sum[1] ^ sum[2]);
    end
    @(posedge clk); #1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL adder still busy after done");
    end
  endtask

  logic [2:0][W-1:0] r1, r2;
  logic              differ;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(32'hffff_ffff, 32'h1, r1);
    run(32'h8000_0000, 32'h8000_0000, r1);
    run('0, '0, r1);
    differ = 1'b0;
    for (int i = 0; i < 8; i++) begin
      run(32'h1234_5678, 32'h9abc_def0, r1);
      run(32'h1234_5678, 32'h9abc_def0, r2);
      if (r1[1] != r2[1]) differ = 1'b1;
    end
    checks++;
    if (!differ) begin
      failures++;
      $display("FAIL output sharing never changes with fresh randomness");
    end
    for (int i = 0; i < 300; i++) run($urandom, $urandom, r1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
