// tb_spanning_tree_adder: checks the spanning-tree adder against the
// reference a + b + cin computed with 33-bit integer arithmetic, on corner
// cases (all-ones carry chains, carries across every 4-bit group) and random
// operands, with both carry-in values.
module tb_spanning_tree_adder;
  localparam int unsigned W = 32;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  spanning_tree_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  task automatic check(logic [W-1:0] x, logic [W-1:0] y, logic c);
    logic [W:0] ref_v;
    a = x; b = y; cin = c;
    #1;
    ref_v = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    checks++;
    if ({cout, sum} !== ref_v) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d:%h want %h", x, y, c, cout, sum, ref_v);
    end
  endtask

  initial begin
    check('0, '0, 1'b0);
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check(32'h7fff_ffff, 32'h1, 1'b0);
    for (int k = 0; k < W; k += 4) begin
      check(32'h0000_000f << k, 32'h1 << k, 1'b0);  // carry out of each group
      check(32'hffff_ffff >> k, 32'h0, 1'b1);
    end
    for (int i = 0; i < 20000; i++)
      check($urandom, $urandom, 1'($urandom));
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
