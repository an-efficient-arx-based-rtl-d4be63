// tb_ti_adder_bank: issues masked additions to the bank of four threshold
// adders, in bursts and with gaps, and checks every returned sum and
// destination against (a + b) mod 2^32, the 32-cycle latency of each, that
// a fifth issue is refused while four are in flight, and the pending bits of
// the scoreboard.
module tb_ti_adder_bank;
  import scp_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             issue = 1'b0, accept, wb_valid;
  shared_t          a, b, wb_data;
  regaddr_t         dest = '0, wb_dest;
  logic [3:0]       rnd = '0;
  logic [NREGS-1:0] pending;
  int               checks = 0, failures = 0;
  int               cycle = 0;
  // expected results by destination
  word_t            want [NREGS];
  int               issued_at [NREGS];
  logic [NREGS-1:0] outstanding = '0;

  ti_adder_bank #(.NADD(4)) dut (.clk(clk), .rst_n(rst_n), .issue(issue), .a(a), .b(b),
                                 .dest(dest), .rnd(rnd), .accept(accept), .wb_valid(wb_valid),
                                 .wb_dest(wb_dest), .wb_data(wb_data), .pending(pending));

  always #5 clk = ~clk;

  function automatic shared_t share(word_t v);
    shared_t s;
    s[1] = $urandom;
    s[2] = $urandom;
    s[0] = v ^ s[1] ^ s[2];
    return s;
  endfunction

  task automatic expect_eq(string what, longint got, longint want_v);
    checks++;
    if (got != want_v) begin
      failures++;
      $display("FAIL %s: got %0h want %0h", what, got, want_v);
    end
  endtask

  // results and scoreboard, sampled before each edge
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      expect_eq("pending", pending, outstanding);
      if (wb_valid) begin
        expect_eq("result for an issued addition", outstanding[wb_dest], 1);
        expect_eq("sum", unmask(wb_data), want[wb_dest]);
        expect_eq("latency", cycle - issued_at[wb_dest], 31);
      end
    end
  end

  always @(posedge clk) begin
    if (wb_valid) outstanding[wb_dest] <= 1'b0;
    if (accept)   outstanding[dest]    <= 1'b1;
  end

  initial begin
    word_t x, z;
    int    busy_count;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); #1;
      issue = 1'b0;
      if ($urandom_range(0, 2) != 0) begin
        // pick a destination that is not in flight
        dest = regaddr_t'($urandom);
        for (int t = 0; t < NREGS && (outstanding[dest] || pending[dest]); t++)
          dest = dest + 1'b1;
        x = $urandom; z = $urandom;
        a = share(x); b = share(z); rnd = 4'($urandom);
        // a register that stays pending with nothing in flight is an error
        // of the bank; issuing to it would break the bank's rule, so skip
        issue = !(outstanding[dest] || pending[dest]);
        #1;
        busy_count = $countones(dut.busy);
        expect_eq("accept iff an adder is idle", accept, busy_count < 4);
        if (accept) begin
          want[dest] = x + z;
          issued_at[dest] = cycle;  // this negedge lies in the issue cycle
        end
      end
    end
    @(negedge clk);
    issue = 1'b0;
    repeat (40) @(posedge clk);
    expect_eq("all results returned", outstanding, 0);
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
