// tb_unprot_alu: checks every operation of the unprotected ALU against
// SystemVerilog operators on random and corner-case operands.
module tb_unprot_alu;
  import scp_pkg::*;

  logic     clk = 1'b0;
  ualu_op_e op;
  word_t    a, b, y;
  int       checks = 0, failures = 0;

  unprot_alu dut (.op(op), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  function automatic word_t model(ualu_op_e o, word_t x, word_t z);
    int unsigned n;
    n = z[4:0];
    unique case (o)
      UA_ADD:  return x + z;
      UA_SUB:  return x - z;
      UA_XOR:  return x ^ z;
      UA_AND:  return x & z;
      UA_OR:   return x | z;
      UA_ROTL: return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
      UA_ROTR: return (n == 0) ? x : ((x >> n) | (x << (32 - n)));
      default: return z;
    endcase
  endfunction

  task automatic check(ualu_op_e o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op %s a=%h b=%h y=%h want %h", o.name(), x, z, y, model(o, x, z));
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      check(ualu_op_e'(o), 32'hffff_ffff, 32'h0000_0001);
      check(ualu_op_e'(o), 32'h0, 32'hffff_ffff);
      check(ualu_op_e'(o), 32'h8000_0001, 32'd31);
      for (int i = 0; i < 2000; i++) check(ualu_op_e'(o), $urandom, $urandom);
    end
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
