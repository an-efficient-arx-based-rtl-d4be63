// tb_prot_regfile: writes random three-share words to random registers
// through both write ports and checks both read ports against a reference
// array, including write-through from either port and reset to zero.
module tb_prot_regfile;
  import scp_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  regaddr_t ra1, ra2, wa, wa2;
  shared_t  rd1, rd2, wd, wd2;
  logic     we, we2;
  shared_t  model [NREGS];
  int       checks = 0, failures = 0;

  prot_regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
                    .we(we), .wa(wa), .wd(wd), .we2(we2), .wa2(wa2), .wd2(wd2));

  function automatic shared_t expect_rd(regaddr_t ra);
    if (we && wa == ra)   return wd;
    if (we2 && wa2 == ra) return wd2;
    return model[ra];
  endfunction

  always #5 clk = ~clk;

  function automatic shared_t rnd_shared();
    shared_t s;
    for (int j = 0; j < NSHARES; j++) s[j] = $urandom;
    return s;
  endfunction

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0; we2 = 1'b0; wa2 = '0; wd2 = '0;
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NREGS; i++) begin
      ra1 = regaddr_t'(i); #1;
      checks++;
      if (rd1 !== '0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int i = 0; i < 3000; i++) begin
      we  = 1'($urandom);
      wa  = regaddr_t'($urandom);
      wd  = rnd_shared();
      we2 = 1'($urandom);
      wa2 = wa + regaddr_t'($urandom_range(1, NREGS - 1));  // never the same register
      wd2 = rnd_shared();
      ra1 = (i % 4 == 1) ? wa2 : regaddr_t'($urandom);
      ra2 = (i % 4 == 0) ? wa : regaddr_t'($urandom);
      #1;
      checks++;
      if (rd1 !== expect_rd(ra1)) begin
        failures++; $display("FAIL port 1 r%0d", ra1);
      end
      checks++;
      if (rd2 !== expect_rd(ra2)) begin
        failures++; $display("FAIL port 2 r%0d", ra2);
      end
      @(posedge clk);
      if (we)  model[wa]  = wd;
      if (we2) model[wa2] = wd2;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
