// tb_unprot_regfile: writes random plain words to random registers and
// checks both read ports against a reference array, including the
// write-through case (reading the register being written) and reset to zero.
module tb_unprot_regfile;
  import scp_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  regaddr_t ra1, ra2, wa;
  word_t  rd1, rd2, wd;
  logic     we;
  word_t  model [NREGS];
  int       checks = 0, failures = 0;

  unprot_regfile dut (.clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
                    .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  function automatic word_t rnd_shared();
    word_t s;
    s = $urandom;
    return s;
  endfunction

  initial begin
    we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
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
      ra1 = regaddr_t'($urandom);
      ra2 = (i % 4 == 0) ? wa : regaddr_t'($urandom);
      #1;
      checks++;
      if (rd1 !== ((we && wa == ra1) ? wd : model[ra1])) begin
        failures++; $display("FAIL port 1 r%0d", ra1);
      end
      checks++;
      if (rd2 !== ((we && wa == ra2) ? wd : model[ra2])) begin
        failures++; $display("FAIL port 2 r%0d", ra2);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
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
