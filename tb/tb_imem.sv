// tb_imem: fills the instruction memory through the write port, then reads
// it back through the synchronous read port, checking the one-cycle latency
// and that the output holds while the read enable is low.
module tb_imem;
  localparam int unsigned DEPTH = 256;

  logic                     clk = 1'b0;
  logic                     we = 1'b0, ren = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [31:0]              wdata = '0, rdata, held;
  logic [31:0]              model [DEPTH];
  int                       checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                             .ren(ren), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      ren = 1'b1; raddr = 8'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++; $display("FAIL imem[%0d] = %h want %h", raddr, rdata, model[raddr]);
      end
      if (i % 10 == 0) begin
        held = rdata;
        ren = 1'b0; raddr = raddr + 8'd1;
        @(posedge clk); #1;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL imem output not held"); end
      end
    end
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
