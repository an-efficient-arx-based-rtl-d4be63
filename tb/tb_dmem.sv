// tb_dmem: random reads and writes on the data RAM's single synchronous port,
// checked against a reference array (read data one cycle after the access,
// held while the port is not enabled).
module tb_dmem;
  localparam int unsigned DEPTH = 256;

  logic                     clk = 1'b0;
  logic                     en = 1'b0, we = 1'b0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [31:0]              wdata = '0, rdata, held;
  logic [31:0]              model [DEPTH];
  int                       checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH)) dut (.clk(clk), .en(en), .we(we), .addr(addr), .wdata(wdata),
                             .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      en = 1'b1; we = 1'b1; addr = 8'(i); wdata = $urandom; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      en = 1'b1; we = 1'($urandom); addr = 8'($urandom); wdata = $urandom;
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      else begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++; $display("FAIL dmem[%0d] = %h want %h", addr, rdata, model[addr]);
        end
        held = rdata;
        en = 1'b0; we = 1'b1; addr = addr + 8'd1; wdata = ~held;
        @(posedge clk); #1;
        checks++;
        if (rdata !== held) begin failures++; $display("FAIL dmem output not held"); end
      end
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
