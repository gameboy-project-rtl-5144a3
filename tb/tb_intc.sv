// tb_intc: checks request latching, the IE mask on the irq line, register
// read-back and clearing a flag by a write.
module tb_intc;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = 16'hFF0F;
  logic [7:0] wdata = 0, rdata;
  logic wr = 0, hit, irq;
  logic [4:0] req = 0;
  int checks = 0, failures = 0;
  intc dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask
  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); addr = 16'hFF0F; #1;
    chk("IF after reset", rdata, 8'hE0);
    chk("no irq", int'(irq), 0);
    for (int b = 0; b < 5; b++) begin
      wreg(16'hFFFF, 8'(1 << b));
      wreg(16'hFF0F, 8'h00);
      @(negedge clk); req = 5'(1 << ((b + 1) % 5)); @(negedge clk); req = 0;
      @(negedge clk); chk($sformatf("masked request %0d", b), int'(irq), 0);
      @(negedge clk); req = 5'(1 << b); @(negedge clk); req = 0;
      @(negedge clk); chk($sformatf("enabled request %0d", b), int'(irq), 1);
      addr = 16'hFF0F; #1;
      chk($sformatf("IF value %0d", b), rdata, 8'hE0 | (1 << b) | (1 << ((b + 1) % 5)));
      wreg(16'hFF0F, 8'(~(1 << b)) & 8'h1F);
      @(negedge clk); chk($sformatf("irq dropped after clear %0d", b), int'(irq), 0);
    end
    addr = 16'hFFFF; #1; chk("IE read", rdata, 8'h10);
    // request wins over a simultaneous write
    @(negedge clk); addr = 16'hFF0F; wdata = 0; wr = 1; req = 5'h10; @(negedge clk); wr = 0; req = 0;
    #1; chk("request beats write", rdata, 8'hF0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
