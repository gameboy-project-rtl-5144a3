// tb_cart_rom: loads a pattern through the load port, reads it back over
// the bus, checks the decode of 0000-7FFF.
module tb_cart_rom;
  logic clk = 0;
  logic [15:0] addr = 0;
  logic [7:0] rdata;
  logic hit, ld_we = 0;
  logic [14:0] ld_addr = 0;
  logic [7:0] ld_data = 0;
  int checks = 0, failures = 0;
  cart_rom dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 0; a < 32768; a++) begin
      @(negedge clk); ld_addr = 15'(a); ld_data = 8'(a ^ (a >> 7)); ld_we = 1;
    end
    @(negedge clk); ld_we = 0;
    for (int a = 0; a < 32768; a += 5) begin
      addr = 16'(a); #1;
      checks++; if (rdata !== 8'(a ^ (a >> 7)) || !hit) failures++;
    end
    addr = 16'h8000; #1; checks++; if (hit) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
