// tb_wram: writes a pattern to all 8 KiB and reads it back combinationally;
// checks the address decode.
module tb_wram;
  logic clk = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic wr = 0, hit;
  int checks = 0, failures = 0;
  wram dut (.*);
  always #5 clk = ~clk;
  function automatic logic [7:0] pat(input int a);
    return 8'((a * 37) ^ (a >> 8));
  endfunction
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 'hC000; a < 'hE000; a++) begin
      @(negedge clk); addr = 16'(a); wdata = pat(a); wr = 1;
    end
    @(negedge clk); wr = 0;
    // a write outside the range must not alias
    addr = 16'hE000; wdata = 8'h5A; wr = 1; @(negedge clk); wr = 0;
    #1; checks++; if (hit) failures++;
    for (int a = 'hC000; a < 'hE000; a += 7) begin
      addr = 16'(a); #1;
      checks++; if (rdata !== pat(a) || !hit) failures++;
    end
    addr = 16'hBFFF; #1; checks++; if (hit) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
