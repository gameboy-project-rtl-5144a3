// tb_timer: checks DIV rate and reset-on-write, the TIMA period for all four
// TAC rates, TMA reload and the overflow interrupt pulse.
module tb_timer;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic wr = 0, hit, irq;
  int checks = 0, failures = 0;
  timer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", s, g, e); end
  endtask
  task automatic wreg(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1; @(negedge clk); wr = 0;
  endtask
  logic [7:0] v;
  task automatic rd(input logic [15:0] a);
    addr = a; #1; v = rdata;
  endtask

  int irqs = 0;
  always @(posedge clk) if (rst_n && irq) irqs++;

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int period [4] = '{1024, 16, 64, 256};
    logic [7:0] t0;
    repeat (2) @(negedge clk); rst_n = 1;
    wreg(16'hFF04, 0);                        // DIV reset
    repeat (255 * 2) @(negedge clk);
    rd(16'hFF04); chk("DIV after 511 clocks", v, 1);
    repeat (256) @(negedge clk);
    rd(16'hFF04); chk("DIV after 767 clocks", v, 2);
    wreg(16'hFF04, 8'h55);
    rd(16'hFF04); chk("DIV cleared", v, 0);
    for (int r = 0; r < 4; r++) begin
      wreg(16'hFF05, 0);
      wreg(16'hFF07, 8'(4 | r));
      // TIMA increments once per period clocks
      repeat (period[r] * 3) @(negedge clk);
      rd(16'hFF05); t0 = v;
      chk($sformatf("TIMA after 3 periods rate %0d", r), t0, 3);
      repeat (period[r] * 2) @(negedge clk);
      rd(16'hFF05); chk($sformatf("TIMA after 5 periods rate %0d", r), v, 5);
    end
    // stop
    wreg(16'hFF07, 8'h01);
    rd(16'hFF05); t0 = v;
    repeat (100) @(negedge clk);
    rd(16'hFF05); chk("TIMA stopped", v, t0);
    rd(16'hFF07); chk("TAC read", v, 8'hF9);
    // overflow and reload
    wreg(16'hFF06, 8'hF0);
    wreg(16'hFF05, 8'hFE);
    irqs = 0;
    wreg(16'hFF07, 8'h05);                    // 16 clocks per tick
    repeat (16 * 2 + 2) @(negedge clk);
    rd(16'hFF05); chk("TIMA reloaded from TMA", v, 8'hF0);
    chk("one overflow interrupt", irqs, 1);
    repeat (16 * 16) @(negedge clk);
    chk("second overflow interrupt", irqs, 2);
    chk("hit", int'(hit), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
