// tb_joypad: sends PS/2 make and break sequences and checks the P1 matrix
// read-out for both select lines and the change interrupt.
module tb_joypad;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = 16'hFF00;
  logic [7:0] wdata = 0, rdata, sc_data = 0, pressed;
  logic wr = 0, hit, sc_valid = 0, irq;
  int checks = 0, failures = 0, irqs = 0;
  joypad dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && irq) irqs++;
  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask
  task automatic sc(input logic [7:0] c);
    @(negedge clk); sc_data = c; sc_valid = 1; @(negedge clk); sc_valid = 0; repeat (3) @(negedge clk);
  endtask
  task automatic sel(input logic [7:0] v);
    @(negedge clk); wdata = v; wr = 1; @(negedge clk); wr = 0; #1;
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    sel(8'h20);  // directions
    chk("idle dirs", rdata, 8'hEF);
    sc(8'hE0); sc(8'h75);           // up pressed
    chk("irq on press", irqs, 1);
    sel(8'h20); chk("up", rdata, 8'hEB);
    sc(8'h22);                       // X -> A
    sel(8'h10); chk("A", rdata, 8'hDE);
    sc(8'h5A);                       // Enter -> Start
    sel(8'h10); chk("A+Start", rdata, 8'hD6);
    sel(8'h20); chk("dirs unaffected", rdata, 8'hEB);
    sel(8'h00); chk("both lines", rdata, 8'hC2);
    sc(8'hF0); sc(8'h22);           // A released
    sel(8'h10); chk("Start only", rdata, 8'hD7);
    chk("irq count", irqs, 4);
    sc(8'h1C);                       // unmapped key: no change, no interrupt
    chk("no irq on unmapped", irqs, 4);
    sc(8'hE0); sc(8'hF0); sc(8'h75);  // up released
    chk("pressed vector", pressed, 8'h80);
    sel(8'h30); chk("nothing selected", rdata, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
