// tb_fb_if: streams lines of pixels into the double buffer while a reader
// drains them; checks line contents and numbers, the bank alternation, and
// that a line arriving while both banks are full is dropped and counted.
module tb_fb_if;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, rd_ready, rd_done = 0;
  logic [7:0] pix_x = 0, pix_y = 0, rd_line, rd_addr = 0;
  logic [1:0] pix_shade = 0, rd_data;
  logic [15:0] lines_out, overruns;
  int checks = 0, failures = 0;
  fb_if dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", s, g, e); end
  endtask
  function automatic logic [1:0] shade_of(input int x, input int y);
    return 2'((x * 5 + y * 3) >> 2);
  endfunction
  task automatic send_line(input int y);
    for (int x = 0; x < 160; x++) begin
      @(negedge clk); pix_valid = 1; pix_x = 8'(x); pix_y = 8'(y); pix_shade = shade_of(x, y);
    end
    @(negedge clk); pix_valid = 0;
  endtask
  task automatic read_line(input int y);
    int bad = 0;
    chk("ready", int'(rd_ready), 1);
    chk("line number", rd_line, y);
    for (int x = 0; x < 160; x++) begin
      rd_addr = 8'(x); #1; if (rd_data != shade_of(x, y)) bad++;
    end
    chk($sformatf("pixels of line %0d", y), bad, 0);
    @(negedge clk); rd_done = 1; @(negedge clk); rd_done = 0;
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk("empty", int'(rd_ready), 0);
    send_line(0);
    read_line(0);
    chk("empty again", int'(rd_ready), 0);
    send_line(1);
    send_line(2);                 // both banks now full
    send_line(3);                 // dropped
    chk("overrun counted", overruns, 1);
    read_line(1);
    read_line(2);
    chk("dropped line not delivered", int'(rd_ready), 0);
    send_line(4);
    read_line(4);
    chk("lines delivered", lines_out, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
