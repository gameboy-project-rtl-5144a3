// tb_dma: checks pass-through, high memory kept off the bus, an OAM DMA
// (160 bytes, 2 clocks per byte, CPU limited to high memory) and a general
// VRAM DMA (CPU stopped, length from FF55), against a bus memory model.
module tb_dma;
  logic clk = 0, rst_n = 0;
  logic [15:0] c_addr = 0, b_addr;
  logic [7:0] c_wdata = 0, c_rdata, b_wdata, b_rdata;
  logic c_wr = 0, cpu_en, b_wr, oam_busy, vram_busy;
  logic [7:0] mem [65536];
  int checks = 0, failures = 0;
  dma dut (.*);
  always #5 clk = ~clk;
  assign b_rdata = mem[b_addr];
  always_ff @(posedge clk) if (b_wr) mem[b_addr] <= b_wdata;
  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0h exp %0h", s, g, e); end
  endtask
  task automatic cw(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); c_addr = a; c_wdata = d; c_wr = 1; @(negedge clk); c_wr = 0;
  endtask
  logic [7:0] v;
  task automatic cr(input logic [15:0] a);
    c_addr = a; #1; v = c_rdata;
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int n;
    foreach (mem[i]) mem[i] = 8'(i * 3 + 1);
    repeat (2) @(negedge clk); rst_n = 1;
    cw(16'hC000, 8'hA5);
    chk("pass-through write", mem['hC000], 8'hA5);
    cr(16'hC000); chk("pass-through read", v, 8'hA5);
    cw(16'hFF80, 8'h3C); cw(16'hFFFE, 8'hC3);
    chk("high memory not on bus", mem['hFF80], 8'(16'hFF80 * 3 + 1));
    cr(16'hFF80); chk("high memory read", v, 8'h3C);
    cr(16'hFFFE); chk("high memory top", v, 8'hC3);
    // OAM DMA from C100
    cw(16'hFF46, 8'hC1);
    n = 0;
    chk("oam busy", int'(oam_busy), 1);
    chk("cpu runs during OAM DMA", int'(cpu_en), 1);
    cr(16'hC000); chk("other memory hidden", v, 8'hFF);
    cr(16'hFF80); chk("high memory during DMA", v, 8'h3C);
    cw(16'hD000, 8'h77); n += 2;
    chk("write dropped during DMA", mem['hD000], 8'(16'hD000 * 3 + 1));
    while (oam_busy) begin @(negedge clk); n++; end
    chk("OAM DMA clocks", n, 320);
    n = 0;
    for (int i = 0; i < 160; i++) if (mem['hFE00 + i] != 8'(('hC100 + i) * 3 + 1)) n++;
    chk("OAM bytes wrong", n, 0);
    cr(16'hFF46); chk("FF46 read back", v, 8'hC1);
    // general VRAM DMA C200 -> 8100, 3 blocks
    cw(16'hFF51, 8'hC2); cw(16'hFF52, 8'h05); cw(16'hFF53, 8'h01); cw(16'hFF54, 8'h0F);
    cw(16'hFF55, 8'h02);
    chk("cpu stopped", int'(cpu_en), 0);
    cr(16'hFF55); chk("FF55 blocks left", v, 8'h02);
    n = 0;
    while (vram_busy) begin @(negedge clk); n++; end
    chk("VRAM DMA clocks", n, 96);
    n = 0;
    for (int i = 0; i < 48; i++) if (mem['h8100 + i] != 8'(('hC200 + i) * 3 + 1)) n++;
    chk("VRAM bytes wrong", n, 0);
    chk("no byte past the end", mem['h8130], 8'(16'h8130 * 3 + 1));
    cr(16'hFF55); chk("FF55 idle", v, 8'hFF);
    chk("cpu resumed", int'(cpu_en), 1);
    // H-blank mode is not supported: ignored
    cw(16'hFF55, 8'h81);
    chk("hblank DMA ignored", int'(vram_busy), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
