// tb_gameboy_top: end-to-end test of the whole system at its default sizes.
//
// A hand-assembled Game Boy program is loaded into the cartridge ROM. It
// writes a background tile and map with the CPU, moves a sprite tile into
// VRAM with a general VRAM DMA, builds a sprite table in work RAM and copies
// it to OAM with an OAM DMA started from a routine running in high memory,
// sets up palettes, the window, the timer and the interrupt enables, turns
// the LCD on and then sleeps in HALT. Interrupt handlers count V-blank and
// timer interrupts and read the joypad; each reports on the external port.
// The testbench plays the framebuffer software: it drains lines from the
// framebuffer interface (once too slowly, to force an overrun) and compares
// every delivered pixel with the expected picture. It counts each mechanism
// and fails if one never happened.
module tb_gameboy_top;
  logic clk = 0, rst_n = 0;
  logic rom_we = 0;
  logic [14:0] rom_addr = 0;
  logic [7:0] rom_data = 0;
  logic sc_valid = 0;
  logic [7:0] sc_data = 0;
  logic fb_ready, fb_done = 0;
  logic [7:0] fb_line, fb_addr = 0;
  logic [1:0] fb_data;
  logic [15:0] fb_lines_out, fb_overruns;
  logic ext_sel, ext_wr;
  logic [15:0] ext_addr;
  logic [7:0] ext_wdata, ext_rdata;
  logic ext_serial_irq = 0;
  logic [15:0] dbg_pc;
  logic dbg_fetch, dbg_halt, dbg_int, cpu_ce;
  logic [4:0] irq_req;
  logic oam_dma_busy, vram_dma_busy;
  logic [1:0] lcd_mode, pix_shade;
  logic pix_valid, dbg_obj_pix, dbg_win_pix;
  logic [7:0] pix_x, pix_y, keys_pressed;

  gameboy_top dut (.*);

  always #5 clk = ~clk;
  assign ext_rdata = 8'hFF;

  int checks = 0, failures = 0;
  task automatic chk(input string s, input longint g, input longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: got %0d expected %0d", s, g, e); end
  endtask
  task automatic happened(input string s, input longint n);
    checks++;
    $display("  %-28s %0d", s, n);
    if (n <= 0) begin failures++; $display("FAIL mechanism never happened: %s", s); end
  endtask

  // ------------------------------------------------------------ program
  logic [7:0] rom [32768];
  task automatic put(input int a, input byte unsigned b[]);
    foreach (b[i]) rom[a + i] = b[i];
  endtask
  initial begin
    foreach (rom[i]) rom[i] = 8'h00;
    put('h0040, '{8'hC3, 8'h00, 8'h03});                       // V-blank -> 0300
    put('h0050, '{8'hC3, 8'h10, 8'h03});                       // timer   -> 0310
    put('h0060, '{8'hC3, 8'h20, 8'h03});                       // joypad  -> 0320
    put('h0100, '{
      8'hF3, 8'h31, 8'hFE, 8'hFF,                              // DI; LD SP,FFFE
      8'hAF, 8'hE0, 8'h40,                                     // LCD off
      8'h21, 8'h10, 8'h80, 8'h06, 8'h10, 8'h3E, 8'hF0,         // HL=8010 B=16 A=F0
      8'h22, 8'h2F, 8'h05, 8'h20, 8'hFB,                       // tile 1: F0,0F,...
      8'h21, 8'h00, 8'h98, 8'h01, 8'h00, 8'h04,                // HL=9800 BC=0400
      8'h3E, 8'h01, 8'h22, 8'h0B, 8'h78, 8'hB1, 8'h20, 8'hF8,  // map = tile 1
      8'h21, 8'h00, 8'hC2, 8'h06, 8'h10, 8'h3E, 8'hFF,         // C200..C20F = FF
      8'h22, 8'h05, 8'h20, 8'hFC,
      8'h3E, 8'hC2, 8'hE0, 8'h51, 8'hAF, 8'hE0, 8'h52,         // VRAM DMA C200 -> 8020
      8'hE0, 8'h53, 8'h3E, 8'h20, 8'hE0, 8'h54, 8'hAF, 8'hE0, 8'h55,
      8'h21, 8'h00, 8'hC1, 8'h06, 8'hA0, 8'hAF,                // clear C100..C19F
      8'h22, 8'h05, 8'h20, 8'hFC,
      8'h21, 8'h00, 8'hC1, 8'h36, 8'h18, 8'h2C, 8'h36, 8'h30,  // sprite 0: y=24 x=48
      8'h2C, 8'h36, 8'h02,                                     // tile 2
      8'h21, 8'h00, 8'h02, 8'h0E, 8'h80, 8'h06, 8'h0A,         // copy DMA routine
      8'h2A, 8'hE2, 8'h0C, 8'h05, 8'h20, 8'hFA,                // to FF80
      8'hCD, 8'h80, 8'hFF,                                     // CALL FF80 (OAM DMA)
      8'h3E, 8'hE4, 8'hE0, 8'h47, 8'hE0, 8'h48,                // BGP = OBP0 = E4
      8'h3E, 8'h64, 8'hE0, 8'h4A, 8'h3E, 8'h07, 8'hE0, 8'h4B,  // WY=100 WX=7
      8'hAF, 8'hE0, 8'h90, 8'hE0, 8'h91, 8'hE0, 8'h92,         // counters = 0
      8'hE0, 8'h06, 8'h3E, 8'hF0, 8'hE0, 8'h05,                // TMA=0 TIMA=F0
      8'h3E, 8'h05, 8'hE0, 8'h07,                              // TAC: on, 16 clocks
      8'h3E, 8'h15, 8'hE0, 8'hFF, 8'hAF, 8'hE0, 8'h0F,         // IE, clear IF
      8'h3E, 8'hB3, 8'hE0, 8'h40,                              // LCD on
      8'hFB, 8'h76, 8'h18, 8'hFD});                            // EI; HALT; JR -3
    // routine run from high memory: start OAM DMA from C100, wait, return
    put('h0200, '{8'h3E, 8'hC1, 8'hE0, 8'h46, 8'h3E, 8'h28, 8'h3D, 8'h20, 8'hFD, 8'hC9});
    // handlers: count in FF90/FF91 and report on FF01/FF10; joypad reads P1
    put('h0300, '{8'hF5, 8'hF0, 8'h90, 8'h3C, 8'hE0, 8'h90, 8'hE0, 8'h01, 8'hF1, 8'hD9});
    put('h0310, '{8'hF5, 8'hF0, 8'h91, 8'h3C, 8'hE0, 8'h91, 8'hE0, 8'h10, 8'hF1, 8'hD9});
    put('h0320, '{8'hF5, 8'h3E, 8'h10, 8'hE0, 8'h00, 8'hF0, 8'h00, 8'hE0, 8'h92,
                  8'hE0, 8'h11, 8'hF1, 8'hD9});
  end

  // expected picture
  function automatic logic [1:0] expect_pix(input int x, input int y);
    if (y >= 8 && y < 16 && x >= 40 && x < 48) return 2'd3;   // sprite
    return (x % 8 < 4) ? 2'd1 : 2'd2;                          // tile 1, BG and window
  endfunction

  // ------------------------------------------------------------ monitors
  longint cyc = 0, n_oam = 0, n_vram = 0, n_vram_stall = 0, n_halt = 0, n_int = 0;
  longint n_obj = 0, n_win = 0, n_ce = 0;
  longint n_req [5] = '{0, 0, 0, 0, 0};
  longint vbl_t [$];
  int ext_vbl = -1, ext_tim = -1, ext_joy = -1, ext_joy2 = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (oam_dma_busy) n_oam++;
    if (vram_dma_busy) begin n_vram++; if (cpu_ce) n_vram_stall = -1000000; end
    if (dbg_halt && cpu_ce) n_halt++;
    if (dbg_int && cpu_ce) n_int++;
    if (cpu_ce) n_ce++;
    for (int i = 0; i < 5; i++) if (irq_req[i]) n_req[i]++;
    if (irq_req[0]) vbl_t.push_back(cyc);
    if (pix_valid && dbg_obj_pix) n_obj++;
    if (pix_valid && dbg_win_pix) n_win++;
    if (ext_wr) begin
      if (ext_addr == 16'hFF01) ext_vbl = ext_wdata;
      if (ext_addr == 16'hFF10) ext_tim = ext_wdata;
      if (ext_addr == 16'hFF11) begin
        if (ext_joy < 0) ext_joy = ext_wdata;   // first report: the press
        else ext_joy2 = ext_wdata;             // later: the release
      end
    end
  end

  // framebuffer software: drain lines, once too slowly
  int lines_read = 0, bad_pix = 0, stalled = 0;
  initial begin
    forever begin
      @(negedge clk);
      if (fb_ready) begin
        automatic int y = fb_line;
        for (int x = 0; x < 160; x++) begin
          fb_addr = 8'(x); #1;
          if (fb_data != expect_pix(x, y)) begin
            bad_pix++;
            if (bad_pix < 5) $display("pixel %0d,%0d got %0d exp %0d", x, y, fb_data, expect_pix(x, y));
          end
          @(negedge clk);
        end
        fb_done = 1; @(negedge clk); fb_done = 0;
        lines_read++;
        if (y == 50 && !stalled) begin stalled = 1; repeat (1500) @(negedge clk); end
      end
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    for (int a = 0; a < 32768; a++) begin
      rom_we = 1; rom_addr = 15'(a); rom_data = rom[a]; @(negedge clk);
    end
    rom_we = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after the first frame has started, press and release X (button A)
    wait (vbl_t.size() == 1);
    @(negedge clk); sc_data = 8'h22; sc_valid = 1; @(negedge clk); sc_valid = 0;
    repeat (5000) @(negedge clk);
    @(negedge clk); sc_data = 8'hF0; sc_valid = 1; @(negedge clk); sc_valid = 0;
    @(negedge clk); sc_data = 8'h22; sc_valid = 1; @(negedge clk); sc_valid = 0;
    wait (vbl_t.size() == 3);
    repeat (1000) @(negedge clk);

    $display("mechanisms:");
    happened("OAM DMA clocks", n_oam);
    happened("VRAM DMA clocks", n_vram);
    happened("CPU stall clean in VRAM DMA", n_vram_stall + 1);
    happened("HALT cycles", n_halt);
    happened("interrupt entry cycles", n_int);
    happened("V-blank interrupts", n_req[0]);
    happened("timer overflows", n_req[2]);
    happened("joypad interrupts", n_req[4]);
    happened("sprite pixels", n_obj);
    happened("window pixels", n_win);
    happened("lines delivered", fb_lines_out);
    happened("line buffer overruns", fb_overruns);
    chk("OAM DMA length (clocks)", n_oam, 320);
    chk("VRAM DMA length (clocks)", n_vram, 32);
    chk("frame period (clocks)", vbl_t[2] - vbl_t[1], 70224);
    chk("CPU machine cycle = 4 clocks", (cyc - n_vram) / 4 - n_ce <= 1, 1);
    chk("V-blank handler count", ext_vbl, 3);
    chk("timer handler count vs overflows", ext_tim, n_req[2] % 256);
    chk("joypad read in handler (A pressed)", ext_joy, 8'hDE);
    chk("joypad read after release", ext_joy2, 8'hDF);
    chk("joypad interrupts (press, release)", n_req[4], 2);
    chk("pixel mismatches", bad_pix, 0);
    chk("lines read + dropped = lines drawn", lines_read + fb_overruns, 3 * 144);
    chk("a full frame read", int'(lines_read >= 144), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
