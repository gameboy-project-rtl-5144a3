// gameboy_top: an original (monochrome) Game Boy without sound and link port.
//
// One bus with a single master. The CPU's bus goes through the DMA device,
// which either passes it on or takes the bus for a transfer; behind it the
// devices decode their own addresses and the first one that answers drives
// the read data (unmapped addresses read FFh):
//   0000-7FFF cart_rom   32 KiB unbanked cartridge ROM
//   8000-9FFF ppu        video RAM          FE00-FE9F ppu  OAM
//   C000-DFFF wram       8 KiB work RAM     FF80-FFFE dma  high memory
//   FF00 joypad, FF04-FF07 timer, FF0F/FFFF intc, FF40-FF4B ppu,
//   FF46 and FF51-FF55 dma, FF01-FF02 and FF10-FF3F the external port.
// The system clock is the 4.194304 MHz dot clock; the CPU advances one
// machine cycle every CLKS_PER_MCYCLE clocks, and is held while a VRAM DMA
// runs. Pixels leave the video hardware into the framebuffer interface,
// whose line-reader side is brought out for the software that copies lines
// to the display memory. Keyboard scancodes come in from a PS/2 controller.
// The serial link and the sound registers are not built: their addresses
// appear on the ext_* port so they can be attached outside.
module gameboy_top
  import gb_pkg::*;
#(
  parameter int unsigned CLKS_PER_MCYCLE = 4
) (
  input  logic        clk,
  input  logic        rst_n,        // resets everything except ROM contents
  // cartridge ROM load port
  input  logic        rom_we,
  input  logic [14:0] rom_addr,
  input  logic [7:0]  rom_data,
  // PS/2 scancodes
  input  logic        sc_valid,
  input  logic [7:0]  sc_data,
  // framebuffer line reader
  output logic        fb_ready,
  output logic [7:0]  fb_line,
  input  logic [7:0]  fb_addr,
  output logic [1:0]  fb_data,
  input  logic        fb_done,
  output logic [15:0] fb_lines_out,
  output logic [15:0] fb_overruns,
  // external devices (serial link, sound)
  output logic        ext_sel,
  output logic [15:0] ext_addr,
  output logic [7:0]  ext_wdata,
  output logic        ext_wr,
  input  logic [7:0]  ext_rdata,
  input  logic        ext_serial_irq,
  // observation
  output logic [15:0] dbg_pc,
  output logic        dbg_fetch,
  output logic        dbg_halt,
  output logic        dbg_int,
  output logic        cpu_ce,
  output logic [4:0]  irq_req,
  output logic        oam_dma_busy,
  output logic        vram_dma_busy,
  output logic [1:0]  lcd_mode,
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [1:0]  pix_shade,
  output logic        dbg_obj_pix,
  output logic        dbg_win_pix,
  output logic [7:0]  keys_pressed
);

  // clock enable of the CPU
  localparam int DW = $clog2(CLKS_PER_MCYCLE + 1);
  localparam logic [DW-1:0] DIV_LAST = DW'(CLKS_PER_MCYCLE - 1);
  logic [DW-1:0] div;
  logic cpu_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == DIV_LAST) ? '0 : div + 1'b1;
  end
  assign cpu_ce = (div == DIV_LAST) && cpu_en;

  // CPU side of the bus
  logic [15:0] c_addr;
  logic [7:0]  c_wdata, c_rdata;
  logic        c_rd, c_wr, irq;

  cpu_core u_cpu (
    .clk, .rst_n, .ce(cpu_ce), .addr(c_addr), .dout(c_wdata), .din(c_rdata),
    .rd(c_rd), .wr(c_wr), .irq, .dbg_pc, .dbg_fetch, .dbg_halt, .dbg_int
  );

  // device side of the bus
  logic [15:0] b_addr;
  logic [7:0]  b_wdata, b_rdata;
  logic        b_wr;

  dma u_dma (
    .clk, .rst_n, .c_addr, .c_wdata, .c_wr, .c_rdata, .cpu_en,
    .b_addr, .b_wdata, .b_wr, .b_rdata,
    .oam_busy(oam_dma_busy), .vram_busy(vram_dma_busy)
  );

  logic [7:0] rom_q, wram_q, ppu_q, tim_q, int_q, joy_q;
  logic       rom_h, wram_h, ppu_h, tim_h, int_h, joy_h;
  logic       irq_vblank, irq_stat, irq_timer, irq_joy;

  cart_rom u_rom (
    .clk, .addr(b_addr), .rdata(rom_q), .hit(rom_h),
    .ld_we(rom_we), .ld_addr(rom_addr), .ld_data(rom_data)
  );

  wram u_wram (
    .clk, .addr(b_addr), .wdata(b_wdata), .wr(b_wr), .rdata(wram_q), .hit(wram_h)
  );

  ppu u_ppu (
    .clk, .rst_n, .addr(b_addr), .wdata(b_wdata), .wr(b_wr), .rdata(ppu_q), .hit(ppu_h),
    .irq_vblank, .irq_stat, .pix_valid, .pix_x, .pix_y, .pix_shade, .mode(lcd_mode),
    .dbg_obj_pix, .dbg_win_pix
  );

  timer u_timer (
    .clk, .rst_n, .addr(b_addr), .wdata(b_wdata), .wr(b_wr), .rdata(tim_q), .hit(tim_h),
    .irq(irq_timer)
  );

  joypad u_joy (
    .clk, .rst_n, .addr(b_addr), .wdata(b_wdata), .wr(b_wr), .rdata(joy_q), .hit(joy_h),
    .sc_valid, .sc_data, .irq(irq_joy), .pressed(keys_pressed)
  );

  assign irq_req = {irq_joy, ext_serial_irq, irq_timer, irq_stat, irq_vblank};

  intc u_intc (
    .clk, .rst_n, .addr(b_addr), .wdata(b_wdata), .wr(b_wr), .rdata(int_q), .hit(int_h),
    .req(irq_req), .irq
  );

  assign ext_sel   = (b_addr == 16'hFF01) || (b_addr == 16'hFF02) ||
                     (b_addr >= 16'hFF10 && b_addr <= 16'hFF3F);
  assign ext_addr  = b_addr;
  assign ext_wdata = b_wdata;
  assign ext_wr    = b_wr && ext_sel;

  always_comb begin
    if      (rom_h)   b_rdata = rom_q;
    else if (ppu_h)   b_rdata = ppu_q;
    else if (wram_h)  b_rdata = wram_q;
    else if (tim_h)   b_rdata = tim_q;
    else if (int_h)   b_rdata = int_q;
    else if (joy_h)   b_rdata = joy_q;
    else if (ext_sel) b_rdata = ext_rdata;
    else              b_rdata = 8'hFF;
  end

  fb_if u_fb (
    .clk, .rst_n, .pix_valid, .pix_x, .pix_y, .pix_shade,
    .rd_ready(fb_ready), .rd_line(fb_line), .rd_addr(fb_addr), .rd_data(fb_data),
    .rd_done(fb_done), .lines_out(fb_lines_out), .overruns(fb_overruns)
  );

  // a CPU write strobe lasts exactly one clock
  a_cpu_wr_single: assert property (@(posedge clk) disable iff (!rst_n) c_wr |=> !c_wr);

endmodule
