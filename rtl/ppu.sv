// ppu: the video hardware of the original Game Boy.
//
// Holds the 8 KiB video RAM (8000-9FFF), the 160-byte sprite attribute
// table OAM (FE00-FE9F) and the LCD registers LCDC, STAT, SCY, SCX, LY, LYC,
// BGP, OBP0, OBP1, WY and WX (FF40-FF4B; FF46 belongs to the DMA device).
//
// A dot counter times each 456-clock line: 80 clocks of OAM search (mode 2),
// 160 clocks of drawing (mode 3, one pixel per clock) and the rest H-blank
// (mode 0); lines 144-153 are V-blank (mode 1, 4560 clocks).
//   Mode 2: on every other clock one of the 40 OAM entries is examined; if
//   it covers the current line and fewer than 10 are already held, its X
//   position, attributes and the two pattern bytes of the row it shows on
//   this line are placed in the sprite line buffer.
//   Mode 3: for pixel x the background map entry under (x+SCX, LY+SCY), or
//   the window map entry when the window covers the pixel, is read, the tile
//   row is fetched (unsigned tile numbers from 8000h or signed ones around
//   9000h, per LCDC bit 4) and the 2-bit colour index taken. The line buffer
//   is then searched for a sprite pixel at x (lowest X wins, then lowest OAM
//   index); a non-transparent sprite pixel replaces the background unless
//   its priority bit is set and the background colour is not 0. The result
//   goes through BGP, OBP0 or OBP1 and leaves one clock later on `pix_*`.
// While the LCD is on the CPU reads FFh from and cannot write OAM in modes 2
// and 3, nor VRAM in mode 3. `irq_vblank` pulses on entering line 144;
// `irq_stat` pulses on a rising edge of the STAT condition (mode 0, 1 or 2
// entered with its enable bit set, or LY=LYC with bit 6 set).
// Reads are combinational; writes happen at the clock edge where `wr` is high.
module ppu
  import gb_pkg::*;
#(
  parameter int unsigned LINE_CYCLES = 456,
  parameter int unsigned OAM_CYCLES  = 80,
  parameter int unsigned WIDTH       = 160,
  parameter int unsigned HEIGHT      = 144,
  parameter int unsigned LINES       = 154,
  parameter int unsigned NSPRITES    = 40,
  parameter int unsigned LINE_SPR    = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic [7:0]  wdata,
  input  logic        wr,
  output logic [7:0]  rdata,
  output logic        hit,
  output logic        irq_vblank,
  output logic        irq_stat,
  output logic        pix_valid,
  output logic [7:0]  pix_x,
  output logic [7:0]  pix_y,
  output logic [1:0]  pix_shade,
  output logic [1:0]  mode,
  output logic        dbg_obj_pix,   // the pixel just output came from a sprite
  output logic        dbg_win_pix    // the pixel just output came from the window
);

  localparam int unsigned DRAW_END = OAM_CYCLES + WIDTH;

  logic [7:0] vram [8192];
  logic [7:0] oam  [NSPRITES * 4];

  logic [7:0] lcdc, scy, scx, ly, lyc, bgp, obp0, obp1, wy, wx;
  logic [3:0] stat_en;              // STAT bits 6:3
  logic [8:0] dot;

  // sprite line buffer
  logic [7:0] sb_x    [LINE_SPR];
  logic [7:0] sb_attr [LINE_SPR];
  logic [7:0] sb_lo   [LINE_SPR];
  logic [7:0] sb_hi   [LINE_SPR];
  logic [3:0] sb_cnt;

  logic lcd_on;
  assign lcd_on = lcdc[7];

  // ------------------------------------------------------------ mode timer
  always_comb begin
    if (!lcd_on)                         mode = 2'd0;
    else if (ly >= 8'(HEIGHT))           mode = 2'd1;
    else if (dot < 9'(OAM_CYCLES))       mode = 2'd2;
    else if (dot < 9'(DRAW_END))         mode = 2'd3;
    else                                 mode = 2'd0;
  end

  // ------------------------------------------------------------- OAM search
  logic [5:0] os_idx;
  logic [7:0] os_y, os_tile, os_attr;
  logic [8:0] os_d;
  logic [3:0] os_row;
  logic [4:0] os_h;
  logic       os_on, os_take;
  logic [3:0] os_cnt;
  logic [12:0] os_addr;

  always_comb begin
    os_idx  = dot[6:1];
    os_y    = oam[{os_idx, 2'b00}];
    os_tile = oam[{os_idx, 2'b10}];
    os_attr = oam[{os_idx, 2'b11}];
    os_h    = lcdc[2] ? 5'd16 : 5'd8;
    os_d    = {1'b0, ly} + 9'd16 - {1'b0, os_y};
    os_on   = !os_d[8] && (os_d < {4'd0, os_h});
    os_cnt  = (dot == 9'd0) ? 4'd0 : sb_cnt;
    os_take = lcd_on && (mode == 2'd2) && !dot[0] && (os_idx < 6'(NSPRITES))
              && os_on && (os_cnt < 4'(LINE_SPR));
    os_row  = os_attr[6] ? (os_h[3:0] - 4'd1 - os_d[3:0]) : os_d[3:0];
    if (lcdc[2]) os_addr = {1'b0, os_tile[7:1], os_row[3:0], 1'b0};
    else         os_addr = {1'b0, os_tile, os_row[2:0], 1'b0};
  end

  // ------------------------------------------------------- pixel pipeline
  logic [7:0] px;
  logic       win_on;
  logic [7:0] fx, fy;
  logic [9:0] map_off;
  logic [12:0] map_addr, tile_addr;
  logic [7:0] tnum, t_lo, t_hi;
  logic [2:0] bsel;
  logic [1:0] bg_idx;
  logic       obj_found;
  logic [1:0] obj_idx;
  logic [7:0] obj_x, obj_attr;
  logic [8:0] sd;
  logic [2:0] sbit;
  logic [1:0] scol;
  logic [7:0] pal;
  logic [1:0] shade;

  always_comb begin
    px     = 8'(dot - 9'(OAM_CYCLES));
    win_on = lcdc[5] && (ly >= wy) && ({1'b0, px} + 9'd7 >= {1'b0, wx});
    if (win_on) begin
      fx = px + 8'd7 - wx;
      fy = ly - wy;
    end else begin
      fx = px + scx;
      fy = ly + scy;
    end
    map_off  = {fy[7:3], fx[7:3]};
    map_addr = {2'b11, (win_on ? lcdc[6] : lcdc[3]), map_off};
    tnum     = vram[map_addr];
    tile_addr = {(!lcdc[4] && !tnum[7]), tnum, fy[2:0], 1'b0};
    t_lo     = vram[tile_addr];
    t_hi     = vram[tile_addr | 13'd1];
    bsel     = 3'd7 - fx[2:0];
    bg_idx   = lcdc[0] ? {t_hi[bsel], t_lo[bsel]} : 2'd0;

    // sprite line buffer search
    obj_found = 1'b0;
    obj_idx   = 2'd0;
    obj_x     = 8'd0;
    obj_attr  = 8'd0;
    sd        = '0;
    sbit      = '0;
    scol      = '0;
    for (int i = 0; i < LINE_SPR; i++) begin
      sd   = {1'b0, px} + 9'd8 - {1'b0, sb_x[i]};
      sbit = sb_attr[i][5] ? sd[2:0] : 3'd7 - sd[2:0];
      scol = {sb_hi[i][sbit], sb_lo[i][sbit]};
      if (i < int'(sb_cnt) && !sd[8] && sd < 9'd8 && scol != 2'd0 &&
          (!obj_found || sb_x[i] < obj_x)) begin
        obj_found = 1'b1;
        obj_idx   = scol;
        obj_x     = sb_x[i];
        obj_attr  = sb_attr[i];
      end
    end

    if (lcdc[1] && obj_found && !(obj_attr[7] && bg_idx != 2'd0)) begin
      pal   = obj_attr[4] ? obp1 : obp0;
      shade = pal[{obj_idx, 1'b0} +: 2];
    end else begin
      pal   = bgp;
      shade = lcdc[0] ? bgp[{bg_idx, 1'b0} +: 2] : 2'd0;
    end
  end

  // --------------------------------------------------------- CPU bus side
  logic in_vram, in_oam, vram_lock, oam_lock;
  assign in_vram   = (addr[15:13] == 3'b100);
  assign in_oam    = (addr >= 16'hFE00) && (addr < 16'hFE00 + 16'(NSPRITES * 4));
  assign vram_lock = lcd_on && (mode == 2'd3);
  assign oam_lock  = lcd_on && (mode == 2'd2 || mode == 2'd3);

  always_comb begin
    hit   = 1'b1;
    rdata = 8'hFF;
    if (in_vram)      rdata = vram_lock ? 8'hFF : vram[addr[12:0]];
    else if (in_oam)  rdata = oam_lock ? 8'hFF : oam[addr[7:0]];
    else begin
      unique case (addr)
        ADDR_LCDC: rdata = lcdc;
        ADDR_STAT: rdata = {1'b1, stat_en, (ly == lyc), mode};
        ADDR_SCY:  rdata = scy;
        ADDR_SCX:  rdata = scx;
        ADDR_LY:   rdata = ly;
        ADDR_LYC:  rdata = lyc;
        ADDR_BGP:  rdata = bgp;
        ADDR_OBP0: rdata = obp0;
        ADDR_OBP1: rdata = obp1;
        ADDR_WY:   rdata = wy;
        ADDR_WX:   rdata = wx;
        default:   hit = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr && in_vram && !vram_lock) vram[addr[12:0]] <= wdata;
    if (wr && in_oam && !oam_lock)   oam[addr[7:0]] <= wdata;
  end

  // ------------------------------------------------------ registers, timing
  logic stat_line, stat_line_q;
  assign stat_line = lcd_on && ((mode == 2'd0 && stat_en[0]) || (mode == 2'd1 && stat_en[1]) ||
                                (mode == 2'd2 && stat_en[2]) || (ly == lyc && stat_en[3]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcdc <= 8'h00; scy <= '0; scx <= '0; ly <= '0; lyc <= '0; bgp <= 8'hFC;
      obp0 <= 8'hFF; obp1 <= 8'hFF; wy <= '0; wx <= '0; stat_en <= '0; dot <= '0;
      sb_cnt <= '0; stat_line_q <= 1'b0; irq_vblank <= 1'b0; irq_stat <= 1'b0;
      pix_valid <= 1'b0; pix_x <= '0; pix_y <= '0; pix_shade <= '0;
      dbg_obj_pix <= 1'b0; dbg_win_pix <= 1'b0;
      for (int i = 0; i < LINE_SPR; i++) begin
        sb_x[i] <= '0; sb_attr[i] <= '0; sb_lo[i] <= '0; sb_hi[i] <= '0;
      end
    end else begin
      irq_vblank <= 1'b0;
      stat_line_q <= stat_line;
      irq_stat   <= stat_line && !stat_line_q;

      if (!lcd_on) begin
        dot <= '0;
        ly  <= '0;
      end else if (dot == 9'(LINE_CYCLES - 1)) begin
        dot <= '0;
        ly  <= (ly == 8'(LINES - 1)) ? 8'd0 : ly + 8'd1;
        if (ly == 8'(HEIGHT - 1)) irq_vblank <= 1'b1;
      end else begin
        dot <= dot + 9'd1;
      end

      if (lcd_on && dot == 9'd0) sb_cnt <= '0;
      if (os_take) begin
        sb_x[os_cnt]    <= oam[{os_idx, 2'b01}];
        sb_attr[os_cnt] <= os_attr;
        sb_lo[os_cnt]   <= vram[os_addr];
        sb_hi[os_cnt]   <= vram[os_addr | 13'd1];
        sb_cnt          <= os_cnt + 4'd1;
      end

      pix_valid   <= (mode == 2'd3);
      pix_x       <= px;
      pix_y       <= ly;
      pix_shade   <= shade;
      dbg_obj_pix <= (mode == 2'd3) && lcdc[1] && obj_found && !(obj_attr[7] && bg_idx != 2'd0);
      dbg_win_pix <= (mode == 2'd3) && lcdc[0] && win_on;

      if (wr) begin
        unique case (addr)
          ADDR_LCDC: lcdc <= wdata;
          ADDR_STAT: stat_en <= wdata[6:3];
          ADDR_SCY:  scy <= wdata;
          ADDR_SCX:  scx <= wdata;
          ADDR_LYC:  lyc <= wdata;
          ADDR_BGP:  bgp <= wdata;
          ADDR_OBP0: obp0 <= wdata;
          ADDR_OBP1: obp1 <= wdata;
          ADDR_WY:   wy <= wdata;
          ADDR_WX:   wx <= wdata;
          default: ;
        endcase
      end
    end
  end

endmodule
