// tb_ppu: loads tiles, two maps and 14 sprites into the video hardware,
// renders two frames (8x8 sprites with unsigned tile data, then 8x16 sprites
// with signed tile data and other scroll values) and compares every pixel
// with an independent reference renderer in the testbench. Also checks the
// mode timing (80/160/216 clocks, 456 per line, 70224 per frame), V-blank
// and LY=LYC interrupts, and that the CPU is locked out of VRAM in mode 3
// and of OAM in modes 2 and 3.
module tb_ppu;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = 0;
  logic [7:0] wdata = 0, rdata, pix_x, pix_y;
  logic wr = 0, hit, irq_vblank, irq_stat, pix_valid, dbg_obj_pix, dbg_win_pix;
  logic [1:0] pix_shade, mode;
  int checks = 0, failures = 0;

  ppu dut (.*);
  always #5 clk = ~clk;

  logic [7:0] vr [8192];
  logic [7:0] om [160];
  logic [7:0] r_lcdc, r_scx, r_scy, r_wx, r_wy, r_bgp, r_obp0, r_obp1;

  task automatic chk(input string s, input int g, input int e);
    checks++; if (g != e) begin failures++; $display("FAIL %s got %0d exp %0d", s, g, e); end
  endtask
  task automatic wb(input int a, input int d);
    @(negedge clk); addr = 16'(a); wdata = 8'(d); wr = 1; @(negedge clk); wr = 0;
    if (a >= 'h8000 && a < 'hA000) vr[a - 'h8000] = 8'(d);
    if (a >= 'hFE00 && a < 'hFEA0) om[a - 'hFE00] = 8'(d);
    case (a)
      'hFF40: r_lcdc = 8'(d); 'hFF42: r_scy = 8'(d); 'hFF43: r_scx = 8'(d);
      'hFF47: r_bgp = 8'(d);  'hFF48: r_obp0 = 8'(d); 'hFF49: r_obp1 = 8'(d);
      'hFF4A: r_wy = 8'(d);   'hFF4B: r_wx = 8'(d);
      default: ;
    endcase
  endtask

  // colour index of pixel (col,row) of the tile whose data starts at offset t
  function automatic int tpix(input int t, input int col, input int row);
    int lo, hi;
    lo = vr[t + row * 2]; hi = vr[t + row * 2 + 1];
    return ((hi >> (7 - col)) & 1) * 2 + ((lo >> (7 - col)) & 1);
  endfunction

  function automatic int bgtile(input int n);
    if (r_lcdc[4]) return n * 16;
    return 'h1000 + ((n < 128) ? n : n - 256) * 16;
  endfunction

  function automatic int ref_pix(input int x, input int y);
    int bi = 0, mx, my, base, h, cnt, best, bestx, sidx, sy, sx, row, col, c;
    bit win;
    win = r_lcdc[5] && y >= r_wy && x + 7 >= r_wx;
    if (win) begin mx = x + 7 - r_wx; my = y - r_wy; base = r_lcdc[6] ? 'h1C00 : 'h1800; end
    else begin mx = (x + r_scx) % 256; my = (y + r_scy) % 256; base = r_lcdc[3] ? 'h1C00 : 'h1800; end
    if (r_lcdc[0]) bi = tpix(bgtile(vr[base + (my / 8) * 32 + mx / 8]), mx % 8, my % 8);
    h = r_lcdc[2] ? 16 : 8;
    cnt = 0; best = -1; bestx = 999; sidx = 0;
    for (int s = 0; s < 40; s++) begin
      sy = om[s * 4]; sx = om[s * 4 + 1];
      if (y + 16 >= sy && y + 16 < sy + h) begin
        if (cnt < 10) begin
          if (x + 8 >= sx && x < sx) begin
            row = y + 16 - sy; if (om[s * 4 + 3][6]) row = h - 1 - row;
            col = x + 8 - sx;  if (om[s * 4 + 3][5]) col = 7 - col;
            c = tpix((h == 16 ? (om[s * 4 + 2] & 'hFE) : om[s * 4 + 2]) * 16, col, row);
            if (c != 0 && sx < bestx) begin best = c; bestx = sx; sidx = s; end
          end
        end
        cnt++;
      end
    end
    if (r_lcdc[1] && best > 0 && !(om[sidx * 4 + 3][7] && bi != 0))
      return om[sidx * 4 + 3][4] ? (r_obp1 >> (best * 2)) & 3 : (r_obp0 >> (best * 2)) & 3;
    if (!r_lcdc[0]) return 0;
    return (r_bgp >> (bi * 2)) & 3;
  endfunction

  int bad = 0, npix = 0, vbl = 0, sirq = 0, sirq_ly = -1, objpix = 0, winpix = 0;
  longint vbl_t [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (pix_valid) begin
      npix++;
      if (pix_shade != 2'(ref_pix(pix_x, pix_y))) begin
        bad++;
        if (bad < 5) $display("pixel %0d,%0d got %0d exp %0d", pix_x, pix_y, pix_shade, ref_pix(pix_x, pix_y));
      end
      if (dbg_obj_pix) objpix++;
      if (dbg_win_pix) winpix++;
    end
    if (irq_vblank && rst_n) begin vbl++; vbl_t.push_back(cyc); end
    if (irq_stat && rst_n) begin sirq++; sirq_ly = dut.ly; end
  end

  // mode run lengths on line 10
  int m2 = 0, m3 = 0, m0 = 0, linelen = 0;
  always @(posedge clk) if (dut.ly == 10 && r_lcdc[7]) begin
    linelen++;
    if (mode == 2) m2++; else if (mode == 3) m3++; else if (mode == 0) m0++;
  end

  initial begin #50000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    static int sp [14][4] = '{
      '{36, 20, 2, 8'h00}, '{36, 24, 2, 8'h20}, '{36, 40, 2, 8'h10}, '{36, 44, 2, 8'h80},
      '{36, 60, 2, 8'h40}, '{36, 70, 2, 8'h00}, '{36, 80, 2, 8'h00}, '{36, 90, 2, 8'h00},
      '{36, 100, 2, 8'h00}, '{36, 110, 2, 8'h00}, '{36, 120, 2, 8'h00}, '{36, 130, 2, 8'h00},
      '{60, 4, 2, 8'h00}, '{140, 163, 2, 8'h30}};
    repeat (2) @(negedge clk); rst_n = 1;
    wb('hFF40, 0);
    for (int a = 0; a < 'h1800; a++) if (a < 'h40 || (a >= 'h1000 && a < 'h1040)) begin
      automatic int t = ((a % 'h1000) / 16 + a / 'h1000) % 4;   // 9000h tiles differ from 8000h
      automatic int r = (a % 16) / 2;
      case (t)
        0: wb('h8000 + a, 0);
        1: wb('h8000 + a, (a % 2) ? 'hCC : 'hF0);
        2: wb('h8000 + a, (a % 2) ? ('h0F ^ r) : (('hFF << r) & 'hFF));
        default: wb('h8000 + a, (a % 2) ? 'h3C : 'h5A);
      endcase
    end
    for (int i = 0; i < 1024; i++) wb('h9800 + i, ((i % 32) + (i / 32)) % 3);
    for (int i = 0; i < 1024; i++) wb('h9C00 + i, 3);
    for (int s = 0; s < 40; s++)
      for (int k = 0; k < 4; k++) wb('hFE00 + s * 4 + k, (s < 14) ? sp[s][k] : 0);
    wb('hFF42, 5); wb('hFF43, 3); wb('hFF4A, 100); wb('hFF4B, 107);
    wb('hFF47, 'hE4); wb('hFF48, 'hD2); wb('hFF49, 'h1B);
    wb('hFF45, 50); wb('hFF41, 'h40);
    wb('hFF40, 'hF3);
    // frame 1
    wait (vbl == 1);
    chk("frame 1 pixels", npix, 160 * 144);
    chk("frame 1 mismatches", bad, 0);
    chk("mode 2 clocks", m2, 80);
    chk("mode 3 clocks", m3, 160);
    chk("mode 0 clocks", m0, 216);
    chk("LY=LYC interrupt line", sirq_ly, 50);
    chk("sprite pixels seen", int'(objpix > 0), 1);
    chk("window pixels seen", int'(winpix > 0), 1);
    // CPU lock-out
    wait (dut.ly == 5 && mode == 3); @(negedge clk);
    addr = 16'h8010; #1; chk("VRAM locked in mode 3", rdata, 8'hFF);
    addr = 16'hFE00; #1; chk("OAM locked in mode 3", rdata, 8'hFF);
    wait (mode == 0); @(negedge clk);
    addr = 16'h8010; #1; chk("VRAM open in mode 0", rdata, 8'hF0);
    addr = 16'hFE00; #1; chk("OAM open in mode 0", rdata, 36);
    wait (dut.ly == 6 && mode == 2); @(negedge clk);
    addr = 16'hFE00; #1; chk("OAM locked in mode 2", rdata, 8'hFF);
    addr = 16'hFF44; #1; chk("LY read", rdata, 6);
    addr = 16'hFF41; #1; chk("STAT read", rdata, 8'hC2);
    // frame 2: 8x16 sprites, signed tile data, new scroll, during V-blank
    wait (vbl == 2);
    bad = 0; npix = 0;
    wb('hFF40, 'hE7);
    wb('hFF43, 200); wb('hFF42, 90);
    wait (vbl == 3);
    chk("frame 2 pixels", npix, 160 * 144);
    chk("frame 2 mismatches", bad, 0);
    chk("frame period", int'(vbl_t[2] - vbl_t[1]), 70224);
    chk("stat interrupts, one per frame", sirq, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
