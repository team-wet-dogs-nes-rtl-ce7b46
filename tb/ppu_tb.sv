// ppu_tb: self-checking test of the picture unit.
//
// The name-table RAM and the pattern ROM are modelled here as synchronous
// memories filled with random bytes; the frame buffer writes are captured
// into an array. Twelve sprites are placed by $2003/$2004 writes (one with
// horizontal flip, one with vertical flip, one behind the background, nine
// on the same lines so the overflow flag must rise), the palette is written
// through $2006/$2007, and rendering is switched on. Two complete frames
// (scroll 0,0 and scroll 13,20 with vertical mirroring) are compared pixel
// by pixel with a reference model written from the register description.
// Also checked: the VBlank flag and nmi appear at line 241 dot 1, a $2002
// read clears the flag, the sprite 0 hit and overflow flags, the one-read
// delay of $2007 reads from the name table, and that the $2001 colour
// emphasis bits travel with every pixel.
module ppu_tb;
  logic clk = 0, rst = 1;
  logic reg_cs = 0, reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [7:0] reg_wdata = 0, reg_rdata;
  logic nmi, vram_we, fb_we, frame_start;
  logic [10:0] vram_addr;
  logic [7:0] vram_wdata, vram_rdata, chr_rdata;
  logic [12:0] chr_addr;
  logic [15:0] fb_addr;
  logic [8:0] fb_data;
  logic [8:0] line, dot;
  int checks = 0, failures = 0;

  logic [7:0] nt [2048];
  logic [7:0] chr [8192];
  logic [5:0] fb [65536];
  logic [2:0] fb_em [65536];
  logic [5:0] pal [32];
  logic [7:0] oam [256];

  ppu dut (.clk, .rst, .mirror_v(1'b1), .reg_cs, .reg_we, .reg_addr, .reg_wdata,
           .reg_rdata, .nmi, .vram_addr, .vram_we, .vram_wdata, .vram_rdata,
           .chr_addr, .chr_rdata, .fb_we, .fb_addr, .fb_data, .line, .dot,
           .frame_start);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    vram_rdata <= nt[vram_addr];
    if (vram_we) nt[vram_addr] <= vram_wdata;
    chr_rdata <= chr[chr_addr];
    if (fb_we) begin fb[fb_addr] <= fb_data[5:0]; fb_em[fb_addr] <= fb_data[8:6]; end
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk);
    reg_cs = 1; reg_we = 1; reg_addr = 3'(a); reg_wdata = 8'(d);
    @(negedge clk);
    reg_cs = 0; reg_we = 0;
  endtask

  task automatic rd(input int a, output int d);
    @(negedge clk);
    reg_cs = 1; reg_we = 0; reg_addr = 3'(a);
    #1 d = reg_rdata;
    @(negedge clk);
    reg_cs = 0;
  endtask

  // ------------------------------------------------------ reference model --
  int sx, sy;
  function automatic int bg_pix(int x, int y, output int at);
    int wx, wy, n, tile, a, p;
    wx = x + sx; wy = y + sy;
    if (wy >= 240) wy -= 240;
    n = (wx >> 8) & 1;          // vertical mirroring: a10 = horizontal table
    wx &= 255;
    tile = nt[n*1024 + (wy>>3)*32 + (wx>>3)];
    a = nt[n*1024 + 'h3C0 + (wy>>5)*8 + (wx>>5)];
    at = (a >> ((((wy>>4)&1)*4) + (((wx>>4)&1)*2))) & 3;
    p = ((chr['h1000 + tile*16 + (wy&7)] >> (7-(wx&7))) & 1) |
        (((chr['h1000 + tile*16 + 8 + (wy&7)] >> (7-(wx&7))) & 1) << 1);
    return p;
  endfunction

  // returns colour; sets hit when sprite 0 and background both opaque
  function automatic int ref_pix(int x, int y, output bit hit, output bit ovf);
    int at, bp, sp, sa, spr_i, cnt, r, c, dy;
    bit front;
    bp = bg_pix(x, y, at);
    sp = 0; sa = 0; front = 0; spr_i = -1; cnt = 0; ovf = 0;
    if (y > 0) begin
      for (int i = 0; i < 64; i++) begin
        dy = (y - 1) - oam[i*4];
        if (dy >= 0 && dy < 8) begin
          cnt++;
          if (cnt > 8) begin ovf = 1; continue; end
          c = x - oam[i*4+3];
          if (c >= 0 && c < 8 && sp == 0) begin
            int t, at2, lo, hi;
            t = oam[i*4+1]; at2 = oam[i*4+2];
            r = (at2 & 'h80) ? 7 - dy : dy;
            if (at2 & 'h40) c = 7 - c;
            lo = (chr[t*16 + r] >> (7-c)) & 1;
            hi = (chr[t*16 + 8 + r] >> (7-c)) & 1;
            if (lo | hi) begin
              sp = lo | (hi << 1); sa = at2 & 3; front = !(at2 & 'h20); spr_i = i;
            end
          end
        end
      end
    end
    hit = (spr_i == 0) && bp != 0 && x != 255;
    if (sp != 0 && (bp == 0 || front)) return pal[16 + sa*4 + sp];
    if (bp != 0) return pal[at*4 + bp];
    return pal[0];
  endfunction

  task automatic compare_frame(input string tag, output bit hit_any, output bit ovf_any);
    int bad;
    bit h, o;
    hit_any = 0; ovf_any = 0;
    for (int y = 0; y < 240; y++) begin
      bad = 0;
      for (int x = 0; x < 256; x++) begin
        int e;
        e = ref_pix(x, y, h, o);
        if (h) hit_any = 1;
        if (o) ovf_any = 1;
        if (fb[y*256 + x] != 6'(e)) begin
          if (bad == 0 && failures < 20)
            $display("%s line %0d x %0d: got %0h expected %0h", tag, y, x, fb[y*256+x], e);
          bad++;
        end
      end
      check($sformatf("%s line %0d", tag, y), bad, 0);
    end
  endtask

  int d, t_vbl;
  bit hit_any, ovf_any;

  initial begin
    for (int i = 0; i < 2048; i++) nt[i] = 8'($urandom);
    for (int i = 0; i < 8192; i++) chr[i] = 8'($urandom);
    for (int i = 0; i < 65536; i++) fb[i] = 0;
    for (int i = 0; i < 256; i++) oam[i] = 8'hFF;
    for (int i = 0; i < 32; i++) pal[i] = 6'($urandom);
    for (int i = 0; i < 4; i++) pal[16 + i*4] = pal[i*4];   // mirrored entries
    for (int i = 1; i < 8; i++) pal[i*4] = pal[i*4];
    // sprites: Y, tile, attr, X
    oam[0:3]   = '{8'd49, 8'd5, 8'h00, 8'd100};
    oam[4:7]   = '{8'd60, 8'd6, 8'h41, 8'd30};     // h-flip, palette 1
    oam[8:11]  = '{8'd70, 8'd7, 8'h82, 8'd200};    // v-flip, palette 2
    oam[12:15] = '{8'd47, 8'd8, 8'h23, 8'd104};    // behind background
    for (int i = 4; i < 13; i++) begin              // nine on lines 121..128
      oam[i*4] = 8'd120; oam[i*4+1] = 8'(9 + i); oam[i*4+2] = 8'(i & 3);
      oam[i*4+3] = 8'(i * 12);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    // palette via $2006/$2007 (entries 0,4,8,12 of each half go to the shared one)
    wr(6, 'h3F); wr(6, 'h00);
    for (int i = 0; i < 32; i++) wr(7, (i % 4 == 0 && i >= 16) ? pal[i - 16] : pal[i]);
    for (int i = 1; i < 8; i++) pal[i*4] = pal[0];          // colour 0 shows $3F00 (model)
    // OAM
    wr(3, 0);
    for (int i = 0; i < 256; i++) wr(4, oam[i]);
    // buffered read of the name table at $2005
    wr(6, 'h20); wr(6, 'h05);
    rd(7, d);
    rd(7, d);
    check("2007 delayed read", d, nt[5]);
    // palette read is direct
    wr(6, 'h3F); wr(6, 'h01);
    rd(7, d);
    check("palette read", d, pal[1]);
    // ctrl: nmi on, bg at $1000, sprites at $0000, 8x8; mask: bg+spr, no clip
    wr(0, 'h90); wr(1, 'h1E);
    wr(5, 0); wr(5, 0);
    sx = 0; sy = 0;
    // VBlank timing
    wait (line == 9'd241 && dot == 9'd0);
    @(posedge clk); #1;
    check("no vblank before dot 1", int'(nmi), 0);
    @(posedge clk); #1;
    check("nmi at line 241 dot 1", int'(nmi), 1);
    rd(2, d);
    check("status vblank", (d >> 7) & 1, 1);
    rd(2, d);
    check("vblank cleared by read", (d >> 7) & 1, 0);
    check("nmi dropped", int'(nmi), 0);
    // frame 1 at scroll 0
    wait (frame_start); @(posedge clk);
    wait (line == 9'd240 && dot == 9'd10);
    compare_frame("frame0", hit_any, ovf_any);
    rd(2, d);
    check("sprite 0 hit", (d >> 6) & 1, int'(hit_any));
    check("sprite 0 hit expected in this scene", int'(hit_any), 1);
    check("overflow", (d >> 5) & 1, int'(ovf_any));
    check("overflow expected in this scene", int'(ovf_any), 1);
    // scroll
    wait (line == 9'd245);
    wr(5, 13); wr(5, 20);
    wr(1, 'hBE);   // blue and red emphasis on
    sx = 13; sy = 20;
    wait (line == 9'd261 && dot == 9'd5);
    rd(2, d);
    check("flags cleared on pre-render line", d & 8'h60, 0);
    wait (frame_start); @(posedge clk);
    wait (line == 9'd240 && dot == 9'd10);
    compare_frame("frame_scrolled", hit_any, ovf_any);
    begin
      int bad_em = 0;
      for (int i = 0; i < 256 * 240; i++) if (fb_em[i] != 3'b101) bad_em++;
      check("emphasis bits stored with every pixel", bad_em, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
