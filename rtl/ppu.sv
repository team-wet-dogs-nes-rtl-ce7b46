// ppu: the picture processing unit. It draws background tiles and sprites
// into the frame buffer, one pixel per PPU clock, under control of the
// eight CPU registers $2000-$2007.
//
// Frame timing: 341 dots per line, 262 lines per frame. Lines 0-239 are
// drawn (dots 1-256 write pixels x = dot-1 into the frame buffer); VBlank
// starts at line 241 dot 1 (status bit 7, and nmi while control bit 7 is
// set) and ends at the pre-render line 261, dot 1, which also clears the
// sprite 0 hit and overflow flags.
//
// Background: every 8 dots the fetch engine reads a name-table byte and an
// attribute byte from the 2 KB name-table RAM and two pattern bytes from
// the pattern ROM, one access per two dots (each memory answers one clock
// after the address). Tiles go into 16-bit shift registers that shift once
// per dot; the first two tiles of a line are fetched at dots 321-336 of the
// line before. The fine horizontal scroll picks the bit of the shift
// register; coarse scroll chooses which tile is fetched. The scroll position
// is the $2005 pair plus the base name table of $2000 bits 1:0; the
// horizontal part is taken at dot 257 of each line and the vertical part on
// the pre-render line, so a mid-frame change of horizontal scroll (the
// sprite-0 split) takes effect on the next line. The attribute byte gives
// the upper two palette bits for each 2x2-tile square (layout 33221100).
//
// Sprites: 64 sprites of 4 bytes in the internal 256-byte sprite RAM (Y-1,
// tile, attributes, X). During dots 65-128 of a line, one sprite per dot is
// tested against the line; up to 8 in priority order (0 first) are kept
// and a ninth sets the overflow flag. Their pattern bytes are fetched at
// dots 257-320 (8x8 or 8x16, flipped as the attributes say) and shown on
// the next line. The lowest-numbered opaque sprite wins; it is drawn over
// the background when attribute bit 5 is 0, behind opaque background when
// 1. An opaque pixel of sprite 0 over opaque background sets the sprite 0
// hit flag. $2001 enables and left-column clipping are applied; monochrome
// keeps only the grey column of the palette; the colour emphasis bits are
// passed to the frame buffer with every pixel for the VGA side to apply.
//
// Colour: palette RAM of 32 six-bit entries ($3F00-$3F1F, with $3F10,
// $3F14, $3F18, $3F1C writing $3F00, $3F04, $3F08, $3F0C); colour 0 of any
// palette shows $3F00. The frame buffer receives the 6-bit system colour
// with the three emphasis bits above it.
//
// CPU side: reg_cs is a one-clock strobe per CPU access (the mapping unit
// makes it one PPU clock wide), reg_we selects a write, reg_addr = A[2:0].
// reg_rdata is valid during the strobe. $2002 reads clear VBlank and the
// write toggle of $2005/$2006. $2007 reads below $3F00 return the byte read
// by the previous access (one-read delay); palette reads return directly.
// VRAM accesses from the CPU belong outside the drawn lines; during drawing
// a CPU write takes the name-table port for that clock.
//
// The register set, memory map, tiles, attributes, sprites and palettes
// follow the document; the fetch schedule, the scroll handling and the
// sprite evaluation schedule are this design's. mirror_v selects vertical
// (1: $2000=$2800) or horizontal name-table mirroring.
module ppu (
  input  logic        clk,
  input  logic        rst,
  input  logic        mirror_v,
  // CPU registers
  input  logic        reg_cs,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  output logic [7:0]  reg_rdata,
  output logic        nmi,
  // name-table RAM (2 KB, synchronous read)
  output logic [10:0] vram_addr,
  output logic        vram_we,
  output logic [7:0]  vram_wdata,
  input  logic [7:0]  vram_rdata,
  // pattern ROM (8 KB window, synchronous read)
  output logic [12:0] chr_addr,
  input  logic [7:0]  chr_rdata,
  // frame buffer
  output logic        fb_we,
  output logic [15:0] fb_addr,
  output logic [8:0]  fb_data,   // {emphasis B G R ($2001 7:5), colour}
  // status
  output logic [8:0]  line,
  output logic [8:0]  dot,
  output logic        frame_start
);
  // ---------------------------------------------------------- registers --
  logic [7:0]  ctrl, mask;
  logic        vblank, s0hit, overflow;
  logic [7:0]  oam_addr;
  logic [7:0]  oam [256];
  logic [5:0]  pal [32];
  logic [7:0]  scroll_x, scroll_y;
  logic        w_toggle;
  logic [13:0] vaddr;
  logic [7:0]  rd_buf;

  wire rendering = mask[3] | mask[4];
  wire drawn_line = (line < 9'd240);
  wire pre_line   = (line == 9'd261);
  wire busy = rendering && (drawn_line || pre_line);

  // latched scroll
  logic [8:0] hs;   // {nt_x, scroll_x}
  logic [7:0] vs;   // scroll_y
  logic       nty;

  // --------------------------------------------------------------- timing --
  always_ff @(posedge clk) begin
    if (rst) begin
      dot <= '0; line <= '0;
    end else if (dot == 9'd340) begin
      dot <= '0;
      line <= (line == 9'd261) ? 9'd0 : line + 9'd1;
    end else begin
      dot <= dot + 9'd1;
    end
  end
  assign frame_start = (line == 9'd0) && (dot == 9'd0);

  // ---------------------------------------------------------- addressing --
  wire fetch_vis = (dot >= 9'd1 && dot <= 9'd256);
  wire fetch_pre = (dot >= 9'd321 && dot <= 9'd336);
  wire bg_fetch  = busy && (fetch_vis || fetch_pre) && (drawn_line || pre_line);
  wire [2:0] ph  = 3'(dot - 9'd1);        // phase within 8-dot group

  // line the fetched tile belongs to
  logic [8:0] fy;
  always_comb begin
    if (fetch_pre) fy = pre_line ? 9'd0 : line + 9'd1;
    else fy = line;
  end
  // tile index within the line: prefetch tiles 0,1 then 2..33
  logic [5:0] tk;
  always_comb begin
    if (fetch_pre) tk = {5'd0, dot >= 9'd329};
    else tk = 6'((dot - 9'd1) >> 3) + 6'd2;
  end

  // scrolled world position of the fetched tile
  logic [8:0] ry;
  logic [7:0] yy;
  logic       nsy, nsx;
  logic [5:0] wx;
  logic [4:0] cx;
  always_comb begin
    ry  = fy + {1'b0, vs};
    nsy = nty ^ (ry >= 9'd240);
    yy  = (ry >= 9'd240) ? 8'(ry - 9'd240) : ry[7:0];
    wx  = hs[8:3] + tk;
    nsx = wx[5];
    cx  = wx[4:0];
  end
  wire nt_a10 = mirror_v ? nsx : nsy;

  logic [7:0] nt_byte, at_byte, pt_lo;
  logic [1:0] at_bits;
  always_comb begin
    case ({yy[4], cx[1]})
      2'b00: at_bits = at_byte[1:0];
      2'b01: at_bits = at_byte[3:2];
      2'b10: at_bits = at_byte[5:4];
      default: at_bits = at_byte[7:6];
    endcase
  end

  // CPU $2007 access targets
  wire cpu_2007   = reg_cs && reg_addr == 3'd7;
  wire v_is_nt    = (vaddr[13:12] == 2'b10) || (vaddr[13:12] == 2'b11 && vaddr[11:8] != 4'hF);
  wire v_is_pal   = (vaddr[13:8] == 6'h3F);
  wire v_a10      = mirror_v ? vaddr[10] : vaddr[11];

  // sprite fetch
  wire spr_fetch  = rendering && (drawn_line || pre_line) && dot >= 9'd257 && dot <= 9'd320;
  wire [2:0] sslot = 3'((dot - 9'd257) >> 3);
  wire [2:0] sph   = 3'(dot - 9'd257);

  // secondary OAM (evaluation result)
  logic [5:0] sec_idx [8];
  logic [3:0] sec_row [8];
  logic [3:0] sec_cnt;

  logic [12:0] spr_pat_addr;
  always_comb begin
    logic [7:0] tile;
    logic [7:0] attr;
    logic [3:0] r;
    tile = oam[{sec_idx[sslot], 2'd1}];
    attr = oam[{sec_idx[sslot], 2'd2}];
    if (ctrl[5]) begin
      r = attr[7] ? 4'd15 - sec_row[sslot] : sec_row[sslot];
      spr_pat_addr = {tile[0], tile[7:1], r[3], sph[2], r[2:0]};
    end else begin
      r = attr[7] ? 4'd7 - sec_row[sslot] : sec_row[sslot];
      spr_pat_addr = {ctrl[3], tile, sph[2], r[2:0]};
    end
  end

  always_comb begin
    vram_we    = 1'b0;
    vram_wdata = reg_wdata;
    vram_addr  = {v_a10, vaddr[9:0]};
    chr_addr   = vaddr[12:0];
    if (bg_fetch) begin
      case (ph)
        3'd0, 3'd1: vram_addr = {nt_a10, yy[7:3], cx};
        3'd2, 3'd3: vram_addr = {nt_a10, 4'b1111, yy[7:5], cx[4:2]};
        default: ;
      endcase
      if (ph == 3'd4 || ph == 3'd5) chr_addr = {ctrl[4], nt_byte, 1'b0, yy[2:0]};
      if (ph == 3'd6 || ph == 3'd7) chr_addr = {ctrl[4], nt_byte, 1'b1, yy[2:0]};
    end
    if (spr_fetch) chr_addr = spr_pat_addr;
    if (cpu_2007 && reg_we && v_is_nt) begin
      vram_we   = 1'b1;
      vram_addr = {v_a10, vaddr[9:0]};
    end
  end

  // ------------------------------------------------- background pipeline --
  logic [15:0] bg_lo, bg_hi, at_lo, at_hi;
  wire bg_shift  = busy && ((dot >= 9'd1 && dot <= 9'd256) || fetch_pre);
  wire bg_reload = bg_fetch && ph == 3'd7;

  always_ff @(posedge clk) begin
    if (rst) begin
      nt_byte <= '0; at_byte <= '0; pt_lo <= '0;
      bg_lo <= '0; bg_hi <= '0; at_lo <= '0; at_hi <= '0;
    end else begin
      if (bg_fetch) begin
        case (ph)
          3'd1: nt_byte <= vram_rdata;
          3'd3: at_byte <= vram_rdata;
          3'd5: pt_lo <= chr_rdata;
          default: ;
        endcase
      end
      if (bg_shift) begin
        bg_lo <= {bg_lo[14:0], 1'b0};
        bg_hi <= {bg_hi[14:0], 1'b0};
        at_lo <= {at_lo[14:0], 1'b0};
        at_hi <= {at_hi[14:0], 1'b0};
        if (bg_reload) begin
          bg_lo <= {bg_lo[14:7], pt_lo};
          bg_hi <= {bg_hi[14:7], chr_rdata};
          at_lo <= {at_lo[14:7], {8{at_bits[0]}}};
          at_hi <= {at_hi[14:7], {8{at_bits[1]}}};
        end
      end
    end
  end

  // ----------------------------------------------------- sprite pipeline --
  logic [7:0] sp_lo [8], sp_hi [8], sp_x [8], sp_attr [8];
  logic [7:0] sp0_valid;   // slot holds sprite 0

  // evaluation at dots 65..128: sprite (dot-65)
  wire        eval_en  = rendering && drawn_line && dot >= 9'd65 && dot <= 9'd128;
  wire [5:0]  eval_i   = 6'(dot - 9'd65);
  wire [8:0]  eval_dy  = line - {1'b0, oam[{eval_i, 2'd0}]};
  wire        eval_hit = (eval_dy < (ctrl[5] ? 9'd16 : 9'd8));

  function automatic logic [7:0] rev8(input logic [7:0] v);
    for (int i = 0; i < 8; i++) rev8[i] = v[7 - i];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sec_cnt <= '0;
      for (int i = 0; i < 8; i++) begin
        sec_idx[i] <= '0; sec_row[i] <= '0;
        sp_lo[i] <= '0; sp_hi[i] <= '0; sp_x[i] <= 8'hFF; sp_attr[i] <= '0;
      end
      sp0_valid <= '0;
    end else begin
      if (dot == 9'd64) sec_cnt <= '0;
      if (eval_en && eval_hit) begin
        if (sec_cnt < 4'd8) begin
          sec_idx[sec_cnt[2:0]] <= eval_i;
          sec_row[sec_cnt[2:0]] <= eval_dy[3:0];
          sec_cnt <= sec_cnt + 4'd1;
        end
      end
      if (spr_fetch) begin
        logic [7:0] attr;
        logic       here;
        attr = oam[{sec_idx[sslot], 2'd2}];
        here = ({1'b0, sslot} < sec_cnt);
        if (sph == 3'd1) sp_lo[sslot] <= here ? (attr[6] ? rev8(chr_rdata) : chr_rdata) : 8'h00;
        if (sph == 3'd5) sp_hi[sslot] <= here ? (attr[6] ? rev8(chr_rdata) : chr_rdata) : 8'h00;
        if (sph == 3'd0) begin
          sp_x[sslot]      <= oam[{sec_idx[sslot], 2'd3}];
          sp_attr[sslot]   <= attr;
          sp0_valid[sslot] <= here && sec_idx[sslot] == 6'd0;
        end
      end
      if (!rendering && dot == 9'd257) begin
        for (int i = 0; i < 8; i++) begin sp_lo[i] <= '0; sp_hi[i] <= '0; end
      end
    end
  end

  // ---------------------------------------------------------- composite --
  wire [7:0] px = 8'(dot - 9'd1);
  logic [1:0] bgp, bga, spp, spa;
  logic       sp_front, sp_is0;
  logic [4:0] pal_idx;
  logic [5:0] colour;

  always_comb begin
    logic [3:0] sel;
    logic [8:0] off;
    logic [2:0] b;
    sel = 4'd15 - {1'b0, hs[2:0]};
    bgp = {bg_hi[sel], bg_lo[sel]};
    bga = {at_hi[sel], at_lo[sel]};
    if (!mask[3] || (px < 8'd8 && !mask[1])) bgp = 2'd0;
    spp = 2'd0; spa = 2'd0; sp_front = 1'b0; sp_is0 = 1'b0;
    off = '0; b = '0;
    for (int i = 7; i >= 0; i--) begin
      off = {1'b0, px} - {1'b0, sp_x[i]};
      b = 3'd7 - off[2:0];
      if (off < 9'd8) begin
        if ({sp_hi[i][b], sp_lo[i][b]} != 2'd0) begin
          spp = {sp_hi[i][b], sp_lo[i][b]};
          spa = sp_attr[i][1:0];
          sp_front = !sp_attr[i][5];
          sp_is0 = sp0_valid[i];
        end
      end
    end
    if (!mask[4] || (px < 8'd8 && !mask[2])) begin spp = 2'd0; sp_is0 = 1'b0; end
    if (spp != 0 && (bgp == 0 || sp_front)) pal_idx = {1'b1, spa, spp};
    else if (bgp != 0) pal_idx = {1'b0, bga, bgp};
    else pal_idx = 5'd0;
    colour = pal[pal_idx];
    if (mask[0]) colour = colour & 6'h30;
  end

  wire pixel_dot = drawn_line && dot >= 9'd1 && dot <= 9'd256;

  always_ff @(posedge clk) begin
    if (rst) begin
      fb_we <= 1'b0; fb_addr <= '0; fb_data <= '0;
    end else begin
      fb_we   <= pixel_dot;
      fb_addr <= {line[7:0], px};
      fb_data <= {mask[7:5], rendering ? colour : (pal[0] & (mask[0] ? 6'h30 : 6'h3F))};
    end
  end

  // ------------------------------------------------- CPU register access --
  always_comb begin
    case (reg_addr)
      3'd2: reg_rdata = {vblank, s0hit, overflow, 5'd0};
      3'd4: reg_rdata = oam[oam_addr];
      3'd7: reg_rdata = v_is_pal ? {2'b00, pal[pal_sel(vaddr[4:0])]} : rd_buf;
      default: reg_rdata = 8'h00;
    endcase
  end

  function automatic logic [4:0] pal_sel(input logic [4:0] a);
    return (a[1:0] == 2'b00) ? {1'b0, a[3:0]} : a;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0; mask <= '0; vblank <= 1'b0; s0hit <= 1'b0; overflow <= 1'b0;
      oam_addr <= '0; scroll_x <= '0; scroll_y <= '0; w_toggle <= 1'b0;
      vaddr <= '0; rd_buf <= '0; hs <= '0; vs <= '0; nty <= 1'b0;
      for (int i = 0; i < 32; i++) pal[i] <= '0;
    end else begin
      // frame flags
      if (line == 9'd241 && dot == 9'd1) vblank <= 1'b1;
      if (pre_line && dot == 9'd1) begin vblank <= 1'b0; s0hit <= 1'b0; overflow <= 1'b0; end
      if (eval_en && eval_hit && sec_cnt == 4'd8) overflow <= 1'b1;
      if (pixel_dot && rendering && bgp != 0 && spp != 0 && sp_is0 && px != 8'd255)
        s0hit <= 1'b1;
      // scroll latches
      if (dot == 9'd257) hs <= {ctrl[0], scroll_x};
      if (pre_line && dot == 9'd280) begin vs <= scroll_y; nty <= ctrl[1]; end
      // registers
      if (reg_cs) begin
        if (reg_we) begin
          case (reg_addr)
            3'd0: ctrl <= reg_wdata;
            3'd1: mask <= reg_wdata;
            3'd3: oam_addr <= reg_wdata;
            3'd4: begin oam[oam_addr] <= reg_wdata; oam_addr <= oam_addr + 8'd1; end
            3'd5: begin
              if (!w_toggle) scroll_x <= reg_wdata; else scroll_y <= reg_wdata;
              w_toggle <= ~w_toggle;
            end
            3'd6: begin
              if (!w_toggle) vaddr[13:8] <= reg_wdata[5:0]; else vaddr[7:0] <= reg_wdata;
              w_toggle <= ~w_toggle;
            end
            3'd7: begin
              if (v_is_pal) pal[pal_sel(vaddr[4:0])] <= reg_wdata[5:0];
              vaddr <= vaddr + (ctrl[2] ? 14'd32 : 14'd1);
            end
            default: ;
          endcase
        end else begin
          case (reg_addr)
            3'd2: begin vblank <= 1'b0; w_toggle <= 1'b0; end
            3'd7: begin
              rd_buf <= (vaddr[13] == 1'b0) ? chr_rdata : vram_rdata;
              vaddr <= vaddr + (ctrl[2] ? 14'd32 : 14'd1);
            end
            default: ;
          endcase
        end
      end
    end
  end

  // sprite RAM has no reset (its contents are written by the game)
  initial for (int i = 0; i < 256; i++) oam[i] = 8'hFF;

  assign nmi = vblank && ctrl[7];
endmodule
