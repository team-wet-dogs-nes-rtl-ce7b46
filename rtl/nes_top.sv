// nes_top: the whole console on one FPGA.
//
// Blocks and connections:
//   cpu6502     the 6502 processor, one CPU cycle every CPU_DIV clocks
//   mapper_dma  CPU address decoding, sprite and sound DMA, NMI hand-over,
//               cartridge bank switching
//   bram_ram    2 KB CPU work RAM, 8 KB cartridge SRAM at $6000 and
//               2 KB picture name-table RAM
//   bram_rom    program ROM (PRG_BANKS x 16 KB) and pattern ROM
//               (CHR_BANKS x 8 KB), loaded through the load ports
//   ppu         picture unit, writes 256x240 colours with emphasis bits
//   frame_buffer dual-clock picture store between the picture unit and VGA
//   vga_driver  640x480 VGA output, picture doubled and centred
//   apu         sound unit (two squares, triangle, noise, DMC, mixer)
//   ac97_if     serial link to the external AC97 codec
//   controller  two game pads, polled on their own and read at $4016/$4017
//
// Clocks: clk is the picture clock; the CPU and the sound unit run on a
// clock enable every CPU_DIV (4) clocks of it. vga_clk drives the VGA side
// of the frame buffer and the VGA timing (25.175 MHz for 640x480).
// ac97_bit_clk comes from the codec. rst is synchronous and must be held
// for a few cycles of every clock.
//
// Outside parts: the codec chip (ac97_* pins) and the cartridge. The
// cartridge reader is not built: the program and pattern ROMs are filled
// through prg_load_* / chr_load_* before rst is released, and the mapping
// style of the cartridge is the MAPPER parameter.
//
// The block split and the clock ratio follow the document; the load ports,
// the reset scheme and the debug outputs are this design's.
module nes_top
  import nes_pkg::*;
#(
  parameter int unsigned MAPPER    = 0,
  parameter int unsigned PRG_BANKS = 2,
  parameter int unsigned CHR_BANKS = 1,
  parameter int unsigned STEP_CYC  = 7457,   // CPU cycles per sound frame step
  parameter int unsigned POLL_CYC  = 29830,  // CPU cycles between pad polls
  localparam int unsigned PRG_AW = $clog2(PRG_BANKS) + 14,
  localparam int unsigned CHR_BW = (CHR_BANKS > 1) ? $clog2(CHR_BANKS) : 1,
  localparam int unsigned CHR_AW = (CHR_BANKS > 1) ? CHR_BW + 13 : 13
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              vga_clk,
  // cartridge contents
  input  logic              prg_load_we,
  input  logic [PRG_AW-1:0] prg_load_addr,
  input  logic [7:0]        prg_load_data,
  input  logic              chr_load_we,
  input  logic [CHR_AW-1:0] chr_load_addr,
  input  logic [7:0]        chr_load_data,
  input  logic              mirror_v,      // cartridge name-table mirroring
  // game pads
  output logic [1:0]        pad_latch,
  output logic [1:0]        pad_pulse,
  input  logic [1:0]        pad_data,
  // VGA
  output logic [7:0]        vga_r,
  output logic [7:0]        vga_g,
  output logic [7:0]        vga_b,
  output logic              vga_hsync_n,
  output logic              vga_vsync_n,
  // AC97 codec
  input  logic              ac97_bit_clk,
  input  logic              ac97_sdata_in,
  output logic              ac97_sdata_out,
  output logic              ac97_sync,
  output logic              ac97_reset_b,
  // status
  output logic [15:0]       cpu_pc,
  output logic [7:0]        pad1_buttons,
  output logic [17:0]       audio_sample
);
  // ------------------------------------------------------- CPU clock enable --
  logic [$clog2(CPU_DIV)-1:0] div;
  logic ce;
  always_ff @(posedge clk) begin
    if (rst) div <= '0;
    else div <= (div == $clog2(CPU_DIV)'(CPU_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign ce = (div == $clog2(CPU_DIV)'(CPU_DIV - 1));

  // ----------------------------------------------------------------- CPU --
  logic [15:0] cpu_addr;
  logic [7:0]  cpu_dout, cpu_din;
  logic        cpu_we, cpu_stall, cpu_nmi, cpu_nmi_ack, cpu_irq, cpu_sync;
  logic [7:0]  dbg_a, dbg_x, dbg_y, dbg_s, dbg_p;

  cpu6502 u_cpu (
    .clk, .rst, .ce, .stall(cpu_stall), .nmi(cpu_nmi), .nmi_ack(cpu_nmi_ack),
    .irq(cpu_irq), .addr(cpu_addr), .dout(cpu_dout), .we(cpu_we), .din(cpu_din),
    .sync(cpu_sync), .dbg_pc(cpu_pc), .dbg_a, .dbg_x, .dbg_y, .dbg_s, .dbg_p
  );

  // ------------------------------------------------------- mapping / DMA --
  logic [10:0]       ram_addr;
  logic              ram_we;
  logic [7:0]        ram_wdata, ram_rdata;
  logic [PRG_AW-1:0] prg_addr;
  logic [7:0]        prg_rdata;
  logic [12:0]       sram_addr;
  logic              sram_we;
  logic [7:0]        sram_wdata, sram_rdata;
  logic [CHR_BW-1:0] chr_bank;
  logic              ppu_cs, ppu_we, ppu_nmi;
  logic [2:0]        ppu_addr;
  logic [7:0]        ppu_wdata, ppu_rdata;
  logic              apu_wr, apu_rd, apu_irq, apu_dma_req, apu_dma_ack;
  logic [4:0]        apu_addr;
  logic [7:0]        apu_wdata, apu_rdata, apu_dma_data;
  logic [15:0]       apu_dma_addr;
  logic              pad_wr, pad_wdata0;
  logic [1:0]        pad_rd, pad_rdata0;
  logic              spr_dma_busy, apu_dma_busy;

  mapper_dma #(.MAPPER(MAPPER), .PRG_BANKS(PRG_BANKS), .CHR_BANKS(CHR_BANKS)) u_map (
    .clk, .rst, .ce,
    .cpu_addr, .cpu_dout, .cpu_we, .cpu_din, .cpu_stall, .cpu_nmi, .cpu_nmi_ack,
    .ppu_nmi,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .prg_addr, .prg_rdata, .chr_bank,
    .ppu_cs, .ppu_we, .ppu_addr, .ppu_wdata, .ppu_rdata,
    .apu_wr, .apu_rd, .apu_addr, .apu_wdata, .apu_rdata,
    .apu_dma_req, .apu_dma_addr, .apu_dma_ack, .apu_dma_data,
    .pad_wr, .pad_wdata0, .pad_rd, .pad_rdata0,
    .spr_dma_busy, .apu_dma_busy
  );
  assign cpu_irq = apu_irq;

  bram_ram #(.AW(11)) u_wram (
    .clk, .addr(ram_addr), .we(ram_we), .din(ram_wdata), .dout(ram_rdata));

  bram_ram #(.AW(13)) u_sram (
    .clk, .addr(sram_addr), .we(sram_we), .din(sram_wdata), .dout(sram_rdata));

  bram_rom #(.AW(PRG_AW)) u_prg (
    .clk, .addr(prg_addr), .dout(prg_rdata),
    .load_we(prg_load_we), .load_addr(prg_load_addr), .load_data(prg_load_data));

  // ----------------------------------------------------------- picture --
  logic [10:0] vram_addr;
  logic        vram_we;
  logic [7:0]  vram_wdata, vram_rdata;
  logic [12:0] ppu_chr_addr;
  logic [7:0]  chr_rdata;
  logic        fb_we;
  logic [15:0] fb_waddr, fb_raddr;
  logic [8:0]  fb_wdata, fb_rdata;   // {emphasis, colour}
  logic [8:0]  ppu_line, ppu_dot;
  logic        ppu_frame_start, vga_de, vga_frame_start;
  logic [CHR_AW-1:0] chr_full_addr;

  ppu u_ppu (
    .clk, .rst, .mirror_v,
    .reg_cs(ppu_cs), .reg_we(ppu_we), .reg_addr(ppu_addr), .reg_wdata(ppu_wdata),
    .reg_rdata(ppu_rdata), .nmi(ppu_nmi),
    .vram_addr, .vram_we, .vram_wdata, .vram_rdata,
    .chr_addr(ppu_chr_addr), .chr_rdata,
    .fb_we, .fb_addr(fb_waddr), .fb_data(fb_wdata),
    .line(ppu_line), .dot(ppu_dot), .frame_start(ppu_frame_start)
  );

  bram_ram #(.AW(11)) u_vram (
    .clk, .addr(vram_addr), .we(vram_we), .din(vram_wdata), .dout(vram_rdata));

  if (CHR_BANKS > 1) begin : g_chr_banked
    assign chr_full_addr = {chr_bank, ppu_chr_addr};
  end else begin : g_chr_flat
    assign chr_full_addr = ppu_chr_addr;
  end

  bram_rom #(.AW(CHR_AW)) u_chr (
    .clk, .addr(chr_full_addr), .dout(chr_rdata),
    .load_we(chr_load_we), .load_addr(chr_load_addr), .load_data(chr_load_data));

  frame_buffer u_fb (
    .wclk(clk), .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .rclk(vga_clk), .raddr(fb_raddr), .rdata(fb_rdata));

  vga_driver u_vga (
    .clk(vga_clk), .rst, .fb_raddr, .fb_rdata,
    .vga_r, .vga_g, .vga_b, .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n),
    .de(vga_de), .frame_start(vga_frame_start));

  // -------------------------------------------------------------- sound --
  logic [3:0] sq1_out, sq2_out, tri_out, noise_out;
  logic [6:0] dmc_out;
  logic       codec_ready;
  logic [2:0] cmds_done;

  apu #(.STEP_CYC(STEP_CYC)) u_apu (
    .clk, .rst, .ce, .wr(apu_wr), .rd(apu_rd), .addr(apu_addr), .wdata(apu_wdata),
    .rdata(apu_rdata), .irq(apu_irq),
    .dma_req(apu_dma_req), .dma_addr(apu_dma_addr), .dma_ack(apu_dma_ack),
    .dma_data(apu_dma_data),
    .sample(audio_sample), .sq1_out, .sq2_out, .tri_out, .noise_out, .dmc_out);

  ac97_if u_ac97 (
    .clk, .rst, .sample(audio_sample), .bit_clk(ac97_bit_clk),
    .sdata_in(ac97_sdata_in), .sdata_out(ac97_sdata_out), .sync(ac97_sync),
    .audio_reset_b(ac97_reset_b), .codec_ready, .cmds_done);

  // ---------------------------------------------------------- game pads --
  logic [7:0] pad2_buttons;

  controller #(.POLL_CYC(POLL_CYC)) u_pad1 (
    .clk, .rst, .ce, .pad_latch(pad_latch[0]), .pad_pulse(pad_pulse[0]),
    .pad_data(pad_data[0]), .wr(pad_wr), .wdata0(pad_wdata0), .rd(pad_rd[0]),
    .rdata0(pad_rdata0[0]), .buttons(pad1_buttons));

  controller #(.POLL_CYC(POLL_CYC)) u_pad2 (
    .clk, .rst, .ce, .pad_latch(pad_latch[1]), .pad_pulse(pad_pulse[1]),
    .pad_data(pad_data[1]), .wr(pad_wr), .wdata0(pad_wdata0), .rd(pad_rd[1]),
    .rdata0(pad_rdata0[1]), .buttons(pad2_buttons));
endmodule
