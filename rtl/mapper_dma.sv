// mapper_dma: the CPU memory map, the two DMA engines and the cartridge
// bank switching of the console.
//
// Address decoding (CPU side):
//   $0000-$1FFF  2 KB work RAM, repeated every 2 KB
//   $2000-$3FFF  picture unit registers, A[2:0] (repeated every 8 bytes)
//   $4000-$4013, $4015, $4017 (write)  sound unit registers, A[4:0]
//   $4014 (write) sprite DMA;  $4016 (write) pad strobe, both pads
//   $4015 (read) sound status; $4016/$4017 (read) pad 1 / pad 2 bit 0
//   $6000-$7FFF  8 KB cartridge SRAM
//   $8000-$FFFF  program ROM, two 16 KB windows
// $4020-$5FFF (expansion area) is not decoded and reads as 0.
// Register strobes (ppu_cs, apu_wr/apu_rd, pad_wr/pad_rd) are one clock
// wide, on the clock where ce=1 ends the CPU cycle, and never while the CPU
// is stalled, so a read with side effects ($2002, $2007, $4015, $4016)
// happens once per CPU access. Reads from RAM and ROM come from synchronous
// memories addressed by the stable CPU address, so their data is ready
// well before that edge.
//
// Sprite DMA: a write of page P to $4014 stalls the CPU for 513 CPU cycles:
// one idle cycle, then 256 pairs of (read $PP00+i, write it to $2004).
// Sound DMA: while the sound unit raises dma_req, the CPU is stalled for
// four cycles; the fourth reads the byte at dma_addr and answers with
// dma_ack. A sound request waits for a running sprite DMA to end.
//
// NMI: the rising edge of the picture unit's nmi line is held as a request
// to the CPU until the CPU acknowledges it (nmi_ack).
//
// Cartridge banking (MAPPER parameter): on any CPU write to $8000-$FFFF the
// written value is taken as a bank number.
//   0: no banking (32 KB program, 8 KB pattern data)
//   1: pattern ROM swap only: value selects the 8 KB pattern bank
//   2: program ROM swap only: value selects the 16 KB bank at $8000;
//      $C000 always shows the last bank
//   3: both: value[7:4] selects the program bank, value[3:0] the pattern bank
// The four mapping styles, the $4014 DMA and the four-cycle sound DMA follow
// the document; the 513-cycle sprite DMA length, the bit split of style 3
// and the fixed last bank are this design's choices (they match common
// cartridges of these styles).
module mapper_dma #(
  parameter int unsigned MAPPER    = 0,   // 0..3, see above
  parameter int unsigned PRG_BANKS = 2,   // 16 KB program banks
  parameter int unsigned CHR_BANKS = 1,   // 8 KB pattern banks
  localparam int unsigned PRG_AW = $clog2(PRG_BANKS) + 14,
  localparam int unsigned CHR_BW = (CHR_BANKS > 1) ? $clog2(CHR_BANKS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  // CPU
  input  logic [15:0]       cpu_addr,
  input  logic [7:0]        cpu_dout,
  input  logic              cpu_we,
  output logic [7:0]        cpu_din,
  output logic              cpu_stall,
  output logic              cpu_nmi,
  input  logic              cpu_nmi_ack,
  input  logic              ppu_nmi,
  // work RAM
  output logic [10:0]       ram_addr,
  output logic              ram_we,
  output logic [7:0]        ram_wdata,
  input  logic [7:0]        ram_rdata,
  // cartridge SRAM ($6000-$7FFF)
  output logic [12:0]       sram_addr,
  output logic              sram_we,
  output logic [7:0]        sram_wdata,
  input  logic [7:0]        sram_rdata,
  // program ROM
  output logic [PRG_AW-1:0] prg_addr,
  input  logic [7:0]        prg_rdata,
  // pattern bank select
  output logic [CHR_BW-1:0] chr_bank,
  // picture unit registers
  output logic              ppu_cs,
  output logic              ppu_we,
  output logic [2:0]        ppu_addr,
  output logic [7:0]        ppu_wdata,
  input  logic [7:0]        ppu_rdata,
  // sound unit registers and DMA
  output logic              apu_wr,
  output logic              apu_rd,
  output logic [4:0]        apu_addr,
  output logic [7:0]        apu_wdata,
  input  logic [7:0]        apu_rdata,
  input  logic              apu_dma_req,
  input  logic [15:0]       apu_dma_addr,
  output logic              apu_dma_ack,
  output logic [7:0]        apu_dma_data,
  // game pads
  output logic              pad_wr,
  output logic              pad_wdata0,
  output logic [1:0]        pad_rd,
  input  logic [1:0]        pad_rdata0,
  // activity (for test and display)
  output logic              spr_dma_busy,
  output logic              apu_dma_busy
);
  // ------------------------------------------------------------ DMA state --
  typedef enum logic [1:0] { D_IDLE, D_SPR, D_APU } dma_e;
  dma_e        dma;
  logic [9:0]  spr_step;     // 0: idle cycle, then 2*i+1 read, 2*i+2 write
  logic [7:0]  spr_page;
  logic [7:0]  spr_byte;
  logic [1:0]  apu_step;

  // bus master: the CPU, or the DMA engine while the CPU is stalled
  logic [15:0] bus_addr;
  logic        bus_we, bus_rd;
  logic [7:0]  bus_wdata;
  wire  [7:0]  spr_i = spr_step[8:1];
  wire         spr_rd_cyc = (dma == D_SPR) && spr_step != 0 && spr_step[0];
  wire         spr_wr_cyc = (dma == D_SPR) && spr_step != 0 && !spr_step[0];

  always_comb begin
    bus_addr = cpu_addr; bus_we = cpu_we; bus_wdata = cpu_dout; bus_rd = !cpu_we;
    if (dma == D_SPR) begin
      bus_addr  = spr_wr_cyc ? 16'h2004 : {spr_page, spr_i};
      bus_we    = spr_wr_cyc;
      bus_rd    = spr_rd_cyc;
      bus_wdata = spr_byte;
    end else if (dma == D_APU) begin
      bus_addr = apu_dma_addr;
      bus_we   = 1'b0;
      bus_rd   = (apu_step == 2'd3);
    end
  end
  // a bus access takes effect at the clock that ends the CPU cycle
  wire cpu_go = ce && dma == D_IDLE;
  wire acc    = ce;
  wire wr_now = acc && bus_we;
  wire rd_now = acc && bus_rd;

  // ------------------------------------------------------------- decode --
  wire sel_ram = bus_addr[15:13] == 3'b000;
  wire sel_ppu = bus_addr[15:13] == 3'b001;
  wire sel_io  = bus_addr[15:5] == 11'h200;          // $4000-$401F
  wire sel_sram = bus_addr[15:13] == 3'b011;
  wire sel_prg = bus_addr[15];
  wire [4:0] io = bus_addr[4:0];

  // bank registers
  logic [7:0] prg_bank;
  logic [7:0] chr_reg;
  always_ff @(posedge clk) begin
    if (rst) begin
      prg_bank <= '0; chr_reg <= '0;
    end else if (wr_now && sel_prg) begin
      case (MAPPER)
        1: chr_reg <= cpu_dout;
        2: prg_bank <= cpu_dout;
        3: begin prg_bank <= {4'd0, cpu_dout[7:4]}; chr_reg <= {4'd0, cpu_dout[3:0]}; end
        default: ;
      endcase
    end
  end
  assign chr_bank = CHR_BW'(chr_reg % CHR_BANKS);

  logic [PRG_AW-1:0] prg_lo_base, prg_hi_base;
  always_comb begin
    if (MAPPER == 2 || MAPPER == 3) begin
      prg_lo_base = PRG_AW'(prg_bank % PRG_BANKS) << 14;
      prg_hi_base = PRG_AW'(PRG_BANKS - 1) << 14;
    end else begin
      // no program banking: 32 KB straight, or 16 KB seen twice
      prg_lo_base = '0;
      prg_hi_base = PRG_AW'(PRG_BANKS - 1) << 14;
    end
    prg_addr = (bus_addr[14] ? prg_hi_base : prg_lo_base) | PRG_AW'(bus_addr[13:0]);
  end

  // memories and registers
  assign ram_addr  = bus_addr[10:0];
  assign ram_we    = wr_now && sel_ram;
  assign ram_wdata = bus_wdata;

  assign sram_addr  = bus_addr[12:0];
  assign sram_we    = wr_now && sel_sram;
  assign sram_wdata = bus_wdata;

  assign ppu_cs    = acc && sel_ppu && (bus_we || bus_rd);
  assign ppu_we    = bus_we;
  assign ppu_addr  = bus_addr[2:0];
  assign ppu_wdata = bus_wdata;

  wire io_apu = sel_io && io != 5'h14 && io != 5'h16 && !(io == 5'h17 && !bus_we);
  assign apu_wr    = wr_now && io_apu;
  assign apu_rd    = rd_now && sel_io && io == 5'h15;
  assign apu_addr  = io;
  assign apu_wdata = bus_wdata;

  assign pad_wr     = wr_now && sel_io && io == 5'h16;
  assign pad_wdata0 = bus_wdata[0];
  assign pad_rd[0]  = rd_now && sel_io && io == 5'h16;
  assign pad_rd[1]  = rd_now && sel_io && io == 5'h17;

  always_comb begin
    cpu_din = 8'h00;
    if (sel_ram) cpu_din = ram_rdata;
    else if (sel_ppu) cpu_din = ppu_rdata;
    else if (sel_io) begin
      case (io)
        5'h15: cpu_din = apu_rdata;
        5'h16: cpu_din = {7'd0, pad_rdata0[0]};
        5'h17: cpu_din = {7'd0, pad_rdata0[1]};
        default: cpu_din = 8'h00;
      endcase
    end else if (sel_sram) cpu_din = sram_rdata;
    else if (sel_prg) cpu_din = prg_rdata;
  end

  // ---------------------------------------------------------------- DMA --
  wire spr_start = cpu_go && cpu_we && cpu_addr == 16'h4014;

  always_ff @(posedge clk) begin
    if (rst) begin
      dma <= D_IDLE; spr_step <= '0; spr_page <= '0; spr_byte <= '0; apu_step <= '0;
    end else if (ce) begin
      case (dma)
        D_IDLE: begin
          if (spr_start) begin
            dma <= D_SPR; spr_page <= cpu_dout; spr_step <= '0;
          end else if (apu_dma_req) begin
            dma <= D_APU; apu_step <= '0;
          end
        end
        D_SPR: begin
          if (spr_rd_cyc) spr_byte <= cpu_din;
          spr_step <= spr_step + 10'd1;
          if (spr_step == 10'd512) dma <= D_IDLE;
        end
        default: begin   // D_APU
          apu_step <= apu_step + 2'd1;
          if (apu_step == 2'd3) dma <= D_IDLE;
        end
      endcase
    end
  end

  assign cpu_stall    = dma != D_IDLE;
  assign apu_dma_ack  = ce && dma == D_APU && apu_step == 2'd3;
  assign apu_dma_data = cpu_din;
  assign spr_dma_busy = dma == D_SPR;
  assign apu_dma_busy = dma == D_APU;

  // ---------------------------------------------------------------- NMI --
  logic ppu_nmi_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      ppu_nmi_q <= 1'b0; cpu_nmi <= 1'b0;
    end else begin
      ppu_nmi_q <= ppu_nmi;
      if (ppu_nmi && !ppu_nmi_q) cpu_nmi <= 1'b1;
      else if (cpu_nmi_ack) cpu_nmi <= 1'b0;
    end
  end

  // handshake rule: a sound DMA byte is only delivered to a pending request
  assert property (@(posedge clk) disable iff (rst) apu_dma_ack |-> apu_dma_req);
endmodule
