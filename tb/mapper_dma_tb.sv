// mapper_dma_tb: self-checking test of the memory map, DMA and banking unit.
//
// The unit is built with mapping style 3 (program and pattern swap), four
// program banks and four pattern banks. The testbench plays the CPU: each
// access is held for one CPU cycle (four clocks, ce on the last) and is
// repeated while the unit stalls the CPU, and the stalled cycles are
// counted. Work RAM and program ROM are behavioural synchronous memories;
// the picture, sound and pad registers answer with fixed patterns.
// Checked: RAM mirroring, the 8 KB SRAM at $6000, one strobe per access for each register group,
// read data routing, the 513-cycle sprite DMA and the bytes it writes to
// $2004, the 4-cycle sound DMA and the byte it returns, the NMI hold until
// acknowledge, and bank switching of both ROMs.
module mapper_dma_tb;
  localparam int PRG_BANKS = 4, CHR_BANKS = 4;
  logic clk = 0, rst = 1, ce;
  logic [1:0] div = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_dout = 0, cpu_din;
  logic cpu_we = 0, cpu_stall, cpu_nmi, cpu_nmi_ack = 0, ppu_nmi = 0;
  logic [10:0] ram_addr;
  logic ram_we;
  logic [7:0] ram_wdata, ram_rdata;
  logic [12:0] sram_addr;
  logic sram_we;
  logic [7:0] sram_wdata, sram_rdata;
  logic [15:0] prg_addr;
  logic [7:0] prg_rdata;
  logic [1:0] chr_bank;
  logic ppu_cs, ppu_we;
  logic [2:0] ppu_addr;
  logic [7:0] ppu_wdata, ppu_rdata;
  logic apu_wr, apu_rd;
  logic [4:0] apu_addr;
  logic [7:0] apu_wdata, apu_rdata;
  logic apu_dma_req = 0, apu_dma_ack;
  logic [15:0] apu_dma_addr = 0;
  logic [7:0] apu_dma_data;
  logic pad_wr, pad_wdata0;
  logic [1:0] pad_rd, pad_rdata0;
  logic spr_dma_busy, apu_dma_busy;
  int checks = 0, failures = 0;

  mapper_dma #(.MAPPER(3), .PRG_BANKS(PRG_BANKS), .CHR_BANKS(CHR_BANKS)) dut (.*);

  logic [7:0] ram [2048];
  logic [7:0] prg [65536];
  logic [7:0] sram [8192];
  always #5 clk = ~clk;
  always @(posedge clk) begin
    div <= div + 2'd1;
    ram_rdata <= ram[ram_addr];
    if (ram_we) ram[ram_addr] <= ram_wdata;
    prg_rdata <= prg[prg_addr];
    sram_rdata <= sram[sram_addr];
    if (sram_we) sram[sram_addr] <= sram_wdata;
  end
  assign ce = (div == 2'd3);
  assign ppu_rdata = {5'b11000, ppu_addr};
  assign apu_rdata = 8'h5C;
  assign pad_rdata0 = 2'b10;

  // strobe counters
  int n_ppu, n_ppu_w, n_apu_wr, n_apu_rd, n_pad_wr, n_pad_rd1;
  logic [7:0] oam_log [$];
  always @(posedge clk) if (!rst) begin
    if (ppu_cs) begin n_ppu++; if (ppu_we) n_ppu_w++; end
    if (ppu_cs && ppu_we && ppu_addr == 3'd4) oam_log.push_back(ppu_wdata);
    if (apu_wr) n_apu_wr++;
    if (apu_rd) n_apu_rd++;
    if (pad_wr) n_pad_wr++;
    if (pad_rd[1]) n_pad_rd1++;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int stalls;
  // one CPU access, repeated while stalled
  task automatic cyc(input int a, input bit w, input int d, output int r);
    bit st;
    @(negedge clk);
    cpu_addr = 16'(a); cpu_we = w; cpu_dout = 8'(d);
    do begin
      @(negedge clk);
      while (!ce) @(negedge clk);
      r = cpu_din; st = cpu_stall;
      if (st) stalls++;
      @(posedge clk); #1;
    end while (st);
    cpu_we = 0;
  endtask

  int r, dma_byte;
  initial begin
    for (int i = 0; i < 2048; i++) ram[i] = 8'($urandom);
    for (int i = 0; i < 65536; i++) prg[i] = 8'($urandom);
    repeat (8) @(posedge clk);
    rst = 0;
    // RAM and its mirrors
    cyc('h0805, 1, 'h5A, r);
    cyc('h0005, 0, 0, r);  check("ram mirror 0805->0005", r, 'h5A);
    cyc('h1FFF, 1, 'h33, r);
    cyc('h07FF, 0, 0, r);  check("ram mirror 1fff->07ff", r, 'h33);
    // cartridge SRAM
    cyc('h6123, 1, 'hA5, r);
    cyc('h7FFF, 1, 'h3C, r);
    cyc('h6123, 0, 0, r);  check("sram $6123", r, 'hA5);
    cyc('h7FFF, 0, 0, r);  check("sram $7FFF", r, 'h3C);
    cyc('h0123, 0, 0, r);  check("sram write left work RAM alone", r, ram['h123]);
    // picture registers, repeated every 8 bytes
    n_ppu = 0; n_ppu_w = 0;
    cyc('h2001, 1, 'h1E, r);
    check("one ppu write strobe", n_ppu_w, 1);
    cyc('h3FFA, 0, 0, r);
    check("ppu read data ($3FFA -> reg 2)", r, 'hC2);
    check("ppu strobes", n_ppu, 2);
    // sound and pads
    n_apu_wr = 0; n_apu_rd = 0; n_pad_wr = 0; n_pad_rd1 = 0;
    cyc('h4000, 1, 'h3F, r);
    cyc('h4017, 1, 'h40, r);
    check("apu writes ($4000, $4017)", n_apu_wr, 2);
    cyc('h4015, 0, 0, r);
    check("apu status read", r, 'h5C);
    check("apu read strobe", n_apu_rd, 1);
    cyc('h4016, 1, 1, r);
    check("pad strobe write", n_pad_wr, 1);
    check("pad write not sent to apu", n_apu_wr, 2);
    cyc('h4017, 0, 0, r);
    check("pad 2 read", r, 1);
    check("pad 2 read strobe", n_pad_rd1, 1);
    // sprite DMA from page 2
    oam_log.delete();
    stalls = 0;
    cyc('h4014, 1, 'h02, r);
    cyc('h8000, 0, 0, r);
    check("sprite DMA stall cycles", stalls, 513);
    check("sprite DMA bytes", oam_log.size(), 256);
    for (int i = 0; i < 256 && i < oam_log.size(); i++)
      check($sformatf("oam byte %0d", i), oam_log[i], ram['h200 + i]);
    // sound DMA of $0123
    stalls = 0;
    apu_dma_addr = 16'h0123; apu_dma_req = 1;
    fork
      begin
        @(posedge clk iff apu_dma_ack);
        dma_byte = apu_dma_data;
        apu_dma_req = 0;
      end
      begin
        cyc('h8001, 0, 0, r);
        cyc('h8002, 0, 0, r);
      end
    join
    check("sound DMA stall cycles", stalls, 4);
    check("sound DMA byte", dma_byte, ram['h123]);
    // NMI held until acknowledged
    @(negedge clk); ppu_nmi = 1;
    repeat (20) @(negedge clk);
    ppu_nmi = 0;
    repeat (20) @(negedge clk);
    check("nmi held after ppu line falls", int'(cpu_nmi), 1);
    cpu_nmi_ack = 1; @(negedge clk); cpu_nmi_ack = 0;
    check("nmi cleared by ack", int'(cpu_nmi), 0);
    // banking: style 3, value[7:4] program bank, value[3:0] pattern bank
    cyc('h8005, 0, 0, r); check("prg bank 0 at $8000", r, prg[5]);
    cyc('hC005, 0, 0, r); check("last bank at $C000", r, prg[3*16384 + 5]);
    cyc('hA000, 1, 'h21, r);
    check("chr bank", chr_bank, 1);
    cyc('h8005, 0, 0, r); check("prg bank 2 at $8000", r, prg[2*16384 + 5]);
    cyc('hC005, 0, 0, r); check("last bank still at $C000", r, prg[3*16384 + 5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
