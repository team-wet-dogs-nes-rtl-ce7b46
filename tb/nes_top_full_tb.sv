// nes_top_full_tb: the console at its default sizes, end to end.
//
// Same game program, pad model, codec model and mechanism counters as the
// reduced end-to-end test, but the console is built with no parameter
// overrides: no cartridge banking (32 KB program ROM, 8 KB pattern ROM),
// the 240 Hz sound frame step (7457 CPU cycles) and a pad poll every 29830
// CPU cycles (60 per second). The program's write to $8000 must not change
// any bank, so the byte read back at $8000 is the first byte of the ROM.
// Six picture frames are run (about 0.1 s of console time).
module nes_top_full_tb;
  localparam int MAPPER = 0, PRG_BANKS = 2, CHR_BANKS = 1;
  localparam int PRG_SIZE = PRG_BANKS * 16384, CHR_SIZE = CHR_BANKS * 8192;
  localparam int FRAMES = 6;

  logic clk = 0, vga_clk = 0, bit_clk = 0, rst = 1;
  logic prg_load_we = 0, chr_load_we = 0;
  logic [$clog2(PRG_SIZE)-1:0] prg_load_addr = 0;
  logic [$clog2(CHR_SIZE)-1:0] chr_load_addr = 0;
  logic [7:0] prg_load_data = 0, chr_load_data = 0;
  logic [1:0] pad_latch, pad_pulse, pad_data;
  logic [7:0] vga_r, vga_g, vga_b;
  logic vga_hsync_n, vga_vsync_n;
  logic ac97_sdata_out, ac97_sync, ac97_reset_b;
  logic [15:0] cpu_pc;
  logic [7:0] pad1_buttons;
  logic [17:0] audio_sample;
  int checks = 0, failures = 0;

  nes_top dut (
    .clk, .rst, .vga_clk, .prg_load_we, .prg_load_addr, .prg_load_data,
    .chr_load_we, .chr_load_addr, .chr_load_data, .mirror_v(1'b1),
    .pad_latch, .pad_pulse, .pad_data, .vga_r, .vga_g, .vga_b, .vga_hsync_n,
    .vga_vsync_n, .ac97_bit_clk(bit_clk), .ac97_sdata_in(1'b1), .ac97_sdata_out,
    .ac97_sync, .ac97_reset_b, .cpu_pc, .pad1_buttons, .audio_sample);

  always #70 clk = ~clk;        // 7.16 MHz picture clock
  always #20 vga_clk = ~vga_clk;
  always #41 bit_clk = ~bit_clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ pad model --
  localparam logic [7:0] BUTTONS = 8'b1010_0110;   // bit 0 = A
  int pad_idx = 0;
  always @(posedge pad_latch[0]) pad_idx = 0;
  always @(posedge pad_pulse[0]) pad_idx = pad_idx + 1;
  assign pad_data[0] = (pad_idx < 8) ? !BUTTONS[pad_idx] : 1'b0;
  assign pad_data[1] = 1'b1;

  // --------------------------------------------------------- program ROM --
  logic [7:0] prg [PRG_SIZE];
  int pc_at;
  function automatic int idx(int a);   // CPU address in $C000-$FFFF -> ROM index
    return (PRG_BANKS - 1) * 16384 + (a - 'hC000);
  endfunction
  task automatic put(input int b);
    prg[idx(pc_at)] = 8'(b);
    pc_at++;
  endtask
  task automatic put_sta(input int v, input int a);   // LDA #v ; STA a
    put('hA9); put(v); put('h8D); put(a & 'hFF); put(a >> 8);
  endtask

  int nmi_addr, irq_addr, idle_addr, l;
  task automatic assemble();
    for (int i = 0; i < PRG_SIZE; i++) prg[i] = 8'($urandom);
    pc_at = 'hC000;
    put('h78); put('hA2); put('hFF); put('h9A);          // SEI; LDX #$FF; TXS
    put('hA9); put(0); put('h85); put('h30); put('h85); put('h31); // clear counters
    l = pc_at; put('hAD); put('h02); put('h20);          // W: LDA $2002
    put('h10); put(8'(l - (pc_at + 1)));                 //    BPL W
    put_sta('h3F, 'h2006); put_sta('h00, 'h2006);
    put('hA2); put('h00);                                 // LDX #0
    l = pc_at; put('h8A); put('h8D); put('h07); put('h20);// P: TXA; STA $2007
    put('hE8); put('hE0); put(32);                        //    INX; CPX #32
    put('hD0); put(8'(l - (pc_at + 1)));                 //    BNE P
    put('hA2); put('h00); put('hA9); put('hFF);           // LDX #0; LDA #$FF
    l = pc_at; put('h9D); put('h00); put('h02);           // S: STA $0200,X
    put('hE8); put('hD0); put(8'(l - (pc_at + 1)));      //    INX; BNE S
    put('hA2); put('h00); put('hA0); put('h00);           // LDX #0; LDY #0
    l = pc_at;                                            // S2: nine sprites
    put('hA9); put(40); put('h9D); put('h00); put('h02); put('hE8);    // Y=40
    put('hA9); put(0);  put('h9D); put('h00); put('h02); put('hE8);    // tile 0
    put('h9D); put('h00); put('h02); put('hE8);                        // attr 0
    put('h98); put('h9D); put('h00); put('h02); put('hE8);             // X=Y reg
    put('h18); put('h69); put(16); put('hA8);             // CLC; ADC #16; TAY
    put('hE0); put(36); put('hD0); put(8'(l - (pc_at + 1)));
    put_sta('h02, 'h4014);                                // sprite DMA
    put_sta('h21, 'h8000);                                // bank swap
    put('hAD); put('h00); put('h80); put('h85); put('h10);// LDA $8000; STA $10
    put_sta('h5A, 'h6010);                                // cartridge SRAM
    put('hAD); put('h10); put('h60); put('h85); put('h11);// LDA $6010; STA $11
    put_sta('hBF, 'h4000); put_sta('h40, 'h4002); put_sta('h08, 'h4003);
    put_sta('h0F, 'h4010); put_sta('h00, 'h4012); put_sta('h01, 'h4013);
    put_sta('h11, 'h4015);                                // square 1 + DMC on
    put_sta('h00, 'h4017);                                // 4-step, frame IRQ on
    put_sta('h80, 'h2000); put_sta('h1E, 'h2001);         // NMI, rendering on
    put('h58);                                            // CLI
    idle_addr = pc_at; put('h4C); put(idle_addr & 'hFF); put(idle_addr >> 8);
    nmi_addr = pc_at;
    put('hE6); put('h30);                                 // INC $30
    put_sta('h01, 'h4016); put_sta('h00, 'h4016);
    put('hA2); put('h00);
    l = pc_at; put('hAD); put('h16); put('h40); put('h29); put('h01);
    put('h95); put('h20); put('hE8); put('hE0); put(8);
    put('hD0); put(8'(l - (pc_at + 1)));
    put('hAD); put('h02); put('h20); put('h40);           // LDA $2002; RTI
    irq_addr = pc_at;
    put('hE6); put('h31); put('hAD); put('h15); put('h40); put('h40);
    prg[idx('hFFFA)] = 8'(nmi_addr);  prg[idx('hFFFB)] = 8'(nmi_addr >> 8);
    prg[idx('hFFFC)] = 8'h00;         prg[idx('hFFFD)] = 8'hC0;
    prg[idx('hFFFE)] = 8'(irq_addr);  prg[idx('hFFFF)] = 8'(irq_addr >> 8);
  endtask

  // ----------------------------------------------------------- counters --
  int n_stall, n_spr_dma, n_apu_dma, n_nmi, n_irq, n_swap, n_vblank, n_s0hit,
      n_ovf, n_poll, n_pad_rd, n_vga, n_ac97, n_audio;
  logic spr_q, apu_q, vbl_q, s0_q, ovf_q, bank_q, vs_q, sync_q, latch_q;
  logic [17:0] sample_q;
  logic [7:0] ram_shadow [2048];
  logic [5:0] fb [65536];
  always @(posedge clk) if (!rst) begin
    if (dut.cpu_stall && dut.ce) n_stall++;
    spr_q <= dut.spr_dma_busy; if (dut.spr_dma_busy && !spr_q) n_spr_dma++;
    apu_q <= dut.apu_dma_busy; if (dut.apu_dma_busy && !apu_q) n_apu_dma++;
    if (dut.cpu_nmi_ack) n_nmi++;
    if (dut.ce && !dut.cpu_stall && dut.cpu_sync && dut.cpu_addr == 16'(irq_addr)) n_irq++;
    bank_q <= dut.u_map.chr_bank[0]; if (dut.u_map.chr_bank[0] != bank_q) n_swap++;
    vbl_q <= dut.u_ppu.vblank; if (dut.u_ppu.vblank && !vbl_q) n_vblank++;
    s0_q <= dut.u_ppu.s0hit; if (dut.u_ppu.s0hit && !s0_q) n_s0hit++;
    ovf_q <= dut.u_ppu.overflow; if (dut.u_ppu.overflow && !ovf_q) n_ovf++;
    latch_q <= pad_latch[0]; if (pad_latch[0] && !latch_q) n_poll++;
    if (dut.pad_rd[0]) n_pad_rd++;
    sample_q <= audio_sample; if (audio_sample != sample_q) n_audio++;
    if (dut.ram_we) ram_shadow[dut.ram_addr] <= dut.ram_wdata;
    if (dut.fb_we) fb[dut.fb_waddr] <= dut.fb_wdata[5:0];
  end
  always @(posedge vga_clk) begin
    vs_q <= vga_vsync_n; if (!vga_vsync_n && vs_q && !rst) n_vga++;
  end
  always @(posedge bit_clk) begin
    sync_q <= ac97_sync; if (ac97_sync && !sync_q && !rst) n_ac97++;
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-24s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) ram_shadow[i] = 0;
    assemble();
    // load the cartridge while reset is held
    repeat (4) @(posedge clk);
    for (int i = 0; i < PRG_SIZE; i++) begin
      @(negedge clk);
      prg_load_we = 1; prg_load_addr = $bits(prg_load_addr)'(i); prg_load_data = prg[i];
    end
    for (int i = 0; i < CHR_SIZE; i++) begin
      @(negedge clk);
      prg_load_we = 0;
      chr_load_we = 1; chr_load_addr = $bits(chr_load_addr)'(i); chr_load_data = 8'hFF;
    end
    @(negedge clk);
    chr_load_we = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (FRAMES) @(posedge dut.ppu_frame_start);
    repeat (20000) @(posedge clk);
    $display("mechanism counts:");
    need("CPU stall cycles", n_stall);
    need("sprite DMA", n_spr_dma);
    need("sound DMA", n_apu_dma);
    need("NMI taken", n_nmi);
    need("IRQ taken", n_irq);
    check("no bank swap without a mapper", n_swap, 0);
    need("VBlank", n_vblank);
    need("sprite 0 hit", n_s0hit);
    need("sprite overflow", n_ovf);
    need("pad polls", n_poll);
    need("pad reads", n_pad_rd);
    need("VGA frames", n_vga);
    need("AC97 frames", n_ac97);
    need("sound output changes", n_audio);
    check("sprite DMA count", n_spr_dma, 1);
    check("stall cycles = 513 + 4 per sound DMA", n_stall, 513 + 4 * n_apu_dma);
    check("byte read at $8000 (no banking)", ram_shadow['h10], prg[0]);
    check("cartridge SRAM read back", ram_shadow['h11], 'h5A);
    for (int i = 0; i < 8; i++) check($sformatf("pad bit %0d", i), ram_shadow['h20 + i], BUTTONS[i]);
    check("NMI handler runs match NMIs", ram_shadow['h30], 8'(n_nmi));
    check("IRQ handler runs match IRQs", ram_shadow['h31], 8'(n_irq));
    check("pad buttons register", pad1_buttons, BUTTONS);
    check("sprite 0 pixel (palette entry 19)", fb[44 * 256 + 3], 19);
    check("sprite 7 pixel", fb[44 * 256 + 7 * 16 + 3], 19);
    check("ninth sprite on the line not drawn", int'(fb[44 * 256 + 8 * 16 + 3] != 19), 1);
    check("background pixel uses colour 3 of a palette", fb[100 * 256 + 100] & 3, 3);
    check("codec commands sent", dut.u_ac97.cmds_done, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000 + FRAMES * 100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
