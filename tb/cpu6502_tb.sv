// cpu6502_tb: self-checking test of the 6502 core.
//
// A 64 KB memory with combinational read sits on the bus. A hand-assembled
// program exercises immediate, zero-page, absolute,X, (indirect),Y with a
// page cross, JSR/RTS, a counted branch loop, shifts and rotates on memory
// and accumulator, PHA/PLA, JMP indirect and CLI. Results in memory are
// compared with values worked out by hand, and the number of cycles each
// instruction takes (cycles between opcode fetches, stalled cycles not
// counted) is compared with the 6502 cycle table. A random stall pattern is
// applied throughout. An IRQ pulse that comes while I=1 must be taken once
// after CLI, and an NMI must be taken and acknowledged.
module cpu6502_tb;
  logic clk = 0, rst = 1, stall = 0, nmi = 0, irq = 0;
  logic nmi_ack, we, sync;
  logic [15:0] addr, dbg_pc;
  logic [7:0] dout, din, dbg_a, dbg_x, dbg_y, dbg_s, dbg_p;
  logic [7:0] mem [0:65535];
  int checks = 0, failures = 0;
  int cyc = 0;

  cpu6502 dut (.clk, .rst, .ce(1'b1), .stall, .nmi, .nmi_ack, .irq, .addr, .dout,
               .we, .din, .sync, .dbg_pc, .dbg_a, .dbg_x, .dbg_y, .dbg_s, .dbg_p);

  assign din = mem[addr];
  always #5 clk = ~clk;
  always @(posedge clk) if (we && !stall) mem[addr] <= dout;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int pc_at = 16'h8000;
  task automatic put(input int b);
    mem[pc_at] = 8'(b);
    pc_at++;
  endtask

  // expected cycles of the instructions in program order
  int exp_cyc [$] = '{2,2,5,2,3,2,2,3,2,6,3,6,5,6,
                      2,2,3, 2,2,3, 2,2,2, 3,5,2,2,2,3,3,2,4,3,5,2,3,2,7};
  int fetch_cyc [$];
  int last_fetch = -1;
  int nmi_acks = 0;

  always @(posedge clk) begin
    if (!rst && !stall) begin
      cyc <= cyc + 1;
      if (sync) begin
        if (last_fetch >= 0) fetch_cyc.push_back(cyc - last_fetch);
        last_fetch <= cyc;
      end
    end
    if (nmi_ack && !rst) begin nmi <= 0; nmi_acks++; end
    if (!rst) stall <= ($urandom_range(0, 3) == 0);
  end

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    mem[16'hFFFC] = 8'h00; mem[16'hFFFD] = 8'h80;
    mem[16'hFFFA] = 8'h00; mem[16'hFFFB] = 8'h90;   // NMI -> $9000
    mem[16'hFFFE] = 8'h00; mem[16'hFFFF] = 8'h91;   // IRQ -> $9100
    mem[16'h0010] = 8'hFE; mem[16'h0011] = 8'h02;   // pointer $02FE
    mem[16'h0301] = 8'h77;
    mem[16'h0020] = 8'h00; mem[16'h0021] = 8'h85;   // JMP ($0020) -> $8500
    // main program
    put('hA2); put('h05);            // LDX #5
    put('hA9); put('h10);            // LDA #$10
    put('h9D); put('h00); put('h02); // STA $0200,X
    put('h69); put('hF5);            // ADC #$F5  -> A=05 C=1
    put('h85); put('h00);            // STA $00
    put('h38);                       // SEC
    put('hE9); put('h06);            // SBC #6 -> FF C=0
    put('h85); put('h01);            // STA $01
    put('hA0); put('h03);            // LDY #3
    put('hB1); put('h10);            // LDA ($10),Y -> [$0301]
    put('h85); put('h02);            // STA $02
    put('h20); put('h00); put('h81); // JSR $8100
    put('hE8);                       // L: INX
    put('hE0); put('h08);            // CPX #8
    put('hD0); put('hFB);            // BNE L
    put('h86); put('h03);            // STX $03
    put('h06); put('h03);            // ASL $03
    put('hA9); put('h81);            // LDA #$81
    put('h4A);                       // LSR A -> 40 C=1
    put('h6A);                       // ROR A -> A0
    put('h85); put('h04);            // STA $04
    put('h48);                       // PHA
    put('hA9); put('h00);            // LDA #0
    put('h68);                       // PLA
    put('h85); put('h05);            // STA $05
    put('h6C); put('h20); put('h00); // JMP ($0020)
    pc_at = 'h8100;
    put('hE6); put('h02);            // INC $02
    put('h60);                       // RTS
    pc_at = 'h8500;
    put('hA9); put('h42);            // LDA #$42
    put('h85); put('h06);            // STA $06
    put('h58);                       // CLI
    put('h4C); put('h05); put('h85); // J: JMP J
    pc_at = 'h9000;
    put('hE6); put('h07);            // NMI: INC $07
    put('h40);                       // RTI
    pc_at = 'h9100;
    put('hE6); put('h09);            // IRQ: INC $09
    put('h40);                       // RTI

    repeat (3) @(posedge clk);
    rst = 0;
    // IRQ pulse while masked (I=1 after reset)
    repeat (20) @(posedge clk);
    irq = 1;
    repeat (2) @(posedge clk);
    irq = 0;
    // wait for the idle loop
    wait (dbg_pc >= 16'h8505 && dbg_pc <= 16'h8508);
    repeat (60) @(posedge clk);
    check("mem205", mem[16'h0205], 8'h10);
    check("adc", mem[16'h0000], 8'h05);
    check("sbc", mem[16'h0001], 8'hFF);
    check("indy+inc", mem[16'h0002], 8'h78);
    check("asl", mem[16'h0003], 8'h10);
    check("ror", mem[16'h0004], 8'hA0);
    check("pla", mem[16'h0005], 8'hA0);
    check("jmpind", mem[16'h0006], 8'h42);
    check("pending irq taken once", mem[16'h0009], 1);
    check("stack back", dbg_s, 8'hFD);
    for (int i = 0; i < exp_cyc.size(); i++)
      check($sformatf("cycles of instruction %0d", i), fetch_cyc[i], exp_cyc[i]);
    // NMI
    nmi = 1;
    repeat (80) @(posedge clk);
    check("nmi handler", mem[16'h0007], 1);
    check("nmi acked", nmi_acks, 1);
    check("irq not retaken", mem[16'h0009], 1);
    // level IRQ with I=0: taken, handler drops it by its RTI
    irq = 1;
    wait (dbg_pc == 16'h9100);
    irq = 0;
    repeat (80) @(posedge clk);
    check("irq unmasked", mem[16'h0009], 2);
    check("back in loop", int'(dbg_pc >= 16'h8505 && dbg_pc <= 16'h8508), 1);
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
