// apu_tb: exercises the APU through its registers as the CPU would:
// channel enables and the $4015 length status, a square tone reaching the
// mixed sample with the value of the mixing formula, the frame IRQ and its
// clearing by a $4015 read, a DMC sample fetch from a random start
// address ($C000 + 64*A) through the DMA port and
// the DMC IRQ.
module apu_tb;
  logic clk = 0, rst = 1, ce = 1, wr = 0, rd = 0, dma_ack = 0;
  logic [4:0] addr = 0;
  logic [7:0] wdata = 0, rdata, dma_data = 8'hAA;
  logic irq, dma_req;
  logic [15:0] dma_addr;
  logic [17:0] sample;
  logic [3:0] sq1_out, sq2_out, tri_out, noise_out;
  logic [6:0] dmc_out;
  int checks = 0, failures = 0;
  apu #(.STEP_CYC(50)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask
  task automatic wreg(input int a, input int d);
    @(negedge clk); wr = 1; addr = 5'(a); wdata = 8'(d); @(negedge clk); wr = 0;
  endtask
  task automatic rstatus(output logic [7:0] v);
    @(negedge clk); addr = 5'h15; rd = 1; v = rdata; @(negedge clk); rd = 0;
  endtask
  initial begin
    logic [7:0] st;
    int mx, sa;
    repeat (2) @(negedge clk); rst = 0;
    wreg('h17, 8'h40);               // inhibit frame IRQ for now
    wreg('h15, 8'h0F);
    wreg('h00, 8'hBF); wreg('h02, 20); wreg('h03, 8'h08);   // square 1, vol 15
    rstatus(st); check("status sq1", st[3:0], 4'b0001);
    wreg('h0C, 8'h30); wreg('h0F, 8'h08);                  // noise vol 0 but length on
    rstatus(st); check("status noise", st[3:0], 4'b1001);
    mx = 0;
    repeat (800) begin @(negedge clk); if (sample > mx) mx = sample; end
    // the idle triangle holds level 15 (sequencer step 0), index 3*15
    check("square in sample (within 4 LSB)", int'(mx / 4), (int'(95.88 / (8128.0 / 15.0 + 100.0) * 262144.0 + 0.5)
                                + int'(163.67 / (24329.0 / 45.0 + 100.0) * 262144.0 + 0.5)) / 4);
    wreg('h15, 8'h00);
    rstatus(st); check("all off", st[4:0], 0);
    // frame IRQ
    wreg('h17, 8'h00);
    repeat (4 * 50 + 5) @(negedge clk);
    check("frame irq", irq, 1);
    rstatus(st); check("status irq bit", st[6], 1);
    check("irq cleared by read", irq, 0);
    // DMC
    sa = int'($urandom_range(0, 255));
    wreg('h10, 8'h8F); wreg('h12, sa); wreg('h13, 8'h00); wreg('h15, 8'h10);
    @(negedge clk);
    check("dma request", dma_req, 1);
    check("dma address", dma_addr, 16'hC000 + 64 * sa);
    dma_ack = 1; @(negedge clk); dma_ack = 0;
    @(negedge clk);
    check("dmc irq", irq, 1);
    rstatus(st); check("dmc irq bit", st[7], 1);
    wreg('h15, 8'h00);
    check("dmc irq cleared", irq, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
