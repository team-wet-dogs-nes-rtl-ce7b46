// apu_dmc_tb: plays a 17-byte sample from $C040 at the fastest rate. The
// testbench answers each DMA request after a random 1-5 cycles with a byte
// computed from the address and a random salt, starts from a random
// direct-load value, checks the addresses and the number of
// fetches, follows the output counter with its own model of the delta
// steps (+2 / -2, clamped to 0..127, starting from the direct-load value),
// and checks the end-of-sample IRQ and its clearing, then loop mode.
module apu_dmc_tb;
  logic clk = 0, rst = 1, ce = 1, wr = 0, enable_wr = 0, enable = 0, irq_clr = 0;
  logic [1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic dma_req, dma_ack = 0, active, irq;
  logic [15:0] dma_addr;
  logic [7:0] dma_data = 0;
  logic [6:0] out;
  int checks = 0, failures = 0;
  apu_dmc dut (.*);
  always #5 clk = ~clk;
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic wreg(input int a, input int d);
    @(negedge clk); wr = 1; waddr = 2'(a); wdata = 8'(d); @(negedge clk); wr = 0;
  endtask
  int salt = 0, dl = 64;
  function automatic logic [7:0] byte_at(input logic [15:0] a); return 8'(a * 29 + salt); endfunction

  int fetches = 0, bad_addr = 0;
  logic [15:0] next_addr = 16'hC040;
  // DMA server: random latency
  always begin
    @(negedge clk);
    if (dma_req && !dma_ack) begin
      repeat ($urandom_range(1, 5)) @(negedge clk);
      if (dma_addr != next_addr) bad_addr++;
      next_addr = dma_addr + 1;
      dma_data = byte_at(dma_addr); dma_ack = 1;
      fetches++;
      @(negedge clk); dma_ack = 0;
    end
  end

  initial begin
    int lvl;
    salt = int'($urandom_range(0, 255)); dl = int'($urandom_range(0, 127));
    repeat (2) @(negedge clk); rst = 0;
    wreg(0, 8'h8F);          // IRQ on, no loop, rate 15 (54 cycles)
    wreg(1, dl);             // direct load
    wreg(2, 1);              // $C040
    wreg(3, 1);              // 17 bytes
    @(negedge clk); enable_wr = 1; enable = 1; @(negedge clk); enable_wr = 0;
    check("active", active, 1);
    wait (irq == 1);
    check("fetches", fetches, 17);
    check("addresses", bad_addr, 0);
    check("done", active, 0);
    // wait until every bit has been played, then compare with the model
    repeat (54 * 8 * 3) @(negedge clk);
    lvl = dl;
    for (int b = 0; b < 17; b++) begin
      logic [7:0] v; v = byte_at(16'(16'hC040 + b));
      for (int i = 0; i < 8; i++) begin
        if (v[i]) begin if (lvl <= 125) lvl += 2; end
        else begin if (lvl >= 2) lvl -= 2; end
      end
    end
    check("output level", out, lvl);
    @(negedge clk); irq_clr = 1; @(negedge clk); irq_clr = 0;
    check("irq cleared", irq, 0);
    // loop mode restarts at the start address
    fetches = 0; next_addr = 16'hC040;
    wreg(0, 8'h4F);
    @(negedge clk); enable_wr = 1; enable = 1; @(negedge clk); enable_wr = 0;
    repeat (54 * 8 * 40) @(negedge clk);
    check("loop keeps fetching", int'(fetches > 17), 1);
    check("loop no irq", irq, 0);
    check("loop active", active, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
