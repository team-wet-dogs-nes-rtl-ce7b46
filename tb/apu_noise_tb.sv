// apu_noise_tb: compares the noise output cycle by cycle with an
// independent model of the 15-bit generator (period index 0 = 4 CPU
// cycles, long and short mode) at a random constant volume, and checks the length
// counter silencing the channel.
module apu_noise_tb;
  logic clk = 0, rst = 1, ce = 1, qframe = 0, hframe = 0, enable = 1, wr = 0;
  logic [1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic active;
  logic [3:0] out;
  int checks = 0, failures = 0, bad = 0;
  apu_noise dut (.*);
  always #5 clk = ~clk;
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic wreg(input int a, input int d);
    @(negedge clk); wr = 1; waddr = 2'(a); wdata = 8'(d); @(negedge clk); wr = 0;
  endtask
  logic [14:0] m;
  logic [3:0] vol;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    vol = 4'($urandom_range(1, 15));
    wreg(0, {4'b0011, vol}); wreg(2, 8'h00); wreg(3, 8'b00001_000);
    // find the phase: the model starts at the next generator step
    m = 15'd1;
    for (int mode = 0; mode < 2; mode++) begin
      logic [3:0] prev; int t;
      if (mode == 1) wreg(2, 8'h80);
      // wait for a change of the generator's output to lock the phase
      wait (dut.timer == 0);
      @(posedge clk);
      @(negedge clk);
      m = dut.lfsr;
      bad = 0;
      for (int s = 0; s < 2000; s++) begin
        for (int c = 0; c < 4; c++) begin
          if (out != ((m[0] == 0) ? vol : 4'd0)) bad++;
          @(negedge clk);
        end
        m = {m[0] ^ (mode ? m[6] : m[1]), m[14:1]};
      end
      check($sformatf("sequence mode %0d", mode), bad, 0);
    end
    // short mode repeats every 93 steps
    begin
      logic [14:0] a; a = m;
      for (int s = 0; s < 93; s++) a = {a[0] ^ a[6], a[14:1]};
      check("short period model", a == m, 1);
    end
    enable = 0; @(negedge clk);
    repeat (8) begin check("silent", out, 0); @(negedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
