// apu_square_tb: drives the square channel register by register and
// measures its output, with a random timer period and volume: waveform
// period 16*(T+1) CPU cycles for timer T,
// high time per duty (1/8, 2/8, 4/8, 6/8), the constant volume, envelope
// decay 15,14,... per quarter frame, length counter expiry after the
// table's count of half frames, halt, muting below period 8, and the sweep
// raising the period by period>>shift.
module apu_square_tb;
  logic clk = 0, rst = 1, ce = 1, qframe = 0, hframe = 0, enable = 1, wr = 0;
  logic [1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic active;
  logic [3:0] out;
  int checks = 0, failures = 0;
  apu_square #(.ONES_COMP(1'b1)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", w, got, exp); end
  endtask
  task automatic wreg(input int a, input int d);
    @(negedge clk); wr = 1; waddr = 2'(a); wdata = 8'(d); @(negedge clk); wr = 0;
  endtask
  task automatic tick(input bit h);
    @(negedge clk); qframe = 1; hframe = h; @(negedge clk); qframe = 0; hframe = 0;
  endtask
  // measure over n cycles: cycles with out != 0, max level, rising edges spacing
  int hi, mx, per;
  int tp, t1, vol;   // timer period, tp+1, constant volume
  task automatic measure(input int n);
    int last_rise; logic prev;
    hi = 0; mx = 0; per = -1; last_rise = -1; prev = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (out != 0) hi++;
      if (out > mx) mx = out;
      if (out != 0 && !prev) begin
        if (last_rise >= 0) per = i - last_rise;
        last_rise = i;
      end
      prev = (out != 0);
    end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    tp = int'($urandom_range(8, 40)); t1 = tp + 1;
    vol = int'($urandom_range(1, 15));
    // duty 2 (50%), halt, constant volume, length index 1
    wreg(0, 8'hB0 | vol); wreg(1, 0); wreg(2, tp); wreg(3, 8'b00001_000);
    measure(16 * t1 * 3);
    check("period", per, 16 * t1);
    check("50% high", hi, 3 * 8 * t1);
    check("volume", mx, vol);
    wreg(0, 8'h30 | vol); measure(16 * t1 * 2); check("12.5% high", hi, 2 * 2 * t1);
    wreg(0, 8'h70 | vol); measure(16 * t1 * 2); check("25% high", hi, 2 * 4 * t1);
    wreg(0, 8'hF0 | vol); measure(16 * t1 * 2); check("75% high", hi, 2 * 12 * t1);
    // envelope: decay mode, divider period 0 -> one step per quarter frame
    wreg(0, 8'b10_1_0_0000); wreg(3, 8'b00001_000);
    tick(0);
    measure(16 * t1); check("env 15", mx, 15);
    tick(0); tick(0); tick(0);
    measure(16 * t1); check("env 12", mx, 12);
    // length: index 3 -> 2 half frames, not halted
    wreg(0, 8'b10_0_1_0101); wreg(3, 8'b00011_000);
    check("active", active, 1);
    tick(1);
    check("still active", active, 1);
    tick(1);
    check("length expired", active, 0);
    measure(16 * t1); check("silent", hi, 0);
    // halt keeps it
    wreg(0, 8'b10_1_1_0101); wreg(3, 8'b00011_000);
    tick(1); tick(1); tick(1);
    check("halted", active, 1);
    // mute under period 8
    wreg(2, 5); measure(16 * 6 * 2); check("muted", hi, 0);
    // sweep: period 100, shift 1, divider period 0 -> period 150
    wreg(2, 100); wreg(1, 8'b1_000_0_001);
    tick(1);
    measure(16 * 151 * 3); check("sweep period", per, 16 * 151);
    // disable clears length
    enable = 0; @(negedge clk); check("disabled", active, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
