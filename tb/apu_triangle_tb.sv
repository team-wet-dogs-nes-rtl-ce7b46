// apu_triangle_tb: with a random timer period P (2..8) the sequencer must
// step every P+1 CPU cycles through 15..0,0..15; the linear counter (reload 2, control 0) must
// stop the sequencer after its count of quarter frames, and the length
// counter must gate it too.
module apu_triangle_tb;
  logic clk = 0, rst = 1, ce = 1, qframe = 0, hframe = 0, enable = 1, wr = 0;
  logic [1:0] waddr = 0;
  logic [7:0] wdata = 0;
  logic active;
  logic [3:0] out;
  int checks = 0, failures = 0;
  apu_triangle dut (.*);
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
  int seen [$];
  int per;
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    wreg(0, 8'hFF);            // control, linear 127
    per = int'($urandom_range(2, 8));
    wreg(2, per); wreg(3, 8'b00001_000);
    tick(0);                   // load linear counter
    // collect output values at each change
    begin
      logic [3:0] prev; int changes, t0, t1;
      prev = out; changes = 0; t0 = -1; t1 = -1;
      for (int i = 0; i < (per + 1) * 70; i++) begin
        @(negedge clk);
        if (out != prev) begin
          seen.push_back(out);
          if (t0 < 0) t0 = i; else if (t1 < 0) t1 = i;
        end
        prev = out;
      end
      check("step time", t1 - t0, per + 1);
    end
    // the sequence without repeats: 15..0 then 1..15 (0 is held for 2 steps)
    begin
      int start; int ok; ok = 1;
      start = -1;
      for (int i = 0; i < seen.size(); i++) if (seen[i] == 15) begin start = i; break; end
      for (int k = 0; k < 31; k++) begin
        int exp;
        exp = (k < 16) ? 15 - k : k - 15;
        if (start < 0 || start + k >= seen.size() || seen[start + k] != exp) ok = 0;
      end
      check("sequence", ok, 1);
    end
    // linear counter gate
    wreg(0, 8'h02); wreg(3, 8'b00001_000);
    tick(0); tick(0); tick(0);   // reload 2, then 1, 0
    begin
      logic [3:0] v; v = out;
      repeat (50) @(negedge clk);
      check("linear gate holds", out, v);
    end
    // length gate: control 1 keeps linear, disable channel
    wreg(0, 8'hFF); wreg(3, 8'b00001_000); tick(0);
    enable = 0; @(negedge clk);
    check("inactive", active, 0);
    begin
      logic [3:0] v; v = out;
      repeat (50) @(negedge clk);
      check("length gate holds", out, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
