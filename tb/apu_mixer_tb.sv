// apu_mixer_tb: compares the mixer with the mixing formulas evaluated in
// floating point for random channel levels and for the extremes:
// 95.88/(8128/(sq1+sq2)+100) + 163.67/(24329/(3t+2n+d)+100), times 2^18.
// It also checks that the result stays within 4% of the exact three-input
// triangle/noise/DMC formula.
module apu_mixer_tb;
  logic clk = 0;
  logic [3:0] sq1 = 0, sq2 = 0, tri_in = 0, noise = 0;
  logic [6:0] dmc = 0;
  logic [17:0] sample;
  int checks = 0, failures = 0;
  apu_mixer dut (.*);
  always #5 clk = ~clk;
  function automatic real model(input int a, input int b, input int t, input int n, input int d);
    real s, x;
    s = (a + b == 0) ? 0.0 : 95.88 / (8128.0 / (a + b) + 100.0);
    x = (3 * t + 2 * n + d == 0) ? 0.0 : 163.67 / (24329.0 / (3 * t + 2 * n + d) + 100.0);
    return (s + x) * 262144.0;
  endfunction
  function automatic real exact(input int a, input int b, input int t, input int n, input int d);
    real s, x;
    s = (a + b == 0) ? 0.0 : 95.88 / (8128.0 / (a + b) + 100.0);
    x = (t + n + d == 0) ? 0.0 : 159.79 / (1.0 / (t / 8227.0 + n / 12241.0 + d / 22638.0) + 100.0);
    return (s + x) * 262144.0;
  endfunction
  initial begin
    for (int i = 0; i < 400; i++) begin
      real m, e;
      @(negedge clk);
      if (i == 0) begin sq1 = 0; sq2 = 0; tri_in = 0; noise = 0; dmc = 0; end
      else if (i == 1) begin sq1 = 15; sq2 = 15; tri_in = 0; noise = 0; dmc = 0; end
      else if (i == 2) begin sq1 = 0; sq2 = 0; tri_in = 15; noise = 15; dmc = 127; end
      else begin
        sq1 = 4'($urandom); sq2 = 4'($urandom); tri_in = 4'($urandom); noise = 4'($urandom);
        dmc = 7'($urandom);
      end
      @(negedge clk);
      m = model(sq1, sq2, tri_in, noise, dmc);
      if (m > 262143.0) m = 262143.0;
      checks++;
      if (sample > m + 1.5 || sample < m - 1.5) begin
        failures++; $display("FAIL %0d %0d %0d %0d %0d: %0d vs %f", sq1, sq2, tri_in, noise, dmc, sample, m);
      end
      e = exact(sq1, sq2, tri_in, noise, dmc);
      checks++;
      if (sample > e * 1.04 + 500 || sample < e * 0.96 - 500) begin
        failures++; $display("FAIL exact %0d vs %f", sample, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
