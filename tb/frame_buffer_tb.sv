// frame_buffer_tb: writes a full 256x240 picture on one clock and reads it
// back on an unrelated second clock. The stored words are nine bits wide
// (colour plus emphasis) and follow a pattern shifted by a random seed.
module frame_buffer_tb;
  logic wclk = 0, rclk = 0, we = 0;
  logic [15:0] waddr = 0, raddr = 0;
  logic [8:0] wdata = 0, rdata;
  int seed;
  int checks = 0, failures = 0;
  frame_buffer dut (.*);
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  function automatic logic [8:0] pat(input int i); return 9'((i % 256) + 3 * (i / 256) + seed); endfunction
  initial begin
    seed = int'($urandom_range(0, 511));
    for (int i = 0; i < 256 * 240; i++) begin
      @(negedge wclk); we = 1; waddr = 16'(i); wdata = pat(i);
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 256 * 240; i += 7) begin
      @(negedge rclk); raddr = 16'(i);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== pat(i)) begin failures++; $display("FAIL %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
