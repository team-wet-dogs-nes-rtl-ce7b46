// bram_rom_tb: loads a ROM through its load port with a random pattern,
// then reads every address back in a shuffled order and checks the
// one-clock read latency.
module bram_rom_tb;
  localparam int AW = 10;
  logic clk = 0, load_we = 0;
  logic [AW-1:0] addr = 0, load_addr = 0;
  logic [7:0] dout, load_data = 0;
  int checks = 0, failures = 0;
  bram_rom #(.AW(AW), .DW(8)) dut (.*);
  always #5 clk = ~clk;
  logic [7:0] ref_mem [2**AW];
  int stride, start;
  function automatic logic [7:0] pat(input int i); return ref_mem[i]; endfunction
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 8'($urandom);
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); load_we = 1; load_addr = AW'(i); load_data = pat(i);
    end
    @(negedge clk); load_we = 0;
    stride = int'($urandom_range(0, 2**(AW-2))) * 2 + 1;   // odd: visits every address
    start  = int'($urandom_range(0, 2**AW - 1));
    for (int n = 0; n < 2**AW; n++) begin
      int i = (start + n * stride) % 2**AW;
      @(negedge clk); addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (dout !== pat(i)) begin failures++; $display("FAIL %0d: %h", i, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
