// bram_ram_tb: writes a random pattern into the RAM, reads it back in a
// shuffled order, and checks read-first behaviour during a write.
module bram_ram_tb;
  localparam int AW = 11;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = 0;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;
  bram_ram #(.AW(AW), .DW(8)) dut (.*);
  always #5 clk = ~clk;
  logic [7:0] ref_mem [2**AW];
  int stride, start;
  function automatic logic [7:0] pat(input int i); return ref_mem[i]; endfunction
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %h %h", w, got, exp); end
  endtask
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 8'($urandom);
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); we = 1; addr = AW'(i); din = pat(i);
    end
    @(negedge clk); we = 0;
    stride = int'($urandom_range(0, 2**(AW-2))) * 2 + 1;   // odd: visits every address
    start  = int'($urandom_range(0, 2**AW - 1));
    for (int n = 0; n < 2**AW; n++) begin
      int i = (start + n * stride) % 2**AW;
      @(negedge clk); addr = AW'(i);
      @(posedge clk); #1; check("read", dout, pat(i));
    end
    @(negedge clk); addr = 5; we = 1; din = 8'hA5;
    @(posedge clk); #1; check("read-first", dout, pat(5));
    @(negedge clk); we = 0;
    @(posedge clk); #1; check("new value", dout, 8'hA5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
