// controller_tb: a behavioural pad (a parallel-in shift register clocked by
// the latch and pulse pins, low = pressed) is driven with random button
// states. After a poll the CPU-side protocol (write 1, write 0, eight
// reads) must return the buttons A first, then 1s. The pulse count per
// poll and the poll period are checked too.
module controller_tb;
  localparam int LC = 3, PC = 2, POLL = 200;
  logic clk = 0, rst = 1, ce = 0;
  logic pad_latch, pad_pulse, pad_data;
  logic wr = 0, wdata0 = 0, rd = 0, rdata0;
  logic [7:0] buttons;
  int checks = 0, failures = 0;
  logic [7:0] pressed, pad_sr;
  int pulses = 0, latches = 0, last_latch = -1, cyc = 0;

  controller #(.LATCH_CYC(LC), .PULSE_CYC(PC), .POLL_CYC(POLL)) dut (.*);
  always #5 clk = ~clk;

  // pad model
  always @(posedge pad_latch) begin pad_sr = ~pressed; latches++; end
  always @(posedge pad_pulse) begin pad_sr = {1'b1, pad_sr[7:1]}; pulses++; end
  assign pad_data = pad_sr[0];

  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %h %h", w, got, exp); end
  endtask
  task automatic cpu(input logic w, input logic d, input logic r);
    @(negedge clk); wr = w; wdata0 = d; rd = r; ce = 1;
    @(negedge clk); wr = 0; rd = 0;
  endtask

  always @(posedge clk) if (ce && !rst) cyc++;
  always @(posedge pad_latch) begin
    if (last_latch >= 0) check("poll period", cyc - last_latch, POLL + LC + 14 * PC);
    last_latch = cyc;
  end

  initial begin
    pressed = 0; pad_sr = 8'hFF;
    repeat (2) @(negedge clk);
    rst = 0; ce = 1;
    for (int k = 0; k < 6; k++) begin
      pressed = 8'($urandom);
      pulses = 0;
      wait (pad_latch == 1);
      wait (pad_latch == 0);
      repeat (16 * PC + 2) @(negedge clk);
      check("pulses", pulses, 7);
      check("buttons", buttons, pressed);
      cpu(1, 1, 0); cpu(1, 0, 0);
      check("A before reads", rdata0, pressed[0]);
      for (int i = 0; i < 10; i++) begin
        cpu(0, 0, 1);
        check($sformatf("read %0d", i), rdata0, i < 7 ? pressed[i + 1] : 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
