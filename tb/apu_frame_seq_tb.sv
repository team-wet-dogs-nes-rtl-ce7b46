// apu_frame_seq_tb: with a 10-cycle step, checks the cycle of every
// quarter/half tick and the IRQ in 4-step mode, the immediate tick and the
// absence of IRQ in 5-step mode (entered at a random point of the
// sequence), IRQ inhibit and IRQ clear.
module apu_frame_seq_tb;
  localparam int S = 10;
  logic clk = 0, rst = 1, ce = 0, wr = 0, irq_clr = 0;
  logic [7:0] wdata = 0;
  logic qframe, hframe, irq;
  int checks = 0, failures = 0;
  int cyc = 0;
  int qlog [$], hlog [$];
  apu_frame_seq #(.STEP_CYC(S)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (!rst) cyc++;
    if (qframe && !rst) qlog.push_back(cyc);
    if (hframe && !rst) hlog.push_back(cyc);
  end
  task automatic check(input string w, input int got, input int exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s %0d %0d", w, got, exp); end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst = 0; ce = 1;
    repeat (4 * S + 3) @(negedge clk);
    // ticks are registered: visible the clock after the S-th cycle
    check("q count", qlog.size(), 4);
    for (int i = 0; i < 4 && i < qlog.size(); i++) check("q time", qlog[i], (i + 1) * S + 1);
    check("h count", hlog.size(), 2);
    if (hlog.size() == 2) begin check("h1", hlog[0], 2 * S + 1); check("h2", hlog[1], 4 * S + 1); end
    check("irq 4-step", irq, 1);
    irq_clr = 1; @(negedge clk); irq_clr = 0;
    check("irq cleared", irq, 0);
    // 5-step mode
    repeat ($urandom_range(0, S - 1)) @(negedge clk);
    qlog.delete(); hlog.delete();
    wr = 1; wdata = 8'h80; @(negedge clk); wr = 0;
    @(negedge clk);
    check("immediate q", qlog.size(), 1);
    check("immediate h", hlog.size(), 1);
    repeat (5 * S) @(negedge clk);
    check("5-step q", qlog.size(), 1 + 4);
    check("5-step h", hlog.size(), 1 + 2);
    check("no irq 5-step", irq, 0);
    // 4-step with inhibit
    wr = 1; wdata = 8'h40; @(negedge clk); wr = 0;
    repeat (4 * S + 2) @(negedge clk);
    check("inhibited", irq, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
