// ac97_if_tb: a codec model supplies bit_clk, reports ready in its tag
// slot, samples sdata_out on the falling edge and cuts frames at the
// rising edge of sync. Checks: reset pulse length, sync 16 bits wide,
// 256 bits per frame, the tag bits, the five register writes in order
// (register index and data), and the PCM slots carrying a random sample with
// its MSB inverted.
module ac97_if_tb;
  logic clk = 0, rst = 1, bit_clk = 0, sdata_in = 0;
  logic [17:0] sample = 18'h2_1234;
  logic sdata_out, sync, audio_reset_b, codec_ready;
  logic [2:0] cmds_done;
  int checks = 0, failures = 0;
  ac97_if #(.RESET_CYC(8)) dut (.*);
  always #5 clk = ~clk;
  always #41 bit_clk = ~bit_clk;
  task automatic check(input string w, input longint got, input longint exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s got %0h exp %0h", w, got, exp); end
  endtask
  // codec: ready bit in its tag slot
  logic codec_is_ready = 0;
  int sbit = 0;
  logic sync_q = 0;
  always @(posedge bit_clk) begin
    if (sync && !sync_q) sbit = 0; else sbit++;
    sync_q <= sync;
    sdata_in <= codec_is_ready && (sbit == 0 || sbit == 1);
  end
  // frame capture on falling edges
  logic [255:0] cur, frames [$];
  int nbits = 0, sync_w = 0, sync_widths [$], lens [$];
  logic sync_prev = 0;
  always @(negedge bit_clk) begin
    if (sync && !sync_prev) begin
      if (nbits > 0) begin frames.push_back(cur); lens.push_back(nbits); end
      nbits = 0; cur = '0;
      if (sync_w > 0) sync_widths.push_back(sync_w);
      sync_w = 0;
    end
    if (sync) sync_w++;
    cur = {cur[254:0], sdata_out};
    nbits++;
    sync_prev = sync;
  end
  int low_cyc = 0;
  initial begin
    logic [22:0] exp_cmd [5] = '{{7'h02, 16'h0000}, {7'h04, 16'h0000}, {7'h18, 16'h0808},
                                  {7'h2A, 16'h0001}, {7'h2C, 16'hBB80}};
    int k;
    sample = 18'($urandom);
    repeat (2) @(negedge clk); rst = 0;
    while (!audio_reset_b) begin @(negedge clk); low_cyc++; end
    check("reset low cycles", low_cyc, 9);
    wait (frames.size() == 5);
    codec_is_ready = 1;
    wait (frames.size() == 17);
    foreach (lens[i]) if (i >= 2) check("frame length", lens[i], 256);
    foreach (sync_widths[i]) if (i >= 2) check("sync width", sync_widths[i], 16);
    check("tag idle", frames[3][255:240], 16'h9800);
    k = 0;
    for (int f = 4; f < 17; f++) begin
      if (frames[f][254]) begin
        if (k < 5) begin
          check("cmd tag", frames[f][255:240], 16'hF800);
          check("cmd addr slot", frames[f][239:220], {1'b0, exp_cmd[k][22:16], 12'd0});
          check("cmd data slot", frames[f][219:200], {exp_cmd[k][15:0], 4'd0});
        end
        k++;
      end
      if (f >= 4) check("pcm left", frames[f][199:180], {~sample[17], sample[16:0], 2'b00});
      if (f >= 4) check("pcm right", frames[f][179:160], {~sample[17], sample[16:0], 2'b00});
      check("unused slots", frames[f][159:0] == 0, 1);
    end
    check("commands sent", k, 5);
    check("ready", codec_ready, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
