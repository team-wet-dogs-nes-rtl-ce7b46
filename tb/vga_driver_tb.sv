// vga_driver_tb: a frame-buffer model returns a colour index computed from
// the address (one clock latency). Over one whole frame the testbench
// checks the sync pulse widths and periods, the visible-area count, and
// that each visible pixel shows the palette colour of NES pixel
// ((column-64)/2, line/2), black in the border. The model also returns
// emphasis bits taken from the address, and channels that are not
// emphasised must appear at 3/4 brightness. The address-to-colour pattern
// is shifted by a random seed. The positions of the sync pulses (columns
// 656-751, lines 490-491) and of the frame_start pulse are checked too.
module vga_driver_tb;
  logic clk = 0, rst = 1;
  logic [15:0] fb_raddr;
  logic [8:0] fb_rdata;
  logic [7:0] vga_r, vga_g, vga_b;
  logic hsync_n, vsync_n, de, frame_start;
  int checks = 0, failures = 0;
  vga_driver dut (.*);
  always #2 clk = ~clk;
  int seed = 0;
  function automatic logic [5:0] idx(input int a); return 6'(((a ^ (a >> 8)) + seed) % 64); endfunction
  function automatic logic [2:0] emph(input int a); return 3'((a + seed) >> 5); endfunction
  always @(posedge clk) fb_rdata <= {emph(fb_raddr), idx(fb_raddr)};
  function automatic logic [7:0] dim(input logic [7:0] c, input bit on);
    return on ? c : 8'(int'(c) * 3 / 4 + ((int'(c) % 4) != 0 ? 1 : 0));
  endfunction

  localparam logic [23:0] SOME [4] = '{24'h7C7C7C, 24'h0000FC, 24'hF8F8F8, 24'h000000};
  int h = 0, v = 0, hs_w = 0, vs_lines = 0, de_cnt = 0, bad = 0, colour_checks = 0;
  int hs_first = -1, vs_first = -1, fs_cnt = 0, fs_at = -1, dimmed = 0;
  logic hs_q = 1;

  initial begin
    seed = int'($urandom_range(0, 4095));
    repeat (3) @(negedge clk);
    rst = 0;
    // outputs are one clock behind the counters
    for (v = 0; v < 525; v++) begin
      for (h = 0; h < 800; h++) begin
        @(posedge clk); #1;
        if (!hsync_n) hs_w++;
        if (!hsync_n && hs_first < 0) hs_first = h;
        if (!vsync_n && h == 0) vs_lines++;
        if (!vsync_n && vs_first < 0) vs_first = v;
        if (frame_start) begin fs_cnt++; fs_at = v * 800 + h; end
        if (de) de_cnt++;
        if (de && h < 640) begin
          logic [23:0] exp;
          if (h >= 64 && h < 576) begin
            int a;
            logic [2:0] e;
            a = (v / 2) * 256 + (h - 64) / 2;
            exp = dut.PAL[idx(a)];
            e = emph(a);
            if (e != 0 && e != 3'b111) dimmed++;
            if (e != 0) exp = {dim(exp[23:16], e[0]), dim(exp[15:8], e[1]), dim(exp[7:0], e[2])};
          end else exp = 0;
          colour_checks++;
          if ({vga_r, vga_g, vga_b} !== exp) bad++;
        end
      end
    end
    checks++; if (hs_w != 96 * 525) begin failures++; $display("FAIL hsync %0d", hs_w); end
    checks++; if (vs_lines != 2) begin failures++; $display("FAIL vsync %0d", vs_lines); end
    checks++; if (de_cnt != 640 * 480) begin failures++; $display("FAIL de %0d", de_cnt); end
    checks++; if (colour_checks != 640 * 480 || bad != 0) begin failures++; $display("FAIL colours %0d bad of %0d", bad, colour_checks); end
    checks++; if (hs_first != 656) begin failures++; $display("FAIL hsync start %0d", hs_first); end
    checks++; if (vs_first != 490) begin failures++; $display("FAIL vsync line %0d", vs_first); end
    checks++; if (fs_cnt != 1 || fs_at != 0) begin failures++; $display("FAIL frame_start %0d at %0d", fs_cnt, fs_at); end
    checks++; if (dimmed == 0) begin failures++; $display("FAIL no dimmed pixels tried"); end
    checks++; if (dut.PAL[1] !== SOME[1] || dut.PAL[32] !== SOME[2]) begin failures++; $display("FAIL palette"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
