// vga_driver: shows the 256x240 NES picture on a 640x480, 60 Hz VGA monitor.
//
// Runs on the 25 MHz pixel clock. Counters sweep 800 x 525 positions
// (640 visible + 16 front porch + 96 sync + 48 back porch horizontally,
// 480 + 10 + 2 + 33 lines vertically; both syncs active low). Each NES pixel
// is shown as a 2x2 block, so the picture is 512x480, centred with a
// 64-pixel black border left and right. The frame-buffer address is
// (line/2)*256 + (column-64)/2; the buffer answers one clock later, so the
// sync and blank outputs are delayed one clock to line up with the colour.
// Each frame-buffer entry is {emphasis[2:0], colour[5:0]}. The 6-bit colour
// index is turned into 8-bit R, G, B by the 64-entry system palette (52
// distinct colours, the remaining entries black). The three emphasis bits
// ($2001 bits 5, 6, 7: red, green, blue) darken the channels that are not
// emphasised to 3/4 whenever any of them is set.
//
// The document says only that this unit writes pixels to the VGA pins and
// picks the frame-buffer entries that give the NES resolution; the timing,
// the 2x scaling, the palette values and the 3/4 emphasis factor are this
// design's choice.
module vga_driver #(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33,
  parameter int unsigned X_OFF = 64
) (
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] fb_raddr,
  input  logic [8:0]  fb_rdata,   // {emphasis B G R, colour}
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        de,          // visible area
  output logic        frame_start  // one clock at the first pixel of a frame
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  // System palette, 0xRRGGBB.
  localparam logic [23:0] PAL [64] = '{
    24'h7C7C7C, 24'h0000FC, 24'h0000BC, 24'h4428BC, 24'h940084, 24'hA80020, 24'hA81000, 24'h881400,
    24'h503000, 24'h007800, 24'h006800, 24'h005800, 24'h004058, 24'h000000, 24'h000000, 24'h000000,
    24'hBCBCBC, 24'h0078F8, 24'h0058F8, 24'h6844FC, 24'hD800CC, 24'hE40058, 24'hF83800, 24'hE45C10,
    24'hAC7C00, 24'h00B800, 24'h00A800, 24'h00A844, 24'h008888, 24'h000000, 24'h000000, 24'h000000,
    24'hF8F8F8, 24'h3CBCFC, 24'h6888FC, 24'h9878F8, 24'hF878F8, 24'hF85898, 24'hF87858, 24'hFCA044,
    24'hF8B800, 24'hB8F818, 24'h58D854, 24'h58F898, 24'h00E8D8, 24'h787878, 24'h000000, 24'h000000,
    24'hFCFCFC, 24'hA4E4FC, 24'hB8B8F8, 24'hD8B8F8, 24'hF8B8F8, 24'hF8A4C0, 24'hF0D0B0, 24'hFCE0A8,
    24'hF8D878, 24'hD8F878, 24'hB8F8B8, 24'hB8F8D8, 24'h00FCFC, 24'hF8D8F8, 24'h000000, 24'h000000
  };

  logic [$clog2(H_TOT)-1:0] hc;
  logic [$clog2(V_TOT)-1:0] vc;
  logic vis, pic, hs, vs;
  logic vis_q, pic_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0; vc <= '0;
    end else if (32'(hc) == H_TOT - 1) begin
      hc <= '0;
      vc <= (32'(vc) == V_TOT - 1) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  always_comb begin
    logic [9:0] px;
    vis = (32'(hc) < H_VIS) && (32'(vc) < V_VIS);
    pic = vis && (32'(hc) >= X_OFF) && (32'(hc) < X_OFF + 512);
    hs  = (32'(hc) >= H_VIS + H_FP) && (32'(hc) < H_VIS + H_FP + H_SYNC);
    vs  = (32'(vc) >= V_VIS + V_FP) && (32'(vc) < V_VIS + V_FP + V_SYNC);
    px  = 10'(hc) - 10'(X_OFF);
    fb_raddr = {8'(vc >> 1), px[8:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vis_q <= 1'b0; pic_q <= 1'b0; hsync_n <= 1'b1; vsync_n <= 1'b1; frame_start <= 1'b0;
    end else begin
      vis_q <= vis;
      pic_q <= pic;
      hsync_n <= ~hs;
      vsync_n <= ~vs;
      frame_start <= (32'(hc) == 0) && (32'(vc) == 0);
    end
  end

  always_comb begin
    logic [23:0] rgb;
    logic [2:0]  em;
    rgb = pic_q ? PAL[fb_rdata[5:0]] : 24'h000000;
    em  = fb_rdata[8:6];
    vga_r = rgb[23:16];
    vga_g = rgb[15:8];
    vga_b = rgb[7:0];
    if (em != 3'b000) begin
      if (!em[0]) vga_r = vga_r - (vga_r >> 2);
      if (!em[1]) vga_g = vga_g - (vga_g >> 2);
      if (!em[2]) vga_b = vga_b - (vga_b >> 2);
    end
    de = vis_q;
  end
endmodule
