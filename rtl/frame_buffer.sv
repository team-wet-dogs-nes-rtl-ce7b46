// frame_buffer: the picture memory between the picture unit and the VGA
// driver, one word per NES pixel (256 x 240): the 6-bit system-palette
// index and the three $2001 colour-emphasis bits above it.
//
// Two clocks: the picture unit writes on wclk (waddr = y*256 + x), the VGA
// driver reads on rclk with one clock of latency. The index stays an index
// here; the VGA driver turns it into RGB.
module frame_buffer #(
  parameter int unsigned W  = 256,
  parameter int unsigned H  = 240,
  parameter int unsigned DW = 9,
  localparam int unsigned AW = $clog2(W * H)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [W * H];

  always_ff @(posedge wclk) if (we) mem[waddr] <= wdata;
  always_ff @(posedge rclk) rdata <= mem[raddr];
endmodule
