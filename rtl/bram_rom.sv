// bram_rom: block-RAM ROM that holds cartridge contents (CPU program or
// pattern tables) in place of a cartridge.
//
// Synchronous read: dout shows mem[addr] one clock after addr is applied.
// The console has no cartridge reader, so the game image is written into
// the array through the load port (load_we/load_addr/load_data), which on
// an FPGA stands for the initial contents of the block RAM. The console
// itself never writes it. Sizes are parameters; the defaults are this
// design's choice (32 KB program, 8 KB patterns are set where it is used).
module bram_rom #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] dout,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
    dout <= mem[addr];
  end
endmodule
