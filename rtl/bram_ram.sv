// bram_ram: single-port block RAM used for the CPU work RAM and for the
// picture unit's name-table RAM (2 KB each by default).
//
// One clock per access: a write stores din at addr on the clock edge with
// we=1; dout shows mem[addr] one clock after addr is applied (read-first:
// during a write it shows the old contents).
module bram_ram #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
