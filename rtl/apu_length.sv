// apu_length: length counter shared by the square, triangle and noise
// channels. Loaded from the 32-entry length table when the channel's length
// register is written while the channel is enabled; counts down on each
// half-frame tick unless halted; forced to 0 when the channel is disabled.
// active is 1 while the count is non-zero (the channel may sound).
module apu_length
  import nes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       hframe,
  input  logic       enable,
  input  logic       halt,
  input  logic       load,
  input  logic [4:0] load_idx,
  output logic       active
);
  logic [7:0] cnt;
  always_ff @(posedge clk) begin
    if (rst || !enable) cnt <= '0;
    else if (load) cnt <= length_table(load_idx);
    else if (hframe && !halt && cnt != 0) cnt <= cnt - 8'd1;
  end
  assign active = (cnt != 0);
endmodule
