// apu_envelope: envelope generator shared by the square and noise channels.
//
// A divider with period vol+1 clocked by the quarter-frame tick counts a
// 4-bit decay level down from 15 to 0 (and around again when loop is set).
// A write to the channel's length register sets the start flag, which
// reloads the level to 15 on the next quarter frame. The output is the
// constant volume when const_vol is set, otherwise the decay level.
module apu_envelope (
  input  logic       clk,
  input  logic       rst,
  input  logic       qframe,     // quarter-frame tick (240 Hz)
  input  logic       start,      // restart request (length register write)
  input  logic       loop_flag,
  input  logic       const_vol,
  input  logic [3:0] vol,        // constant volume / divider period
  output logic [3:0] level
);
  logic       start_f;
  logic [3:0] div, decay;

  always_ff @(posedge clk) begin
    if (rst) begin
      start_f <= 1'b0; div <= '0; decay <= '0;
    end else begin
      if (start) start_f <= 1'b1;
      if (qframe) begin
        if (start_f && !start) begin
          start_f <= 1'b0; decay <= 4'd15; div <= vol;
        end else if (div == 0) begin
          div <= vol;
          if (decay != 0) decay <= decay - 4'd1;
          else if (loop_flag) decay <= 4'd15;
        end else begin
          div <= div - 4'd1;
        end
      end
    end
  end

  assign level = const_vol ? vol : decay;
endmodule
