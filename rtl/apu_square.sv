// apu_square: one square-wave channel of the APU.
//
// Four registers (waddr 0..3, as $4000-$4003 or $4004-$4007):
//   0  DDLC VVVV  duty, length halt / envelope loop, constant volume, volume
//   1  EPPP NSSS  sweep enable, period, negate, shift
//   2  TTTT TTTT  timer low bits
//   3  LLLL LTTT  length index, timer high bits (restarts envelope and phase)
// An 11-bit timer, clocked every second CPU cycle, steps an 8-step duty
// sequencer. As in the block diagram, the envelope level reaches the output
// only through three gates: the sweep unit (mutes for periods under 8 or a
// target above $7FF), the sequencer bit and the length counter. The sweep
// adjusts the period on half-frame ticks; channel 1 (ONES_COMP=1) negates
// with one's complement, channel 2 with two's complement.
//
// Timing: ce marks CPU cycles, qframe/hframe are one-clock ticks from the
// frame sequencer. The structure follows the document's square-channel
// diagram; the register layout and tables are those of the NES APU.
module apu_square #(
  parameter bit ONES_COMP = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       qframe,
  input  logic       hframe,
  input  logic       enable,     // from $4015
  input  logic       wr,
  input  logic [1:0] waddr,
  input  logic [7:0] wdata,
  output logic       active,     // length counter non-zero
  output logic [3:0] out
);
  import nes_pkg::*;
  logic [1:0]  duty;
  logic        halt, const_vol;
  logic [3:0]  vol;
  logic        sw_en, sw_neg, sw_reload;
  logic [2:0]  sw_per, sw_shift, sw_div;
  logic [10:0] period, timer;
  logic [2:0]  step;
  logic        half;
  logic [3:0]  env;
  logic [11:0] target;
  logic        mute;

  always_comb begin
    logic [10:0] delta;
    delta = period >> sw_shift;
    if (sw_neg) target = {1'b0, period} - {1'b0, delta} - (ONES_COMP ? 12'd1 : 12'd0);
    else        target = {1'b0, period} + {1'b0, delta};
    mute = (period < 11'd8) || (!sw_neg && target[11]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      duty <= '0; halt <= 1'b0; const_vol <= 1'b0; vol <= '0;
      sw_en <= 1'b0; sw_neg <= 1'b0; sw_reload <= 1'b0; sw_per <= '0; sw_shift <= '0; sw_div <= '0;
      period <= '0; timer <= '0; step <= '0; half <= 1'b0;
    end else begin
      if (wr) begin
        case (waddr)
          2'd0: {duty, halt, const_vol, vol} <= wdata;
          2'd1: begin {sw_en, sw_per, sw_neg, sw_shift} <= wdata; sw_reload <= 1'b1; end
          2'd2: period[7:0] <= wdata;
          default: begin period[10:8] <= wdata[2:0]; step <= '0; end
        endcase
      end
      if (ce) begin
        half <= ~half;
        if (half) begin
          if (timer == 0) begin
            timer <= period;
            step <= step + 3'd1;
          end else timer <= timer - 11'd1;
        end
      end
      if (hframe) begin
        if (sw_div == 0 && sw_en && sw_shift != 0 && !mute && !(wr && waddr == 2'd2)
            && !(wr && waddr == 2'd3))
          period <= target[10:0];
        if (sw_div == 0 || sw_reload) begin
          sw_div <= sw_per; sw_reload <= 1'b0;
        end else sw_div <= sw_div - 3'd1;
      end
    end
  end

  apu_envelope u_env (.clk, .rst, .qframe, .start(wr && waddr == 2'd3), .loop_flag(halt),
                      .const_vol, .vol, .level(env));
  apu_length u_len (.clk, .rst, .hframe, .enable, .halt, .load(wr && waddr == 2'd3),
                    .load_idx(wdata[7:3]), .active);

  wire seq_bit = duty_table(duty)[3'd7 - step];
  assign out = (!mute && seq_bit && active) ? env : 4'd0;
endmodule
