// apu_noise: the noise channel of the APU.
//
// Registers (waddr 0..3 as $400C-$400F): 0 = --LC VVVV (length halt /
// envelope loop, constant volume, volume), 2 = M--- PPPP (mode, period
// index), 3 = LLLL L--- (length index; restarts the envelope). Built like
// the square channel around an envelope generator, but the timer steps a
// 15-bit random generator (linear-feedback shift register, feedback from
// bit 0 xor bit 1, or bit 6 in short mode). The envelope level reaches the
// output while the generator's bit 0 is 0 and the length counter runs.
module apu_noise (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       qframe,
  input  logic       hframe,
  input  logic       enable,
  input  logic       wr,
  input  logic [1:0] waddr,
  input  logic [7:0] wdata,
  output logic       active,
  output logic [3:0] out
);
  import nes_pkg::*;
  logic        halt, const_vol, mode;
  logic [3:0]  vol, pidx, env;
  logic [11:0] timer;
  logic [14:0] lfsr;

  always_ff @(posedge clk) begin
    if (rst) begin
      halt <= 1'b0; const_vol <= 1'b0; vol <= '0; mode <= 1'b0; pidx <= '0;
      timer <= '0; lfsr <= 15'd1;
    end else begin
      if (wr) begin
        case (waddr)
          2'd0: {halt, const_vol, vol} <= wdata[5:0];
          2'd2: {mode, pidx} <= {wdata[7], wdata[3:0]};
          default: ;
        endcase
      end
      if (ce) begin
        if (timer == 0) begin
          timer <= noise_period(pidx) - 12'd1;
          lfsr <= {lfsr[0] ^ (mode ? lfsr[6] : lfsr[1]), lfsr[14:1]};
        end else timer <= timer - 12'd1;
      end
    end
  end

  apu_envelope u_env (.clk, .rst, .qframe, .start(wr && waddr == 2'd3), .loop_flag(halt),
                      .const_vol, .vol, .level(env));
  apu_length u_len (.clk, .rst, .hframe, .enable, .halt, .load(wr && waddr == 2'd3),
                    .load_idx(wdata[7:3]), .active);

  assign out = (!lfsr[0] && active) ? env : 4'd0;
endmodule
