// apu_triangle: the triangle-wave channel of the APU.
//
// Registers (waddr 0..3 as $4008-$400B): 0 = CRRR RRRR (control/length
// halt, linear counter reload value), 2 = timer low, 3 = LLLL LTTT (length
// index, timer high; sets the linear-counter reload flag). As in the block
// diagram, each expiry of the 11-bit timer passes through two gates, the
// linear counter and the length counter, both non-zero, to step the
// 32-step sequencer, whose output is F E D ... 1 0 0 1 ... E F.
// The linear counter is clocked by quarter frames, the length counter by
// half frames; the timer runs on every CPU cycle (ce).
module apu_triangle (
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
  logic        control;
  logic [6:0]  lin_load, lin;
  logic        lin_reload;
  logic [10:0] period, timer;
  logic [4:0]  step;

  always_ff @(posedge clk) begin
    if (rst) begin
      control <= 1'b0; lin_load <= '0; lin <= '0; lin_reload <= 1'b0;
      period <= '0; timer <= '0; step <= '0;
    end else begin
      if (wr) begin
        case (waddr)
          2'd0: {control, lin_load} <= wdata;
          2'd2: period[7:0] <= wdata;
          2'd3: begin period[10:8] <= wdata[2:0]; lin_reload <= 1'b1; end
          default: ;
        endcase
      end
      if (ce) begin
        if (timer == 0) begin
          timer <= period;
          if (lin != 0 && active) step <= step + 5'd1;
        end else timer <= timer - 11'd1;
      end
      if (qframe) begin
        if (lin_reload) lin <= lin_load;
        else if (lin != 0) lin <= lin - 7'd1;
        if (!control) lin_reload <= 1'b0;
      end
    end
  end

  apu_length u_len (.clk, .rst, .hframe, .enable, .halt(control), .load(wr && waddr == 2'd3),
                    .load_idx(wdata[7:3]), .active);

  assign out = step[4] ? step[3:0] : ~step[3:0];
endmodule
