// apu_frame_seq: the APU frame sequencer.
//
// Divides the CPU clock into the slow clocks of the channel units: a
// quarter-frame tick (envelopes, triangle linear counter) every STEP_CYC
// CPU cycles, 240 per second, and a half-frame tick (length counters,
// sweeps) on every second step, 120 per second. In 4-step mode (mode=0)
// the fourth step also raises the frame IRQ, 60 per second, unless
// inhibited. In 5-step mode the fourth step is idle and the fifth clocks
// both, so the sequence repeats at 48 Hz and raises no IRQ.
// Writing $4017 (wr: bit 7 mode, bit 6 IRQ inhibit) restarts the sequence
// and, in 5-step mode, gives a quarter and a half tick at once. irq_clr
// (a $4015 read) clears the IRQ flag. Ticks are one clock wide, on ce.
module apu_frame_seq #(
  parameter int unsigned STEP_CYC = 7457
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       wr,
  input  logic [7:0] wdata,
  input  logic       irq_clr,
  output logic       qframe,
  output logic       hframe,
  output logic       irq
);
  logic [$clog2(STEP_CYC)-1:0] div;
  logic [2:0] step;
  logic       mode, inhibit;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; step <= '0; mode <= 1'b0; inhibit <= 1'b0; irq <= 1'b0;
      qframe <= 1'b0; hframe <= 1'b0;
    end else begin
      qframe <= 1'b0;
      hframe <= 1'b0;
      if (irq_clr) irq <= 1'b0;
      if (wr) begin
        mode <= wdata[7];
        inhibit <= wdata[6];
        if (wdata[6]) irq <= 1'b0;
        div <= '0;
        step <= '0;
        if (wdata[7]) begin qframe <= 1'b1; hframe <= 1'b1; end
      end else if (ce) begin
        if (32'(div) == STEP_CYC - 1) begin
          div <= '0;
          case (step)
            3'd0: qframe <= 1'b1;
            3'd1: begin qframe <= 1'b1; hframe <= 1'b1; end
            3'd2: qframe <= 1'b1;
            3'd3: if (!mode) begin
              qframe <= 1'b1; hframe <= 1'b1;
              if (!inhibit) irq <= 1'b1;
            end
            default: begin qframe <= 1'b1; hframe <= 1'b1; end
          endcase
          if ((!mode && step == 3'd3) || step == 3'd4) step <= '0;
          else step <= step + 3'd1;
        end else div <= div + 1'b1;
      end
    end
  end
endmodule
