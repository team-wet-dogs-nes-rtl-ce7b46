// controller: interface to one NES game pad.
//
// Pad side: a polling state machine raises pad_latch for LATCH_CYC CPU
// cycles; the pad then presents button A on pad_data (low = pressed). It
// then gives seven pulses on pad_pulse (high for PULSE_CYC, low for
// PULSE_CYC), sampling the next button at the end of each pulse, in the
// order A, B, Select, Start, Up, Down, Left, Right as the pad shifts them.
// A poll starts every POLL_CYC CPU cycles (60 per second at 1.79 MHz), and
// the eight buttons are stored, pressed = 1, when it ends.
//
// CPU side (register $4016 or $4017 through the mapping unit): writing 1
// and then 0 to bit 0 copies the stored buttons into a shift register
// (while the bit is 1 it keeps copying). Each read strobe returns the next
// button in bit 0, A first; after eight reads it returns 1.
//
// Timing: everything advances on clock edges with ce=1 (one CPU cycle).
// The polling sequence and the read protocol follow the document; the
// pulse widths (12 us latch, 6 us half pulses) are this design's choice.
// The document lists START before SELECT; the pad's shift order, A B
// Select Start, is used here, so bit 2 of `buttons` is Select.
module controller #(
  parameter int unsigned LATCH_CYC = 21,
  parameter int unsigned PULSE_CYC = 11,
  parameter int unsigned POLL_CYC  = 29830
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  // pad pins
  output logic       pad_latch,
  output logic       pad_pulse,
  input  logic       pad_data,   // low = pressed
  // CPU register
  input  logic       wr,         // write strobe (one CPU cycle)
  input  logic       wdata0,     // bit 0 of the written value
  input  logic       rd,         // read strobe (one CPU cycle)
  output logic       rdata0,     // bit 0 of the read value
  output logic [7:0] buttons     // last polled state, bit 0 = A
);
  typedef enum logic [1:0] { P_WAIT, P_LATCH, P_HIGH, P_LOW } pstate_e;
  pstate_e     ps;
  logic [$clog2(POLL_CYC + 1)-1:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shift_in;
  logic [7:0]  shreg;
  logic        strobe;

  always_ff @(posedge clk) begin
    if (rst) begin
      ps <= P_WAIT; cnt <= '0; bitn <= '0; shift_in <= '0; buttons <= '0;
      pad_latch <= 1'b0; pad_pulse <= 1'b0;
    end else if (ce) begin
      case (ps)
        P_WAIT: begin
          if (32'(cnt) == POLL_CYC - 1) begin
            cnt <= '0; ps <= P_LATCH; pad_latch <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        P_LATCH: begin
          if (32'(cnt) == LATCH_CYC - 1) begin
            cnt <= '0; pad_latch <= 1'b0;
            shift_in[0] <= ~pad_data;   // button A
            bitn <= 3'd1;
            ps <= P_HIGH; pad_pulse <= 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        P_HIGH: begin
          if (32'(cnt) == PULSE_CYC - 1) begin
            cnt <= '0; pad_pulse <= 1'b0; ps <= P_LOW;
            shift_in[bitn] <= ~pad_data;
          end else cnt <= cnt + 1'b1;
        end
        default: begin // P_LOW
          if (32'(cnt) == PULSE_CYC - 1) begin
            cnt <= '0;
            if (bitn == 3'd7) begin
              ps <= P_WAIT;
              buttons <= shift_in;
            end else begin
              bitn <= bitn + 3'd1; ps <= P_HIGH; pad_pulse <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe <= 1'b0; shreg <= '0;
    end else if (ce) begin
      if (wr) strobe <= wdata0;
      if (strobe || (wr && wdata0)) shreg <= buttons;
      else if (rd) shreg <= {1'b1, shreg[7:1]};
    end
  end

  assign rdata0 = shreg[0];
endmodule
