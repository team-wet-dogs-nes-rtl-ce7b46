// apu_dmc: the delta modulation channel of the APU.
//
// Registers (waddr 0..3 as $4010-$4013): 0 = IL-- RRRR (IRQ enable, loop,
// rate index), 1 = -DDD DDDD (direct load of the output counter),
// 2 = sample address ($C000 + A*64), 3 = sample length (L*16 + 1 bytes).
// The DMA reader fetches the next sample byte whenever the one-byte buffer
// is empty and bytes remain: it raises dma_req with dma_addr and waits for
// dma_ack with the byte on dma_data (the DMA unit stalls the CPU for the
// access). At each expiry of the rate timer the shifter takes one bit,
// and the 7-bit output counter goes up 2 for a 1 or down 2 for a 0,
// staying inside 0..127. When the shifter is empty it reloads from the
// buffer, or falls silent if the buffer is empty. At the end of a sample
// it restarts (loop) or raises irq (if enabled).
//
// enable comes from $4015 bit 4: clearing it stops the sample, setting it
// restarts an ended sample; irq_clr (a $4015 write) clears the IRQ flag.
module apu_dmc (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        wr,
  input  logic [1:0]  waddr,
  input  logic [7:0]  wdata,
  input  logic        enable_wr,   // $4015 written
  input  logic        enable,      // bit 4 of that write
  input  logic        irq_clr,
  output logic        dma_req,
  output logic [15:0] dma_addr,
  input  logic        dma_ack,
  input  logic [7:0]  dma_data,
  output logic        active,      // bytes remaining
  output logic        irq,
  output logic [6:0]  out
);
  import nes_pkg::*;
  logic        irq_en, loop_f;
  logic [3:0]  rate;
  logic [7:0]  s_addr, s_len;
  logic [15:0] cur_addr;
  logic [11:0] bytes_left;
  logic [7:0]  buffer, shreg;
  logic        buf_full, silence;
  logic [3:0]  bits_left;
  logic [8:0]  timer;
  logic [6:0]  level;

  always_ff @(posedge clk) begin
    if (rst) begin
      irq_en <= 1'b0; loop_f <= 1'b0; rate <= '0; s_addr <= '0; s_len <= '0;
      cur_addr <= 16'hC000; bytes_left <= '0; buffer <= '0; shreg <= '0; buf_full <= 1'b0;
      silence <= 1'b1; bits_left <= 4'd8; timer <= '0; level <= '0; irq <= 1'b0;
    end else begin
      if (wr) begin
        case (waddr)
          2'd0: begin
            {irq_en, loop_f, rate} <= {wdata[7:6], wdata[3:0]};
            if (!wdata[7]) irq <= 1'b0;
          end
          2'd1: level <= wdata[6:0];
          2'd2: s_addr <= wdata;
          default: s_len <= wdata;
        endcase
      end
      if (irq_clr) irq <= 1'b0;
      if (enable_wr) begin
        if (!enable) bytes_left <= '0;
        else if (bytes_left == 0) begin
          cur_addr <= {2'b11, s_addr, 6'd0};
          bytes_left <= {s_len, 4'd0} + 12'd1;
        end
      end
      // memory reader
      if (dma_ack && dma_req) begin
        buffer <= dma_data;
        buf_full <= 1'b1;
        cur_addr <= (cur_addr == 16'hFFFF) ? 16'h8000 : cur_addr + 16'd1;
        if (bytes_left == 12'd1) begin
          if (loop_f) begin
            cur_addr <= {2'b11, s_addr, 6'd0};
            bytes_left <= {s_len, 4'd0} + 12'd1;
          end else begin
            bytes_left <= '0;
            if (irq_en) irq <= 1'b1;
          end
        end else bytes_left <= bytes_left - 12'd1;
      end
      // output unit
      if (ce) begin
        if (timer == 0) begin
          timer <= dmc_rate(rate) - 9'd1;
          if (!silence) begin
            if (shreg[0] && level <= 7'd125) level <= level + 7'd2;
            else if (!shreg[0] && level >= 7'd2) level <= level - 7'd2;
          end
          shreg <= {1'b0, shreg[7:1]};
          if (bits_left == 4'd1) begin
            bits_left <= 4'd8;
            if (buf_full && !(dma_ack && dma_req)) begin
              shreg <= buffer; buf_full <= 1'b0; silence <= 1'b0;
            end else silence <= 1'b1;
          end else bits_left <= bits_left - 4'd1;
        end else timer <= timer - 9'd1;
      end
    end
  end

  assign dma_req  = !buf_full && bytes_left != 0;
  assign dma_addr = cur_addr;
  assign active   = (bytes_left != 0);
  assign out      = level;
endmodule
