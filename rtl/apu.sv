// apu: the NES audio processing unit, registers $4000-$4017.
//
// Holds the five sound channels (two squares, triangle, noise, delta
// modulation), the frame sequencer that clocks their envelope, length,
// linear and sweep units, the $4015 enable/status register and the mixer
// that turns the channel levels into an 18-bit sample for the audio codec.
//
// CPU side: the CPU and APU share the CPU clock, so a register write is a
// one-clock strobe wr with addr = CPU address bits 4:0 ($4000 -> 0) and
// wdata; rd is a one-clock read strobe and rdata is valid while addr is
// $15. Reading $4015 returns {DMC IRQ, frame IRQ, 0, DMC active, noise,
// triangle, square 2, square 1 length active} and clears the frame IRQ.
// Writing $4015 enables channels (bits 0-4) and clears the DMC IRQ.
// irq is the OR of the frame and DMC interrupts.
// DMA: the DMC's sample fetches go out as dma_req/dma_addr and come back as
// dma_ack/dma_data (see mapper_dma).
//
// The document lists the channels, the frame sequencer, the mixing formula
// and the lookup-table mixer; the register layout is the NES one.
module apu #(
  parameter int unsigned STEP_CYC = 7457
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        wr,
  input  logic        rd,
  input  logic [4:0]  addr,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output logic        irq,
  output logic        dma_req,
  output logic [15:0] dma_addr,
  input  logic        dma_ack,
  input  logic [7:0]  dma_data,
  output logic [17:0] sample,
  output logic [3:0]  sq1_out,
  output logic [3:0]  sq2_out,
  output logic [3:0]  tri_out,
  output logic [3:0]  noise_out,
  output logic [6:0]  dmc_out
);
  logic qframe, hframe, frame_irq, dmc_irq;
  logic [4:0] en;
  logic a_sq1, a_sq2, a_tri, a_noise, a_dmc;

  wire wr_status = wr && addr == 5'h15;
  wire rd_status = rd && addr == 5'h15;

  always_ff @(posedge clk) begin
    if (rst) en <= '0;
    else if (wr_status) en <= wdata[4:0];
  end

  apu_frame_seq #(.STEP_CYC(STEP_CYC)) u_seq (
    .clk, .rst, .ce, .wr(wr && addr == 5'h17), .wdata, .irq_clr(rd_status),
    .qframe, .hframe, .irq(frame_irq));

  apu_square #(.ONES_COMP(1'b1)) u_sq1 (
    .clk, .rst, .ce, .qframe, .hframe, .enable(en[0]),
    .wr(wr && addr[4:2] == 3'd0), .waddr(addr[1:0]), .wdata, .active(a_sq1), .out(sq1_out));
  apu_square #(.ONES_COMP(1'b0)) u_sq2 (
    .clk, .rst, .ce, .qframe, .hframe, .enable(en[1]),
    .wr(wr && addr[4:2] == 3'd1), .waddr(addr[1:0]), .wdata, .active(a_sq2), .out(sq2_out));
  apu_triangle u_tri (
    .clk, .rst, .ce, .qframe, .hframe, .enable(en[2]),
    .wr(wr && addr[4:2] == 3'd2), .waddr(addr[1:0]), .wdata, .active(a_tri), .out(tri_out));
  apu_noise u_noise (
    .clk, .rst, .ce, .qframe, .hframe, .enable(en[3]),
    .wr(wr && addr[4:2] == 3'd3), .waddr(addr[1:0]), .wdata, .active(a_noise), .out(noise_out));
  apu_dmc u_dmc (
    .clk, .rst, .ce, .wr(wr && addr[4:2] == 3'd4), .waddr(addr[1:0]), .wdata,
    .enable_wr(wr_status), .enable(wdata[4]), .irq_clr(wr_status),
    .dma_req, .dma_addr, .dma_ack, .dma_data, .active(a_dmc), .irq(dmc_irq), .out(dmc_out));

  apu_mixer u_mix (.clk, .sq1(sq1_out), .sq2(sq2_out), .tri_in(tri_out), .noise(noise_out),
                   .dmc(dmc_out), .sample);

  assign rdata = {dmc_irq, frame_irq, 1'b0, a_dmc, a_noise, a_tri, a_sq2, a_sq1};
  assign irq = frame_irq | dmc_irq;
endmodule
