// ac97_if: serial link to the AC97 audio codec on the board.
//
// Codec reset: after rst, audio_reset_b is held low for RESET_CYC system
// clocks (1 us or more; 8 clocks at 7.16 MHz) and then left high.
// Frames: the codec supplies bit_clk. Every 256 bit clocks the link sends a
// frame on sdata_out, MSB first, changing on the rising edge of bit_clk: a
// 16-bit tag slot and twelve 20-bit data slots. sync is high for the 16 bit
// clocks of the tag slot. The tag marks the frame valid, slots 1 and 2
// valid while a register command is pending, and slots 3 and 4 (left and
// right PCM) valid. After the codec reports ready (bit 15 of the tag it
// sends on sdata_in), a fixed list of register writes is issued, one per
// frame: master and headphone volume 0 dB, PCM out volume 0x0808, variable
// rate on and DAC rate 48 kHz. Slot 1 carries {write=0, register index,
// 12 zeros}, slot 2 {16-bit data, 4 zeros}. Every frame carries the current
// APU sample, an unsigned 18-bit value, turned into two's complement by
// inverting its MSB and padded to 20 bits, in both PCM slots. The other
// slots are zero.
//
// Clocking: sample comes from the system clock domain and changes slowly;
// it is taken into the bit_clk domain once per frame through a two-stage
// register, which is enough for an audio level (a torn word lasts one
// frame). The frame format, sync length and reset pulse follow the
// document; the command list and the sampling points are this design's.
module ac97_if #(
  parameter int unsigned RESET_CYC = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [17:0] sample,
  input  logic        bit_clk,
  input  logic        sdata_in,
  output logic        sdata_out,
  output logic        sync,
  output logic        audio_reset_b,
  output logic        codec_ready,
  output logic [2:0]  cmds_done
);
  // ---- codec reset pulse (system clock)
  logic [$clog2(RESET_CYC + 1)-1:0] rcnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      rcnt <= '0; audio_reset_b <= 1'b0;
    end else if (rcnt != RESET_CYC[$bits(rcnt)-1:0]) begin
      rcnt <= rcnt + 1'b1;
    end else begin
      audio_reset_b <= 1'b1;
    end
  end

  // ---- bit clock domain
  logic [1:0]   brst_s;
  logic         brst;
  always_ff @(posedge bit_clk) brst_s <= {brst_s[0], ~audio_reset_b};
  assign brst = brst_s[1];

  localparam int unsigned NCMD = 5;
  function automatic logic [22:0] cmd(input logic [2:0] i);  // {reg[6:0], data[15:0]}
    case (i)
      3'd0: return {7'h02, 16'h0000};
      3'd1: return {7'h04, 16'h0000};
      3'd2: return {7'h18, 16'h0808};
      3'd3: return {7'h2A, 16'h0001};
      default: return {7'h2C, 16'hBB80};
    endcase
  endfunction

  logic [7:0]   bitn;
  logic [255:0] frame;
  logic [17:0]  s1, s2;
  logic [2:0]   ci;
  logic         ready;

  always_comb begin
    logic        cv;
    logic [22:0] c;
    logic [19:0] pcm;
    cv  = ready && (32'(ci) < NCMD);
    c   = cmd(ci);
    pcm = {~s2[17], s2[16:0], 2'b00};
    frame = '0;
    frame[255:240] = {1'b1, cv, cv, 1'b1, 1'b1, 11'd0};
    frame[239:220] = cv ? {1'b0, c[22:16], 12'd0} : 20'd0;
    frame[219:200] = cv ? {c[15:0], 4'd0} : 20'd0;
    frame[199:180] = pcm;
    frame[179:160] = pcm;
  end

  logic [255:0] shreg;
  always_ff @(posedge bit_clk) begin
    if (brst) begin
      bitn <= '0; shreg <= '0; sdata_out <= 1'b0; sync <= 1'b0;
      s1 <= '0; s2 <= '0; ci <= '0; ready <= 1'b0;
    end else begin
      s1 <= sample;
      bitn <= bitn + 8'd1;
      if (bitn == 8'd0) begin
        s2 <= s1;
        shreg <= {frame[254:0], 1'b0};
        sdata_out <= frame[255];
        if (ready && 32'(ci) < NCMD) ci <= ci + 3'd1;
      end else begin
        sdata_out <= shreg[255];
        shreg <= {shreg[254:0], 1'b0};
      end
      sync <= (bitn < 8'd16);
      // the codec's tag bit 15 (codec ready) arrives with the first bit
      if (bitn == 8'd2) ready <= sdata_in;
    end
  end

  assign codec_ready = ready;
  assign cmds_done   = ci;
endmodule
