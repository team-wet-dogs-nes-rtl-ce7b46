// apu_mixer: combines the five APU channels into one 18-bit sample.
//
// The NES mixes non-linearly:
//   square_out = 95.88 / (8128 / (square1 + square2) + 100)
//   tnd_out    = 159.79 / (1 / (triangle/8227 + noise/12241 + dmc/22638) + 100)
// and output = square_out + tnd_out lies between 0.0 and 1.0, scaled here
// by 2^18. Both parts come from lookup tables holding every possible value:
// a 31-entry square table indexed by square1 + square2, and a 203-entry
// table indexed by 3*triangle + 2*noise + dmc, filled with
// 163.67 / (24329 / n + 100), the usual one-index approximation of
// tnd_out. The tables are computed at elaboration in integer arithmetic.
// The sum is saturated at 2^18 - 1 and registered (one clock latency).
module apu_mixer (
  input  logic        clk,
  input  logic [3:0]  sq1,
  input  logic [3:0]  sq2,
  input  logic [3:0]  tri_in,
  input  logic [3:0]  noise,
  input  logic [6:0]  dmc,
  output logic [17:0] sample
);
  typedef logic [17:0] sq_tab_t  [31];
  typedef logic [17:0] tnd_tab_t [203];

  // round(95.88 * 2^18 * n / (8128 + 100 n))
  function automatic sq_tab_t make_sq();
    sq_tab_t t;
    for (int n = 0; n < 31; n++) begin
      longint num, den;
      num = 64'd9588 * 64'(n) * 64'd262144;
      den = 64'd100 * (64'd8128 + 64'd100 * 64'(n));
      t[n] = (n == 0) ? 18'd0 : 18'((num + den / 2) / den);
    end
    return t;
  endfunction

  // round(163.67 * 2^18 * n / (24329 + 100 n))
  function automatic tnd_tab_t make_tnd();
    tnd_tab_t t;
    for (int n = 0; n < 203; n++) begin
      longint num, den;
      num = 64'd16367 * 64'(n) * 64'd262144;
      den = 64'd100 * (64'd24329 + 64'd100 * 64'(n));
      t[n] = (n == 0) ? 18'd0 : 18'((num + den / 2) / den);
    end
    return t;
  endfunction

  localparam sq_tab_t  SQ_TAB  = make_sq();
  localparam tnd_tab_t TND_TAB = make_tnd();

  always_ff @(posedge clk) begin
    logic [18:0] s;
    logic [7:0]  ti;
    ti = 8'(3 * tri_in) + 8'(2 * noise) + 8'(dmc);
    s = {1'b0, SQ_TAB[5'(sq1) + 5'(sq2)]} + {1'b0, TND_TAB[ti]};
    sample <= s[18] ? 18'h3FFFF : s[17:0];
  end
endmodule
