// twiddle_rom: twiddle factor look-up table for the multiplication stage that
// follows butterfly stage STAGE of an N-point (N = 2**LOG2N) radix-2
// decimation-in-frequency FFT.
//
// After butterfly stage s the stream is made of blocks of 2*D samples,
// D = N / 2**(s+1): D sums followed by D differences. Sums are multiplied by
// 1; the difference at offset j inside its half block is multiplied by
// W_N^(j * 2**s). For N = 8 this is 1,1,1,1,W8^0,W8^1,W8^2,W8^3 after stage 0
// and 1,1,W8^0,W8^2 (repeated) after stage 1.
//
// The D factors are computed at elaboration time from cos and sin (see
// fft_pkg::twiddle) and rounded to single precision; the block is a
// combinational table indexed by the sample position.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 3,
  parameter int unsigned STAGE = 0
) (
  input  logic [LOG2N-1:0] idx,
  output cplx_t            w
);

  localparam int unsigned D = 2 ** (LOG2N - STAGE - 1);

  cplx_t tab [D];

  for (genvar j = 0; j < int'(D); j++) begin : g_tab
    localparam cplx_t WJ = twiddle(LOG2N, j * (2 ** STAGE));
    assign tab[j] = WJ;
  end

  always_comb begin
    if ((idx & LOG2N'(D)) != '0) w = tab[int'(idx) % int'(D)];
    else                         w = '{re: FP_ONE, im: FP_ZERO};
  end

  if (STAGE >= LOG2N - 1) begin : g_bad_stage
    $error("a twiddle stage follows only butterfly stages 0..LOG2N-2");
  end

endmodule
