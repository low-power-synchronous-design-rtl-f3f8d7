// fft_top: pipelined N-point radix-2 decimation-in-frequency FFT on IEEE 754
// single precision complex samples (N = 8 by default).
//
// Structure (for N = 8 the five stages of the reference design):
//   MUX stage (feedback depth N/2) -> twiddle stage -> MUX stage (N/4) ->
//   twiddle stage -> ... -> MUX stage (feedback depth 1)
// i.e. log2(N) butterfly stages and log2(N)-1 twiddle multiplication stages.
// Every stage has a single floating point add/sub unit (the twiddle stages
// also one multiplier) that is reused four times per sample on a clock four
// times faster than the sample rate; fft_ctrl supplies the phase controls
// shared by all stages.
//
// Interface and timing:
//   clk        fast clock, period T/4 (T = one sample period)
//   sample_en  high in the fast cycle whose rising edge ends a sample period;
//              in_valid/in_re/in_im are taken on that edge
//   frame_start high while the next sample taken is position 0 of a frame;
//              a frame is N samples on N consecutive sample periods, and may
//              start only while frame_start is high (frames can be back to
//              back)
//   out_valid, out_re, out_im, out_pos, out_bin: result registers, updated on
//              the half-period edges (end of the second fast cycle of a sample
//              period) and steady on the sample edges; out_pos is the
//              position in the output frame and out_bin = bit-reverse(out_pos)
//              is the frequency index k of X(k). Results leave in bit-reversed
//              order X(0), X(4), X(2), ... for N = 8; putting them back in
//              natural order is left to the consumer.
// Latency: X(bitrev(N-1)), the last result of a frame, appears in sample
// period 2*(N + log2 N - 1), counting the period in which x(0) is offered as
// period 1 (20 periods for N = 8): one period per stage plus the time to
// stream a frame in and out. The butterfly output registers load half a
// period early, on the half-period edge, which gives each twiddle stage the
// one and a half periods its four products and two additions need.
// When no frame is offered and no stage holds valid data the sample-rate
// registers stop loading.
//
// The stage order, the feedback depths, the single time-shared arithmetic
// unit per stage and the bit-reversed output order follow the reference
// architecture; the generalisation to any N = 2**LOG2N (up to 1024), the
// single fast clock with phase enables, the half-period output edge of the
// butterfly stages, the frame counter and the idle stop are this design's
// own.
module fft_top
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fp32_t            in_re,
  input  fp32_t            in_im,
  output logic             sample_en,
  output logic             frame_start,
  output logic             out_valid,
  output fp32_t            out_re,
  output fp32_t            out_im,
  output logic [LOG2N-1:0] out_pos,
  output logic [LOG2N-1:0] out_bin
);

  localparam int unsigned N = 2 ** LOG2N;

  ctrl_t            ctrl;
  logic [LOG2N-1:0] idx;
  logic             busy;

  // bus into butterfly stage s, out of butterfly stage s, out of twiddle stage s
  stage_bus_t mux_in  [LOG2N];
  stage_bus_t mux_out [LOG2N];
  stage_bus_t tw_out  [LOG2N];
  logic [LOG2N-1:0] mux_busy;
  logic [LOG2N-1:0] tw_busy;

  fft_ctrl #(.LOG2N(LOG2N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .busy       (busy),
    .ctrl       (ctrl),
    .sample_en  (sample_en),
    .frame_start(frame_start),
    .idx        (idx)
  );

  always_comb begin
    mux_in[0]       = '0;
    mux_in[0].valid = in_valid;
    mux_in[0].idx[LOG2N-1:0] = idx;
    mux_in[0].d     = '{re: in_re, im: in_im};
  end

  for (genvar s = 0; s < int'(LOG2N); s++) begin : g_stage
    bfly_mux_stage #(.LOG2N(LOG2N), .FB_DEPTH(N >> (s + 1))) u_mux (
      .clk  (clk),
      .rst_n(rst_n),
      .ctrl (ctrl),
      .din  (mux_in[s]),
      .dout (mux_out[s]),
      .busy (mux_busy[s])
    );
    if (s < int'(LOG2N) - 1) begin : g_tw
      twiddle_mult_stage #(.LOG2N(LOG2N), .STAGE(s)) u_tw (
        .clk  (clk),
        .rst_n(rst_n),
        .ctrl (ctrl),
        .din  (mux_out[s]),
        .dout (tw_out[s]),
        .busy (tw_busy[s])
      );
      assign mux_in[s+1] = tw_out[s];
    end else begin : g_last
      assign tw_out[s]  = '0;
      assign tw_busy[s] = 1'b0;
    end
  end

  assign busy      = (|mux_busy) || (|tw_busy);
  assign out_valid = mux_out[LOG2N-1].valid;
  assign out_re    = mux_out[LOG2N-1].d.re;
  assign out_im    = mux_out[LOG2N-1].d.im;
  assign out_pos   = mux_out[LOG2N-1].idx[LOG2N-1:0];
  always_comb
    for (int b = 0; b < int'(LOG2N); b++) out_bin[b] = out_pos[LOG2N-1-b];

endmodule
