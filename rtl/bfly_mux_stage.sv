// bfly_mux_stage: one radix-2 decimation-in-frequency butterfly stage of the
// serial FFT pipeline (a "MUX stage"), built as a delay-feedback stage.
//
// Samples arrive one per sample period T. A frame position idx travels with
// each sample. The stage holds FB_DEPTH complex values in a feedback shift
// register (4, 2 and 1 for the three stages of the 8-point FFT).
//   * While bit FB_DEPTH of the input position is 0 (swap = 0) the input
//     sample is pushed into the feedback register, and the value leaving the
//     feedback register (a difference stored one half block earlier) goes to
//     the output.
//   * While that bit is 1 (swap = 1) the input is paired with the sample
//     FB_DEPTH positions earlier, now at the feedback output: the sum goes to
//     the output and the difference is pushed into the feedback register.
// So the output stream holds, for each block of 2*FB_DEPTH samples, first the
// FB_DEPTH sums and then the FB_DEPTH differences, delayed by FB_DEPTH sample
// periods; the output position is the input position minus FB_DEPTH.
//
// One floating point add/sub unit does all the arithmetic. It is used four
// times per sample period on the fast clock (period T/4), steered by the
// shared controls s1 (real/imaginary, multiplexers A and B) and ctl (add/sub):
//   phase 0: re(fb) + re(in)   phase 1: im(fb) + im(in)
//   phase 2: re(fb) - re(in)   phase 3: im(fb) - im(in)
// The sums are ready after phase 1: the real sum sits in the fast result
// register t1 and the imaginary sum comes straight from the unit, and the
// output register takes them on that edge (ctrl.mid, the half-period edge).
// The differences are ready after phase 3 and go into the feedback register
// on ctrl.tick in the same way.
// Registers: input register (complex sample, position, valid) and feedback
// register, loaded on ctrl.tick; output register, loaded on ctrl.mid.
// Latency: a sample at input position p is in the output register half a
// sample period after the input register holds position p + FB_DEPTH, that
// is FB_DEPTH + 1 sample periods after it was offered at the input register.
//
// Follows the reference architecture: the input and output registers, the
// feedback register of depth 4/2/1, the single time-shared add/sub and its
// operand multiplexers, and the four output multiplexers steered by swap.
// Own choices: swap is derived inside the stage from the sample position
// instead of being supplied from outside, the output register loads on the
// half-period edge, so that one fast result register is enough instead of
// four, and the position and valid flag travel with the data.
module bfly_mux_stage
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N    = 3,
  parameter int unsigned FB_DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  stage_bus_t din,
  output stage_bus_t dout,
  output logic       busy
);

  localparam int unsigned N = 2 ** LOG2N;

  stage_bus_t        in_q;                  // input register
  cplx_t             fb   [FB_DEPTH];       // feedback shift register
  logic [FB_DEPTH-1:0] fb_v;                // valid flags alongside it
  fp32_t             p, q, r;               // add/sub operands and result
  fp32_t             t1;                    // fast-clock result register
  logic              swap;
  cplx_t             fb_next, out_next;

  // operand multiplexers A (input sample) and B (feedback output)
  assign p = ctrl.s1 ? in_q.d.im : in_q.d.re;
  assign q = ctrl.s1 ? fb[FB_DEPTH-1].im : fb[FB_DEPTH-1].re;

  fp_addsub u_addsub (.a(q), .b(p), .sub(ctrl.ctl), .y(r));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t1 <= '0;
    else        t1 <= r;
  end

  // in phase 1: t1 = re sum, r = im sum
  // in phase 3: t1 = re difference, r = im difference
  assign swap = in_q.idx[$clog2(FB_DEPTH)];

  always_comb begin
    if (swap) begin
      fb_next  = '{re: t1, im: r};
      out_next = '{re: t1, im: r};
    end else begin
      fb_next  = in_q.d;
      out_next = fb[FB_DEPTH-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= '0;
      fb   <= '{default: '0};
      fb_v <= '0;
    end else if (ctrl.tick) begin
      in_q <= din;
      fb[0] <= fb_next;
      fb_v[0] <= in_q.valid;
      for (int i = 1; i < int'(FB_DEPTH); i++) begin
        fb[i]   <= fb[i-1];
        fb_v[i] <= fb_v[i-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
    end else if (ctrl.mid) begin
      dout.valid <= fb_v[FB_DEPTH-1];
      dout.idx   <= '0;
      dout.idx[LOG2N-1:0] <= in_q.idx[LOG2N-1:0] - LOG2N'(FB_DEPTH);
      dout.d     <= out_next;
    end
  end

  assign busy = in_q.valid || (|fb_v) || dout.valid;

  // the feedback depth is a power of two below N
  if (FB_DEPTH >= N || (FB_DEPTH & (FB_DEPTH - 1)) != 0) begin : g_bad_depth
    $error("FB_DEPTH must be a power of two below 2**LOG2N");
  end

endmodule
