// fft_pkg: types, constants and elaboration-time helpers shared by the
// floating point FFT pipeline.
//
// A sample on the pipeline is an IEEE 754 single precision complex number
// (cplx_t) travelling with its position inside the N-point frame (idx) and a
// valid flag (stage_bus_t). The twiddle factors W_N^k = cos(2*pi*k/N) -
// j*sin(2*pi*k/N) are worked out in double precision at elaboration time and
// rounded to the nearest single precision value, so no table of numbers is
// stored in the source. For N = 8 this gives W8^1 = 0x3F3504F3 - j*0x3F3504F3,
// the constant the reference design uses.
package fft_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam int unsigned MAX_LOG2N = 10;

  typedef struct packed {
    logic                 valid;
    logic [MAX_LOG2N-1:0] idx;   // sample position inside the frame (low LOG2N bits used)
    cplx_t                d;
  } stage_bus_t;

  // Control lines shared by all stages, one set per fast clock cycle.
  // The fast clock has period T/4 where T is the sample period.
  typedef struct packed {
    logic tick;    // last quarter of a sample period and the pipeline runs:
                   // input and feedback registers load on this edge
    logic mid;     // second quarter of a sample period and the pipeline
                   // runs: butterfly output registers load on this edge
    logic s1;      // MUX stage operand select: 0 real part, 1 imaginary part
    logic ctl;     // MUX stage add/sub control: 0 add, 1 subtract
    logic sltm;    // twiddle stage data select: 0 real, 1 imaginary
    logic sltn;    // twiddle stage factor select: 0 real, 1 imaginary
    logic mctl;    // twiddle stage add/sub control: 0 add, 1 subtract
    logic cap_re;  // twiddle stage: real part (product difference) is ready
    logic cap_out; // twiddle stage: imaginary part (product sum) is ready,
                   // output register loads
  } ctrl_t;

  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Round a real to the nearest IEEE single precision bit pattern.
  // Magnitudes below 1e-12 become +0 so that cos(pi/2) etc. give exact zeros.
  function automatic fp32_t real_to_fp32(input real v);
    logic [63:0] b;
    logic        s;
    int          e;
    logic [52:0] m53;
    logic [24:0] m25;
    logic [23:0] m24;
    b = $realtobits(v);
    if (v < 1.0e-12 && v > -1.0e-12) return FP_ZERO;
    s   = b[63];
    e   = int'(b[62:52]) - 1023 + 127;
    m53 = {1'b1, b[51:0]};
    // keep 24 significant bits plus a rounding bit
    m25 = m53[52:28];
    m24 = m25[24:1] + {23'd0, m25[0]};
    if (m24 == 24'd0) begin         // rounding carried out of the significand
      m24 = 24'h80_0000;
      e   = e + 1;
    end
    return {s, e[7:0], m24[22:0]};
  endfunction

  // Twiddle factor W_N^k with N = 2**log2n.
  function automatic cplx_t twiddle(input int unsigned log2n, input int unsigned k);
    real ang;
    cplx_t w;
    ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(2 ** log2n);
    w.re = real_to_fp32($cos(ang));
    w.im = real_to_fp32(-$sin(ang));
    return w;
  endfunction

endpackage
