// fft_ctrl: clock phase and sample sequencing for the FFT pipeline.
//
// The pipeline works in one clock domain. The clock clk has period T/4 where
// T is the sample period: every complex sample is given four fast cycles, and
// each arithmetic unit is reused four times per sample. A 2-bit phase counter
// ph (0..3) stands in for the three related clocks of periods T, T/2 and T/4
// of the reference architecture; registers of the slower domains load with an
// enable on the proper fast edge instead of on a divided clock.
//
// Per sample period, with ph the value of the counter during the cycle:
//   ph        0    1    2    3
//   s1        0    1    0    1     (real / imaginary operand, changes every T/4)
//   ctl       0    0    1    1     (add / subtract, changes every T/2)
//   mid       -    1    -    -     butterfly output registers load (sums ready)
//   tick      -    -    -    1     input and feedback registers load
// The twiddle stages work half a period later, on the butterfly output that
// changes at the end of phase 1:
//   ph        2    3    0    1
//   sltm      0    1    0    1     data:   a_r, a_i, a_r, a_i
//   sltn      0    1    1    0     factor: c_r, c_i, c_i, c_r
//   mctl           subtract in phase 0, add in phase 2
//   cap_re in phase 0, cap_out in phase 2
// tick and mid are high only while the pipeline runs. sample_en is high in
// phase 3 whatever the pipeline does: the input sample is taken on that edge.
//
// The frame counter idx counts the samples of an N-point frame. It advances
// on every tick. The pipeline runs while a sample is offered, while a frame
// is part way in, or while any stage still holds valid data (busy), so after
// the last frame the stages keep stepping until all results are out and then
// stop. A new frame must start when frame_start is high (idx = 0); frames can
// follow each other without a gap.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             busy,
  output ctrl_t            ctrl,
  output logic             sample_en,
  output logic             frame_start,
  output logic [LOG2N-1:0] idx
);

  logic [1:0] ph;   // phase inside the sample period
  logic       run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 2'd0;
    else        ph <= ph + 2'd1;
  end

  assign sample_en   = (ph == 2'd3);
  assign run         = in_valid || (idx != '0) || busy;
  assign frame_start = (idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                idx <= '0;
    else if (sample_en && run) idx <= idx + 1'b1;
  end

  always_comb begin
    ctrl.tick    = sample_en && run;
    ctrl.mid     = (ph == 2'd1) && run;
    ctrl.s1      = ph[0];
    ctrl.ctl     = ph[1];
    ctrl.sltm    = ph[0];
    ctrl.sltn    = ph[1] ~^ ph[0];
    ctrl.mctl    = (ph == 2'd0);
    ctrl.cap_re  = (ph == 2'd0);
    ctrl.cap_out = (ph == 2'd2);
  end

endmodule
