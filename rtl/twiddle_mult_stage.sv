// twiddle_mult_stage: complex multiplication of the sample stream by the
// twiddle factors, between two butterfly stages.
//
// For an input a = ar + j*ai and a factor w = cr + j*ci (from twiddle_rom,
// selected by the sample position) the stage forms
//   re = ar*cr - ai*ci,   im = ar*ci + ai*cr
// with one floating point multiplier and one add/sub unit, each used four
// times per sample period on the fast clock (period T/4). The butterfly
// output that feeds the stage changes on the half-period edge (end of phase
// 1), so the stage works from phase 2 to phase 1 of the next period:
//   phase 2: ar*cr   phase 3: ai*ci   phase 0: ar*ci   phase 1: ai*cr
// Two fast registers (m1, m2) hold the last two products, so the add/sub unit
// sees (ar*cr, ai*ci) in phase 0, where it subtracts, and (ar*ci, ai*cr) in
// phase 2, where it adds. The real result is held in a register loaded in
// phase 0; the output register (real, imaginary, position, valid) loads in
// phase 2, half a sample period later, so the result is steady when the next
// butterfly stage samples it on the following tick.
// Sums of the butterfly stage are multiplied by 1, as in the reference
// design, which keeps the stage free of bypass paths.
// Latency: one and a half sample periods, from the butterfly output edge
// (end of phase 1) to the tick on which the next butterfly stage takes the
// product.
//
// Follows the reference architecture: the two input multiplexers, the single
// multiplier, the two product registers, the single add/sub unit and two
// output registers. Own choice: the two output registers load on the two
// half-period edges as a real-part register and an output register, rather
// than as a two-deep shift register, so that both parts are steady together.
module twiddle_mult_stage
  import fft_pkg::*;
#(
  parameter int unsigned LOG2N = 3,
  parameter int unsigned STAGE = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ctrl_t      ctrl,
  input  stage_bus_t din,
  output stage_bus_t dout,
  output logic       busy
);

  cplx_t      w;
  fp32_t      in1, in2, prod, m1, m2, sb;
  fp32_t      re_q;
  logic       v_q;
  logic [MAX_LOG2N-1:0] idx_q;

  twiddle_rom #(.LOG2N(LOG2N), .STAGE(STAGE)) u_rom (
    .idx (din.idx[LOG2N-1:0]),
    .w   (w)
  );

  assign in1 = ctrl.sltm ? din.d.im : din.d.re;
  assign in2 = ctrl.sltn ? w.im : w.re;

  fp_mult u_mult (.a(in1), .b(in2), .y(prod));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0;
      m2 <= '0;
    end else begin
      m1 <= prod;
      m2 <= m1;
    end
  end

  fp_addsub u_addsub (.a(m2), .b(m1), .sub(ctrl.mctl), .y(sb));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_q  <= '0;
      v_q   <= 1'b0;
      idx_q <= '0;
      dout  <= '0;
    end else begin
      if (ctrl.cap_re) begin
        re_q  <= sb;
        v_q   <= din.valid;
        idx_q <= din.idx;
      end
      if (ctrl.cap_out) begin
        dout.d.re  <= re_q;
        dout.d.im  <= sb;
        dout.valid <= v_q;
        dout.idx   <= idx_q;
      end
    end
  end

  assign busy = v_q || dout.valid;

endmodule
