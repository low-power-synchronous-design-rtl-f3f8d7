// twiddle_mult_stage_tb: checks the twiddle multiplication stage after
// butterfly stage 0 of an 8-point FFT. A stream of random complex samples
// with positions 0..7 repeating is sent, one per sample period; every result
// is compared with the product by W8^(position-4) (positions 4..7) or by 1
// (positions 0..3) worked out here in double precision. With the truncating
// arithmetic the error must stay below 4 units in the last place of the
// largest partial product. Positions multiplied by 1 must come out unchanged,
// bit for bit. As in the pipeline, the input changes on the half-period edge
// (end of phase 1) and the result must be steady for the next sample edge:
// a sample prepared in period k is applied in period k+1 and its product is
// read in period k+2.
module twiddle_mult_stage_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int NS = 64;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  stage_bus_t din, dout;
  logic busy;
  int checks = 0, failures = 0;

  twiddle_mult_stage #(.LOG2N(3), .STAGE(0)) dut (.clk, .rst_n, .ctrl, .din, .dout, .busy);

  always #5 clk = ~clk;

  logic [1:0] ph = 0;
  always @(posedge clk) ph <= ph + 1;
  always_comb begin
    ctrl = '0;
    ctrl.tick    = (ph == 3);
    ctrl.mid     = (ph == 1);
    ctrl.sltm    = ph[0];
    ctrl.sltn    = ph[1] ~^ ph[0];
    ctrl.mctl    = (ph == 0);
    ctrl.cap_re  = (ph == 0);
    ctrl.cap_out = (ph == 2);
  end

  fp32_t sr [NS], si [NS];
  int sent_period [NS];
  int period = 0, n_sent = 0, n_out = 0;
  stage_bus_t din_next = '0;

  // like the butterfly stage output register, the input changes on the
  // half-period edge
  always @(posedge clk) if (ph == 1) din <= din_next;

  always @(negedge clk) if (rst_n && ph == 3) begin
    period++;
    if (dout.valid) begin
      real ar, ai, c, d, er, ei, tol, mag;
      int p;
      p = n_out % 8;
      ar = fp32_to_real(sr[n_out]);
      ai = fp32_to_real(si[n_out]);
      c = (p >= 4) ? $cos(2.0 * 3.14159265358979323846 * real'(p - 4) / 8.0) : 1.0;
      d = (p >= 4) ? -$sin(2.0 * 3.14159265358979323846 * real'(p - 4) / 8.0) : 0.0;
      er = ar * c - ai * d;
      ei = ar * d + ai * c;
      mag = (fabs(ar) > fabs(ai)) ? fabs(ar) : fabs(ai);
      tol = 4.0 * mag * (2.0 ** -23) + 1.0e-30;
      checks++;
      if (fabs(fp32_to_real(dout.d.re) - er) > tol || fabs(fp32_to_real(dout.d.im) - ei) > tol ||
          int'(dout.idx) != p || period - sent_period[n_out] != 2) begin
        failures++;
        $display("FAIL sample %0d pos %0d: %g %g expected %g %g (idx %0d, %0d periods)", n_out, p,
                 fp32_to_real(dout.d.re), fp32_to_real(dout.d.im), er, ei, dout.idx,
                 period - sent_period[n_out]);
      end
      if (p < 4) begin
        checks++;
        if (dout.d.re !== sr[n_out] || dout.d.im !== si[n_out]) begin
          failures++;
          $display("FAIL sample %0d changed by a unit factor", n_out);
        end
      end
      n_out++;
    end
    din_next = '0;
    if (n_sent < NS) begin
      din_next.valid = 1;
      din_next.idx = MAX_LOG2N'(n_sent % 8);
      din_next.d = '{re: sr[n_sent], im: si[n_sent]};
      sent_period[n_sent] = period;
    end
    n_sent++;
  end

  initial begin
    din = '0;
    for (int i = 0; i < NS; i++) begin
      sr[i] = rand_fp32(5000);
      si[i] = rand_fp32(5000);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (n_sent == NS + 4);
    checks++;
    if (n_out != NS) begin failures++; $display("FAIL %0d results", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
