// fft_size_check: drives one fft_top of size N = 2**LOG2N with NFRAMES random
// frames sent back to back and checks every result against a DFT worked out
// here, the frame positions and bins of the results, the latency of the first
// frame (2*(N + log2 N - 1) sample periods, counting the period in which
// x(0) is offered and the one in which the last result appears) and that every
// butterfly stage ran with both swap settings. Reports through its ports when
// done; used by fft_sizes_tb.
module fft_size_check
  import fft_pkg::*;
  import fft_tb_pkg::*;
#(
  parameter int LOG2N   = 4,
  parameter int NFRAMES = 2
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int N = 2 ** LOG2N;
  localparam int LATENCY = 2 * (N + LOG2N - 1);
  // error bound relative to the largest output: truncation in every stage
  localparam real TOL = 1.0e-6 * real'(LOG2N) * 4.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  fp32_t in_re = '0, in_im = '0;
  logic sample_en, frame_start, out_valid;
  fp32_t out_re, out_im;
  logic [LOG2N-1:0] out_pos, out_bin;

  fft_top #(.LOG2N(LOG2N)) dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .sample_en, .frame_start,
    .out_valid, .out_re, .out_im, .out_pos, .out_bin
  );

  always #5 clk = ~clk;

  fp32_t xin_re [NFRAMES][N];
  fp32_t xin_im [NFRAMES][N];
  real   ref_re [NFRAMES][N];
  real   ref_im [NFRAMES][N];
  real   ref_max [NFRAMES];
  int    swap_seen [LOG2N];

  for (genvar s = 0; s < LOG2N; s++) begin : g_watch
    always @(posedge clk)
      if (dut.ctrl.tick && dut.g_stage[s].u_mux.in_q.valid)
        swap_seen[s] |= 1 << dut.g_stage[s].u_mux.swap;
  end

  int period = 0, first_in_period = -1;
  int f_in = 0, n_in = 0, frame_out = 0, pos_expect = 0;

  always @(negedge clk) begin
    if (sample_en) begin
      period++;
      if (rst_n && f_in < NFRAMES && (n_in != 0 || frame_start)) begin
        if (f_in == 0 && n_in == 0) first_in_period = period;
        in_valid = 1'b1;
        in_re = xin_re[f_in][n_in];
        in_im = xin_im[f_in][n_in];
        n_in++;
        if (n_in == N) begin n_in = 0; f_in++; end
      end else begin
        in_valid = 1'b0;
      end
      if (out_valid && frame_out < NFRAMES) begin
        int k;
        real er, ei, tol;
        k = 0;
        for (int b = 0; b < LOG2N; b++) if ((pos_expect & (1 << b)) != 0) k |= 1 << (LOG2N - 1 - b);
        er = fabs(fp32_to_real(out_re) - ref_re[frame_out][k]);
        ei = fabs(fp32_to_real(out_im) - ref_im[frame_out][k]);
        tol = TOL * ref_max[frame_out] + 1.0e-6;
        checks++;
        if (int'(out_pos) != pos_expect || int'(out_bin) != k || er > tol || ei > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d frame %0d X(%0d) pos %0d: got %g, %g expected %g, %g", N, frame_out,
                     k, out_pos, fp32_to_real(out_re), fp32_to_real(out_im),
                     ref_re[frame_out][k], ref_im[frame_out][k]);
        end
        if (frame_out == 0 && pos_expect == N - 1) begin
          checks++;
          if (period - first_in_period + 1 != LATENCY) begin
            failures++;
            $display("FAIL N=%0d latency %0d, expected %0d", N, period - first_in_period + 1, LATENCY);
          end else
            $display("N=%0d: latency %0d sample periods", N, period - first_in_period + 1);
        end
        pos_expect++;
        if (pos_expect == N) begin pos_expect = 0; frame_out++; end
      end
    end
  end

  initial begin
    real xr[], xi[], yr[], yi[];
    done = 0;
    checks = 0;
    failures = 0;
    for (int s = 0; s < LOG2N; s++) swap_seen[s] = 0;
    xr = new[N]; xi = new[N];
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        xin_re[f][n] = rand_fp32(1000);
        xin_im[f][n] = rand_fp32(1000);
        xr[n] = fp32_to_real(xin_re[f][n]);
        xi[n] = fp32_to_real(xin_im[f][n]);
      end
      dft(N, xr, xi, yr, yi);
      ref_max[f] = 0.0;
      for (int k = 0; k < N; k++) begin
        ref_re[f][k] = yr[k];
        ref_im[f][k] = yi[k];
        if (fabs(yr[k]) > ref_max[f]) ref_max[f] = fabs(yr[k]);
        if (fabs(yi[k]) > ref_max[f]) ref_max[f] = fabs(yi[k]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (frame_out == NFRAMES);
    for (int s = 0; s < LOG2N; s++) begin
      checks++;
      if (swap_seen[s] != 3) begin
        failures++;
        $display("FAIL N=%0d stage %0d swap settings seen %b", N, s, swap_seen[s]);
      end
    end
    repeat (8) @(posedge clk);
    done = 1;
  end

endmodule
