// fft_top_tb: end-to-end test of the 8-point FFT pipeline at its default size.
//
// Frame 0 is the eight-sample test vector (2+4j, 1-3j, 7+21j, 15+5j, 12+8j,
// 26-31j, -4-9j, -10-21j) whose transform is known to be
// X = 49-26j, 22.83-13.59j, 33.54+5.59j, -113.54+8.41j, -15+74j, 17.17-16.41j,
// -7-22j, 29+22j (in natural order); the results are compared both with a
// DFT worked out in the testbench and, bit for bit, with the single precision
// results of the reference design for this vector. Then NRAND (62) random frames
// are sent back to back, the pipeline is left to run dry and stop, and one
// more random frame is sent from idle. Every result is checked against the
// DFT with a tolerance relative to the largest output of its frame; the
// swap settings of the three butterfly stages during the first frame are
// checked against their published schedule, and the latency of the first
// frame is checked against 2*(N + log2 N - 1) sample periods (20 for N = 8),
// counting the period in which x(0) is offered and the one in which the last
// result appears. The test also counts how often each mechanism happened: both
// swap settings of every butterfly stage, non-trivial twiddle factors in
// every twiddle stage, back-to-back frames, and the pipeline stopping when
// idle and restarting.
module fft_top_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int LOG2N = 3;          // fft_top default
  localparam int N     = 2 ** LOG2N;
  localparam int NRAND = 62;   // with frame 0 and the last frame: 64 frames, 512 samples
  localparam int NFRAMES = NRAND + 2;
  localparam real TOL = 2.0e-5;
  // sample periods from the one in which x(0) is offered to the one in which
  // the last result of the frame appears, both counted
  localparam int LATENCY = 2 * (N + LOG2N - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  fp32_t in_re = '0, in_im = '0;
  logic sample_en, frame_start, out_valid;
  fp32_t out_re, out_im;
  logic [LOG2N-1:0] out_pos, out_bin;

  fft_top dut (
    .clk, .rst_n, .in_valid, .in_re, .in_im, .sample_en, .frame_start,
    .out_valid, .out_re, .out_im, .out_pos, .out_bin
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // input frames
  fp32_t xin_re [NFRAMES][N];
  fp32_t xin_im [NFRAMES][N];

  // frame 0 and its reference-design results in output order (bit-reversed)
  localparam fp32_t VEC_RE [8] = '{32'h40000000, 32'h3f800000, 32'h40e00000, 32'h41700000,
                                   32'h41400000, 32'h41D00000, 32'hC0800000, 32'hC1200000};
  localparam fp32_t VEC_IM [8] = '{32'h40800000, 32'hc0400000, 32'h41A80000, 32'h40A00000,
                                   32'h41000000, 32'hC1F80000, 32'hC1100000, 32'hC1A80000};
  localparam fp32_t REF_RE [8] = '{32'h42440000, 32'hC1700000, 32'hC0E00000, 32'h41E80000,
                                   32'h41B6A09F, 32'h41895f61, 32'h42062808, 32'hC2E31404};
  localparam fp32_t REF_IM [8] = '{32'hC1D00000, 32'h42940000, 32'hC1B00000, 32'h41B00000,
                                   32'hC1595f64, 32'hC183504E, 32'h40B2BEC4, 32'h4106A09E};

  int period = 0;                    // counts sample periods
  int first_in_period = -1;
  int frame_out = 0, pos_expect = 0;
  int n_exact = 0;
  int n_swap_checked = 0;
  // mechanism counters
  int swap_cnt [LOG2N][2];
  int twid_nontrivial [LOG2N];
  int n_back_to_back = 0, n_idle_stop = 0, n_restart = 0;
  bit was_idle = 0;

  task automatic check_swaps();
    logic sw [3];
    sw[0] = dut.g_stage[0].u_mux.swap;
    sw[1] = dut.g_stage[1].u_mux.swap;
    sw[2] = dut.g_stage[2].u_mux.swap;
    for (int st = 0; st < 3; st++) begin
      int row;
      row = period - first_in_period;
      if (row >= 0 && row < 19 && SWAP_TAB[st][row] != "x") begin
        checks++;
        n_swap_checked++;
        if (sw[st] != (SWAP_TAB[st][row] == "1")) begin
          failures++;
          $display("FAIL swap of stage %0d in row %0d is %0d", st + 1, row, sw[st]);
        end
      end
    end
  endtask

  // drive the inputs for the sample edge at the end of this fast cycle
  int f_in = 0, n_in = 0;
  bit sending = 0;
  bit hold_gap = 0;
  always @(negedge clk) begin
    if (sample_en) begin
      period++;
      if (first_in_period >= 0) check_swaps();
      if (rst_n && !hold_gap && f_in < NFRAMES && (sending || frame_start)) begin
        if (n_in == 0 && dut.busy) n_back_to_back++;
        if (n_in == 0 && f_in == NFRAMES - 1 && was_idle) n_restart++;
        if (f_in == 0 && n_in == 0) first_in_period = period;
        in_valid = 1'b1;
        in_re = xin_re[f_in][n_in];
        in_im = xin_im[f_in][n_in];
        sending = 1;
        n_in++;
        if (n_in == N) begin
          n_in = 0; f_in++; sending = 0;
          if (f_in == NFRAMES - 1) hold_gap = 1;   // last frame waits for idle
        end
      end else begin
        in_valid = 1'b0;
        in_re = '0;
        in_im = '0;
      end
    end
  end

  // release the last frame once the pipeline has been idle for a while
  int idle_periods = 0;
  always @(negedge clk) begin
    if (sample_en && hold_gap) begin
      if (!dut.busy && !dut.ctrl.tick) begin
        idle_periods++;
        if (idle_periods == 1) n_idle_stop++;
        was_idle = 1;
        if (idle_periods == 5) hold_gap = 0;
      end
    end
  end

  // Swap schedule of the first frame, row k = k sample periods after the
  // period in which x(0) is offered ("x" = not used); all three stages must
  // follow it exactly.
  localparam string SWAP_TAB [3] = '{"000001111xxxxxxxxxx", "xxxxxxx00110011xxxx"
                                     , "xxxxxxxxxxx01010101"};
  // mechanism counting on the sample edges that step the pipeline
  always @(posedge clk) begin
    if (rst_n && dut.ctrl.tick) begin
      if (dut.g_stage[0].u_mux.in_q.valid) swap_cnt[0][dut.g_stage[0].u_mux.swap]++;
      if (dut.g_stage[1].u_mux.in_q.valid) swap_cnt[1][dut.g_stage[1].u_mux.swap]++;
      if (dut.g_stage[2].u_mux.in_q.valid) swap_cnt[2][dut.g_stage[2].u_mux.swap]++;
      if (dut.g_stage[0].g_tw.u_tw.din.valid &&
          dut.g_stage[0].g_tw.u_tw.w != {FP_ONE, FP_ZERO}) twid_nontrivial[0]++;
      if (dut.g_stage[1].g_tw.u_tw.din.valid &&
          dut.g_stage[1].g_tw.u_tw.w != {FP_ONE, FP_ZERO}) twid_nontrivial[1]++;
    end
  end

  // reference transforms
  real ref_re [NFRAMES][N];
  real ref_im [NFRAMES][N];
  real ref_max [NFRAMES];

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < LOG2N; b++) if ((v & (1 << b)) != 0) r |= 1 << (LOG2N - 1 - b);
    return r;
  endfunction

  // check the results, taken once per sample period
  always @(negedge clk) begin
    if (sample_en && out_valid && frame_out < NFRAMES) begin
      int k;
      real er, ei, tol;
      k = bitrev(pos_expect);
      checks++;
      if (int'(out_pos) != pos_expect || int'(out_bin) != k) begin
        failures++;
        $display("FAIL frame %0d: position %0d/bin %0d, expected %0d/%0d",
                 frame_out, out_pos, out_bin, pos_expect, k);
      end
      er = fabs(fp32_to_real(out_re) - ref_re[frame_out][k]);
      ei = fabs(fp32_to_real(out_im) - ref_im[frame_out][k]);
      tol = TOL * ref_max[frame_out] + 1.0e-6;
      checks++;
      if (er > tol || ei > tol) begin
        failures++;
        $display("FAIL frame %0d X(%0d): got %g, %g j expected %g, %g j", frame_out, k,
                 fp32_to_real(out_re), fp32_to_real(out_im), ref_re[frame_out][k], ref_im[frame_out][k]);
      end
      if (frame_out == 0) begin
        if (out_re == REF_RE[pos_expect] && out_im == REF_IM[pos_expect]) n_exact++;
        else $display("note: X(%0d) = %h %h, reference design gave %h %h", k, out_re, out_im,
                      REF_RE[pos_expect], REF_IM[pos_expect]);
        if (pos_expect == N - 1) begin
          checks++;
          if (period - first_in_period + 1 != LATENCY) begin
            failures++;
            $display("FAIL latency %0d sample periods, expected %0d", period - first_in_period + 1,
                     LATENCY);
          end else $display("latency of first frame: %0d sample periods", period - first_in_period + 1);
        end
      end
      pos_expect++;
      if (pos_expect == N) begin
        pos_expect = 0;
        frame_out++;
      end
    end
  end

  initial begin
    real xr[], xi[], yr[], yi[];
    xr = new[N]; xi = new[N];
    for (int f = 0; f < NFRAMES; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin
          xin_re[f][n] = VEC_RE[n];
          xin_im[f][n] = VEC_IM[n];
        end else begin
          xin_re[f][n] = rand_fp32(1000);
          xin_im[f][n] = rand_fp32(1000);
        end
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
    repeat (40) @(posedge clk);
    // bit-exact agreement with the reference design on the test vector
    checks++;
    if (n_exact != N) begin
      failures++;
      $display("FAIL only %0d of %0d results of the test vector are bit-exact", n_exact, N);
    end
    checks++;
    if (n_swap_checked != 24) begin
      failures++;
      $display("FAIL %0d swap settings compared with the schedule", n_swap_checked);
    end
    // every mechanism must have happened
    for (int s = 0; s < LOG2N; s++) begin
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (swap_cnt[s][v] == 0) begin
          failures++;
          $display("FAIL stage %0d never ran with swap=%0d", s, v);
        end
      end
    end
    for (int s = 0; s < LOG2N - 1; s++) begin
      checks++;
      if (twid_nontrivial[s] == 0) begin
        failures++;
        $display("FAIL twiddle stage %0d never used a factor other than 1", s);
      end
    end
    checks++;
    if (n_back_to_back == 0 || n_idle_stop == 0 || n_restart == 0) begin
      failures++;
      $display("FAIL back-to-back %0d, idle stops %0d, restarts %0d",
               n_back_to_back, n_idle_stop, n_restart);
    end
    // the stopped pipeline must not load its sample registers
    checks++;
    if (dut.busy || dut.ctrl.tick) begin
      failures++;
      $display("FAIL pipeline did not stop after the last frame");
    end
    $display("mechanisms: swap0/1 per stage %0d/%0d %0d/%0d %0d/%0d, twiddle %0d %0d, back-to-back %0d, idle stops %0d, restarts %0d, exact %0d/%0d",
             swap_cnt[0][0], swap_cnt[0][1], swap_cnt[1][0], swap_cnt[1][1], swap_cnt[2][0], swap_cnt[2][1],
             twid_nontrivial[0], twid_nontrivial[1], n_back_to_back, n_idle_stop, n_restart, n_exact, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired, %0d frames checked", frame_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
