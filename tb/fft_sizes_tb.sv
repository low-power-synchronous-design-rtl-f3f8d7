// fft_sizes_tb: runs the FFT pipeline at every larger size of its latency
// table, N = 16, 32, 64, 128, 256, 512 and 1024, side by side (see
// fft_size_check). The latency checked for each is 2*(N + log2 N - 1) sample
// periods: 38, 72, 138, 268, 526, 1040 and 2066.
module fft_sizes_tb;
  localparam int NSIZES = 7;   // LOG2N = 4 .. 10
  logic done     [NSIZES];
  int   checks   [NSIZES];
  int   failures [NSIZES];

  for (genvar i = 0; i < NSIZES; i++) begin : g_size
    fft_size_check #(.LOG2N(i + 4), .NFRAMES(i < 4 ? 3 : 2)) u_chk (
      .done(done[i]), .checks(checks[i]), .failures(failures[i])
    );
  end

  function automatic int total(input int v [NSIZES]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    do #100; while (!all_done());
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end
endmodule
