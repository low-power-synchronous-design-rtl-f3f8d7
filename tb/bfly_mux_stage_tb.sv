// bfly_mux_stage_tb: checks the butterfly stage at the three feedback depths
// of the 8-point FFT (4, 2 and 1), with one stage of each depth fed the same
// input stream. Four frames of integer-valued samples are streamed back to
// back, followed by idle samples that flush the last differences out. For a
// stage of depth D and output position m, with m' = m mod 2D and b = m - m',
// the stage must give x(b+m') + x(b+m'+D) when m' < D and x(b+m'-D) - x(b+m')
// when m' >= D; with integer values these are exact, so the results are
// compared bit for bit. The output positions, the valid flags, the latency
// (first result seen D + 1 sample periods after the first sample was
// offered) and the busy flag once all is flushed are checked as well. The
// controls are generated here from a phase counter of its own.
module bfly_mux_stage_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  localparam int LOG2N = 3, N = 8, NF = 4, NS = 3;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  stage_bus_t din;
  stage_bus_t dout [NS];
  logic busy [NS];
  int checks = 0, failures = 0;

  // stage g has feedback depth 4 >> g
  for (genvar g = 0; g < NS; g++) begin : g_dut
    bfly_mux_stage #(.LOG2N(LOG2N), .FB_DEPTH(4 >> g)) dut (
      .clk, .rst_n, .ctrl, .din, .dout(dout[g]), .busy(busy[g])
    );
  end

  always #5 clk = ~clk;

  logic [1:0] ph = 0;
  always @(posedge clk) ph <= ph + 1;
  always_comb begin
    ctrl = '0;
    ctrl.tick = (ph == 3);
    ctrl.mid  = (ph == 1);
    ctrl.s1   = ph[0];
    ctrl.ctl  = ph[1];
  end

  int xr [NF*N], xi [NF*N];
  int period = 0, first_period = -1, n_sent = 0;
  int n_out [NS] = '{default: 0};

  always @(negedge clk) if (rst_n && ph == 3) begin
    period++;
    // check the output registers (loaded on the half-period edge)
    for (int g = 0; g < NS; g++) begin
      if (dout[g].valid) begin
        int d, m, mm, b, er, ei;
        d  = 4 >> g;
        m  = n_out[g];
        mm = m % (2 * d);
        b  = m - mm;
        if (n_out[g] == 0) begin
          checks++;
          if (period - first_period != d + 1) begin
            failures++;
            $display("FAIL depth %0d: first result after %0d periods", d, period - first_period);
          end
        end
        if (mm < d) begin
          er = xr[b+mm] + xr[b+mm+d];
          ei = xi[b+mm] + xi[b+mm+d];
        end else begin
          er = xr[b+mm-d] - xr[b+mm];
          ei = xi[b+mm-d] - xi[b+mm];
        end
        checks++;
        if (dout[g].d.re !== real_to_fp32(real'(er)) || dout[g].d.im !== real_to_fp32(real'(ei)) ||
            int'(dout[g].idx) != m % N) begin
          failures++;
          $display("FAIL depth %0d sample %0d (idx %0d): %g %g expected %0d %0d", d, m, dout[g].idx,
                   fp32_to_real(dout[g].d.re), fp32_to_real(dout[g].d.im), er, ei);
        end
        n_out[g]++;
      end
    end
    // drive the next input
    din = '0;
    din.idx = MAX_LOG2N'(n_sent % N);
    if (n_sent < NF * N) begin
      din.valid = 1;
      din.d.re = real_to_fp32(real'(xr[n_sent]));
      din.d.im = real_to_fp32(real'(xi[n_sent]));
      if (n_sent == 0) first_period = period;
    end
    n_sent++;
  end

  initial begin
    din = '0;
    for (int n = 0; n < NF * N; n++) begin
      xr[n] = int'($urandom_range(20000, 0)) - 10000;
      xi[n] = int'($urandom_range(20000, 0)) - 10000;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (n_sent == NF * N + 2 * N);
    for (int g = 0; g < NS; g++) begin
      checks++;
      if (n_out[g] != NF * N || busy[g]) begin
        failures++;
        $display("FAIL depth %0d: %0d results, busy %0d", 4 >> g, n_out[g], busy[g]);
      end
    end
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
