// fft_ctrl_tb: checks the phase controls and the frame counter.
// The control lines are compared, in every fast cycle, with the schedule
// written out here: within a sample period s1 = 0,1,0,1 and the add/sub
// control 0,0,1,1 (real add, imaginary add, real subtract, imaginary
// subtract); the butterfly output edge (mid) is at the end of phase 1; the
// twiddle stage selects a_r*c_r, a_i*c_i, a_r*c_i, a_i*c_r in phases 2, 3, 0,
// 1 and subtracts in phase 0, adds in phase 2. It also checks that the frame
// counter steps once per sample period while a frame is sent, keeps running
// to the end of a frame and while busy is high, and stops at 0 when idle.
module fft_ctrl_tb;
  import fft_pkg::*;

  localparam int LOG2N = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, busy = 0;
  ctrl_t ctrl;
  logic sample_en, frame_start;
  logic [LOG2N-1:0] idx;
  int checks = 0, failures = 0;

  fft_ctrl #(.LOG2N(LOG2N)) dut (.clk, .rst_n, .in_valid, .busy, .ctrl, .sample_en,
                                 .frame_start, .idx);

  always #5 clk = ~clk;

  // expected schedule per phase: s1, ctl, sltm, sltn, mctl, cap_re, cap_out
  localparam logic [6:0] SCHED [4] = '{7'b0_0_0_1_1_1_0, 7'b1_0_1_0_0_0_0,
                                       7'b0_1_0_0_0_0_1, 7'b1_1_1_1_0_0_0};
  int ph_model = 0;
  int ticks = 0;

  always @(negedge clk) if (rst_n) begin
    checks++;
    if ({ctrl.s1, ctrl.ctl, ctrl.sltm, ctrl.sltn, ctrl.mctl, ctrl.cap_re, ctrl.cap_out}
        !== SCHED[ph_model] || sample_en !== (ph_model == 3)) begin
      failures++;
      $display("FAIL phase %0d: controls %b", ph_model,
               {ctrl.s1, ctrl.ctl, ctrl.sltm, ctrl.sltn, ctrl.mctl, ctrl.cap_re, ctrl.cap_out});
    end
    checks++;
    if (frame_start !== (idx == 0) || ctrl.tick !== (sample_en && (in_valid || busy || idx != 0)) ||
        ctrl.mid !== (ph_model == 1 && (in_valid || busy || idx != 0))) begin
      failures++;
      $display("FAIL tick/mid/frame_start");
    end
    if (ctrl.tick) ticks++;
    ph_model = (ph_model + 1) % 4;
  end

  task automatic wait_samples(input int n);
    repeat (n) begin
      do @(negedge clk); while (!sample_en);
    end
  endtask

  initial begin
    int t_start;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // idle: nothing moves
    wait_samples(5);
    checks++;
    if (idx !== 0 || ticks != 0) begin failures++; $display("FAIL moved while idle"); end
    // one sample offered: the counter must finish the frame by itself
    @(posedge clk); #1 in_valid = 1;
    wait_samples(1);
    @(posedge clk); #1 in_valid = 0;
    checks++;
    if (idx !== 1) begin failures++; $display("FAIL idx %0d after one sample", idx); end
    wait_samples(10);
    checks++;
    if (idx !== 0 || ticks != 8) begin failures++; $display("FAIL frame not completed: idx %0d ticks %0d", idx, ticks); end
    // busy keeps it stepping past the frame end
    busy = 1;
    t_start = ticks;
    wait_samples(12);
    checks++;
    if (ticks - t_start != 12 || idx !== 3'(12)) begin failures++; $display("FAIL busy run %0d", ticks - t_start); end
    busy = 0;
    wait_samples(10);
    checks++;
    if (idx !== 0) begin failures++; $display("FAIL did not stop at frame end, idx %0d", idx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
