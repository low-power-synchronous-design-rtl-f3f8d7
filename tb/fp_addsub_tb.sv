// fp_addsub_tb: checks the single precision adder/subtractor.
// * the eight sign cases of the add/sub sign table with small integers,
//   where the exact result is representable and must come out bit-exact;
// * zero operands and x - x;
// * random integers below 2**20 (exact results, compared bit for bit);
// * random values over a wide exponent range, compared with the real-valued
//   result: the truncating design must be within two units in the last place
//   of the larger operand.
module fp_addsub_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a, .b, .sub, .y);

  task automatic check_exact(input real ra, input real rb, input logic s);
    real ex;
    a = real_to_fp32(ra);
    b = real_to_fp32(rb);
    sub = s;
    #1;
    ex = s ? ra - rb : ra + rb;
    checks++;
    if (y !== real_to_fp32(ex)) begin
      failures++;
      $display("FAIL %g %s %g = %h, expected %h", ra, s ? "-" : "+", rb, y, real_to_fp32(ex));
    end
  endtask

  function automatic real ulp(input fp32_t f);
    return fp32_to_real({1'b0, f[30:23], 23'd0}) / 8388608.0;
  endfunction

  initial begin
    // sign table: (+,+), (+,-), (-,+), (-,-) with add and with subtract,
    // both orders of magnitude
    for (int s = 0; s < 2; s++) begin
      check_exact( 5.0,  3.0, s[0]);
      check_exact( 5.0, -3.0, s[0]);
      check_exact(-5.0,  3.0, s[0]);
      check_exact(-5.0, -3.0, s[0]);
      check_exact( 3.0,  5.0, s[0]);
      check_exact( 3.0, -5.0, s[0]);
      check_exact(-3.0,  5.0, s[0]);
      check_exact(-3.0, -5.0, s[0]);
    end
    check_exact(1.0, 1.0, 1'b0);        // 2.0, carry out of the significand
    check_exact(0.0, 7.5, 1'b0);
    check_exact(7.5, 0.0, 1'b1);
    check_exact(0.0, 7.5, 1'b1);
    check_exact(123.25, 123.25, 1'b1);  // exact cancellation
    check_exact(1.0, 0.00048828125, 1'b1);  // long normalisation shift
    check_exact(65536.0, 65535.0, 1'b1);
    repeat (2000) begin
      int ia, ib;
      ia = int'($urandom_range(2_000_000, 0)) - 1_000_000;
      ib = int'($urandom_range(2_000_000, 0)) - 1_000_000;
      check_exact(real'(ia), real'(ib), 1'($urandom_range(1, 0)));
    end
    repeat (3000) begin
      real ra, rb, ex, got, tol;
      a = {1'($urandom), 8'($urandom_range(160, 100)), 23'($urandom)};
      b = {1'($urandom), 8'($urandom_range(160, 100)), 23'($urandom)};
      sub = 1'($urandom);
      #1;
      ra = fp32_to_real(a);
      rb = fp32_to_real(b);
      ex = sub ? ra - rb : ra + rb;
      got = fp32_to_real(y);
      tol = 2.0 * ((a[30:0] > b[30:0]) ? ulp(a) : ulp(b));
      checks++;
      if (fabs(got - ex) > tol) begin
        failures++;
        $display("FAIL %h %s %h = %h (%g), expected %g", a, sub ? "-" : "+", b, y, got, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
