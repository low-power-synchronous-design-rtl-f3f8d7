// fp_mult_tb: checks the single precision multiplier.
// * products of small integers and of powers of two, exact and bit-exact;
// * zero operands give a signed zero;
// * random values, compared with the real-valued product: the truncating
//   design must be below the true magnitude by less than one unit in the
//   last place of the result.
module fp_mult_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp_mult dut (.a, .b, .y);

  task automatic check_exact(input real ra, input real rb);
    a = real_to_fp32(ra);
    b = real_to_fp32(rb);
    #1;
    checks++;
    if (y !== real_to_fp32(ra * rb) && !(ra * rb == 0.0 && y[30:0] == 31'd0)) begin
      failures++;
      $display("FAIL %g * %g = %h, expected %h", ra, rb, y, real_to_fp32(ra * rb));
    end
  endtask

  initial begin
    check_exact(2.0, 3.0);
    check_exact(-1.5, 2.5);
    check_exact(-4.0, -0.25);
    check_exact(1.0, 1.0);
    check_exact(3.0, 3.0);       // product bit 47 clear
    check_exact(1.75, 1.75);     // product bit 47 set
    check_exact(0.0, 5.0);
    check_exact(-5.0, 0.0);
    // sign of a zero product
    a = 32'h0000_0000; b = 32'hC0A0_0000; #1;
    checks++;
    if (y !== 32'h8000_0000) begin failures++; $display("FAIL 0 * -5 = %h", y); end
    repeat (2000) begin
      int ia, ib;
      ia = int'($urandom_range(8000, 0)) - 4000;
      ib = int'($urandom_range(4000, 0)) - 2000;
      check_exact(real'(ia), real'(ib));
    end
    repeat (3000) begin
      real ex, got, tol;
      a = {1'($urandom), 8'($urandom_range(180, 80)), 23'($urandom)};
      b = {1'($urandom), 8'($urandom_range(180, 80)), 23'($urandom)};
      #1;
      ex  = fp32_to_real(a) * fp32_to_real(b);
      got = fp32_to_real(y);
      tol = fabs(ex) * (2.0 ** -23);
      checks++;
      if (fabs(got) > fabs(ex) || fabs(ex) - fabs(got) > tol || (got < 0.0) != (ex < 0.0)) begin
        failures++;
        $display("FAIL %h * %h = %h (%g), expected %g", a, b, y, got, ex);
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
