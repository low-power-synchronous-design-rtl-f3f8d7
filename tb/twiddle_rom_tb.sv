// twiddle_rom_tb: checks the twiddle factor tables.
// For N = 8 the tables after stage 0 and stage 1 are compared bit for bit
// with the single precision constants 1, W8^1 = 0x3F3504F3 - j*0x3F3504F3,
// W8^2 = -j and W8^3 = -0x3F3504F3 - j*0x3F3504F3 at the positions where the
// decimation-in-frequency flow graph applies them. For N = 64 (stage 2) every
// entry is compared with cos/sin worked out here, within single precision
// rounding.
module twiddle_rom_tb;
  import fft_pkg::*;
  import fft_tb_pkg::*;

  logic [2:0] idx8;
  logic [5:0] idx64;
  cplx_t w0, w1, w64;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOG2N(3), .STAGE(0)) dut0 (.idx(idx8), .w(w0));
  twiddle_rom #(.LOG2N(3), .STAGE(1)) dut1 (.idx(idx8), .w(w1));
  twiddle_rom #(.LOG2N(6), .STAGE(2)) dut2 (.idx(idx64), .w(w64));

  localparam fp32_t H = 32'h3F35_04F3;          // cos(pi/4) in single precision
  localparam logic [63:0] EXP0 [8] = '{
    {FP_ONE, FP_ZERO}, {FP_ONE, FP_ZERO}, {FP_ONE, FP_ZERO}, {FP_ONE, FP_ZERO},
    {FP_ONE, FP_ZERO}, {H, H | 32'h8000_0000}, {FP_ZERO, 32'hBF80_0000},
    {H | 32'h8000_0000, H | 32'h8000_0000}};
  localparam logic [63:0] EXP1 [4] = '{
    {FP_ONE, FP_ZERO}, {FP_ONE, FP_ZERO}, {FP_ONE, FP_ZERO}, {FP_ZERO, 32'hBF80_0000}};

  initial begin
    for (int i = 0; i < 8; i++) begin
      idx8 = 3'(i);
      #1;
      checks += 2;
      if (w0 !== EXP0[i]) begin failures++; $display("FAIL N=8 stage 0 idx %0d: %h", i, w0); end
      if (w1 !== EXP1[i % 4]) begin failures++; $display("FAIL N=8 stage 1 idx %0d: %h", i, w1); end
    end
    for (int i = 0; i < 64; i++) begin
      real er, ei, ang;
      int k;
      idx64 = 6'(i);
      #1;
      // after stage 2 of 64: blocks of 16, lower half j = i%8 uses W64^(4j)
      k = ((i % 16) >= 8) ? (i % 8) * 4 : 0;
      ang = 2.0 * 3.14159265358979323846 * real'(k) / 64.0;
      er = $cos(ang);
      ei = -$sin(ang);
      checks++;
      if (fabs(fp32_to_real(w64.re) - er) > 1.0e-7 || fabs(fp32_to_real(w64.im) - ei) > 1.0e-7) begin
        failures++;
        $display("FAIL N=64 idx %0d: %g %g expected %g %g", i, fp32_to_real(w64.re),
                 fp32_to_real(w64.im), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
