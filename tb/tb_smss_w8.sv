// tb_smss_w8: feeds one random sample per cycle with a twiddle exponent k
// (odd k never on two consecutive samples, as in the FFT pipelines) and
// compares each output, exactly 2 cycles later, with the sample rotated by
// exp(-j*pi*k/4) in real arithmetic. Tolerance: 3 LSB plus the 1.1e-4
// relative error of the shift-add constant.
module tb_smss_w8;
  import fft_pkg::*;
  localparam int NS = 3000;
  logic clk = 0, rst_n = 0;
  cplx_t x, y;
  logic [1:0] k;
  int checks = 0, failures = 0, nodd = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real xr [NS], xi [NS];
  int  kk [NS];

  smss_w8 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; k = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NS + 2; t++) begin
      @(negedge clk);
      if (t >= 2) begin : chk
        real er, ei, c, s, m;
        int i;
        i  = t - 2;
        c  = $cos(3.14159265358979 * kk[i] / 4.0);
        s  = -$sin(3.14159265358979 * kk[i] / 4.0);
        er = xr[i] * c - xi[i] * s;
        ei = xr[i] * s + xi[i] * c;
        m  = 3.0 + 1.2e-4 * (rabs(xr[i]) + rabs(xi[i]));
        checks++;
        if (rabs(real'(y.re) - er) > m || rabs(real'(y.im) - ei) > m) begin
          failures++;
          $display("FAIL i=%0d k=%0d got (%0d,%0d) want (%f,%f)", i, kk[i], y.re, y.im, er, ei);
        end
      end
      if (t < NS) begin
        if (t > 0 && kk[t-1] % 2 == 1) kk[t] = 2 * ($urandom % 2);
        else                           kk[t] = $urandom % 4;
        if (kk[t] % 2 == 1) nodd++;
        x.re = DW'($signed($urandom) >>> 12);
        x.im = DW'($signed($urandom) >>> 12);
        if (t < 8) begin   // extremes
          x.re = (t % 2) ? DW'(-(1 <<< 19)) : DW'((1 <<< 19) - 1);
          x.im = (t % 4 < 2) ? DW'((1 <<< 19) - 1) : DW'(-(1 <<< 19));
        end
        xr[t] = real'(x.re);
        xi[t] = real'(x.im);
        k = 2'(kk[t]);
      end else begin
        x = '0; k = 2'd0;
      end
    end
    checks++;
    if (nodd < NS / 5) begin
      failures++;
      $display("FAIL too few shared-multiplier uses: %0d", nodd);
    end
    $display("shared multiplier served %0d odd twiddles", nodd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
