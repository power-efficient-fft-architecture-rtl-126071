// tb_tw16_mul: random samples with random k in 0..7; each output, one cycle
// later, must be within 2 LSB of the sample times exp(-j*2*pi*k/16)
// (computed in real arithmetic; coefficient quantisation 2^-15 included).
module tb_tw16_mul;
  import fft_pkg::*;
  localparam int NS = 2000;
  logic clk = 0, rst_n = 0;
  cplx_t x, y;
  logic [2:0] k;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real xr [NS], xi [NS];
  int  kk [NS];

  tw16_mul dut (.*);

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
    for (int t = 0; t < NS + 1; t++) begin
      @(negedge clk);
      if (t >= 1) begin : chk
        real er, ei, c, s, m;
        int i;
        i  = t - 1;
        c  = $cos(2.0 * 3.14159265358979 * kk[i] / 16.0);
        s  = -$sin(2.0 * 3.14159265358979 * kk[i] / 16.0);
        er = xr[i] * c - xi[i] * s;
        ei = xr[i] * s + xi[i] * c;
        m  = 1.5 + 6.2e-5 * (rabs(xr[i]) + rabs(xi[i]));
        checks++;
        if (rabs(real'(y.re) - er) > m || rabs(real'(y.im) - ei) > m) begin
          failures++;
          $display("FAIL i=%0d k=%0d got (%0d,%0d) want (%f,%f)", i, kk[i], y.re, y.im, er, ei);
        end
      end
      if (t < NS) begin
        kk[t] = (t < 8) ? t : $urandom % 8;
        x.re = DW'($signed($urandom) >>> 11);
        x.im = DW'($signed($urandom) >>> 11);
        xr[t] = real'(x.re);
        xi[t] = real'(x.im);
        k = 3'(kk[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
