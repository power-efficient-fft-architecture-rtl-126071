// tb_fft8_dif: streams NB blocks of 8 random complex samples (plus an impulse
// and a full-scale block) back to back into fft8_dif, input in natural
// order, and compares every output sample, 12 cycles after the input sample
// in the same position, with an 8-point DFT computed in real arithmetic,
// output expected in bit-reversed order.
module tb_fft8_dif;
  import fft_pkg::*;
  localparam int NB = 200;
  localparam int LAT = 12;
  logic clk = 0, rst_n = 0;
  cplx_t x, y;
  logic [2:0] ph_i;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real xr [NB*8], xi [NB*8];

  fft8_dif dut (.*);

  always #5 clk = ~clk;

  function automatic int br3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    repeat (NB * 8 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < 8; n++) begin
        xr[b*8+n] = real'($signed($urandom) >>> 16);
        xi[b*8+n] = real'($signed($urandom) >>> 16);
        if (b == 0) begin xr[n] = (n == 0) ? 1000.0 : 0.0; xi[n] = 0.0; end
        if (b == 1) begin xr[8+n] = 32767.0; xi[8+n] = -32768.0; end
      end
    x = '0; ph_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NB * 8 + LAT; t++) begin
      @(negedge clk);
      if (t >= LAT) begin : chk
        int i, b, p, kout;
        real er, ei, tol, sa;
        i = t - LAT; b = i / 8; p = i % 8;
        kout = ("dif" == "dif") ? br3(p) : p;
        er = 0.0; ei = 0.0; sa = 0.0;
        for (int n = 0; n < 8; n++) begin
          real a;
          a  = -2.0 * 3.14159265358979 * n * kout / 8.0;
          er += xr[b*8+n] * $cos(a) - xi[b*8+n] * $sin(a);
          ei += xr[b*8+n] * $sin(a) + xi[b*8+n] * $cos(a);
          sa += rabs(xr[b*8+n]) + rabs(xi[b*8+n]);
        end
        tol = 4.0 + 1.2e-4 * sa;
        checks++;
        if (rabs(real'(y.re) - er) > tol || rabs(real'(y.im) - ei) > tol) begin
          failures++;
          if (failures < 10)
            $display("FAIL block %0d X[%0d] got (%0d,%0d) want (%f,%f)", b, kout, y.re, y.im, er, ei);
        end
      end
      if (t < NB * 8) begin : drv
        int b, p, n;
        b = t / 8; p = t % 8;
        n = ("dif" == "dif") ? p : br3(p);
        x.re = DW'(longint'(xr[b*8+n]));
        x.im = DW'(longint'(xi[b*8+n]));
      end else x = '0;
      ph_i = 3'(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
