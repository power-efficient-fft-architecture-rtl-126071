// tb_fft16_smss_top: end-to-end test of the two-stream 16-point FFT at its
// default size. Streams A and B each send NF frames back to back, one
// sample per cycle, starting in the first cycle after reset: random frames
// of several amplitudes, an impulse, a full-scale constant and a full-scale
// alternating frame. Every output is compared with a 16-point DFT computed
// in real arithmetic (tolerance: a few LSB plus the relative error of the
// shift-add 1/sqrt(2) constant). The test also checks that X_A[0] of the
// first frame appears exactly 42 cycles and X_B[0] 50 cycles after the first
// input, that output indices run 0..15 without gaps, and it counts the
// mechanisms of the design: SW1 and SW2 in swap and in normal mode, the two
// switches always in opposite modes, and the shared SMSS multiplier serving a
// held difference in both the DIT and the DIF path.
module tb_fft16_smss_top;
  import fft_pkg::*;
  localparam int N  = 16;
  localparam int NF = 64;
  localparam int LAT_A = 42;
  localparam int LAT_B = 50;
  localparam int T_END = NF * N + LAT_B;

  logic clk = 0, rst_n = 0;
  cin_t in_a, in_b;
  cplx_t out_a, out_b;
  logic [3:0] out_a_idx, out_b_idx;
  logic out_a_valid, out_b_valid;
  int checks = 0, failures = 0;
  real ar [NF*N], ai [NF*N], br [NF*N], bi [NF*N];
  int n_sw1_swap = 0, n_sw1_norm = 0, n_sw2_swap = 0, n_sw2_norm = 0;
  int n_same_mode = 0, n_smss_dit = 0, n_smss_dif = 0, n_out_a = 0, n_out_b = 0;
  real max_err = 0.0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  fft16_smss_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (T_END + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fill one frame of one stream with test data of a given kind.
  task automatic gen(input int f, output real re [N], output real im [N]);
    int kind, sh;
    kind = f % 8;
    sh   = 16 + ($urandom % 12);
    for (int n = 0; n < N; n++) begin
      re[n] = real'($signed($urandom) >>> sh);
      im[n] = real'($signed($urandom) >>> sh);
      if (kind == 3) begin re[n] = (n == f % N) ? 20000.0 : 0.0; im[n] = 0.0; end
      if (kind == 5) begin re[n] = 32767.0; im[n] = -32768.0; end
      if (kind == 6) begin re[n] = (n % 2) ? -32768.0 : 32767.0; im[n] = (n % 4 < 2) ? 32767.0 : -32768.0; end
      if (kind == 7) begin re[n] = 16000.0 * $cos(2.0 * 3.14159265358979 * 3 * n / 16.0);
                           im[n] = 16000.0 * $sin(2.0 * 3.14159265358979 * 3 * n / 16.0); end
    end
  endtask

  task automatic check_out(input string s, input int t, input int lat, input cplx_t y,
                           input logic [3:0] idx, input logic valid, ref real xr [NF*N],
                           ref real xi [NF*N]);
    int f, k;
    real er, ei, sa, tol, e;
    checks++;
    if (valid != (t >= lat && t < lat + NF * N + N)) begin
      failures++;
      if (failures < 10) $display("FAIL %s valid=%0d at cycle %0d", s, valid, t);
      return;
    end
    if (!valid || t >= lat + NF * N) return;
    f = (t - lat) / N;
    k = (t - lat) % N;
    er = 0.0; ei = 0.0; sa = 0.0;
    for (int n = 0; n < N; n++) begin
      real a;
      a  = -2.0 * 3.14159265358979 * n * k / 16.0;
      er += xr[f*N+n] * $cos(a) - xi[f*N+n] * $sin(a);
      ei += xr[f*N+n] * $sin(a) + xi[f*N+n] * $cos(a);
      sa += rabs(xr[f*N+n]) + rabs(xi[f*N+n]);
    end
    tol = 6.0 + 1.5e-4 * sa;
    e = rabs(real'(y.re) - er);
    if (rabs(real'(y.im) - ei) > e) e = rabs(real'(y.im) - ei);
    if (e > max_err) max_err = e;
    checks++;
    if (int'(idx) != k || e > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s frame %0d X[%0d] idx %0d got (%0d,%0d) want (%f,%f)",
                                  s, f, k, idx, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      real re [N], im [N];
      gen(f, re, im);
      for (int n = 0; n < N; n++) begin ar[f*N+n] = re[n]; ai[f*N+n] = im[n]; end
      gen(f + 3, re, im);
      for (int n = 0; n < N; n++) begin br[f*N+n] = re[n]; bi[f*N+n] = im[n]; end
    end
    in_a = '0; in_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < T_END; t++) begin
      // cycle t: outputs from the previous edge are settled; present sample t
      if (t > 0) @(negedge clk);
      check_out("A", t, LAT_A, out_a, out_a_idx, out_a_valid, ar, ai);
      check_out("B", t, LAT_B, out_b, out_b_idx, out_b_valid, br, bi);
      if (out_a_valid) n_out_a++;
      if (out_b_valid) n_out_b++;
      if (t < NF * N) begin
        in_a.re = IW'(longint'(ar[t])); in_a.im = IW'(longint'(ai[t]));
        in_b.re = IW'(longint'(br[t])); in_b.im = IW'(longint'(bi[t]));
      end else begin
        in_a = '0; in_b = '0;
      end
      if (dut.sw1_swap) n_sw1_swap++; else n_sw1_norm++;
      if (dut.sw2_swap) n_sw2_swap++; else n_sw2_norm++;
      if (dut.sw1_swap == dut.sw2_swap) n_same_mode++;
      if (dut.u_p2.u_pe2.pend) n_smss_dit++;
      if (dut.u_q2.u_pe2.pend) n_smss_dif++;
    end
    $display("SW1 swap %0d normal %0d, SW2 swap %0d normal %0d, same-mode cycles %0d",
             n_sw1_swap, n_sw1_norm, n_sw2_swap, n_sw2_norm, n_same_mode);
    $display("SMSS held-difference products: DIT %0d DIF %0d; outputs A %0d B %0d; max error %f",
             n_smss_dit, n_smss_dif, n_out_a, n_out_b, max_err);
    checks++; if (n_sw1_swap == 0 || n_sw1_norm == 0) begin failures++; $display("FAIL SW1 mode never used"); end
    checks++; if (n_sw2_swap == 0 || n_sw2_norm == 0) begin failures++; $display("FAIL SW2 mode never used"); end
    checks++; if (n_same_mode != 0) begin failures++; $display("FAIL SW1 and SW2 in the same mode"); end
    checks++; if (n_smss_dit == 0 || n_smss_dif == 0) begin failures++; $display("FAIL SMSS sharing never used"); end
    checks++; if (n_out_a != NF * N + LAT_B - LAT_A || n_out_b != NF * N) begin
      failures++; $display("FAIL output counts A %0d B %0d", n_out_a, n_out_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
