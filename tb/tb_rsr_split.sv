// tb_rsr_split: two reorder units, LAT = N/2 (stream A) and LAT = N (stream
// B), are fed the same continuous stream of numbered samples. Output j of
// frame f must appear exactly LAT + j cycles after input 0 of frame f and be
// x[2j] for j < N/2 and x[2*bitrev(j-N/2)+1] otherwise; the position tag
// must equal j.
module tb_rsr_split;
  import fft_pkg::*;
  localparam int N  = 16;
  localparam int NF = 40;
  logic clk = 0, rst_n = 0;
  cplx_t x, ya, yb;
  logic [3:0] ph_i, pha, phb;
  int checks = 0, failures = 0;

  rsr_split #(.N(N), .LAT(N / 2)) dut_a (.clk, .rst_n, .x, .ph_i, .y(ya), .ph_o(pha));
  rsr_split #(.N(N), .LAT(N))     dut_b (.clk, .rst_n, .x, .ph_i, .y(yb), .ph_o(phb));

  always #5 clk = ~clk;

  function automatic int br3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  function automatic int src(input int j);
    return (j < N / 2) ? 2 * j : 2 * br3(j - N / 2) + 1;
  endfunction

  task automatic check(input int t, input int lat, input cplx_t y, input logic [3:0] ph);
    int f, j, want;
    if (t < lat) return;
    f = (t - lat) / N;
    j = (t - lat) % N;
    want = f * N + src(j);
    checks++;
    if (int'(y.re) != want || int'(y.im) != -want || int'(ph) != j) begin
      failures++;
      if (failures < 10) $display("FAIL lat %0d cycle %0d: got %0d tag %0d, want %0d tag %0d",
                                  lat, t, y.re, ph, want, j);
    end
  endtask

  initial begin
    repeat (NF * N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; ph_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NF * N; t++) begin
      @(negedge clk);
      check(t, N / 2, ya, pha);
      check(t, N, yb, phb);
      x.re = DW'(t);
      x.im = DW'(-t);
      ph_i = 4'(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
