// sdf_stage: one radix-2 butterfly stage with a D-deep delay line, the
// building block of the 8-point DIT and DIF pipelines. Samples arrive one per
// cycle; c = position of the current sample within its block of 2D.
// While c < D the sample is parked in the delay line and the line's oldest
// entry (a difference of the previous block) leaves. While c >= D the
// sample b meets its partner a (index c - D) from the delay line: a + b
// leaves at once and a - b goes into the delay line.
// JROT adds the trivial twiddle -j of a span-2 stage (W4^1): DIF applies it
// to the second difference leaving the line, DIT to the second lower input
// before the butterfly. Larger twiddles are applied outside (smss_w8).
// Output is registered; latency D + 1 cycles, order of positions unchanged.
// The source says only that the 8-point FFTs are radix-2 pipelines; this
// delay-feedback form, which suits one sample per cycle, is this design's.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int D    = 4,
  parameter bit DIF  = 1'b1,
  parameter bit JROT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      x,
  input  logic [2:0] ph_i,   // position of x within its 8-sample block
  output cplx_t      y
);
  localparam int CB = $clog2(2 * D);

  cplx_t fifo [D];
  cplx_t fo, b, fifo_in, out_c;
  logic [CB-1:0] c;
  logic lower;

  always_comb begin
    c     = ph_i[CB-1:0];
    lower = (int'(c) >= D);
    fo    = fifo[D-1];
    b     = x;
    if (!DIF && JROT && lower && (int'(c) - D >= D / 2)) b = c_mul_mj(x);
    if (lower) begin
      out_c   = c_add(fo, b);
      fifo_in = c_sub(fo, b);
    end else begin
      out_c   = fo;
      if (DIF && JROT && (int'(c) >= D / 2)) out_c = c_mul_mj(fo);
      fifo_in = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) fifo[i] <= '0;
      y <= '0;
    end else begin
      fifo[0] <= fifo_in;
      for (int i = 1; i < D; i++) fifo[i] <= fifo[i-1];
      y <= out_c;
    end
  end
endmodule
