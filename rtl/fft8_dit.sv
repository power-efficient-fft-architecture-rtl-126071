// fft8_dit: 8-point radix-2 decimation-in-time FFT (the P2 stage). Takes one
// sample per cycle in bit-reversed order (position p carries x[bitrev3(p)])
// and delivers the transform in natural order, blocks back to back.
// Three delay-feedback butterfly stages of span 1, 2, 4; the lower inputs of
// the span-2 stage are rotated by 1 and -j, those of the span-4 stage by
// W8^0..3 in the SMSS unit (shared 1/sqrt(2) multiplier).
// Which samples it takes and its output order follow the source; the stage
// form (delay feedback) and the latency are this design's choices.
// ph_i is the position of x within its block; LAT = 12 cycles from a sample
// entering to the output sample in the same position (1+1, 2+1, 2, 4+1).
module fft8_dit
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      x,
  input  logic [2:0] ph_i,
  output cplx_t      y
);
  cplx_t y1, y2, y3;
  logic [2:0] ph1, ph2, ph3;
  logic [1:0] k2;

  always_comb begin
    ph1 = ph_i - 3'd2;                 // after stage 1 (1 + 1)
    ph2 = ph1 - 3'd3;                  // after stage 2 (2 + 1)
    ph3 = ph2 - 3'd2;                  // after SMSS unit
    k2  = ph2[2] ? ph2[1:0] : 2'd0;    // lower inputs of span 4 sit in 4..7
  end

  sdf_stage #(.D(1), .DIF(1'b0), .JROT(1'b0)) u_s1 (.clk, .rst_n, .x(x),  .ph_i(ph_i), .y(y1));
  sdf_stage #(.D(2), .DIF(1'b0), .JROT(1'b1)) u_s2 (.clk, .rst_n, .x(y1), .ph_i(ph1),  .y(y2));
  smss_w8                                     u_pe2 (.clk, .rst_n, .x(y2), .k(k2),      .y(y3));
  sdf_stage #(.D(4), .DIF(1'b0), .JROT(1'b0)) u_s3 (.clk, .rst_n, .x(y3), .ph_i(ph3),  .y(y));
endmodule
