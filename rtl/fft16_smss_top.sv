// fft16_smss_top: 16-point pipelined FFT for two independent complex streams
// A and B, each delivering one sample per cycle, with both spectra produced
// in normal order. X[k] = E[k] + W16^k O[k], X[k+8] = E[k] - W16^k O[k],
// where E and O are the 8-point FFTs of the even and odd samples.
//
// Data path (multipath delay commutator, two paths P and Q):
//   P1/Q1  rsr_split   stream A / B -> evens (natural), then odds (bit-reversed)
//   SW1    sw2x2       odds go to P2, evens to Q2; swap for the first N/2
//                      cycles of its period, normal for the second N/2
//   P2     fft8_dit    8-point DIT of the odd samples (A and B alternate),
//                      followed by tw16_mul (W16^k) and scheduling registers
//   Q2     fft8_dif    8-point DIF of the even samples, scheduling registers
//   SW2    sw2x2       routes A's results to P3 and B's to Q3; always in the
//                      opposite mode to SW1
//   P3/Q3  bf_final    bit-reverses E, butterflies, normal-order output
// Both 8-point FFTs hold one SMSS unit (smss_w8) each, where a single
// 1/sqrt(2) shift-add multiplier serves the adder and subtractor outputs.
//
// Interface: after reset release the first cycle carries sample x[0] of frame
// 0 of both streams, and every following cycle the next sample (continuous
// streaming, no handshake). out_a carries X_A[out_a_idx] when out_a_valid;
// likewise for B. Timing: X_A[0] of frame 0 leaves LAT_A = 42 cycles after
// x_A[0] entered, X_B[0] LAT_B = 50 cycles after x_B[0]; then one output per
// cycle per stream, frames back to back. Outputs have DW = IW + 6 bits and
// are unscaled (full DFT sum). N is fixed at 16 by the 8-point stages.
module fft16_smss_top
  import fft_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cin_t                 in_a,
  input  cin_t                 in_b,
  output cplx_t                out_a,
  output logic [$clog2(N)-1:0] out_a_idx,
  output logic                 out_a_valid,
  output cplx_t                out_b,
  output logic [$clog2(N)-1:0] out_b_idx,
  output logic                 out_b_valid
);
  localparam int LN     = $clog2(N);
  localparam int FFT8_L = 12;                 // latency of fft8_dit / fft8_dif
  localparam int TW_L   = 1;                  // latency of tw16_mul
  // Both middle paths are padded to MID_L, chosen so that MID_L + 1 (the SW1
  // register) is N/2 modulo N: then SW2 is always in the opposite mode to SW1.
  localparam int MID_L  = 23;
  localparam int PAD_P  = MID_L - FFT8_L - TW_L;
  localparam int PAD_Q  = MID_L - FFT8_L;
  localparam int LAT_A  = N / 2 + 1 + MID_L + 1 + N / 2 + 1;
  localparam int LAT_B  = LAT_A + N / 2;

  if (N != 16) begin : g_chk
    $error("fft16_smss_top: only N = 16 is supported");
  end

  // ---- frame position of the inputs and output-valid timing -------------
  logic [LN-1:0] tc;
  logic [6:0]    cyc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc  <= '0;
      cyc <= '0;
    end else begin
      tc  <= tc + 1'b1;
      if (int'(cyc) < LAT_B) cyc <= cyc + 1'b1;
    end
  end
  assign out_a_valid = (int'(cyc) >= LAT_A);
  assign out_b_valid = (int'(cyc) >= LAT_B);

  // ---- P1 / Q1: reordering shift registers --------------------------------
  cplx_t xa, xb, p1_y, q1_y;
  logic [LN-1:0] p1_ph, q1_ph;
  always_comb begin
    xa.re = DW'(in_a.re);  xa.im = DW'(in_a.im);
    xb.re = DW'(in_b.re);  xb.im = DW'(in_b.im);
  end

  rsr_split #(.N(N), .LAT(N / 2)) u_p1 (.clk, .rst_n, .x(xa), .ph_i(tc), .y(p1_y), .ph_o(p1_ph));
  rsr_split #(.N(N), .LAT(N))     u_q1 (.clk, .rst_n, .x(xb), .ph_i(tc), .y(q1_y), .ph_o(q1_ph));

  // ---- SW1: swap while P1 emits its evens ----------------------------------
  logic sw1_swap;
  cplx_t p2_in, q2_in;
  logic [LN-1:0] s1_ph;
  assign sw1_swap = !p1_ph[LN-1];
  sw2x2 #(.PW(LN), .RST_PH(N / 2 - 1)) u_sw1 (.clk, .rst_n, .swap(sw1_swap), .in_p(p1_y), .in_q(q1_y),
                          .ph_i(p1_ph), .out_p(p2_in), .out_q(q2_in), .ph_o(s1_ph));

  // ---- P2: DIT of odd samples, W16 twiddle, padding -------------------------
  cplx_t dit_y, tw_y, p2_out;
  logic [2:0] dit_ph;
  assign dit_ph = s1_ph[2:0] - 3'(FFT8_L);
  fft8_dit u_p2 (.clk, .rst_n, .x(p2_in), .ph_i(s1_ph[2:0]), .y(dit_y));
  tw16_mul u_tw (.clk, .rst_n, .x(dit_y), .k(dit_ph), .y(tw_y));
  delay_line #(.LEN(PAD_P)) u_pad_p (.clk, .rst_n, .d(tw_y), .q(p2_out));

  // ---- Q2: DIF of even samples, padding ------------------------------------
  cplx_t dif_y, q2_out;
  fft8_dif u_q2 (.clk, .rst_n, .x(q2_in), .ph_i(s1_ph[2:0]), .y(dif_y));
  delay_line #(.LEN(PAD_Q)) u_pad_q (.clk, .rst_n, .d(dif_y), .q(q2_out));

  // ---- SW2: swap while the DIF carries stream A ----------------------------
  logic [LN-1:0] m_ph, s2_ph;
  logic sw2_swap;
  cplx_t p3_in, q3_in;
  assign m_ph     = s1_ph - LN'(MID_L);
  assign sw2_swap = !m_ph[LN-1];
  sw2x2 #(.PW(LN), .RST_PH(N - 1)) u_sw2 (.clk, .rst_n, .swap(sw2_swap), .in_p(p2_out), .in_q(q2_out),
                          .ph_i(m_ph), .out_p(p3_in), .out_q(q3_in), .ph_o(s2_ph));

  // ---- P3 / Q3: final butterflies -------------------------------------------
  bf_final #(.N(N)) u_p3 (.clk, .rst_n, .x(p3_in), .q(s2_ph),
                          .y(out_a), .idx_o(out_a_idx));
  bf_final #(.N(N)) u_q3 (.clk, .rst_n, .x(q3_in), .q(s2_ph ^ LN'(N / 2)),
                          .y(out_b), .idx_o(out_b_idx));

  // Q1 runs exactly N/2 positions behind P1.
  a_q1_offset: assert property (@(posedge clk) disable iff (!rst_n) q1_ph == (p1_ph ^ LN'(N / 2)))
    else $error("fft16_smss_top: Q1 out of step with P1");
  // SW1 and SW2 always work in opposite modes.
  a_sw_modes: assert property (@(posedge clk) disable iff (!rst_n) sw1_swap != sw2_swap)
    else $error("fft16_smss_top: SW1 and SW2 in the same mode");
endmodule
