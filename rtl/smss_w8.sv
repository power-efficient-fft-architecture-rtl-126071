// smss_w8: twiddle rotation of a sample stream by W8^k = exp(-j*2*pi*k/8),
// k = 0..3, built around ONE shared 1/sqrt(2) multiplier (shared multiplier
// scheduling scheme, SMSS). Rotating a + jb by W8^1 or W8^3 needs the sum
// s = a + b and the difference d = b - a, each scaled by 0.707:
//   W8^1: (0.707 s) + j(0.707 d)      W8^3: (0.707 d) - j(0.707 s)
// W8^0 passes the sample and W8^2 = -j only swaps and negates. Instead of two
// constant multipliers, a multiplexer feeds the adder output to the shared
// mul_0707 in the cycle the sample arrives and the held subtractor output in
// the next cycle; the first product waits in a register. That halves the
// multiplier count, as the source proposes for its PE2 stage; the exact
// two-cycle schedule is this design's own reading of it.
// Timing: one sample per cycle in, fixed latency of 2 cycles. Rule: two
// consecutive samples may not both need the multiplier (odd k); in an
// 8-point radix-2 pipeline the odd twiddles are never adjacent, and an
// assertion watches the rule.
module smss_w8
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      x,
  input  logic [1:0] k,      // twiddle exponent for the sample on x
  output cplx_t      y
);
  localparam int SW = DW + 1;            // one guard bit for a +/- b

  logic signed [SW-1:0] s_in, d_in, d_hold, m_in, m_out, p_s;
  logic                 pend;            // multiplier owed to the held difference
  cplx_t                x1;
  logic [1:0]           k1;

  always_comb begin
    s_in = SW'(x.re) + SW'(x.im);
    d_in = SW'(x.im) - SW'(x.re);
    m_in = pend ? d_hold : s_in;         // the SMSS multiplexer
  end

  mul_0707 #(.W(SW)) u_mul (.x(m_in), .y(m_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1     <= '0;
      k1     <= '0;
      p_s    <= '0;
      d_hold <= '0;
      pend   <= 1'b0;
      y      <= '0;
    end else begin
      // first cycle: register the sample and the scaled sum
      x1     <= x;
      k1     <= k;
      p_s    <= m_out;
      d_hold <= d_in;
      pend   <= k[0];
      // second cycle: scaled difference comes out of the shared multiplier
      unique case (k1)
        2'd0: y <= x1;
        2'd1: begin y.re <= DW'(p_s);  y.im <= DW'(m_out);  end
        2'd2: begin y.re <= x1.im;     y.im <= -x1.re;      end
        2'd3: begin y.re <= DW'(m_out); y.im <= -DW'(p_s);  end
      endcase
    end
  end

  // The shared multiplier is busy for two cycles per odd twiddle.
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) pend |-> !k[0])
    else $error("smss_w8: odd twiddles on consecutive samples");
endmodule
