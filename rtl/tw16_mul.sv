// tw16_mul: multiplies the odd-sample spectrum O[k], k = 0..7, by the
// 16-point twiddle W16^k = cos(2*pi*k/16) - j*sin(2*pi*k/16) before the final
// butterflies combine it with the even-sample spectrum. Coefficients are
// round(2^14 * cos) and round(2^14 * sin) (Q1.14), read from a small constant
// table; products are rounded to nearest and shifted back by 14 bits.
// One sample per cycle, k given with the sample, registered output:
// latency 1 cycle. The combining twiddle is needed by the algorithm; where it
// sits (on the DIT output, shared by both streams) is this design's choice.
module tw16_mul
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cplx_t      x,
  input  logic [2:0] k,
  output cplx_t      y
);
  localparam int CW = 16;
  localparam int FR = 14;
  localparam int PW = DW + CW + 1;

  logic signed [CW-1:0] cr, ci;   // W = cr - j*ci
  logic signed [PW-1:0] pre, pim;

  always_comb begin
    unique case (k)
      3'd0: begin cr =  16'sd16384; ci = 16'sd0;     end
      3'd1: begin cr =  16'sd15137; ci = 16'sd6270;  end
      3'd2: begin cr =  16'sd11585; ci = 16'sd11585; end
      3'd3: begin cr =  16'sd6270;  ci = 16'sd15137; end
      3'd4: begin cr =  16'sd0;     ci = 16'sd16384; end
      3'd5: begin cr = -16'sd6270;  ci = 16'sd15137; end
      3'd6: begin cr = -16'sd11585; ci = 16'sd11585; end
      3'd7: begin cr = -16'sd15137; ci = 16'sd6270;  end
    endcase
    // (a + jb)(cr - j ci) = (a cr + b ci) + j(b cr - a ci)
    pre = PW'(x.re) * PW'(cr) + PW'(x.im) * PW'(ci) + PW'(1 << (FR - 1));
    pim = PW'(x.im) * PW'(cr) - PW'(x.re) * PW'(ci) + PW'(1 << (FR - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else begin
      y.re <= DW'(pre >>> FR);
      y.im <= DW'(pim >>> FR);
    end
  end
endmodule
