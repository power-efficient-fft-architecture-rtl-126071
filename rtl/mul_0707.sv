// mul_0707: bit-parallel multiplication by 1/sqrt(2) with shifts and adds only.
// The constant is factored as 1 + (1 + 2^-2)(2^-6 - 2^-2) = 0.70703125, which
// costs three additions and three fixed (wired) shifts:
//   t = (x >>> 6) - (x >>> 2);  u = t + (t >>> 2);  y = x + u
// This factorisation is the one the source gives. The shifts are arithmetic
// and truncate; no extra guard bits are kept (this design's choice). Purely
// combinational: y follows x in the same cycle. W is the operand width.
module mul_0707 #(
  parameter int W = 22
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] t, u;
  always_comb begin
    t = (x >>> 6) - (x >>> 2);
    u = t + (t >>> 2);
    y = x + u;
  end
endmodule
