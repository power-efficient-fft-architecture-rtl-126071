// bf_final: last stage of one stream (P3 or Q3). Per frame it receives, one
// sample per cycle, first the 8 even-half results E[] of the DIF in
// bit-reversed order, then the 8 twiddled odd-half results T[k] = W16^k O[k]
// of the DIT in natural order. The E samples are written into a reordering
// register bank at their bit-reversed address, which undoes the DIF's
// bit-reversal. As each T[k] arrives the radix-2 butterfly forms
//   X[k] = E[k] + T[k]   (sent out at once)
//   X[k+8] = E[k] - T[k] (held 8 cycles in scheduling registers)
// so the 16-point spectrum leaves in normal order X[0..15], one per cycle,
// frames back to back. q is the position of x in this 16-cycle frame
// (0..7 E, 8..15 T). Output is registered; idx_o is the spectral index of y.
// X[k] leaves 9 + k cycles after the frame's first E sample.
module bf_final
  import fft_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cplx_t                x,
  input  logic [$clog2(N)-1:0] q,
  output cplx_t                y,
  output logic [$clog2(N)-1:0] idx_o
);
  localparam int H  = N / 2;
  localparam int LN = $clog2(N);

  cplx_t ebank [H];     // E[] in natural order after bit reversal
  cplx_t dsr   [H];     // X[k + N/2] waiting for their turn
  logic  second;        // q in the T half
  logic [LN-2:0] kk;

  always_comb begin
    second = q[LN-1];
    kk     = q[LN-2:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < H; i++) begin
        ebank[i] <= '0;
        dsr[i]   <= '0;
      end
      y     <= '0;
      idx_o <= '0;
    end else begin
      for (int i = 1; i < H; i++) dsr[i] <= dsr[i-1];
      if (!second) begin
        ebank[bitrev(int'(kk), LN - 1)] <= x;
        dsr[0] <= '0;
        y      <= dsr[H-1];
        idx_o  <= {1'b1, kk};
      end else begin
        dsr[0] <= c_sub(ebank[kk], x);
        y      <= c_add(ebank[kk], x);
        idx_o  <= {1'b0, kk};
      end
    end
  end
endmodule
