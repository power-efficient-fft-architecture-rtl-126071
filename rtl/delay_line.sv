// delay_line: LEN-cycle shift register for complex samples ("scheduling
// registers"). Used to equalise the latencies of the DIT and DIF paths.
// LEN = 0 is a plain wire.
module delay_line
  import fft_pkg::*;
#(
  parameter int LEN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t d,
  output cplx_t q
);
  if (LEN == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    cplx_t sr [LEN];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LEN; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[LEN-1];
  end
endmodule
