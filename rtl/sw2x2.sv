// sw2x2: the 2x2 path switch used as SW1 and SW2. In normal mode path P feeds
// P and path Q feeds Q; in swap mode P feeds Q and Q feeds P. The mode is
// chosen by the caller every cycle (the top toggles it every N/2 cycles, as
// the source prescribes). The routed samples and their frame position tags
// are registered, so the switch has one cycle of latency. RST_PH lets the
// caller keep the tag consistent with its position counter from reset on.
module sw2x2
  import fft_pkg::*;
#(
  parameter int PW     = 4,       // width of the position tag carried along
  parameter int RST_PH = 0        // tag value held during reset
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          swap,     // 1 = swap mode, 0 = normal mode
  input  cplx_t         in_p,
  input  cplx_t         in_q,
  input  logic [PW-1:0] ph_i,
  output cplx_t         out_p,
  output cplx_t         out_q,
  output logic [PW-1:0] ph_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_p <= '0;
      out_q <= '0;
      ph_o  <= PW'(RST_PH);
    end else begin
      out_p <= swap ? in_q : in_p;
      out_q <= swap ? in_p : in_q;
      ph_o  <= ph_i;
    end
  end
endmodule
