// rsr_split: the delay commutator in front of SW1 (stages P1 and Q1). It takes
// one N-point frame of a stream, one sample per cycle in natural order, and
// re-emits it one sample per cycle as: the N/2 even samples x[0], x[2], ...
// in natural order, then the N/2 odd samples in bit-reversed order
// (x[2*bitrev(i)+1], i = 0..N/2-1), which is what the DIF and DIT halves
// expect. The samples are held in a chain of reordering shift registers; a
// multiplexer picks, each cycle, the register whose age matches the sample
// due. ph_i is the frame position of x; output j of a frame appears LAT
// cycles after input 0 of that frame, and ph_o is j. LAT >= N/2 is needed;
// the second stream uses LAT = N so that its halves arrive at the switch when
// the first stream's opposite halves do. The register-chain form follows the
// source; depth, tap choice and latency are this design's.
module rsr_split
  import fft_pkg::*;
#(
  parameter int N   = 16,
  parameter int LAT = N / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cplx_t                x,
  input  logic [$clog2(N)-1:0] ph_i,
  output cplx_t                y,
  output logic [$clog2(N)-1:0] ph_o
);
  localparam int LN    = $clog2(N);
  // Largest j - n over the odd half, j = N/2 + i, n = 2*bitrev(i) + 1.
  function automatic int max_lead();
    int m;
    m = 0;
    for (int i = 0; i < N / 2; i++)
      if (N / 2 + i - (2 * int'(bitrev(i, LN - 1)) + 1) > m)
        m = N / 2 + i - (2 * int'(bitrev(i, LN - 1)) + 1);
    return m;
  endfunction
  localparam int DEPTH = LAT - 1 + max_lead();   // oldest sample ever needed

  if (LAT < N / 2) begin : g_chk
    $error("rsr_split: LAT must be at least N/2");
  end

  cplx_t sr [DEPTH];
  logic [LN-1:0] jn;
  int            n, age;
  cplx_t         sel;

  always_comb begin
    jn = ph_i + LN'(1) - LN'(LAT);          // output index due next cycle
    if (int'(jn) < N / 2) n = 2 * int'(jn);
    else                  n = 2 * int'(bitrev(int'(jn) - N / 2, LN - 1)) + 1;
    age = LAT - 1 + int'(jn) - n;
    sel = (age <= 0) ? x : sr[age-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      y    <= '0;
      ph_o <= LN'(N - LAT % N);         // position due in the first cycle
    end else begin
      sr[0] <= x;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      y    <= sel;
      ph_o <= jn;
    end
  end
endmodule
