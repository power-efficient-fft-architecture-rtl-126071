// tb_bf_final: per 16-cycle frame sends 8 random E values in bit-reversed
// order (q = 0..7) followed by 8 random T values in natural order
// (q = 8..15). Output idx j must appear 9 + j cycles after the frame's first
// E sample, in order 0..15, and equal E[j] + T[j] (j < 8) or
// E[j-8] - T[j-8] (j >= 8) exactly.
module tb_bf_final;
  import fft_pkg::*;
  localparam int NF = 60;
  logic clk = 0, rst_n = 0;
  cplx_t x, y;
  logic [3:0] q, idx_o;
  int checks = 0, failures = 0;
  int er [NF*8], ei [NF*8], tr [NF*8], ti [NF*8];

  bf_final #(.N(16)) dut (.*);

  always #5 clk = ~clk;

  function automatic int br3(input int v);
    return ((v & 1) << 2) | (v & 2) | ((v >> 2) & 1);
  endfunction

  initial begin
    repeat (NF * 16 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NF * 8; i++) begin
      er[i] = $signed($urandom) >>> 13; ei[i] = $signed($urandom) >>> 13;
      tr[i] = $signed($urandom) >>> 13; ti[i] = $signed($urandom) >>> 13;
    end
    x = '0; q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NF * 16 + 9; t++) begin
      @(negedge clk);
      if (t >= 9) begin : chk
        int f, j, k, wr, wi;
        f = (t - 9) / 16; j = (t - 9) % 16; k = j % 8;
        wr = (j < 8) ? er[f*8+k] + tr[f*8+k] : er[f*8+k] - tr[f*8+k];
        wi = (j < 8) ? ei[f*8+k] + ti[f*8+k] : ei[f*8+k] - ti[f*8+k];
        checks++;
        if (int'(y.re) != wr || int'(y.im) != wi || int'(idx_o) != j) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d X[%0d]: got (%0d,%0d) idx %0d want (%0d,%0d)",
                                      f, j, y.re, y.im, idx_o, wr, wi);
        end
      end
      if (t < NF * 16) begin : drv
        int f, p;
        f = t / 16; p = t % 16;
        if (p < 8) begin x.re = DW'(er[f*8+br3(p)]); x.im = DW'(ei[f*8+br3(p)]); end
        else       begin x.re = DW'(tr[f*8+p-8]);    x.im = DW'(ti[f*8+p-8]);    end
      end else x = '0;
      q = 4'(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
