// tb_sw2x2: drives random samples and random modes into the 2x2 switch and
// checks, one cycle later, that normal mode kept the paths and swap mode
// exchanged them, together with the position tag.
module tb_sw2x2;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, swap = 0;
  cplx_t in_p, in_q, out_p, out_q;
  logic [3:0] ph_i = 0, ph_o;
  int checks = 0, failures = 0;
  cplx_t ep, eq;
  logic [3:0] eph;
  logic have = 0;

  sw2x2 #(.PW(4), .RST_PH(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_p = '0; in_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (out_p !== ep || out_q !== eq || ph_o !== eph) begin
          failures++;
          $display("FAIL cycle %0d", i);
        end
      end
      in_p = cplx_t'({$urandom, $urandom});
      in_q = cplx_t'({$urandom, $urandom});
      swap = $urandom % 2;
      ph_i = 4'($urandom);
      ep   = swap ? in_q : in_p;
      eq   = swap ? in_p : in_q;
      eph  = ph_i;
      have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
