// tb_mul_0707: checks the shift-add 1/sqrt(2) multiplier. For random and edge
// operands the output must equal x + u with t = floor(x/64) - floor(x/4),
// u = t + floor(t/4) (the bit-exact value of the factorised constant,
// worked out here with real arithmetic), and must lie within a few LSB plus
// 1.1e-4 |x| of x / sqrt(2).
module tb_mul_0707;
  localparam int W = 22;
  logic signed [W-1:0] x, y;
  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction


  mul_0707 #(.W(W)) dut (.x(x), .y(y));

  function automatic longint fl(input real v);
    return longint'($floor(v));
  endfunction

  task automatic check_one(input longint xv);
    longint t, u, e;
    real    r;
    x = W'(xv);
    #1;
    t = fl(real'(xv) / 64.0) - fl(real'(xv) / 4.0);
    u = t + fl(real'(t) / 4.0);
    e = xv + u;
    r = real'(xv) / $sqrt(2.0);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", xv, y, e);
    end
    checks++;
    if (rabs(real'(y) - r) > 3.0 + 1.1e-4 * rabs(real'(xv))) begin
      failures++;
      $display("FAIL x=%0d y=%0d far from x/sqrt2=%f", xv, y, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0); check_one(1); check_one(-1); check_one(64); check_one(-64);
    check_one(1 <<< 20); check_one(-(1 <<< 20)); check_one((1 <<< 21) - 1);
    check_one(-(1 <<< 21));
    for (int i = 0; i < 2000; i++) begin
      longint v;
      v = longint'($signed($urandom)) >>> 10;   // full 22-bit range
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
