// tb_fp64: checks fp64_mul against the simulator's own double-precision
// multiplication on random normal operands (exponents kept near the middle of
// the range so no result under- or overflows), plus zero operands.
module tb_fp64;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;
  fp64_mul dut (.a, .b, .y);

  function automatic logic [63:0] rnd_fp();
    return {1'($urandom), 11'(900 + $urandom % 240), $urandom, 20'($urandom)};
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int i = 0; i < 20000; i++) begin
      a = rnd_fp();
      b = (i % 97 == 0) ? 64'h0 : rnd_fp();
      if (i % 5 == 0) b = $realtobits(real'($urandom % 9));
      #1;
      e = $realtobits($bitstoreal(a) * $bitstoreal(b));
      checks++;
      if (y !== e && !(y[62:0] == 0 && e[62:0] == 0)) begin
        failures++;
        if (failures < 10) $display("mul %h * %h = %h, expected %h", a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
