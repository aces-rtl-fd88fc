// tb_fp64_add: checks fp64_add against the simulator's double-precision
// addition on random operands of both signs, with exponent differences from 0
// to beyond the significand width (alignment, cancellation, carry-out), plus
// zero operands and exact cancellation.
module tb_fp64_add;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;
  fp64_add dut (.a, .b, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int i = 0; i < 30000; i++) begin
      a = {1'($urandom), 11'(1000 + $urandom % 40), $urandom, 20'($urandom)};
      b = {1'($urandom), 11'(int'(a[62:52]) - 2 + int'($urandom % 64) - 30), $urandom, 20'($urandom)};
      if (i % 7 == 0) b = {~a[63], a[62:0]};                 // exact cancellation
      if (i % 11 == 0) b = {~a[63], a[62:8], 8'($urandom)};  // heavy cancellation
      if (i % 101 == 0) b = 64'h0;
      if (i % 13 == 0) begin a = $realtobits(real'($urandom % 50)); b = $realtobits(real'($urandom % 50)); end
      #1;
      e = $realtobits($bitstoreal(a) + $bitstoreal(b));
      checks++;
      if (y !== e && !(y[62:0] == 0 && e[62:0] == 0)) begin
        failures++;
        if (failures < 10) $display("add %h + %h = %h, expected %h", a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
