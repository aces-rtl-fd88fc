// tb_global_buffer: a 16-entry buffer fed with random A elements whose
// columns come from a small set, so that repeats are frequent, and drained at
// random. A reference queue gives the expected head and the expected RD: the
// distance to the next buffered entry with the same column, or RD_FAR. Also
// checks order, full/empty flags and that no entry is lost.
module tb_global_buffer;
  import aces_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0, empty;
  a_elem_t push_elem = '0, pop_elem;
  logic [15:0] pop_rd;
  global_buffer #(.DEPTH(D)) dut (.*);

  a_elem_t q [$];
  int pushed = 0, popped = 0;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int exp_rd;
      @(negedge clk);
      push_valid = ($urandom % 2) == 0;
      push_elem  = '{row: $urandom % 32, col: $urandom % 5, val: {$urandom, $urandom}};
      pop_ready  = ($urandom % 3) != 0;
      #1;
      checks += 3;
      if (push_ready != (q.size() < D)) begin failures++; $display("push_ready wrong"); end
      if (pop_valid != (q.size() > 0) || empty != (q.size() == 0)) begin failures++; $display("pop_valid wrong"); end
      exp_rd = 1024;
      if (q.size() > 0) begin
        for (int k = q.size() - 1; k >= 1; k--) if (q[k].col == q[0].col) exp_rd = k;
        checks += 2;
        if (pop_elem != q[0]) begin failures++; $display("head wrong"); end
        if (int'(pop_rd) != exp_rd) begin failures++; $display("rd %0d exp %0d", pop_rd, exp_rd); end
      end
      @(posedge clk);
      if (pop_ready && q.size() > 0) begin void'(q.pop_front()); popped++; end
      if (push_valid && push_ready) begin q.push_back(push_elem); pushed++; end
    end
    checks++;
    if (pushed - popped != q.size() || popped < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
