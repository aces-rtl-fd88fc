// tb_mpe: drives one MPE with scalar-vector tasks against a behavioural cache
// port that answers hit, miss (followed later by a fill notice) or NACK at
// random. Checks every product a*B(k,j) and its coordinate, the fiber
// markers, the pure-fiber flag (set only when every line hit first time) and,
// for all-hit fibers, the timing of two cycles per line plus one per element.
module tb_mpe;
  import aces_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic task_valid = 0, task_ready;
  logic [31:0] task_row = 0, task_line0 = 0;
  logic [63:0] task_aval = 0;
  logic [15:0] task_len = 0, task_rd = 0;
  logic req_valid, req_ready, resp_valid = 0, fill_notify = 0;
  logic [31:0] req_line;
  logic [15:0] req_rd, req_fd;
  cresp_t resp_status = CR_HIT;
  line_t resp_data = '0;
  logic out_valid, out_ready, out_first, out_last, busy, pure_fiber, miss_event;
  elem_t out_elem;
  logic [31:0] out_row;

  mpe dut (.*);

  // B "line" content: element e of line L has coordinate 4L+e and value L+e+1
  function automatic line_t line_of(logic [31:0] l);
    line_t d;
    for (int e = 0; e < LINE_ELEMS; e++)
      d[e] = '{coord: 32'(l * 4 + 32'(e)), val: $realtobits(real'(l + 32'(e) + 1))};
    return d;
  endfunction

  int mode = 0;              // 0: always hit, 1: random
  int fill_wait = -1;
  logic [31:0] pend_line;
  bit any_non_hit;
  assign req_ready = 1'b1;
  always @(posedge clk) begin
    resp_valid  <= 0;
    fill_notify <= 0;
    if (fill_wait == 0) fill_notify <= 1;
    if (fill_wait >= 0) fill_wait--;
    if (req_valid && req_ready) begin
      int r;
      r = (mode == 0) ? 0 : int'($urandom % 4);
      resp_valid <= 1;
      resp_data  <= line_of(req_line);
      checks++;
      if (req_fd != 16'((task_len + 3) / 4)) begin failures++; $display("fd %0d", req_fd); end
      if (r == 1) begin resp_status <= CR_MISS; fill_wait = 5 + int'($urandom % 10); any_non_hit = 1; end
      else if (r == 2) begin resp_status <= CR_NACK; any_non_hit = 1; end
      else resp_status <= CR_HIT;
    end
  end

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int len, got, t0, t1, lines;
      real a;
      bit saw_pure;
      mode = (t < 20) ? 0 : 1;
      len = 1 + int'($urandom % 13);
      a = real'(1 + int'($urandom % 9)) * 0.5;
      any_non_hit = 0;
      saw_pure = 0;
      @(negedge clk);
      task_valid = 1; task_row = 32'(t); task_aval = $realtobits(a);
      task_line0 = 32'(100 + t * 8); task_len = 16'(len); task_rd = 16'(t);
      out_ready = 1;
      @(posedge clk); t0 = $time; #1 task_valid = 0;
      got = 0;
      while (got < len) begin
        @(posedge clk);
        if (pure_fiber) saw_pure = 1;
        if (out_valid && out_ready) begin
          int l, e;
          l = 100 + t * 8 + got / 4; e = got % 4;
          checks++;
          if (out_elem.coord != 32'(l * 4 + e) ||
              $bitstoreal(out_elem.val) != a * real'(l + e + 1) ||
              out_row != 32'(t) || out_first != (got == 0) || out_last != (got == len - 1)) begin
            failures++;
            $display("task %0d elem %0d: coord %0d val %f", t, got, out_elem.coord, $bitstoreal(out_elem.val));
          end
          got++;
        end
      end
      t1 = $time;
      @(posedge clk); if (pure_fiber) saw_pure = 1;
      checks++;
      if (saw_pure != !any_non_hit) begin failures++; $display("task %0d pure flag %0d", t, saw_pure); end
      lines = (len + 3) / 4;
      if (mode == 0) begin
        checks++;
        if ((t1 - t0) / 10 != 2 * lines + len) begin
          failures++;
          $display("task %0d took %0d cycles, expected %0d", t, (t1 - t0) / 10, 2 * lines + len);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
