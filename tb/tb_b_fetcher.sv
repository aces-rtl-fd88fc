// tb_b_fetcher: 4 MPEs whose ready lines toggle at random, a row-information
// table model with one-cycle reads, and a stream of A elements. Checks that
// each task carries the element's row, value and RD, the line and length of
// row col of B from the table, that it goes to exactly one MPE, the
// lowest-numbered ready one, and that tasks keep the order of the stream.
module tb_b_fetcher;
  import aces_pkg::*;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_valid = 0, a_ready, binfo_en, busy;
  a_elem_t a_elem = '0;
  logic [15:0] a_rd = '0, binfo_len = '0, task_len, task_rd;
  logic [31:0] binfo_row, binfo_line0 = '0, task_row, task_line0;
  logic [63:0] task_aval;
  logic [NPE-1:0] mpe_ready = '0, task_valid;
  b_fetcher #(.NPE(NPE)) dut (.*);

  // row info: line0 = 3*k+7, len = k % 11 + 1
  always_ff @(posedge clk) if (binfo_en) begin
    binfo_line0 <= binfo_row * 3 + 7;
    binfo_len   <= 16'(binfo_row % 11 + 1);
  end

  typedef struct { a_elem_t e; logic [15:0] rd; } ex_t;
  ex_t exp_q [$];
  int sent = 0, got = 0;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      if (!a_valid || a_ready) begin
        a_valid = ($urandom % 4) != 0;
        a_elem = '{row: $urandom % 100, col: $urandom % 50, val: {$urandom, $urandom}};
        a_rd = 16'($urandom);
      end
      mpe_ready = NPE'($urandom);
      #1;
      if (task_valid != '0) begin
        ex_t x;
        int low;
        low = -1;
        for (int i = NPE - 1; i >= 0; i--) if (mpe_ready[i]) low = i;
        checks += 3;
        if ($countones(task_valid) != 1) begin failures++; $display("not one-hot"); end
        if (low < 0 || !task_valid[low]) begin failures++; $display("not lowest ready"); end
        x = exp_q.pop_front();
        if (task_row != x.e.row || task_aval != x.e.val || task_rd != x.rd ||
            task_line0 != x.e.col * 3 + 7 || task_len != 16'(x.e.col % 11 + 1)) begin
          failures++; $display("task contents wrong");
        end
        got++;
      end
      @(posedge clk);
      if (a_valid && a_ready) begin exp_q.push_back('{a_elem, a_rd}); sent++; end
      #1;
      if (a_valid && !a_ready) ; // held
    end
    checks++;
    if (got < 1000 || sent - got > 1) begin failures++; $display("sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
