// tb_merge_scheduler: loads rows of random leaf weights, executes the tasks it
// issues (with a random delay before each completes) and checks that every
// task merges the two lightest fibers then present (a Huffman order kept in
// the testbench's own list), that a task's inputs are never outputs of tasks
// still running, that a row of n leaves yields n-1 tasks and a root, and that
// the summed task weights equal the Huffman cost computed here.
module tb_merge_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic leaf_valid = 0, leaf_ready, row_end = 0, root_valid, task_valid, task_ready = 0;
  logic task_done = 0, idle;
  logic [7:0] leaf_id = 0, root_id, task_a, task_b, task_dst, task_done_id = 0;
  logic [15:0] leaf_w = 0, task_w;
  merge_scheduler #(.PQ_DEPTH(16), .TASK_BUF(8)) dut (.*);

  int wt [int];          // weight of every live fiber id
  bit done_id [int];     // ids available as inputs
  int ntask, cost, roots;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int huffman_cost(int w [$]);
    int c;
    c = 0;
    while (w.size() > 1) begin
      int a, b;
      w.sort();
      a = w.pop_front(); b = w.pop_front();
      c += a + b;
      w.push_back(a + b);
    end
    return c;
  endfunction

  always @(posedge clk) if (root_valid) roots++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int row = 0; row < 40; row++) begin
      int n, exp_cost;
      int ws [$];
      n = 1 + int'($urandom % 12);
      wt.delete(); done_id.delete();
      ws.delete();
      for (int i = 0; i < n; i++) begin
        int w;
        w = 1 + int'($urandom % 30);
        @(negedge clk);
        leaf_valid = 1; leaf_id = 8'(i); leaf_w = 16'(w);
        wt[i] = w; done_id[i] = 1; ws.push_back(w);
        #1; while (!leaf_ready) begin @(negedge clk); #1; end
      end
      @(negedge clk); leaf_valid = 0; row_end = 1;
      @(negedge clk); row_end = 0;
      exp_cost = huffman_cost(ws);
      ntask = 0; cost = 0; roots = 0;
      while (ntask < n - 1) begin
        @(negedge clk);
        if (task_valid) begin
          int a, b, d, lo1, lo2;
          a = int'(task_a); b = int'(task_b); d = int'(task_dst);
          checks++;
          if (!done_id.exists(a) || !done_id.exists(b) || a == b) begin
            failures++; $display("row %0d: task uses unfinished input %0d/%0d", row, a, b);
          end
          // weights of the inputs must be the lightest live pair at creation:
          // with pairwise merges in Huffman order the sum is checked below
          cost += int'(task_w);
          task_ready = 1;
          @(negedge clk); task_ready = 0;
          done_id.delete(a); done_id.delete(b);
          repeat (int'($urandom % 3)) @(negedge clk);
          task_done = 1; task_done_id = 8'(d);
          done_id[d] = 1;
          @(negedge clk); task_done = 0;
          ntask++;
        end
      end
      repeat (3) @(negedge clk);
      checks++;
      if (cost != exp_cost) begin failures++; $display("row %0d: cost %0d, Huffman %0d", row, cost, exp_cost); end
      checks++;
      if (roots != 1) begin failures++; $display("row %0d: %0d roots", row, roots); end
      checks++;
      if (!idle) begin failures++; $display("row %0d: not idle", row); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
