// tb_selective_queue: writes fibers of random length into one selective queue
// and takes them out in a random order (not only the head), as the
// synchronization scheduler may. Checks that candidates appear oldest first,
// only once complete, that every fiber reads back intact by (slot, index),
// that back-pressure appears when descriptors or element space run out, and
// that space comes back after frees.
module tb_selective_queue;
  import aces_pkg::*;
  localparam int DEPTH = 32, NFIB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, in_first = 0, in_last = 0;
  elem_t in_elem = '0;
  logic [31:0] in_row = 0;
  logic [NFIB-1:0] cand_valid;
  logic [NFIB-1:0][31:0] cand_row;
  logic [NFIB-1:0][1:0] cand_slot;
  logic claim_valid = 0, free_valid = 0, empty;
  logic [1:0] claim_slot = 0, rd_slot = 0, free_slot = 0;
  logic [15:0] rd_idx = 0, rd_len;
  elem_t rd_elem;
  selective_queue #(.DEPTH(DEPTH), .NFIB(NFIB)) dut (.*);

  int fid_of_row [int];
  int len_of [int];
  int nwritten = 0, nread = 0, stalls = 0;
  int wr_fib = 0, wr_pos = 0, wr_len = 5;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: fiber f has row 1000+f, element j has coord j and value f*100+j.
  // in_ready depends on the queue state only, so it is sampled at the
  // falling edge, half a cycle before the push it decides.
  always @(negedge clk) begin
    in_valid = 0;
    if (rst_n && wr_fib < 200) begin
      in_valid = 1;
      in_row   = 32'(1000 + wr_fib);
      in_first = (wr_pos == 0);
      in_last  = (wr_pos == wr_len - 1);
      in_elem  = '{coord: 32'(wr_pos), val: 64'(wr_fib * 100 + wr_pos)};
      #1;
      if (!in_ready) stalls++;
      else if (wr_pos == wr_len - 1) begin
        len_of[wr_fib] = wr_len;
        wr_fib++; wr_pos = 0; wr_len = 1 + int'($urandom % 12);
      end else wr_pos++;
    end
  end

  initial begin
    int last_age;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nread < 200) begin
      @(negedge clk);
      // candidates must be complete fibers in age order
      last_age = -1;
      for (int p = 0; p < NFIB; p++) if (cand_valid[p]) begin
        int f;
        f = int'(cand_row[p]) - 1000;
        checks++;
        if (f <= last_age || !len_of.exists(f)) begin failures++; $display("candidate order/complete error"); end
        last_age = f;
      end
      if (cand_valid != 0) begin
        int p, f, s;
        do p = int'($urandom % NFIB); while (!cand_valid[p]);
        s = int'(cand_slot[p]);
        f = int'(cand_row[p]) - 1000;
        claim_valid = 1; claim_slot = 2'(s); rd_slot = 2'(s);
        @(negedge clk); claim_valid = 0;
        checks++;
        if (int'(rd_len) != len_of[f]) begin failures++; $display("fiber %0d len %0d", f, rd_len); end
        for (int j = 0; j < len_of[f]; j++) begin
          rd_idx = 16'(j); #1;
          checks++;
          if (rd_elem.coord != 32'(j) || rd_elem.val != 64'(f * 100 + j)) begin
            failures++; $display("fiber %0d elem %0d wrong", f, j);
          end
        end
        @(negedge clk);
        free_valid = 1; free_slot = 2'(s);
        @(negedge clk); free_valid = 0;
        nread++;
        repeat (int'($urandom % 6)) @(negedge clk);
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (!empty) begin failures++; $display("queue not empty at end"); end
    checks++;
    if (stalls == 0) begin failures++; $display("back-pressure never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
