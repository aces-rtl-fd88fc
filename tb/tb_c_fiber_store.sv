// tb_c_fiber_store: 4 ports, 8 row slots, 16 elements per copy. Each step a
// random port rewrites a random row: it reads the current copy, writes a new
// fiber of random length into the other copy, and commits. A reference model
// keeps the expected current fiber per row. Checks that reads before the
// commit still see the old copy, that after the commit all ports and the drain
// port see the new fiber and length, that clear empties every row, and that a
// commit length above the capacity raises overflow.
module tb_c_fiber_store;
  import aces_pkg::*;
  localparam int NP = 4, R = 8, ML = 16;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NP-1:0][2:0] p_row = '0;
  logic [NP-1:0][15:0] p_rd_idx = '0, p_len, p_wr_idx = '0, p_commit_len = '0;
  elem_t [NP-1:0] p_rd_elem, p_wr_elem = '0;
  logic [NP-1:0] p_wr = '0, p_commit = '0;
  logic [2:0] d_row = 0;
  logic [15:0] d_idx = 0, d_len;
  elem_t d_elem;
  logic overflow;
  c_fiber_store #(.NPORT(NP), .ROWS(R), .MAXLEN(ML)) dut (.*);

  elem_t ref_f [R][$];

  task automatic check_row(int r);
    for (int p = 0; p < NP; p++) p_row[p] = 3'(r);
    d_row = 3'(r);
    #1;
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (int'(p_len[p]) != ref_f[r].size()) begin failures++; $display("row %0d port %0d len %0d exp %0d", r, p, p_len[p], ref_f[r].size()); end
    end
    checks++;
    if (int'(d_len) != ref_f[r].size()) failures++;
    for (int i = 0; i < ref_f[r].size(); i++) begin
      int p;
      p = int'($urandom % NP);
      p_rd_idx[p] = 16'(i); d_idx = 16'(i);
      #1;
      checks += 2;
      if (p_rd_elem[p] != ref_f[r][i]) begin failures++; $display("row %0d idx %0d wrong", r, i); end
      if (d_elem != ref_f[r][i]) failures++;
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 400; step++) begin
      int p, r, n;
      elem_t nf [$];
      @(negedge clk);
      if (step % 100 == 99) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        for (int k = 0; k < R; k++) ref_f[k].delete();
        for (int k = 0; k < R; k++) check_row(k);
        continue;
      end
      nf.delete();
      p = int'($urandom % NP); r = int'($urandom % R); n = int'($urandom % (ML + 1));
      p_row[p] = 3'(r);
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        nf.push_back('{coord: $urandom, val: {$urandom, $urandom}});
        p_wr[p] = 1; p_wr_idx[p] = 16'(i); p_wr_elem[p] = nf[i];
        // the current copy must be untouched while writing
        if (ref_f[r].size() > 0) begin
          p_rd_idx[p] = 16'(i % ref_f[r].size());
          #1;
          checks++;
          if (p_rd_elem[p] != ref_f[r][i % ref_f[r].size()]) begin failures++; $display("old copy disturbed"); end
        end
      end
      @(negedge clk);
      p_wr[p] = 0;
      p_commit[p] = 1; p_commit_len[p] = 16'(n);
      @(negedge clk);
      p_commit[p] = 0;
      ref_f[r] = nf;
      check_row(r);
    end
    checks++;
    if (overflow) failures++;
    @(negedge clk);
    p_commit[0] = 1; p_commit_len[0] = 16'(ML + 1); p_row[0] = 0;
    @(negedge clk);
    p_commit[0] = 0;
    checks++;
    if (!overflow) begin failures++; $display("overflow not raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
